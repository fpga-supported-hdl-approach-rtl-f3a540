// Self-checking testbench for fp_logic.
//
// For random operand words and every operation code (including unused ones)
// the expected word is built bit by bit from each operation's truth table,
// written as a 4-bit constant indexed by {a_i, b_i}. Combinational block:
// each check waits 1 ns.
module tb_fp_logic;
  import fp_pkg::*;

  logic [31:0] a, b, y;
  fp_op_t      op;
  int          checks = 0, failures = 0;

  fp_logic dut (.a, .b, .op, .y);

  function automatic logic [3:0] truth(input logic [3:0] code);
    case (code)
      4'd4:    return 4'b1000;   // AND
      4'd5:    return 4'b1110;   // OR
      4'd6:    return 4'b0111;   // NAND
      4'd7:    return 4'b0001;   // NOR
      4'd8:    return 4'b0110;   // XOR
      default: return 4'b0000;
    endcase
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e;
    logic [3:0]  t;
    for (int i = 0; i < 3000; i++) begin
      for (int c = 0; c < 16; c++) begin
        a  = $urandom;
        b  = $urandom;
        op = fp_op_t'(c);
        #1;
        t = truth(4'(c));
        for (int k = 0; k < 32; k++) e[k] = t[{a[k], b[k]}];
        checks++;
        if (y !== e) begin
          failures++;
          if (failures <= 10) $display("FAIL op=%0d a=%h b=%h got %h expected %h", c, a, b, y, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
