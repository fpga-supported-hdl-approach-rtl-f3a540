// Self-checking testbench for fp_div (floating point divide).
//
// Applies directed operand pairs (exact results, rounding ties, overflow,
// underflow, special operands) and then random pairs, some with nearly equal
// magnitudes, and compares result word and flags with fp_ref_pkg, a model
// built on the simulator's double-precision arithmetic. The unit is
// combinational: each check waits 1 ns after the inputs change.
module tb_fp_div;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  localparam int N_RANDOM = 20000;

  logic [31:0] a, b;
  fp32_t       y;
  fp_flags_t   flags;
  int          checks = 0, failures = 0;

  fp_div dut (.a(fp32_t'(a)), .b(fp32_t'(b)), .y, .flags);

  task automatic check(input int op, input logic [31:0] ta, input logic [31:0] tb);
    logic [34:0] exp_v;
    a = ta; b = tb;

    #1;
    exp_v = fp_ref(op, ta, tb);
    checks++;
    if ({flags, y} !== exp_v) begin
      failures++;
      if (failures <= 10)
        $display("FAIL op=%0d a=%h b=%h got y=%h flags=%b expected y=%h flags=%b",
                 op, ta, tb, y, flags, exp_v[31:0], exp_v[34:32]);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x;
    check(3, 32'h3F800000, 32'h40400000);   // 1/3
    check(3, 32'h40C00000, 32'h40000000);   // 6/2
    check(3, 32'h3F800000, 32'h00000000);   // divide by zero
    check(3, 32'h00000000, 32'h3F800000);   // zero dividend
    check(3, 32'h00000000, 32'h00000000);   // 0/0
    check(3, 32'h7F7FFFFF, 32'h3E800000);   // overflow
    check(3, 32'h00800000, 32'h40000000);   // underflow
    check(3, 32'h3F800000, 32'h7F800000);   // 1/inf
    check(3, 32'h3F7FFFFF, 32'h3F800001);
    check(3, 32'hC0E00000, 32'h40400000);   // -7/3
    for (int i = 0; i < N_RANDOM; i++) begin
      x = rand_operand();
      check(3, x, rand_operand());
      check(3, x, near_operand(x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
