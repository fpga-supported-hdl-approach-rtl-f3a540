// Self-checking testbench for fp_mul (floating point multiply).
//
// Applies directed operand pairs (exact results, rounding ties, overflow,
// underflow, special operands) and then random pairs, some with nearly equal
// magnitudes, and compares result word and flags with fp_ref_pkg, a model
// built on the simulator's double-precision arithmetic. The unit is
// combinational: each check waits 1 ns after the inputs change.
module tb_fp_mul;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  localparam int N_RANDOM = 20000;

  logic [31:0] a, b;
  fp32_t       y;
  fp_flags_t   flags;
  int          checks = 0, failures = 0;

  fp_mul dut (.a(fp32_t'(a)), .b(fp32_t'(b)), .y, .flags);

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
    check(2, 32'h3FC00000, 32'h40000000);   // 1.5 * 2
    check(2, 32'h3F800001, 32'h3F800001);
    check(2, 32'hBF800001, 32'h3F7FFFFF);
    check(2, 32'h7F000000, 32'h40000000);   // overflow
    check(2, 32'h00800000, 32'h3F000000);   // underflow
    check(2, 32'h00800000, 32'h3F800000);   // smallest normal survives
    check(2, 32'h7F800000, 32'h00000000);   // inf * 0
    check(2, 32'h80000000, 32'h3F800000);   // -0 * 1
    check(2, 32'h00400000, 32'h3F800000);   // subnormal input
    check(2, 32'h4B7FFFFF, 32'h4B7FFFFF);
    for (int i = 0; i < N_RANDOM; i++) begin
      x = rand_operand();
      check(2, x, rand_operand());
      check(2, x, near_operand(x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
