// Self-checking testbench for fp_addsub (floating point add and subtract).
//
// Applies directed operand pairs (exact results, rounding ties, overflow,
// underflow, special operands) and then random pairs, some with nearly equal
// magnitudes, and compares result word and flags with fp_ref_pkg, a model
// built on the simulator's double-precision arithmetic. The unit is
// combinational: each check waits 1 ns after the inputs change.
module tb_fp_addsub;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  localparam int N_RANDOM = 20000;

  logic [31:0] a, b;
  fp32_t       y;
  fp_flags_t   flags;
  int          checks = 0, failures = 0;
  logic        sub;

  fp_addsub dut (.a(fp32_t'(a)), .b(fp32_t'(b)), .sub, .y, .flags);

  task automatic check(input int op, input logic [31:0] ta, input logic [31:0] tb);
    logic [34:0] exp_v;
    a = ta; b = tb;
    sub = (op == 1);
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
    // directed: 1+1, 1-1, 1.5-2^-23 (cancellation), ties, overflow, underflow, specials
    check(0, 32'h3F800000, 32'h3F800000);
    check(1, 32'h3F800000, 32'h3F800000);
    check(1, 32'h3FC00000, 32'h3F800001);
    check(0, 32'h4B800000, 32'h3F800000);   // 2^24 + 1: tie to even
    check(0, 32'h4B800000, 32'h40400000);   // 2^24 + 3: tie rounds up
    check(0, 32'h7F7FFFFF, 32'h7F7FFFFF);   // overflow
    check(1, 32'h00800001, 32'h00800000);   // underflow
    check(0, 32'h7F800000, 32'hFF800000);   // inf - inf
    check(0, 32'h80000000, 32'h80000000);   // -0 + -0
    check(1, 32'h40490FDB, 32'hC0490FDB);
    check(0, 32'h3F800000, 32'h33800000);   // 1 + 2^-24: tie to even
    check(0, 32'h3F800000, 32'h33800001);   // just above the tie
    check(1, 32'h3F800000, 32'h33800001);
    for (int i = 0; i < N_RANDOM; i++) begin
      x = rand_operand();
      check($urandom_range(0, 1), x, rand_operand());
      check($urandom_range(0, 1), x, near_operand(x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
