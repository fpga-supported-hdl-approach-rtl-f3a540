// Self-checking testbench for fp_exception.
//
// Directed cases for every branch (NaN, infinity with and without the
// divide-by-zero flag, signed zero, zero datapath result, exponent 255 and
// beyond, exponent 0 and below) and random in-range results, whose packed
// word must be {sign, exp[7:0], sig[22:0]}. Expected words are written out
// as IEEE 754 constants. Combinational block: each check waits 1 ns.
module tb_fp_exception;
  import fp_pkg::*;

  logic        sign, is_zero, special_sign, dz_in;
  exp_t        exp;
  logic [23:0] sig;
  fp_special_t special;
  fp32_t       y;
  fp_flags_t   flags;
  int          checks = 0, failures = 0;

  fp_exception dut (.sign, .exp, .sig, .is_zero, .special, .special_sign,
                    .div_by_zero_in(dz_in), .y, .flags);

  task automatic check(input logic ts, input int te, input logic [23:0] tsig, input logic tz,
                       input fp_special_t tspc, input logic tss, input logic tdz,
                       input logic [31:0] ey, input logic [2:0] ef);
    sign = ts; exp = exp_t'(te); sig = tsig; is_zero = tz; special = tspc;
    special_sign = tss; dz_in = tdz;
    #1;
    checks++;
    if (y !== ey || flags !== ef) begin
      failures++;
      if (failures <= 10)
        $display("FAIL exp=%0d spc=%0d got %h/%b expected %h/%b", te, tspc, y, flags, ey, ef);
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
    logic [23:0] r;
    int e;
    check(0, 127, 24'h800000, 0, SPC_NONE, 0, 0, 32'h3F800000, 3'b000);
    check(1, 128, 24'hC00000, 0, SPC_NONE, 0, 0, 32'hC0400000, 3'b000);
    check(0, 254, 24'hFFFFFF, 0, SPC_NONE, 0, 0, 32'h7F7FFFFF, 3'b000);
    check(1, 255, 24'h800000, 0, SPC_NONE, 0, 0, 32'hFF800000, 3'b001);  // overflow
    check(0, 300, 24'h900000, 0, SPC_NONE, 0, 0, 32'h7F800000, 3'b001);
    check(0,   1, 24'h800000, 0, SPC_NONE, 0, 0, 32'h00800000, 3'b000);
    check(1,   0, 24'hFFFFFF, 0, SPC_NONE, 0, 0, 32'h80000000, 3'b010);  // underflow
    check(0, -40, 24'h812345, 0, SPC_NONE, 0, 0, 32'h00000000, 3'b010);
    check(1,  77, 24'h000000, 1, SPC_NONE, 0, 0, 32'h80000000, 3'b000);  // zero result
    check(0, 127, 24'h800000, 0, SPC_NAN,  1, 0, 32'h7FC00000, 3'b000);
    check(0, 127, 24'h800000, 0, SPC_INF,  1, 1, 32'hFF800000, 3'b100);  // x/0
    check(1, 127, 24'h800000, 0, SPC_INF,  0, 0, 32'h7F800000, 3'b000);
    check(0, 127, 24'h800000, 0, SPC_ZERO, 1, 0, 32'h80000000, 3'b000);
    for (int i = 0; i < 5000; i++) begin
      r = {1'b1, 23'($urandom)};
      e = $urandom_range(1, 254);
      check(1'(i), e, r, 0, SPC_NONE, 0, 0, {1'(i), 8'(e), r[22:0]}, 3'b000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
