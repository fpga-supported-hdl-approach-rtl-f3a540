// Self-checking testbench for fp_mant_div, the restoring significand divider.
//
// For random normalized significands n and d (and the edge values 2^23 and
// 2^24-1) the expected quotient floor(n * 2^26 / d) and remainder flag are
// computed with 64-bit integer division. Combinational block: each check
// waits 1 ns.
module tb_fp_mant_div;

  logic [23:0] n, d;
  logic [26:0] q;
  logic        rem_nz;
  int          checks = 0, failures = 0;

  fp_mant_div dut (.n, .d, .q, .rem_nz);

  task automatic check(input logic [23:0] tn, input logic [23:0] td);
    longint unsigned num, eq, er;
    n = tn; d = td;
    #1;
    num = longint'(tn) << 26;
    eq  = num / longint'(td);
    er  = num % longint'(td);
    checks++;
    if (longint'(q) != eq || rem_nz != (er != 0)) begin
      failures++;
      if (failures <= 10) $display("FAIL n=%h d=%h got q=%h r=%b expected q=%h r=%b",
                                   tn, td, q, rem_nz, eq, er != 0);
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
    check(24'h800000, 24'h800000);
    check(24'hFFFFFF, 24'h800000);
    check(24'h800000, 24'hFFFFFF);
    check(24'hFFFFFF, 24'hFFFFFF);
    check(24'hC00000, 24'hC00000);
    for (int i = 0; i < 20000; i++) check({1'b1, 23'($urandom)}, {1'b1, 23'($urandom)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
