// Self-checking testbench for fp_prenorm_addsub.
//
// For random operand pairs (normal numbers over several exponent spreads,
// plus zeros, infinities and NaNs) it works out with integer arithmetic which
// operand is larger, the shared exponent, the aligned smaller significand
// (floor of sig*8 / 2^d with any lost bits ORed into bit 0), whether the
// significands are subtracted, and the special-case code, and compares them
// with the block. Combinational block: each check waits 1 ns.
module tb_fp_prenorm_addsub;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic [31:0]  a, b;
  logic         sub;
  logic         sign_big, eff_sub, special_sign;
  logic [7:0]   exp_big;
  logic [26:0]  sig_big, sig_small;
  fp_special_t  special;
  int           checks = 0, failures = 0;

  fp_prenorm_addsub dut (
    .a(fp32_t'(a)), .b(fp32_t'(b)), .sub, .sign_big, .eff_sub, .exp_big,
    .sig_big, .sig_small, .special, .special_sign
  );

  function automatic logic [23:0] sig_of(input logic [31:0] x);
    return (x[30:23] == 0) ? 24'h0 : {1'b1, x[22:0]};
  endfunction

  task automatic check(input logic [31:0] ta, input logic [31:0] tb, input logic ts);
    logic [31:0] be, big, sml;
    longint unsigned ext, q, rem;
    int d;
    logic [26:0] e_small;
    fp_special_t e_spc;
    logic        e_spc_sign;
    logic        a_nan, b_nan, a_inf, b_inf;
    a = ta; b = tb; sub = ts;
    #1;
    be = tb; be[31] = tb[31] ^ ts;
    if (ta[30:23] == 0) ta[22:0] = 0;
    if (be[30:23] == 0) be[22:0] = 0;
    if (be[30:0] > ta[30:0]) begin big = be; sml = ta; end
    else begin big = ta; sml = be; end
    d   = int'(big[30:23]) - int'(sml[30:23]);
    ext = longint'(sig_of(sml)) * 8;
    if (d >= 27) begin q = 0; rem = ext; end
    else begin q = ext >> d; rem = ext - (q << d); end
    e_small = 27'(q) | 27'(rem != 0);
    a_nan = (ta[30:23] == 8'hFF) && (ta[22:0] != 0);
    b_nan = (be[30:23] == 8'hFF) && (be[22:0] != 0);
    a_inf = (ta[30:23] == 8'hFF) && (ta[22:0] == 0);
    b_inf = (be[30:23] == 8'hFF) && (be[22:0] == 0);
    e_spc = SPC_NONE; e_spc_sign = 1'b0;
    if (a_nan || b_nan || (a_inf && b_inf && ta[31] != be[31])) e_spc = SPC_NAN;
    else if (a_inf) begin e_spc = SPC_INF; e_spc_sign = ta[31]; end
    else if (b_inf) begin e_spc = SPC_INF; e_spc_sign = be[31]; end
    else if (ta[30:23] == 0 && be[30:23] == 0) begin e_spc = SPC_ZERO; e_spc_sign = ta[31] & be[31]; end
    checks++;
    if (e_spc != special || (e_spc != SPC_NONE && e_spc_sign != special_sign)) begin
      failures++;
      if (failures <= 10) $display("FAIL special a=%h b=%h sub=%b got %0d exp %0d", ta, tb, ts, special, e_spc);
    end
    if (e_spc == SPC_NONE) begin
      checks++;
      if (sign_big != big[31] || eff_sub != (ta[31] ^ be[31]) || exp_big != big[30:23] ||
          sig_big != {sig_of(big), 3'b000} || sig_small != e_small) begin
        failures++;
        if (failures <= 10)
          $display("FAIL a=%h b=%h sub=%b got %b %b %h %h %h expected %b %b %h %h %h", ta, tb, ts,
                   sign_big, eff_sub, exp_big, sig_big, sig_small,
                   big[31], ta[31] ^ be[31], big[30:23], {sig_of(big), 3'b000}, e_small);
      end
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
    logic [31:0] x, y;
    check(32'h3F800000, 32'h3F800000, 1'b0);
    check(32'h3F800000, 32'h33800001, 1'b1);   // d = 24
    check(32'h3F800000, 32'h32000001, 1'b0);   // d = 27: all sticky
    check(32'h7F800000, 32'h7F800000, 1'b1);   // inf - inf
    check(32'h80000000, 32'h00000000, 1'b1);   // -0 - 0
    for (int i = 0; i < 20000; i++) begin
      x = rand_operand();
      y = ($urandom_range(0, 1) == 0) ? rand_operand() : near_operand(x);
      if ($urandom_range(0, 2) == 0) y[30:23] = 8'(int'(x[30:23]) + $urandom_range(0, 30));
      check(x, y, 1'($urandom_range(0, 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
