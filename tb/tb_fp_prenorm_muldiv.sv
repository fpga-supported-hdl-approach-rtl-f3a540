// Self-checking testbench for fp_prenorm_muldiv.
//
// Random and directed operand pairs, for both multiply and divide: checks the
// sign (XOR of signs), the biased exponent ea+eb-127 or ea-eb+127 computed as
// a plain integer, the significands with the implied bit, the special-case
// code and the divide-by-zero flag. Combinational block: each check waits 1 ns.
module tb_fp_prenorm_muldiv;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic [31:0] a, b;
  logic        div, sign, dz;
  exp_t        exp;
  logic [23:0] sig_a, sig_b;
  fp_special_t special;
  int          checks = 0, failures = 0;

  fp_prenorm_muldiv dut (
    .a(fp32_t'(a)), .b(fp32_t'(b)), .div, .sign, .exp, .sig_a, .sig_b,
    .special, .div_by_zero(dz)
  );

  task automatic check(input logic [31:0] ta, input logic [31:0] tb, input logic td);
    int          e_exp;
    logic        az, bz, ai, bi, an, bn, e_dz;
    fp_special_t e_spc;
    a = ta; b = tb; div = td;
    #1;
    az = ta[30:23] == 0; bz = tb[30:23] == 0;
    ai = ta[30:23] == 8'hFF && ta[22:0] == 0; bi = tb[30:23] == 8'hFF && tb[22:0] == 0;
    an = ta[30:23] == 8'hFF && ta[22:0] != 0; bn = tb[30:23] == 8'hFF && tb[22:0] != 0;
    e_exp = td ? int'(ta[30:23]) - int'(tb[30:23]) + 127 : int'(ta[30:23]) + int'(tb[30:23]) - 127;
    e_dz  = 1'b0;
    if (an || bn) e_spc = SPC_NAN;
    else if (td) begin
      if ((az && bz) || (ai && bi)) e_spc = SPC_NAN;
      else if (bz) begin e_spc = SPC_INF; e_dz = !ai; end
      else if (ai) e_spc = SPC_INF;
      else if (az || bi) e_spc = SPC_ZERO;
      else e_spc = SPC_NONE;
    end else begin
      if ((az && bi) || (ai && bz)) e_spc = SPC_NAN;
      else if (ai || bi) e_spc = SPC_INF;
      else if (az || bz) e_spc = SPC_ZERO;
      else e_spc = SPC_NONE;
    end
    checks++;
    if (sign != (ta[31] ^ tb[31]) || int'(exp) != e_exp || special != e_spc || dz != e_dz ||
        sig_a != (az ? 24'h0 : {1'b1, ta[22:0]}) || sig_b != (bz ? 24'h0 : {1'b1, tb[22:0]})) begin
      failures++;
      if (failures <= 10)
        $display("FAIL a=%h b=%h div=%b got s=%b e=%0d spc=%0d dz=%b expected e=%0d spc=%0d dz=%b",
                 ta, tb, td, sign, exp, special, dz, e_exp, e_spc, e_dz);
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
    check(32'h3F800000, 32'h00000000, 1'b1);   // divide by zero
    check(32'h7F800000, 32'h00000000, 1'b1);   // inf / 0
    check(32'h00000000, 32'h00000000, 1'b1);   // 0 / 0
    check(32'h7F800000, 32'h00000000, 1'b0);   // inf * 0
    check(32'h7F7FFFFF, 32'h7F7FFFFF, 1'b0);   // largest exponent sum
    check(32'h00800000, 32'h7F000000, 1'b1);   // smallest exponent difference
    for (int i = 0; i < 20000; i++) check(rand_operand(), rand_operand(), 1'($urandom_range(0, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
