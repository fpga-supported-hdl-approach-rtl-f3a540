// Self-checking testbench for fp_postnorm.
//
// Two instances, W = 28 (adder and divider) and W = 48 (multiplier), get
// random significands with random leading-zero counts, exponents and sticky
// bits (sticky only where the leading one lies in the top three bits, as
// the block requires). The expected result is obtained by converting the exact value
// (mant*4 + sticky) * 2^(exp-127-W) to a real and rounding it to single
// precision with the reference model; the significand, the exponent and the
// zero flag must match. Combinational block: each check waits 1 ns.
module tb_fp_postnorm;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic        sign;
  exp_t        exp_in;
  logic        sticky;
  logic [27:0] m28;
  logic [47:0] m48;
  logic        s28, s48, z28, z48;
  exp_t        e28, e48;
  logic [23:0] g28, g48;
  logic        s28_ok, s48_ok;
  int          checks = 0, failures = 0;

  fp_postnorm #(.W(28)) dut28 (.sign_in(sign), .exp_in, .mant(m28), .sticky_in(sticky),
                               .sign_out(s28), .exp_out(e28), .sig(g28), .is_zero(z28));
  fp_postnorm #(.W(48)) dut48 (.sign_in(sign), .exp_in, .mant(m48), .sticky_in(sticky),
                               .sign_out(s48), .exp_out(e48), .sig(g48), .is_zero(z48));

  function automatic logic [31:0] expect_word(input longint unsigned m, input int w,
                                              input int e, input logic st, input logic sg);
    real v;
    logic [34:0] r;
    v = real'(m * 4 + longint'(st)) * (2.0 ** (e - 127 - w));
    if (sg) v = -v;
    r = real_to_sp(v);
    return r[31:0];
  endfunction

  task automatic cmp(input string tag, input logic [31:0] ew, input logic so, input exp_t eo,
                     input logic [23:0] sg, input logic z, input logic zero_in);
    checks++;
    if (zero_in) begin
      if (!z) begin failures++; $display("FAIL %s zero flag", tag); end
    end else if (z || {so, eo[7:0], sg[22:0]} != ew || !sg[23] || eo < 1 || eo > 254) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s exp_in=%0d sticky=%b got %b/%0d/%h expected %h", tag, exp_in, sticky,
                 so, eo, sg, ew);
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
    for (int i = 0; i < 20000; i++) begin
      sign   = 1'($urandom_range(0, 1));
      exp_in = exp_t'($urandom_range(60, 190));
      sticky = 1'($urandom_range(0, 1));
      if ($urandom_range(0, 1) == 0) begin
        m28 = 28'({$urandom, $urandom} >> $urandom_range(36, 38));
        m48 = 48'({$urandom, $urandom} >> $urandom_range(16, 18));
      end else begin
        m28 = 28'({$urandom, $urandom} >> $urandom_range(36, 63));
        m48 = 48'({$urandom, $urandom} >> $urandom_range(16, 63));
      end
      if (i == 0) begin m28 = '0; m48 = '0; sticky = 1'b0; end
      if (i == 1) begin m28 = 28'h3FFFFFF; m48 = 48'hFFFFFF800000; sticky = 1'b0; end
      if (i == 2) begin m28 = 28'h4000006; m48 = 48'h400000C00000; sticky = 1'b0; end // ties
      // sticky_in is only meaningful when the leading one is in the top 3 bits
      s28_ok = (m28 >> 25) != 0;
      s48_ok = (m48 >> 45) != 0;
      sticky = sticky & s28_ok & s48_ok;
      #1;
      cmp("W28", expect_word(longint'(m28), 28, int'(exp_in), sticky, sign), s28, e28, g28, z28, m28 == 0);
      cmp("W48", expect_word(longint'(m48), 48, int'(exp_in), sticky, sign), s48, e48, g48, z48, m48 == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
