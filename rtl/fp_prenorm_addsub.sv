// Pre-normalization for floating point addition and subtraction.
//
// Separates both operands into sign, exponent and significand (implied bit
// restored), inverts the sign of b for a subtraction, and orders the operands
// by magnitude so that the larger one comes first. The exponents are compared
// and the smaller significand is shifted towards the least significant end by
// the exponent difference, so both share the larger exponent. Three extra
// low-order bits (guard, round, sticky) keep what the shift moves out; every
// bit shifted past them is ORed into the sticky bit. The XOR of the two
// effective signs says whether the significands are added or subtracted.
// Because the larger magnitude comes first, a subtraction never goes negative
// and the result takes the sign of the larger operand.
//
// Special operands (NaN, infinity, two zeros) are resolved here and reported
// on special/special_sign, from the classification bits of the unpacked
// operands; the class bits of the reordered copies are left unused.
// Combinational; no clock.
module fp_prenorm_addsub
  import fp_pkg::*;
(
  input  fp32_t              a,
  input  fp32_t              b,
  input  logic               sub,          // 1: a - b, 0: a + b
  output logic               sign_big,     // sign of the larger operand
  output logic               eff_sub,      // significands are subtracted
  output logic [EXP_W-1:0]   exp_big,      // common exponent after alignment
  output logic [SIG_W+2:0]   sig_big,      // larger significand, 3 low zero bits
  output logic [SIG_W+2:0]   sig_small,    // aligned smaller significand with G,R,S
  output fp_special_t        special,
  output logic               special_sign
);

  localparam int unsigned XW = SIG_W + 3;  // 27

  fp_unpacked_t ua, ub, ubig, usmall;
  fp32_t        b_eff;
  logic [EXP_W-1:0] diff;
  logic [XW-1:0]    ext, shifted, lost_mask;
  logic             sticky;

  always_comb begin
    b_eff      = b;
    b_eff.sign = b.sign ^ sub;
  end

  fp_unpack u_unpack_a (.x(a),     .u(ua));
  fp_unpack u_unpack_b (.x(b_eff), .u(ub));

  always_comb begin
    // Magnitude compare: exponent first, then fraction.
    if ({ub.exp, ub.sig} > {ua.exp, ua.sig}) begin
      ubig   = ub;
      usmall = ua;
    end else begin
      ubig   = ua;
      usmall = ub;
    end

    sign_big = ubig.sign;
    eff_sub  = ua.sign ^ ub.sign;
    exp_big  = ubig.exp;
    sig_big  = {ubig.sig, 3'b000};

    diff = ubig.exp - usmall.exp;
    ext  = {usmall.sig, 3'b000};
    if (diff >= EXP_W'(XW)) begin
      shifted   = '0;
      lost_mask = '1;
    end else begin
      shifted   = ext >> diff;
      lost_mask = ~({XW{1'b1}} << diff);
    end
    sticky    = |(ext & lost_mask);
    sig_small = {shifted[XW-1:1], shifted[0] | sticky};

    // Special operands.
    special      = SPC_NONE;
    special_sign = 1'b0;
    if (ua.is_nan || ub.is_nan || (ua.is_inf && ub.is_inf && eff_sub)) begin
      special = SPC_NAN;
    end else if (ua.is_inf || ub.is_inf) begin
      special      = SPC_INF;
      special_sign = ua.is_inf ? ua.sign : ub.sign;
    end else if (ua.is_zero && ub.is_zero) begin
      // +0 unless both are -0 (round to nearest).
      special      = SPC_ZERO;
      special_sign = ua.sign & ub.sign;
    end
  end

endmodule
