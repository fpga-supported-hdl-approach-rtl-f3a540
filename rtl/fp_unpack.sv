// Field separation of one IEEE 754 single-precision operand.
//
// Splits the word into sign, exponent and fraction and restores the implied
// leading 1 of the significand. Subnormal operands are flushed to zero (the
// design keeps no subnormal path, as underflowing values are replaced by
// zero). Classifies zero, infinity and NaN for the special-case logic of the
// arithmetic units. Purely combinational.
module fp_unpack
  import fp_pkg::*;
(
  input  fp32_t        x,
  output fp_unpacked_t u
);

  always_comb begin
    u.sign    = x.sign;
    u.exp     = x.exp;
    u.is_zero = (x.exp == '0);
    u.is_inf  = (x.exp == '1) && (x.frac == '0);
    u.is_nan  = (x.exp == '1) && (x.frac != '0);
    u.sig     = (x.exp == '0) ? '0 : {1'b1, x.frac};
  end

endmodule
