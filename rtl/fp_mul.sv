// Single-precision floating point multiplier.
//
// Datapath: pre-normalization (sign = XOR of signs, exponent = ea + eb - 127,
// zero and special checks) -> 24 x 24 bit unsigned multiply of the
// significands (sign-magnitude: the sign travels separately) -> rounding and
// normalization of the 48-bit product -> exception handling. The product of
// two significands in [1,2) lies in [1,4), so its weight-1 bit is bit 46 and
// bit 47 is the possible carry. Combinational; no clock.
module fp_mul
  import fp_pkg::*;
(
  input  fp32_t     a,
  input  fp32_t     b,
  output fp32_t     y,
  output fp_flags_t flags
);

  logic               sign, n_sign, n_zero, dz;
  exp_t               exp, n_exp;
  logic [SIG_W-1:0]   sig_a, sig_b, n_sig;
  logic [2*SIG_W-1:0] product;
  fp_special_t        special;

  fp_prenorm_muldiv u_pre (
    .a, .b, .div(1'b0),
    .sign, .exp, .sig_a, .sig_b, .special, .div_by_zero(dz)
  );

  assign product = sig_a * sig_b;

  fp_postnorm #(.W(2*SIG_W)) u_post (
    .sign_in  (sign),
    .exp_in   (exp),
    .mant     (product),
    .sticky_in(1'b0),
    .sign_out (n_sign),
    .exp_out  (n_exp),
    .sig      (n_sig),
    .is_zero  (n_zero)
  );

  fp_exception u_exc (
    .sign(n_sign), .exp(n_exp), .sig(n_sig), .is_zero(n_zero),
    .special, .special_sign(sign), .div_by_zero_in(dz),
    .y, .flags
  );

endmodule
