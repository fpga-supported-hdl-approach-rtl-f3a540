// Single-precision floating point divider.
//
// Datapath: pre-normalization (sign = XOR of signs, exponent = ea - eb + 127,
// divide-by-zero and zero-dividend checks) -> restoring division of the
// significands (fp_mant_div, 27 quotient bits plus a remainder-nonzero
// sticky bit) -> normalization and rounding -> exception handling. The
// quotient lies in (1/2, 2); it is zero-extended by one bit so that the
// post-normalizer sees its weight-1 bit at bit 26 of 28. A zero divisor gives
// a signed infinity with div_by_zero raised; a zero dividend gives a signed
// zero without running the datapath result. Combinational; no clock.
module fp_div
  import fp_pkg::*;
(
  input  fp32_t     a,
  input  fp32_t     b,
  output fp32_t     y,
  output fp_flags_t flags
);

  localparam int unsigned Q_W = SIG_W + 3;   // 27

  logic             sign, n_sign, n_zero, dz, rem_nz;
  exp_t             exp, n_exp;
  logic [SIG_W-1:0] sig_a, sig_b, n_sig;
  logic [Q_W-1:0]   q;
  fp_special_t      special;

  fp_prenorm_muldiv u_pre (
    .a, .b, .div(1'b1),
    .sign, .exp, .sig_a, .sig_b, .special, .div_by_zero(dz)
  );

  fp_mant_div #(.Q_W(Q_W)) u_mdiv (.n(sig_a), .d(sig_b), .q, .rem_nz);

  fp_postnorm #(.W(Q_W + 1)) u_post (
    .sign_in  (sign),
    .exp_in   (exp),
    .mant     ({1'b0, q}),
    .sticky_in(rem_nz),
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
