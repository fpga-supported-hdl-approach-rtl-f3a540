// Single-precision floating point adder/subtractor.
//
// Datapath: pre-normalization (field separation, exponent compare, alignment
// of the smaller significand, special operands) -> significand add or
// subtract -> post-normalization and rounding -> exception handling.
// When the effective signs differ, the smaller significand is subtracted by
// adding its two's complement (one's complement plus one) to the larger one;
// the operand ordering keeps the difference non-negative. A difference of
// exactly zero is +0. The 27-bit aligned significands get one carry bit, so
// the post-normalizer sees 28 bits with the weight-1 bit at bit 26.
// Combinational; no clock. sub = 1 computes a - b.
module fp_addsub
  import fp_pkg::*;
(
  input  fp32_t     a,
  input  fp32_t     b,
  input  logic      sub,
  output fp32_t     y,
  output fp_flags_t flags
);

  localparam int unsigned XW = SIG_W + 3;   // 27

  logic             sign_big, eff_sub, special_sign;
  logic [EXP_W-1:0] exp_big;
  logic [XW-1:0]    sig_big, sig_small;
  fp_special_t      special;
  logic [XW:0]      sum;
  logic             res_sign, n_sign, n_zero;
  exp_t             n_exp;
  logic [SIG_W-1:0] n_sig;

  fp_prenorm_addsub u_pre (
    .a, .b, .sub,
    .sign_big, .eff_sub, .exp_big, .sig_big, .sig_small,
    .special, .special_sign
  );

  always_comb begin
    if (eff_sub) sum = {1'b0, sig_big} + {1'b1, ~sig_small} + (XW+1)'(1);
    else         sum = {1'b0, sig_big} + {1'b0, sig_small};
    res_sign = (sum == '0) ? 1'b0 : sign_big;
  end

  fp_postnorm #(.W(XW + 1)) u_post (
    .sign_in  (res_sign),
    .exp_in   (exp_t'({2'b00, exp_big})),
    .mant     (sum),
    .sticky_in(1'b0),
    .sign_out (n_sign),
    .exp_out  (n_exp),
    .sig      (n_sig),
    .is_zero  (n_zero)
  );

  fp_exception u_exc (
    .sign(n_sign), .exp(n_exp), .sig(n_sig), .is_zero(n_zero),
    .special, .special_sign, .div_by_zero_in(1'b0),
    .y, .flags
  );

endmodule
