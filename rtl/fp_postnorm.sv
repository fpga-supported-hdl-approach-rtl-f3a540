// Post-normalization and rounding of a raw significand.
//
// Input: a W-bit unsigned significand whose bit W-2 has weight 1 (bit W-1
// catches the carry of an addition or a product of two values in [1,2)),
// the biased exponent that goes with that weight, and a sticky bit for
// anything already discarded below bit 0. The unit counts leading zeros,
// shifts the significand left until its MSB is 1 and adjusts the exponent by
// the same amount (a carry in bit W-1 becomes an exponent increment). The top
// 24 bits are the result significand; the next bit is the guard bit and all
// lower bits plus sticky_in form the sticky bit. Rounding is round to nearest,
// ties to even; a rounding carry renormalizes to 1.0 and bumps the exponent.
// The exponent leaves unbounded (signed 10 bits): range checks are the
// exception stage's job. A zero significand sets is_zero.
//
// W must be at least 26. sticky_in may only be set when the leading one of
// mant lies in its top three bits, so that the left shift cannot move real
// bits into the place of the discarded ones (the divider satisfies this). Combinational; no clock.
module fp_postnorm
  import fp_pkg::*;
#(
  parameter int unsigned W = 28
) (
  input  logic             sign_in,
  input  exp_t             exp_in,
  input  logic [W-1:0]     mant,
  input  logic             sticky_in,
  output logic             sign_out,
  output exp_t             exp_out,
  output logic [SIG_W-1:0] sig,
  output logic             is_zero
);

  logic [$clog2(W+1)-1:0] lzc;
  logic [W-1:0]           norm;
  logic [SIG_W-1:0]       sig_trunc;
  logic                   guard, sticky, round_up;
  logic [SIG_W:0]         sig_rounded;
  exp_t                   exp_norm;

  always_comb begin
    lzc = '0;
    for (int i = 0; i < int'(W); i++) begin
      if (mant[i]) lzc = ($clog2(W+1))'(W - 1 - i);
    end
    is_zero   = (mant == '0);
    norm      = mant << lzc;
    exp_norm  = exp_in + exp_t'(1) - exp_t'(lzc);

    sig_trunc = norm[W-1 -: SIG_W];
    guard     = norm[W-1-SIG_W];
    sticky    = sticky_in | (|norm[W-2-SIG_W:0]);
    round_up  = guard & (sticky | sig_trunc[0]);

    sig_rounded = {1'b0, sig_trunc} + (SIG_W+1)'(round_up);
    if (sig_rounded[SIG_W]) begin
      sig     = {1'b1, {(SIG_W-1){1'b0}}};
      exp_out = exp_norm + exp_t'(1);
    end else begin
      sig     = sig_rounded[SIG_W-1:0];
      exp_out = exp_norm;
    end
    sign_out = sign_in;
  end

endmodule
