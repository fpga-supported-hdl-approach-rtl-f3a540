// Restoring divider for two normalized 24-bit significands.
//
// Computes q = floor(n * 2^(Q_W-1) / d) and whether a remainder is left, for
// n and d in [2^23, 2^24). Since n/d lies in (1/2, 2), q has Q_W bits with the
// weight-1 bit at bit Q_W-1. The first quotient bit compares n with d; each
// following step doubles the partial remainder, adds the two's complement of
// the divisor and keeps the difference if it is not negative (quotient bit 1)
// or restores the old remainder (quotient bit 0). One step per quotient bit,
// unrolled: purely combinational. Q_W = 27 gives 24 result bits, a guard bit
// and one more bit; rem_nz supplies the sticky bit.
module fp_mant_div
  import fp_pkg::*;
#(
  parameter int unsigned Q_W = SIG_W + 3
) (
  input  logic [SIG_W-1:0] n,
  input  logic [SIG_W-1:0] d,
  output logic [Q_W-1:0]   q,
  output logic             rem_nz
);

  logic [SIG_W:0] rem, trial, neg_d;

  always_comb begin
    neg_d = ~{1'b0, d} + (SIG_W+1)'(1);
    rem   = {1'b0, n};
    q     = '0;
    for (int i = int'(Q_W) - 1; i >= 0; i--) begin
      trial = rem + neg_d;
      if (!trial[SIG_W]) begin
        q[i] = 1'b1;
        rem  = trial;
      end
      if (i > 0) rem = rem << 1;
    end
    rem_nz = (rem != '0);
  end

endmodule
