// Pre-normalization for floating point multiplication and division.
//
// Separates both operands into sign, exponent and significand (implied bit
// restored). The result sign is the XOR of the operand signs. The result
// exponent is ea + eb - 127 for a multiplication and ea - eb + 127 for a
// division, kept as a signed 10-bit biased value so that the exception stage
// can see it leave the range 1..254. The significands need no alignment.
//
// Zero checks: a zero divisor gives infinity and raises div_by_zero (only for
// a finite nonzero dividend), a zero dividend or factor gives zero, and the
// undefined forms (0/0, inf/inf, 0*inf, NaN operands) give a NaN. These are
// reported on special. Combinational; no clock.
module fp_prenorm_muldiv
  import fp_pkg::*;
(
  input  fp32_t            a,
  input  fp32_t            b,
  input  logic             div,         // 1: a / b, 0: a * b
  output logic             sign,
  output exp_t             exp,
  output logic [SIG_W-1:0] sig_a,
  output logic [SIG_W-1:0] sig_b,
  output fp_special_t      special,
  output logic             div_by_zero
);

  fp_unpacked_t ua, ub;

  fp_unpack u_unpack_a (.x(a), .u(ua));
  fp_unpack u_unpack_b (.x(b), .u(ub));

  always_comb begin
    sign  = ua.sign ^ ub.sign;
    sig_a = ua.sig;
    sig_b = ub.sig;
    if (div) exp = exp_t'({2'b00, ua.exp}) - exp_t'({2'b00, ub.exp}) + exp_t'(BIAS);
    else     exp = exp_t'({2'b00, ua.exp}) + exp_t'({2'b00, ub.exp}) - exp_t'(BIAS);

    special     = SPC_NONE;
    div_by_zero = 1'b0;
    if (ua.is_nan || ub.is_nan) begin
      special = SPC_NAN;
    end else if (div) begin
      if ((ua.is_zero && ub.is_zero) || (ua.is_inf && ub.is_inf)) begin
        special = SPC_NAN;
      end else if (ub.is_zero) begin
        special     = SPC_INF;
        div_by_zero = ~ua.is_inf;
      end else if (ua.is_inf) begin
        special = SPC_INF;
      end else if (ua.is_zero || ub.is_inf) begin
        special = SPC_ZERO;
      end
    end else begin
      if ((ua.is_zero && ub.is_inf) || (ua.is_inf && ub.is_zero)) begin
        special = SPC_NAN;
      end else if (ua.is_inf || ub.is_inf) begin
        special = SPC_INF;
      end else if (ua.is_zero || ub.is_zero) begin
        special = SPC_ZERO;
      end
    end
  end

endmodule
