// Exception handling and packing of the IEEE 754 result.
//
// Takes the normalized, rounded result (sign, unbounded biased exponent,
// 24-bit significand) and the special-case code of the pre-normalization
// stage. Overflow (exponent 255 or more) replaces the result by a signed
// infinity and raises overflow. Underflow (exponent 0 or less, i.e. below the
// smallest normal number) replaces the result by a signed zero and raises
// underflow; no subnormal results are produced. Special cases override the
// datapath: quiet NaN 0x7FC00000, signed infinity (with div_by_zero passed
// through) or signed zero. Otherwise the fields are packed with the implied
// bit dropped, which leaves sig[23] unused by design. Combinational; no clock.
module fp_exception
  import fp_pkg::*;
(
  input  logic             sign,
  input  exp_t             exp,
  input  logic [SIG_W-1:0] sig,
  input  logic             is_zero,
  input  fp_special_t      special,
  input  logic             special_sign,
  input  logic             div_by_zero_in,
  output fp32_t            y,
  output fp_flags_t        flags
);

  always_comb begin
    flags = '0;
    y     = '{sign: sign, exp: '0, frac: '0};
    unique case (special)
      SPC_NAN:  y = QNAN;
      SPC_INF: begin
        y                 = '{sign: special_sign, exp: '1, frac: '0};
        flags.div_by_zero = div_by_zero_in;
      end
      SPC_ZERO: y = '{sign: special_sign, exp: '0, frac: '0};
      SPC_NONE: begin
        if (is_zero) begin
          y = '{sign: sign, exp: '0, frac: '0};
        end else if (exp >= exp_t'(255)) begin
          y              = '{sign: sign, exp: '1, frac: '0};
          flags.overflow = 1'b1;
        end else if (exp <= exp_t'(0)) begin
          y               = '{sign: sign, exp: '0, frac: '0};
          flags.underflow = 1'b1;
        end else begin
          y = '{sign: sign, exp: exp[EXP_W-1:0], frac: sig[FRAC_W-1:0]};
        end
      end
      default: y = QNAN;
    endcase
  end

endmodule
