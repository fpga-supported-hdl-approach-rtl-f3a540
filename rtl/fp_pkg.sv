// Shared types and constants of the single-precision floating point ALU.
//
// fp32_t is the IEEE 754 single-precision word: 1 sign bit, 8 exponent bits
// biased by 127 and 23 fraction bits. fp_op_t is the operation encoding on the
// ALU's 4-bit select input; the encoding is this design's own choice. The
// signed 10-bit exponent type exp_t holds biased exponents while they are
// outside 1..254, before the exception stage folds them back.
package fp_pkg;

  localparam int unsigned EXP_W  = 8;
  localparam int unsigned FRAC_W = 23;
  localparam int unsigned SIG_W  = FRAC_W + 1;   // significand with the implied bit
  localparam int unsigned BIAS   = 127;
  localparam int unsigned OUT_W  = 65;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp32_t;

  // Biased exponent with headroom for values below 1 and above 254.
  typedef logic signed [9:0] exp_t;

  // Operand after field separation (flush-to-zero for subnormals).
  typedef struct packed {
    logic             sign;
    logic [EXP_W-1:0] exp;
    logic [SIG_W-1:0] sig;    // implied bit in sig[23], zero for zero operands
    logic             is_zero;
    logic             is_inf;
    logic             is_nan;
  } fp_unpacked_t;

  // Exception flags reported next to the result.
  typedef struct packed {
    logic div_by_zero;
    logic underflow;
    logic overflow;
  } fp_flags_t;

  // Special operand cases resolved before normalization.
  typedef enum logic [1:0] {
    SPC_NONE = 2'd0,   // result comes from the datapath
    SPC_ZERO = 2'd1,   // signed zero
    SPC_INF  = 2'd2,   // signed infinity
    SPC_NAN  = 2'd3    // quiet NaN
  } fp_special_t;

  typedef enum logic [3:0] {
    OP_ADD  = 4'd0,
    OP_SUB  = 4'd1,
    OP_MUL  = 4'd2,
    OP_DIV  = 4'd3,
    OP_AND  = 4'd4,
    OP_OR   = 4'd5,
    OP_NAND = 4'd6,
    OP_NOR  = 4'd7,
    OP_XOR  = 4'd8
  } fp_op_t;

  localparam fp32_t QNAN = '{sign: 1'b0, exp: 8'hFF, frac: 23'h400000};

endpackage
