// 32-bit floating point ALU (IEEE 754 single precision).
//
// Two operand words a and b feed, in parallel, an adder/subtractor, a
// multiplier, a divider and a bitwise logic unit; the 4-bit select s picks
// which result reaches the output:
//   0 add  1 subtract  2 multiply  3 divide
//   4 AND  5 OR        6 NAND      7 NOR     8 XOR     others: 0
// out[31:0] is the result word, out[32] overflow, out[33] underflow and
// out[34] divide by zero (flags are zero for the logic operations);
// out[64:35] are reserved and read as zero. The 65-bit output width and the
// port names follow the ALU's published interface; the select encoding and
// the bit layout of out are this design's own.
//
// The whole ALU is combinational: out follows a, b and s after the
// propagation delay, with no clock or handshake. Rounding is to nearest,
// ties to even; subnormal inputs count as zero and results below the normal
// range become zero with underflow raised.
module floting_point_alu32
  import fp_pkg::*;
(
  input  logic [31:0]      a,
  input  logic [31:0]      b,
  input  logic [3:0]       s,
  output logic [OUT_W-1:0] out
);

  fp_op_t    op;
  fp32_t     y_addsub, y_mul, y_div;
  fp_flags_t f_addsub, f_mul, f_div;
  logic [31:0] y_logic;

  assign op = fp_op_t'(s);

  fp_addsub u_addsub (
    .a(fp32_t'(a)), .b(fp32_t'(b)), .sub(op == OP_SUB),
    .y(y_addsub), .flags(f_addsub)
  );

  fp_mul u_mul (.a(fp32_t'(a)), .b(fp32_t'(b)), .y(y_mul), .flags(f_mul));

  fp_div u_div (.a(fp32_t'(a)), .b(fp32_t'(b)), .y(y_div), .flags(f_div));

  fp_logic u_logic (.a, .b, .op, .y(y_logic));

  always_comb begin
    out = '0;
    unique case (op)
      OP_ADD, OP_SUB: out[34:0] = {f_addsub, y_addsub};
      OP_MUL:         out[34:0] = {f_mul, y_mul};
      OP_DIV:         out[34:0] = {f_div, y_div};
      OP_AND, OP_OR, OP_NAND, OP_NOR, OP_XOR: out[31:0] = y_logic;
      default:        out = '0;
    endcase
  end

endmodule
