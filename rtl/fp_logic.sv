// Bitwise logic unit of the ALU.
//
// Applies AND, OR, NAND, NOR or XOR to the two 32-bit operand words bit by
// bit, treating them as plain bit vectors rather than floating point numbers.
// Any other operation code gives zero. Combinational; no clock.
module fp_logic
  import fp_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  fp_op_t      op,
  output logic [31:0] y
);

  always_comb begin
    unique case (op)
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_NAND: y = ~(a & b);
      OP_NOR:  y = ~(a | b);
      OP_XOR:  y = a ^ b;
      default: y = '0;
    endcase
  end

endmodule
