// alu: combinational arithmetic/logic unit of the MIPS-lite processor.
//
// Performs the five operations of the instruction set on two W-bit operands:
// add, sub (a - b), and, or, and slt (1 when a < b as two's-complement
// signed numbers, else 0). zero is 1 when the result is 0; the controller
// uses it with a subtraction to decide a beq. The operation set and the
// purely combinational nature follow the design; the operation encoding
// (alu_op_t) and the zero flag are this implementation's choices.
// Overflow is ignored, as add and sub wrap modulo 2^W.
//
// Interface: a, b (W bits), op (alu_op_t); y (W bits), zero.
module alu
  import mips_lite_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  alu_op_t      op,
  output logic [W-1:0] y,
  output logic         zero
);

  logic [W-1:0] diff;
  assign diff = a - b;

  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = diff;
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      // a < b (signed): the sign of a - b, corrected when the subtraction
      // overflows (operands of different sign).
      ALU_SLT: y = W'((a[W-1] != b[W-1]) ? a[W-1] : diff[W-1]);
      default: y = '0;
    endcase
  end

  assign zero = (y == '0);

endmodule
