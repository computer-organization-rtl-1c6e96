// pc_next: next-PC selection of the MIPS-lite processor.
//
// Normally the next PC is PC + 4. For a taken beq it is the branch target
// PC + 4 + (sign-extended offset x 4); for j it is the 26-bit target field
// times 4, with the upper four bits taken from PC + 4. The PC + 4 rule and
// the fact that branch and jump select some other address follow the
// design; the target formulas are the standard MIPS ones. A dedicated adder
// computes the branch target so the ALU stays free to compare the beq
// operands in the same step.
//
// Interface: pc (W bits), offset (sign-extended immediate, W bits),
// target (26 bits), sel (pc_sel_t); next (W bits). Purely combinational.
module pc_next
  import mips_lite_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] pc,
  input  logic [W-1:0] offset,
  input  logic [25:0]  target,
  input  pc_sel_t      sel,
  output logic [W-1:0] next
);

  logic [W-1:0] pc_plus4;
  assign pc_plus4 = pc + W'(4);

  always_comb begin
    unique case (sel)
      PC_BRANCH: next = pc_plus4 + (offset << 2);
      PC_JUMP:   next = {pc_plus4[W-1:28], target, 2'b00};
      default:   next = pc_plus4;
    endcase
  end

endmodule
