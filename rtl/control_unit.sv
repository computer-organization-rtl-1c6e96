// control_unit: step sequencer and instruction decoder of the MIPS-lite
// processor.
//
// Every instruction is taken through the execution steps in order, one clock
// cycle each, skipping those it does not need:
//
//   step  add/sub/and/or/slt, addi   lw          sw          beq          j
//   IF    IR <- IMEM[PC]             same        same        same         same
//   D     read operands              same        same        same         PC <- jump target
//   ALU   ALUOUT <- rs op rt/imm     ALUOUT <- rs + imm       rs - rt,    -
//                                                             PC <- PC+4 or target
//   MEM   -                          MDR <- DMEM DMEM <- rt, PC <- PC+4   -
//   WB    rd/rt <- ALUOUT,           rt <- MDR,  -           -            -
//         PC <- PC+4                 PC <- PC+4
//
// so R-type and addi take 4 cycles, lw 5, sw 4, beq 3 and j 2. The PC
// update is folded into the last step of each instruction (pc_load = 1 with
// pc_sel choosing PC + 4, branch or jump target). An opcode or R-type
// function code outside the instruction set is executed as a no-operation
// that ends in D with PC <- PC + 4.
// The steps and what each does follow the design; skipping unneeded steps,
// the register latches between steps and the encodings are this
// implementation's choices.
//
// Interface: clk, rst (synchronous, returns to IF); opcode, funct from IR;
// zero from the ALU. Outputs: step (current step), ir_load, pc_load, pc_sel,
// alu_op, alu_src_imm (second ALU operand is the immediate), aluout_load,
// mdr_load, mem_we, rf_we, rf_dst_rd (destination is rd, else rt),
// rf_from_mem (write data is MDR, else ALUOUT), instr_done (last cycle of an
// instruction). All outputs are combinational functions of the step and IR.
module control_unit
  import mips_lite_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [5:0] opcode,
  input  logic [5:0] funct,
  input  logic       zero,
  output step_t      step,
  output logic       ir_load,
  output logic       pc_load,
  output pc_sel_t    pc_sel,
  output alu_op_t    alu_op,
  output logic       alu_src_imm,
  output logic       aluout_load,
  output logic       mdr_load,
  output logic       mem_we,
  output logic       rf_we,
  output logic       rf_dst_rd,
  output logic       rf_from_mem,
  output logic       instr_done
);

  // Instruction classes decoded from IR.
  logic is_r, is_addi, is_lw, is_sw, is_beq, is_j, is_valid;
  alu_op_t r_op;

  always_comb begin
    r_op = ALU_ADD;
    is_r = 1'b0;
    if (opcode == OP_RTYPE) begin
      is_r = 1'b1;
      unique case (funct)
        FN_ADD:  r_op = ALU_ADD;
        FN_SUB:  r_op = ALU_SUB;
        FN_AND:  r_op = ALU_AND;
        FN_OR:   r_op = ALU_OR;
        FN_SLT:  r_op = ALU_SLT;
        default: is_r = 1'b0;
      endcase
    end
  end

  assign is_addi  = (opcode == OP_ADDI);
  assign is_lw    = (opcode == OP_LW);
  assign is_sw    = (opcode == OP_SW);
  assign is_beq   = (opcode == OP_BEQ);
  assign is_j     = (opcode == OP_J);
  assign is_valid = is_r | is_addi | is_lw | is_sw | is_beq;   // go past D

  step_t step_nxt;

  always_ff @(posedge clk) begin
    if (rst) step <= ST_IF;
    else     step <= step_nxt;
  end

  always_comb begin
    step_nxt    = step;
    ir_load     = 1'b0;
    pc_load     = 1'b0;
    pc_sel      = PC_PLUS4;
    alu_op      = ALU_ADD;
    alu_src_imm = 1'b0;
    aluout_load = 1'b0;
    mdr_load    = 1'b0;
    mem_we      = 1'b0;
    rf_we       = 1'b0;
    rf_dst_rd   = 1'b0;
    rf_from_mem = 1'b0;

    unique case (step)
      ST_IF: begin
        ir_load  = 1'b1;
        step_nxt = ST_D;
      end

      ST_D: begin
        if (is_valid) begin
          step_nxt = ST_ALU;
        end else begin
          // j, or an instruction outside the set: finish here.
          pc_load  = 1'b1;
          pc_sel   = is_j ? PC_JUMP : PC_PLUS4;
          step_nxt = ST_IF;
        end
      end

      ST_ALU: begin
        if (is_beq) begin
          alu_op   = ALU_SUB;
          pc_load  = 1'b1;
          pc_sel   = zero ? PC_BRANCH : PC_PLUS4;
          step_nxt = ST_IF;
        end else begin
          alu_op      = is_r ? r_op : ALU_ADD;
          alu_src_imm = !is_r;
          aluout_load = 1'b1;
          step_nxt    = (is_lw || is_sw) ? ST_MEM : ST_WB;
        end
      end

      ST_MEM: begin
        if (is_sw) begin
          mem_we   = 1'b1;
          pc_load  = 1'b1;
          step_nxt = ST_IF;
        end else begin
          mdr_load = 1'b1;
          step_nxt = ST_WB;
        end
      end

      ST_WB: begin
        rf_we       = 1'b1;
        rf_dst_rd   = is_r;
        rf_from_mem = is_lw;
        pc_load     = 1'b1;
        step_nxt    = ST_IF;
      end

      default: step_nxt = ST_IF;
    endcase
  end

  // The PC is updated exactly once per instruction, in its last step.
  assign instr_done = pc_load;

endmodule
