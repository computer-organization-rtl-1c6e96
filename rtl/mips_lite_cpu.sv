// mips_lite_cpu: MIPS-lite processor, datapath plus control.
//
// Executes add, sub, and, or, slt, addi, lw, sw, beq and j from a separate
// instruction memory, with a separate data memory (a load-store machine:
// only lw and sw touch memory, all operations work on registers).
// Datapath, in the order of the execution steps:
//   IF   the PC addresses the instruction memory; the word is loaded into the
//        hidden instruction register IR;
//   D    IR's rs and rt fields address the register file's two read ports;
//        the 16-bit immediate is sign-extended;
//   ALU  the ALU combines rs with rt (R-type, beq) or with the immediate
//        (addi, lw, sw); the result is latched in ALUOUT; for beq the ALU's
//        zero flag decides between PC + 4 and the branch target;
//   MEM  ALUOUT addresses the data memory: lw latches the word in MDR, sw
//        writes rt's value;
//   WB   ALUOUT (R-type, addi) or MDR (lw) is written to rd (R-type) or rt;
//   PC   the PC is loaded with PC + 4, the branch target or the jump target
//        at the end of the instruction's last step.
// control_unit sequences the steps; see it for the cycle count of each
// instruction (2 to 5 cycles).
//
// Interface: clk, rst (synchronous, active high: PC <- 0, registers cleared,
// controller to IF). The instruction memory is loaded through prog_we,
// prog_addr (word index), prog_data while rst is held. The remaining outputs
// let a testbench or a debugger follow execution: pc, ir, step, instr_done
// (last cycle of an instruction), the register-file write (rf_we, rf_waddr,
// rf_wdata) and the data-memory write (dmem_we, dmem_addr, dmem_wdata), all
// valid in the cycle before the clock edge that performs them.
// The six steps, the register file, the ALU role and the separate memories
// follow the design; IR's shamt field (bits 10-6) is not used by any
// instruction of the set and is left unconnected. Step skipping, the separate branch adder, memory sizes
// and the reset are choices of this implementation.
module mips_lite_cpu
  import mips_lite_pkg::*;
#(
  parameter int unsigned XLEN       = 32,
  parameter int unsigned NUM_REGS   = 32,
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_WORDS = 256,
  localparam int unsigned RAW       = $clog2(NUM_REGS),
  localparam int unsigned IAW       = $clog2(IMEM_WORDS)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            prog_we,
  input  logic [IAW-1:0]  prog_addr,
  input  logic [31:0]     prog_data,
  output logic [XLEN-1:0] pc,
  output logic [31:0]     ir,
  output step_t           step,
  output logic            instr_done,
  output logic            rf_we,
  output logic [RAW-1:0]  rf_waddr,
  output logic [XLEN-1:0] rf_wdata,
  output logic            dmem_we,
  output logic [XLEN-1:0] dmem_addr,
  output logic [XLEN-1:0] dmem_wdata
);

  // Control signals.
  logic    ir_load, pc_load, alu_src_imm, aluout_load, mdr_load;
  logic    rf_dst_rd, rf_from_mem, zero;
  pc_sel_t pc_sel;
  alu_op_t alu_op;

  // Datapath nets.
  rtype_t          f;                   // IR viewed as its fields
  logic [31:0]     imem_rdata;
  logic [XLEN-1:0] pc_nxt, imm_ext, rs_val, rt_val, alu_b, alu_y;
  logic [XLEN-1:0] aluout_q, mdr_q, dmem_rdata;

  assign f = rtype_t'(ir);

  // ---- control ----
  control_unit u_ctrl (
    .clk         (clk),
    .rst         (rst),
    .opcode      (f.opcode),
    .funct       (f.funct),
    .zero        (zero),
    .step        (step),
    .ir_load     (ir_load),
    .pc_load     (pc_load),
    .pc_sel      (pc_sel),
    .alu_op      (alu_op),
    .alu_src_imm (alu_src_imm),
    .aluout_load (aluout_load),
    .mdr_load    (mdr_load),
    .mem_we      (dmem_we),
    .rf_we       (rf_we),
    .rf_dst_rd   (rf_dst_rd),
    .rf_from_mem (rf_from_mem),
    .instr_done  (instr_done)
  );

  // ---- IF: PC, instruction memory, IR ----
  parallel_load_register #(.W(XLEN)) u_pc (
    .clk (clk), .rst (rst), .c (pc_load), .x (pc_nxt), .z (pc)
  );

  instr_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk       (clk),
    .prog_we   (prog_we),
    .prog_addr (prog_addr),
    .prog_data (prog_data),
    .addr      (32'(pc)),
    .instr     (imem_rdata)
  );

  parallel_load_register #(.W(32)) u_ir (
    .clk (clk), .rst (rst), .c (ir_load), .x (imem_rdata), .z (ir)
  );

  // ---- D: register file, immediate ----
  assign rf_waddr = rf_dst_rd ? f.rd[RAW-1:0] : f.rt[RAW-1:0];
  assign rf_wdata = rf_from_mem ? mdr_q : aluout_q;

  register_file #(.NUM_REGS(NUM_REGS), .W(XLEN)) u_rf (
    .clk       (clk),
    .rst       (rst),
    .src1_addr (f.rs[RAW-1:0]),
    .src2_addr (f.rt[RAW-1:0]),
    .dst_addr  (rf_waddr),
    .dst_data  (rf_wdata),
    .we        (rf_we),
    .src1_data (rs_val),
    .src2_data (rt_val)
  );

  // The 16-bit immediate, sign-extended: bit 15 copied into the upper bits.
  assign imm_ext = {{(XLEN-16){ir[15]}}, ir[15:0]};

  // ---- ALU ----
  assign alu_b = alu_src_imm ? imm_ext : rt_val;

  alu #(.W(XLEN)) u_alu (.a(rs_val), .b(alu_b), .op(alu_op), .y(alu_y), .zero(zero));

  parallel_load_register #(.W(XLEN)) u_aluout (
    .clk (clk), .rst (rst), .c (aluout_load), .x (alu_y), .z (aluout_q)
  );

  // ---- MEM ----
  assign dmem_addr  = aluout_q;
  assign dmem_wdata = rt_val;

  data_mem #(.WORDS(DMEM_WORDS), .W(XLEN)) u_dmem (
    .clk   (clk),
    .addr  (dmem_addr),
    .we    (dmem_we),
    .wdata (dmem_wdata),
    .rdata (dmem_rdata)
  );

  parallel_load_register #(.W(XLEN)) u_mdr (
    .clk (clk), .rst (rst), .c (mdr_load), .x (dmem_rdata), .z (mdr_q)
  );

  // ---- PC update ----
  pc_next #(.W(XLEN)) u_pcn (
    .pc     (pc),
    .offset (imm_ext),
    .target (ir[25:0]),
    .sel    (pc_sel),
    .next   (pc_nxt)
  );

endmodule
