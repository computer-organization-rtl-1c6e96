// mips_lite_pkg: types and constants shared by the MIPS-lite processor.
//
// Holds the instruction field layout (opcode, rs, rt, rd, shamt, funct),
// the opcode and function-code numbers of the supported instructions, the
// ALU operation encoding and the execution step enumeration used by the
// controller. The R-type layout and the add function code (100000) follow
// the instruction encoding of the design; the remaining opcode and function
// numbers are the standard MIPS-I values, chosen here so that programs
// assembled for MIPS run unchanged.
package mips_lite_pkg;

  // Instruction fields, bit 31 first.
  typedef struct packed {
    logic [5:0] opcode;   // b31-26
    logic [4:0] rs;       // b25-21, first source register
    logic [4:0] rt;       // b20-16, second source (R-type) or destination (lw/addi)
    logic [4:0] rd;       // b15-11, destination register (R-type)
    logic [4:0] shamt;    // b10-6, unused by MIPS-lite
    logic [5:0] funct;    // b5-0, operation of an R-type instruction
  } rtype_t;

  // Opcodes (bits 31-26).
  localparam logic [5:0] OP_RTYPE = 6'b000000;
  localparam logic [5:0] OP_J     = 6'b000010;
  localparam logic [5:0] OP_BEQ   = 6'b000100;
  localparam logic [5:0] OP_ADDI  = 6'b001000;
  localparam logic [5:0] OP_LW    = 6'b100011;
  localparam logic [5:0] OP_SW    = 6'b101011;

  // Function codes of R-type instructions (bits 5-0).
  localparam logic [5:0] FN_ADD = 6'b100000;
  localparam logic [5:0] FN_SUB = 6'b100010;
  localparam logic [5:0] FN_AND = 6'b100100;
  localparam logic [5:0] FN_OR  = 6'b100101;
  localparam logic [5:0] FN_SLT = 6'b101010;

  // ALU operations.
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_AND = 3'd2,
    ALU_OR  = 3'd3,
    ALU_SLT = 3'd4
  } alu_op_t;

  // Execution steps of one instruction. The PC update is not a step of
  // its own: it happens at the end of the last step an instruction needs.
  typedef enum logic [2:0] {
    ST_IF  = 3'd0,   // instruction fetch: IR <- IMEM[PC]
    ST_D   = 3'd1,   // decode, read operands
    ST_ALU = 3'd2,   // perform the operation
    ST_MEM = 3'd3,   // data memory access (lw, sw)
    ST_WB  = 3'd4    // write the result back to the register file
  } step_t;

  // Source of the next PC.
  typedef enum logic [1:0] {
    PC_PLUS4  = 2'd0,
    PC_BRANCH = 2'd1,
    PC_JUMP   = 2'd2
  } pc_sel_t;

endpackage
