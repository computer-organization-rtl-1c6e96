// tb_control_unit: runs the controller through every instruction class and
// checks, cycle by cycle, the step it is in and the control signals of that
// step against a table written out in the testbench: IF loads IR; R-type
// and addi go D, ALU, WB; lw D, ALU, MEM, WB; sw D, ALU, MEM; beq D, ALU
// (branch target chosen only when zero = 1); j ends in D with the jump
// target; an unknown opcode ends in D with PC + 4. The cycle count of each
// instruction (the number of steps) is checked with it.
module tb_control_unit;
  import mips_lite_pkg::*;

  logic       clk = 1'b0, rst = 1'b1;
  logic [5:0] opcode = '0, funct = '0;
  logic       zero = 1'b0;
  step_t      step;
  logic       ir_load, pc_load, alu_src_imm, aluout_load, mdr_load, mem_we;
  logic       rf_we, rf_dst_rd, rf_from_mem, instr_done;
  pc_sel_t    pc_sel;
  alu_op_t    alu_op;
  int checks = 0, failures = 0;

  control_unit dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("FAIL op=%b fn=%b %s: %0d, expected %0d", opcode, funct, what, got, exp);
    end
  endtask

  // Packed view of the outputs that matter in a step:
  // {ir_load, pc_load, pc_sel, alu_src_imm, aluout_load, mdr_load, mem_we, rf_we, rf_dst_rd, rf_from_mem}
  function automatic logic [10:0] outs();
    return {ir_load, pc_load, pc_sel, alu_src_imm, aluout_load, mdr_load, mem_we, rf_we, rf_dst_rd, rf_from_mem};
  endfunction

  localparam logic [10:0] O_IF      = 11'b1_0_00_0_0_0_0_0_0_0;
  localparam logic [10:0] O_D       = 11'b0_0_00_0_0_0_0_0_0_0;
  localparam logic [10:0] O_ALU_R   = 11'b0_0_00_0_1_0_0_0_0_0;
  localparam logic [10:0] O_ALU_I   = 11'b0_0_00_1_1_0_0_0_0_0;
  localparam logic [10:0] O_WB_R    = 11'b0_1_00_0_0_0_0_1_1_0;
  localparam logic [10:0] O_WB_I    = 11'b0_1_00_0_0_0_0_1_0_0;
  localparam logic [10:0] O_WB_LW   = 11'b0_1_00_0_0_0_0_1_0_1;
  localparam logic [10:0] O_MEM_LW  = 11'b0_0_00_0_0_1_0_0_0_0;
  localparam logic [10:0] O_MEM_SW  = 11'b0_1_00_0_0_0_1_0_0_0;
  localparam logic [10:0] O_BEQ_T   = 11'b0_1_01_0_0_0_0_0_0_0;
  localparam logic [10:0] O_BEQ_N   = 11'b0_1_00_0_0_0_0_0_0_0;
  localparam logic [10:0] O_J       = 11'b0_1_10_0_0_0_0_0_0_0;
  localparam logic [10:0] O_NOP     = 11'b0_1_00_0_0_0_0_0_0_0;

  // Run one instruction: steps[] and outs_exp[] list what each cycle must
  // show, alu_exp the ALU operation expected in the ALU step.
  task automatic run(input logic [5:0] op, input logic [5:0] fn, input logic z,
                     input step_t steps[$], input logic [10:0] oexp[$], input alu_op_t alu_exp);
    opcode = op; funct = fn; zero = z;
    foreach (steps[i]) begin
      #1;
      expect_eq(int'(step), int'(steps[i]), $sformatf("step %0d", i));
      expect_eq(int'(outs()), int'(oexp[i]), $sformatf("controls in step %0d", i));
      expect_eq(int'(instr_done), int'(i == steps.size() - 1), $sformatf("instr_done in step %0d", i));
      if (steps[i] == ST_ALU) expect_eq(int'(alu_op), int'(alu_exp), "ALU operation");
      @(negedge clk);
    end
    expect_eq(int'(step), int'(ST_IF), "back to IF");
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    rst = 1'b0;
    for (int rep = 0; rep < 3; rep++) begin
      run(OP_RTYPE, FN_ADD, 1'($urandom), '{ST_IF, ST_D, ST_ALU, ST_WB}, '{O_IF, O_D, O_ALU_R, O_WB_R}, ALU_ADD);
      run(OP_RTYPE, FN_SUB, 1'($urandom), '{ST_IF, ST_D, ST_ALU, ST_WB}, '{O_IF, O_D, O_ALU_R, O_WB_R}, ALU_SUB);
      run(OP_RTYPE, FN_AND, 1'($urandom), '{ST_IF, ST_D, ST_ALU, ST_WB}, '{O_IF, O_D, O_ALU_R, O_WB_R}, ALU_AND);
      run(OP_RTYPE, FN_OR,  1'($urandom), '{ST_IF, ST_D, ST_ALU, ST_WB}, '{O_IF, O_D, O_ALU_R, O_WB_R}, ALU_OR);
      run(OP_RTYPE, FN_SLT, 1'($urandom), '{ST_IF, ST_D, ST_ALU, ST_WB}, '{O_IF, O_D, O_ALU_R, O_WB_R}, ALU_SLT);
      run(OP_ADDI, 6'($urandom), 1'($urandom), '{ST_IF, ST_D, ST_ALU, ST_WB}, '{O_IF, O_D, O_ALU_I, O_WB_I}, ALU_ADD);
      run(OP_LW, 6'($urandom), 1'($urandom), '{ST_IF, ST_D, ST_ALU, ST_MEM, ST_WB}, '{O_IF, O_D, O_ALU_I, O_MEM_LW, O_WB_LW}, ALU_ADD);
      run(OP_SW, 6'($urandom), 1'($urandom), '{ST_IF, ST_D, ST_ALU, ST_MEM}, '{O_IF, O_D, O_ALU_I, O_MEM_SW}, ALU_ADD);
      run(OP_BEQ, 6'($urandom), 1'b1, '{ST_IF, ST_D, ST_ALU}, '{O_IF, O_D, O_BEQ_T}, ALU_SUB);
      run(OP_BEQ, 6'($urandom), 1'b0, '{ST_IF, ST_D, ST_ALU}, '{O_IF, O_D, O_BEQ_N}, ALU_SUB);
      run(OP_J, 6'($urandom), 1'($urandom), '{ST_IF, ST_D}, '{O_IF, O_J}, ALU_ADD);
      run(6'b111111, 6'($urandom), 1'($urandom), '{ST_IF, ST_D}, '{O_IF, O_NOP}, ALU_ADD);
      run(OP_RTYPE, 6'b000000, 1'($urandom), '{ST_IF, ST_D}, '{O_IF, O_NOP}, ALU_ADD);
    end
    // Reset in the middle of an instruction returns to IF.
    opcode = OP_LW;
    repeat (3) @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    expect_eq(int'(step), int'(ST_IF), "reset to IF");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
