// tb_mips_lite_cpu: end-to-end test of the MIPS-lite processor at its
// default size (32 registers of 32 bits, 256-word memories).
//
// The testbench assembles a program into the instruction memory through the
// load port, releases reset and runs it, checking every instruction against
// an instruction-set model kept in the testbench:
//   * the PC at which each instruction executes and the word in IR;
//   * the register written (number and value) and the data-memory word
//     written (address and value), or that none is written;
//   * the number of cycles the instruction took (R-type/addi 4, lw 5, sw 4,
//     beq 3, j 2).
// The program starts with a fixed part: the instruction add $1,$2,$3
// (encoded 0x00430820) and one case of every instruction, beq taken and not
// taken, slt true and false. A seeded random part follows: ALU operations on
// random registers, stores and loads through $0 (never written, so 0 after
// reset) and forward beq/j. It ends in a jump to itself. NRUNS programs with
// different seeds are run one after the other, the processor being reset
// between them. Each mechanism is counted, and one that never happened
// counts as a failure.
module tb_mips_lite_cpu;
  import mips_lite_pkg::*;

  localparam int unsigned IMEM_WORDS = 256;
  localparam int unsigned DMEM_WORDS = 256;
  localparam int unsigned NREG       = 32;
  localparam int unsigned NRAND      = 200;
  localparam int unsigned NRUNS      = 8;     // programs, each with its own seed

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        prog_we = 1'b0;
  logic [7:0]  prog_addr = '0;
  logic [31:0] prog_data = '0;
  logic [31:0] pc, ir, rf_wdata, dmem_addr, dmem_wdata;
  step_t       step;
  logic        instr_done, rf_we, dmem_we;
  logic [4:0]  rf_waddr;

  mips_lite_cpu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------- instruction encoders ----------------
  function automatic logic [31:0] r_ins(logic [5:0] fn, int rd, int rs, int rt);
    return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] i_ins(logic [5:0] op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] j_ins(int word_addr);
    return {OP_J, 26'(word_addr)};
  endfunction

  // ---------------- program ----------------
  logic [31:0] prog [IMEM_WORDS];
  int n = 0;

  task automatic emit(logic [31:0] w);
    prog[n] = w;
    n++;
  endtask

  function automatic int rnd_reg();   // 1..31, never $0
    return 1 + int'($urandom_range(30));
  endfunction

  task automatic build_program();
    logic [5:0] fns [5] = '{FN_ADD, FN_SUB, FN_AND, FN_OR, FN_SLT};
    for (int i = 0; i < IMEM_WORDS; i++) prog[i] = '0;
    // Fixed part.
    emit(i_ins(OP_ADDI, 2, 0, 7));          // $2 = 7
    emit(i_ins(OP_ADDI, 3, 0, -3));         // $3 = -3
    emit(32'h0043_0820);                    // add $1,$2,$3  -> 4
    emit(r_ins(FN_SUB, 4, 2, 3));           // $4 = 10
    emit(r_ins(FN_AND, 5, 2, 3));           // $5 = 7 & -3
    emit(r_ins(FN_OR,  6, 2, 3));           // $6 = 7 | -3
    emit(r_ins(FN_SLT, 7, 3, 2));           // -3 < 7 -> 1
    emit(r_ins(FN_SLT, 8, 2, 3));           // 7 < -3 -> 0
    emit(i_ins(OP_SW, 4, 0, 8));            // M[8] = 10
    emit(i_ins(OP_LW, 9, 0, 8));            // $9 = 10
    emit(i_ins(OP_BEQ, 9, 4, 1));           // taken, skips next
    emit(i_ins(OP_ADDI, 10, 0, 99));        // skipped
    emit(i_ins(OP_BEQ, 9, 2, 1));           // not taken
    emit(i_ins(OP_ADDI, 11, 0, 5));
    emit(j_ins(n + 2));                     // jump over next
    emit(i_ins(OP_ADDI, 12, 0, 77));        // skipped
    // Initialise every memory word that a random lw may read.
    for (int a = 0; a < 16; a++) emit(i_ins(OP_SW, rnd_reg(), 0, 4 * a));
    // Random part.
    for (int k = 0; k < NRAND; k++) begin
      int c = int'($urandom_range(9));
      if (c <= 3)      emit(r_ins(fns[$urandom_range(4)], rnd_reg(), rnd_reg(), rnd_reg()));
      else if (c == 4) emit(i_ins(OP_ADDI, rnd_reg(), rnd_reg(), int'($urandom_range(65535))));
      else if (c == 5) emit(i_ins(OP_SW, rnd_reg(), 0, 4 * int'($urandom_range(15))));
      else if (c == 6) emit(i_ins(OP_LW, rnd_reg(), 0, 4 * int'($urandom_range(15))));
      else if (c == 7) emit(i_ins(OP_BEQ, rnd_reg(), rnd_reg(), int'($urandom_range(2))));
      else if (c == 8) emit(i_ins(OP_BEQ, 0, 0, int'($urandom_range(2))));
      else             emit(j_ins(n + 1 + int'($urandom_range(2))));
    end
    // Halt: jumps to themselves (three, since a random beq or j near the
    // end may skip up to two words).
    repeat (3) emit(j_ins(n));
  endtask

  // ---------------- instruction-set model ----------------
  logic [31:0] m_pc;
  logic [31:0] m_reg [NREG];
  logic [31:0] m_mem [DMEM_WORDS];

  // Mechanism counters.
  int n_add, n_sub, n_and, n_or, n_slt1, n_slt0, n_addi, n_lw, n_sw;
  int n_beq_t, n_beq_nt, n_j, n_rfw, n_instr;

  // Observed effects of the current instruction.
  int          cyc = 0;
  int          obs_rfw = 0, obs_mw = 0;
  logic [4:0]  obs_rfa;
  logic [31:0] obs_rfd, obs_ma, obs_md;
  bit          halted = 0;

  task automatic retire();
    logic [31:0] w, a, b, imm, nxt, res;
    logic [5:0]  op, fn;
    int          rs, rt, rd, exp_cyc;
    int          exp_rfw, exp_mw;
    logic [4:0]  exp_rfa;
    logic [31:0] exp_rfd, exp_ma, exp_md;
    w   = prog[m_pc[9:2]];
    op  = w[31:26]; fn = w[5:0];
    rs  = int'(w[25:21]); rt = int'(w[20:16]); rd = int'(w[15:11]);
    a   = m_reg[rs]; b = m_reg[rt];
    imm = {{16{w[15]}}, w[15:0]};
    nxt = m_pc + 4;
    exp_rfw = 0; exp_mw = 0; exp_rfa = '0; exp_rfd = '0; exp_ma = '0; exp_md = '0;
    exp_cyc = 4;
    check(pc == m_pc, $sformatf("PC %h, model %h", pc, m_pc));
    check(ir == w, $sformatf("IR %h, expected %h at PC %h", ir, w, m_pc));
    case (op)
      OP_RTYPE: begin
        case (fn)
          FN_ADD: begin res = a + b; n_add++; end
          FN_SUB: begin res = a - b; n_sub++; end
          FN_AND: begin res = a & b; n_and++; end
          FN_OR:  begin res = a | b; n_or++;  end
          default: begin
            res = ($signed(a) < $signed(b)) ? 32'd1 : 32'd0;
            if (res == 1) n_slt1++; else n_slt0++;
          end
        endcase
        exp_rfw = 1; exp_rfa = 5'(rd); exp_rfd = res;
      end
      OP_ADDI: begin exp_rfw = 1; exp_rfa = 5'(rt); exp_rfd = a + imm; n_addi++; end
      OP_LW: begin
        exp_rfw = 1; exp_rfa = 5'(rt); exp_rfd = m_mem[(a + imm) >> 2];
        exp_cyc = 5; n_lw++;
      end
      OP_SW: begin exp_mw = 1; exp_ma = a + imm; exp_md = b; n_sw++; end
      OP_BEQ: begin
        exp_cyc = 3;
        if (a == b) begin nxt = m_pc + 4 + (imm << 2); n_beq_t++; end
        else n_beq_nt++;
      end
      default: begin  // j
        exp_cyc = 2; n_j++;
        nxt = {nxt[31:28], w[25:0], 2'b00};
        if (nxt == m_pc) halted = 1;
      end
    endcase
    check(cyc == exp_cyc, $sformatf("PC %h took %0d cycles, expected %0d", m_pc, cyc, exp_cyc));
    check(obs_rfw == exp_rfw, $sformatf("PC %h: %0d register writes, expected %0d", m_pc, obs_rfw, exp_rfw));
    if (exp_rfw == 1 && obs_rfw == 1)
      check(obs_rfa == exp_rfa && obs_rfd == exp_rfd,
            $sformatf("PC %h: wrote $%0d=%h, expected $%0d=%h", m_pc, obs_rfa, obs_rfd, exp_rfa, exp_rfd));
    check(obs_mw == exp_mw, $sformatf("PC %h: %0d memory writes, expected %0d", m_pc, obs_mw, exp_mw));
    if (exp_mw == 1 && obs_mw == 1)
      check(obs_ma == exp_ma && obs_md == exp_md,
            $sformatf("PC %h: stored M[%h]=%h, expected M[%h]=%h", m_pc, obs_ma, obs_md, exp_ma, exp_md));
    // The example instruction add $1,$2,$3 at PC 8: R[1] <- 7 + (-3).
    if (m_pc == 32'd8)
      check(obs_rfw == 1 && obs_rfa == 5'd1 && obs_rfd == 32'd4, "add $1,$2,$3 did not write 4 to $1");
    if (exp_rfw == 1) begin m_reg[exp_rfa] = exp_rfd; n_rfw++; end
    if (exp_mw == 1)  m_mem[exp_ma[9:2]] = exp_md;
    m_pc = nxt;
    n_instr++;
  endtask

  // Sample at the falling edge, when all combinational outputs are settled.
  always @(negedge clk) begin
    if (!rst && !halted) begin
      cyc++;
      if (rf_we) begin obs_rfw++; obs_rfa = rf_waddr; obs_rfd = rf_wdata; end
      if (dmem_we) begin obs_mw++; obs_ma = dmem_addr; obs_md = dmem_wdata; end
      if (instr_done) begin
        retire();
        cyc = 0; obs_rfw = 0; obs_mw = 0;
      end
    end
  end

  // Watchdog.
  initial begin
    repeat (NRUNS * 3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int run_i = 0; run_i < NRUNS; run_i++) begin
      void'($urandom(32'd1234 + 32'(run_i)));
      n = 0;
      build_program();
      m_pc = '0;
      foreach (m_reg[i]) m_reg[i] = '0;
      foreach (m_mem[i]) m_mem[i] = '0;
      // Hold reset (this also restarts a processor left looping at the end
      // of the previous program) and load the program.
      @(negedge clk);
      rst = 1'b1;
      halted = 0;
      cyc = 0; obs_rfw = 0; obs_mw = 0;
      for (int i = 0; i < IMEM_WORDS; i++) begin
        @(negedge clk);
        prog_we = 1'b1; prog_addr = 8'(i); prog_data = prog[i];
      end
      @(negedge clk);
      prog_we = 1'b0;
      rst = 1'b0;
      wait (halted);
      repeat (5) @(posedge clk);
    end
    check(n_add > 0,    "add never executed");
    check(n_sub > 0,    "sub never executed");
    check(n_and > 0,    "and never executed");
    check(n_or > 0,     "or never executed");
    check(n_slt1 > 0,   "slt never true");
    check(n_slt0 > 0,   "slt never false");
    check(n_addi > 0,   "addi never executed");
    check(n_lw > 0,     "lw never executed");
    check(n_sw > 0,     "sw never executed");
    check(n_beq_t > 0,  "beq never taken");
    check(n_beq_nt > 0, "beq never fell through");
    check(n_j > 0,      "j never executed");
    check(n_rfw > 0,    "register file never written");
    $display("instructions=%0d add=%0d sub=%0d and=%0d or=%0d slt(1)=%0d slt(0)=%0d addi=%0d lw=%0d sw=%0d beq(taken)=%0d beq(not)=%0d j=%0d",
             n_instr, n_add, n_sub, n_and, n_or, n_slt1, n_slt0, n_addi, n_lw, n_sw, n_beq_t, n_beq_nt, n_j);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
