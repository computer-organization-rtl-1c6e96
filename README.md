# MIPS-lite: a step-by-step datapath and its control

This is a small 32-bit MIPS-style processor that executes one instruction at a
time, walking it through the classic execution steps — fetch, decode and
operand read, ALU operation, memory access, write-back, PC update — one clock
cycle per step. It implements the teaching design "Computer organization:
Datapath and control": a load-store machine with a 32 x 32-bit register file,
one ALU, and separate instruction and data memories. The register file is
built the way that design builds it — parallel-load registers, decoders, and
tri-state buffers driving shared buses — rather than as an inferred array.

Instructions: `add sub and or slt` (R-type), `addi`, `lw sw`, `beq`, `j`.

## Instruction format

All instructions are 32 bits. The R-type layout:

| bits  | 31-26  | 25-21 | 20-16 | 15-11 | 10-6  | 5-0   |
|-------|--------|-------|-------|-------|-------|-------|
| field | opcode | rs    | rt    | rd    | shamt | funct |

I-type instructions (`addi lw sw beq`) keep `opcode rs rt` and put a 16-bit
two's-complement immediate in bits 15-0; `j` holds a 26-bit word target in
bits 25-0. Because `rs` and `rt` sit in fixed places, the register file's
two read addresses come straight from the instruction register without any
decoding.

Encodings (standard MIPS-I numbers, so that MIPS assemblers can be used):

| instr | opcode | funct  | effect |
|-------|--------|--------|--------|
| add   | 000000 | 100000 | rd <- rs + rt |
| sub   | 000000 | 100010 | rd <- rs - rt |
| and   | 000000 | 100100 | rd <- rs & rt |
| or    | 000000 | 100101 | rd <- rs \| rt |
| slt   | 000000 | 101010 | rd <- (rs < rt, signed) ? 1 : 0 |
| addi  | 001000 |        | rt <- rs + sext(imm) |
| lw    | 100011 |        | rt <- MEM[rs + sext(imm)] |
| sw    | 101011 |        | MEM[rs + sext(imm)] <- rt |
| beq   | 000100 |        | if rs == rt: PC <- PC + 4 + 4*sext(imm) |
| j     | 000010 |        | PC <- {(PC+4)[31:28], target, 00} |

Example: `add $1, $2, $3` is `000000 00010 00011 00001 00000 100000`
(`0x00430820`).

Any other opcode, or an R-type function code outside the table, executes as a
no-operation (PC <- PC + 4). `shamt` is ignored. Add and sub wrap; there is
no overflow trap.

## How an instruction moves through the datapath

The PC, the instruction register IR, and two hidden latches, ALUOUT (the
ALU result) and MDR (the word read by `lw`), are all parallel-load registers
whose load input is driven by the controller. Every instruction starts in IF
and skips the steps it has no use for. The PC is loaded once per instruction,
at the end of its last step:

| step | R-type, addi | lw | sw | beq | j |
|------|--------------|----|----|-----|---|
| IF   | IR <- IMEM[PC] | same | same | same | same |
| D    | operands read (rs, rt, sext imm) | same | same | same | PC <- jump target |
| ALU  | ALUOUT <- rs op (rt or imm) | ALUOUT <- rs + imm | ALUOUT <- rs + imm | rs - rt; PC <- zero ? branch target : PC+4 | |
| MEM  | | MDR <- DMEM[ALUOUT] | DMEM[ALUOUT] <- rt; PC <- PC+4 | | |
| WB   | rd (R) / rt (addi) <- ALUOUT; PC <- PC+4 | rt <- MDR; PC <- PC+4 | | | |
| **cycles** | **4** | **5** | **4** | **3** | **2** |

Operands are not latched after D: the register file is read combinationally
from IR, and IR and the registers do not change until the instruction's last
cycle, so `rs`/`rt` values stay valid through ALU and MEM.

The branch target is formed by its own adder in `pc_next` (PC + 4 + 4 x
offset) so that the ALU is free to do the `beq` comparison (a subtraction
whose zero flag decides the branch) in the same cycle. The jump target keeps
the upper four bits of PC + 4.

## The register file

`register_file` follows the gate-level construction of the design, scaled
from its four-register example to `NUM_REGS` (default 32):

* `NUM_REGS` `parallel_load_register`s. A register loads `x` at the clock edge
  when its control `c` is 1 and holds otherwise.
* Write: a `decoder` with enable turns `dst_addr` into the `c` inputs. Its
  enable is `we`, so at most one register loads, and only when `we = 1`.
  `dst_data` is wired to every register's input.
* Read: each of the two read ports has its own `decoder`, permanently enabled.
  The decoder's one-hot output enables one tri-state buffer per register onto
  that port's bus (`shared_bus`). So the bus carries the addressed register.

That is `NUM_REGS` registers, two plain decoders, one decoder with enable,
`2 x NUM_REGS` tri-state buffers and three buses. For the four-register case:
four registers, three 2-to-4 decoders, eight buffers.

**Tri-state buffers as gating.** `shared_bus` models the buffers and the bus
wire as AND-OR logic: each driver's value is ANDed with its enable and the
results are ORed. With exactly one enable set, this gives the same value a
real tri-state bus would. It stays two-valued, synthesizes on parts without
internal tri-states, and simulates in two-state simulators. The rule that at
most one device drives a bus at a time is an immediate assertion in
`shared_bus`. If no driver is enabled, a real bus floats; this model reads 0.
The register file never leaves a read bus undriven.

Register 0 is an ordinary register. It is cleared by reset but not hard-wired
to zero as in full MIPS. Programs that use `$0` as a constant zero must not
write it.

`NUM_REGS` must be a power of two.

## Modules

| file | role |
|------|------|
| `rtl/mips_lite_pkg.sv` | instruction fields (`rtype_t`), opcodes, function codes, `alu_op_t`, `step_t`, `pc_sel_t` |
| `rtl/mips_lite_cpu.sv` | top: datapath wiring, IR, PC, ALUOUT, MDR, immediate sign extension |
| `rtl/control_unit.sv` | step sequencer and decoder (table above) |
| `rtl/register_file.sv` | 2-read / 1-write register file built from the parts below |
| `rtl/parallel_load_register.sv` | W-bit register with load control `c` and synchronous reset |
| `rtl/decoder.sv` | n-to-2^n decoder with enable |
| `rtl/shared_bus.sv` | tri-state bus with NDRV drivers (AND-OR model plus a single-driver assertion) |
| `rtl/alu.sv` | add, sub, and, or, signed slt; zero flag |
| `rtl/pc_next.sv` | PC + 4, branch target, jump target |
| `rtl/instr_mem.sv` | instruction memory, combinational read at the PC, load port |
| `rtl/data_mem.sv` | data memory, combinational read, write at the clock edge |

## Top-level interface (`mips_lite_cpu`)

Parameters: `XLEN = 32`, `NUM_REGS = 32`, `IMEM_WORDS = 256`,
`DMEM_WORDS = 256`.

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst` | in | clock; synchronous active-high reset: PC = 0, all registers 0, controller to IF |
| `prog_we`, `prog_addr`, `prog_data` | in | write one word into instruction memory (word index); use while `rst` is held |
| `pc`, `ir`, `step` | out | program counter, instruction register, current step |
| `instr_done` | out | last cycle of the current instruction |
| `rf_we`, `rf_waddr`, `rf_wdata` | out | register-file write happening at the next edge |
| `dmem_we`, `dmem_addr`, `dmem_wdata` | out | data-memory store happening at the next edge |

Addresses are byte addresses of word-aligned words. The memories use address
bits `[log2(WORDS)+1:2]` and repeat beyond their size. Data memory is not
initialised: a program should store a word before it loads it.

## Simulating

Every testbench in `tb/` is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. With plain
Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/mips_lite_pkg.sv tb/tb_mips_lite_cpu.sv --top-module tb_mips_lite_cpu
./obj_dir/Vtb_mips_lite_cpu
```

Replace the testbench name to run a unit test: `tb_register_file`, `tb_alu`,
`tb_control_unit`, `tb_decoder`, `tb_shared_bus`,
`tb_parallel_load_register`, `tb_pc_next`, `tb_instr_mem` or
`tb_data_mem`.

`tb_mips_lite_cpu` runs the processor at its default size. The program has
two parts:

* A fixed prologue that contains `add $1,$2,$3`, every instruction, `slt`
  both true and false, and `beq` both taken and not taken.
* About 200 seeded random instructions. These are ALU operations on random
  registers, loads and stores through `$0`, and forward `beq`/`j`. The
  program ends in a jump to itself.

Eight such programs, each with its own seed, run one after another, with a
reset between them (about 1500 instructions in all).

An instruction-set model inside the testbench executes the same program. For
every instruction, the testbench checks:

* the PC and the IR;
* the register write and the memory write, or that there is none;
* the cycle count from the table above.

It also counts how often each instruction kind, taken and untaken branches
and true and false `slt` happened. Any kind that never happened is a failure.
The run takes well under a second.

The register-file testbench covers both the 32-register default and the
four-register case.

## Departures and choices

The design fixes the instruction set, the six execution steps, the register
file's interface (SRC 1/2 Addr, DST Addr, DST Data, WE, SRC 1/2 Data) and its
internal construction, the parallel-load register's behaviour, the ALU's role,
and the separation of instruction and data memory. The following are this
implementation's own choices:

* **One step per cycle, with steps skipped.** Each instruction skips the
  steps it does not need. This adds the hidden ALUOUT and MDR latches.
* **Opcodes and function codes.** Only the `add` encoding is fixed by the
  design. The rest are the standard MIPS values.
* **`addi`.** It is included because the design uses it to explain
  immediate operands.
* **Branch target adder.** The branch target has its own adder. The design
  suggests using the ALU for it, which would need an extra cycle or more
  control.
* **Memories.** The memory sizes (256 words each), the combinational reads and
  the instruction-memory load port are not specified by the design.
* **Reset.** Reset is synchronous and clears every register. Register 0 is not
  hard-wired to zero.
* **Tri-state buses.** They are modelled as AND-OR gating with a
  single-driver assertion, as described above.
