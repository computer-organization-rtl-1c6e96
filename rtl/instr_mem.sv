// instr_mem: instruction memory of the MIPS-lite processor.
//
// A WORDS x 32-bit array, separate from the data memory. The processor reads
// it combinationally at the PC during the fetch step; the word index is
// PC[log2(WORDS)+1:2], so the PC is a byte address of word-aligned
// instructions and the memory repeats beyond its size. A write port
// (prog_we, prog_addr, prog_data, written at the clock edge) loads the
// program before the processor is released from reset. Size, the loading
// port and the combinational read are choices of this implementation; the
// separation of instruction and data memory follows the design.
//
// Interface: clk; prog_we, prog_addr (word index), prog_data; addr (byte
// address), instr.
module instr_mem #(
  parameter int unsigned WORDS = 256,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          prog_we,
  input  logic [AW-1:0] prog_addr,
  input  logic [31:0]   prog_data,
  input  logic [31:0]   addr,
  output logic [31:0]   instr
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk)
    if (prog_we) mem[prog_addr] <= prog_data;

  assign instr = mem[addr[AW+1:2]];

endmodule
