// data_mem: data memory of the MIPS-lite processor.
//
// A WORDS x W-bit array addressed by the ALU result, a byte address of
// word-aligned data (word index addr[log2(WORDS)+1:2]; the memory repeats
// beyond its size). lw reads it combinationally; sw writes wdata at the
// rising clock edge when we = 1. Memory size, word addressing and timing are
// choices of this implementation; its role (the ALU gives the address, the
// memory gives data to the registers on a load) follows the design.
//
// Interface: clk, addr (W bits), we, wdata (W bits); rdata (W bits).
module data_mem #(
  parameter int unsigned WORDS = 256,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic         clk,
  input  logic [W-1:0] addr,
  input  logic         we,
  input  logic [W-1:0] wdata,
  output logic [W-1:0] rdata
);

  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk)
    if (we) mem[addr[AW+1:2]] <= wdata;

  assign rdata = mem[addr[AW+1:2]];

endmodule
