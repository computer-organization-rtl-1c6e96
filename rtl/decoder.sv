// decoder: n-to-2^n line decoder with enable.
//
// When en is 1, exactly one output line is 1: the one whose index equals the
// binary input a. When en is 0 all lines are 0. With en tied to 1 this is the
// plain 2-4 decoder that selects the tri-state buffers of a register-file
// read port; with en driven by the write enable it is the 2-4 decoder with
// enable that picks the register to load. N defaults to 2 (a 2-4 decoder);
// the register file sets it to log2 of its register count.
//
// Interface: a (N-bit input), en, y (2^N one-hot output). Purely
// combinational.
module decoder #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0]      a,
  input  logic              en,
  output logic [(1<<N)-1:0] y
);

  always_comb begin
    for (int unsigned i = 0; i < (1 << N); i++)
      y[i] = en && (a == N'(i));
  end

endmodule
