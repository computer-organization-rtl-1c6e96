// parallel_load_register: W-bit register with a load control.
//
// On a rising clock edge the register takes the value of x when its control
// input c is 1 and keeps its value when c is 0; z always shows the stored
// value. This is the parallel-load register the register file is built from,
// and the processor also uses it for its hidden registers (PC, IR and the
// latches between steps).
//
// Interface: clk, rst (synchronous, active high, clears the register to
// RESET_VALUE), c (load), x (data in), z (data out).
// Timing: z changes one clock edge after c = 1 is presented with x.
// The load/hold behaviour and the 32-bit width follow the design; the reset
// input is an addition of this implementation so that the processor starts
// from a known state.
module parallel_load_register #(
  parameter int unsigned     W           = 32,
  parameter logic [W-1:0]    RESET_VALUE = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         c,
  input  logic [W-1:0] x,
  output logic [W-1:0] z
);

  always_ff @(posedge clk) begin
    if (rst)    z <= RESET_VALUE;
    else if (c) z <= x;
  end

endmodule
