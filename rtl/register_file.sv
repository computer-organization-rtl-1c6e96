// register_file: NUM_REGS x W register file, two read ports, one write port.
//
// Structure, as in the design's four-register example scaled to NUM_REGS:
//   * NUM_REGS parallel-load registers hold the values;
//   * each read port has a decoder (always enabled) that turns SRC addr into
//     one-hot enables for the tri-state buffers that connect every register's
//     output to that port's bus, so the bus carries the selected register;
//   * a decoder with enable, enabled by WE, turns DST addr into the load
//     control c of exactly one register, so DST data is written to that
//     register only when WE = 1; all other registers hold.
// That is three buses, two plain decoders, one decoder with enable and
// 2 x NUM_REGS tri-state buffers.
//
// Interface: src1_addr, src2_addr, dst_addr (log2(NUM_REGS) bits each),
// dst_data (W bits), we; src1_data, src2_data (W bits).
// Timing: reads are combinational; a write takes effect at the rising clock
// edge and is visible on the read ports after it.
// Register 0 is an ordinary register here (no hard-wired zero); rst clears
// all registers, a choice of this implementation.
module register_file #(
  parameter int unsigned NUM_REGS = 32,
  parameter int unsigned W        = 32,
  localparam int unsigned AW      = $clog2(NUM_REGS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] src1_addr,
  input  logic [AW-1:0] src2_addr,
  input  logic [AW-1:0] dst_addr,
  input  logic [W-1:0]  dst_data,
  input  logic          we,
  output logic [W-1:0]  src1_data,
  output logic [W-1:0]  src2_data
);

  logic [NUM_REGS-1:0]        load;     // c of each register
  logic [NUM_REGS-1:0]        sel1;     // tri-state enables, read bus 1
  logic [NUM_REGS-1:0]        sel2;     // tri-state enables, read bus 2
  logic [NUM_REGS-1:0][W-1:0] regs_q;   // register outputs

  decoder #(.N(AW)) u_dec_dst  (.a(dst_addr),  .en(we),   .y(load));
  decoder #(.N(AW)) u_dec_src1 (.a(src1_addr), .en(1'b1), .y(sel1));
  decoder #(.N(AW)) u_dec_src2 (.a(src2_addr), .en(1'b1), .y(sel2));

  for (genvar r = 0; r < NUM_REGS; r++) begin : g_reg
    parallel_load_register #(.W(W)) u_reg (
      .clk (clk),
      .rst (rst),
      .c   (load[r]),
      .x   (dst_data),
      .z   (regs_q[r])
    );
  end

  shared_bus #(.NDRV(NUM_REGS), .W(W)) u_bus1 (.d(regs_q), .en(sel1), .q(src1_data));
  shared_bus #(.NDRV(NUM_REGS), .W(W)) u_bus2 (.d(regs_q), .en(sel2), .q(src2_data));

endmodule
