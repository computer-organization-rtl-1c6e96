// shared_bus: a W-bit bus with NDRV tri-state drivers.
//
// Each driver i offers a value d[i] through a tri-state buffer whose enable
// is en[i]; any number of devices may read the bus, but at most one may
// drive it at a time. The buffers and the bus wires are modelled as an
// AND-OR network: with one enable set, q equals that driver's value, which
// is what the tri-state bus delivers. Two enabled drivers would make the
// real bus undefined; here this is flagged by an assertion. With no driver
// enabled the real bus floats; this model then reads 0.
// Building the bus from gating logic instead of high-impedance outputs is a
// choice of this implementation: it keeps the circuit two-valued and
// synthesizable on devices without internal tri-states.
//
// Interface: d (NDRV values of W bits), en (NDRV enables), q (bus value).
// Purely combinational.
module shared_bus #(
  parameter int unsigned NDRV = 4,
  parameter int unsigned W    = 32
) (
  input  logic [NDRV-1:0][W-1:0] d,
  input  logic [NDRV-1:0]        en,
  output logic [W-1:0]           q
);

  always_comb begin
    q = '0;
    for (int unsigned i = 0; i < NDRV; i++)
      q |= d[i] & {W{en[i]}};
  end

  // Bus rule: at most one device writes the wires at any given time.
  always_comb
    assert ($countones(en) <= 1)
      else $error("shared_bus: %0d drivers enabled at once", $countones(en));

endmodule
