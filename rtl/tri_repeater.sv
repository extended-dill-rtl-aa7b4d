// Tri-state repeater with a 1-active enable, in two-valued form.
//
// A tri-state output is modelled without a high-impedance value: an enabled
// repeater puts its input on drv, a disabled one puts all zeros there, and the
// bus that several repeaters share (tri_bus) is the OR of their drv outputs.
// With at most one driver enabled this gives the value a real tri-state bus
// would carry.  Combinational.
//
// The two-valued treatment of the high-impedance state follows the
// document, which also has no third logic value; modelling the bus as an OR
// of gated drivers is this design's choice.
module tri_repeater #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] d,
  input  logic         en,
  output logic [W-1:0] drv
);
  assign drv = d & {W{en}};
endmodule
