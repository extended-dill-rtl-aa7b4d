// Resolution of a bus shared by N tri-state drivers.
//
// Each driver hands over its contribution (zero when disabled, see
// tri_repeater) and its enable.  The bus value is the OR of all
// contributions.  Driving a bus from two enabled outputs at once would be a
// short circuit in real hardware; an immediate assertion reports it.  With no
// driver enabled the bus reads 0 (a floating bus has no defined level).
module tri_bus #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 4
) (
  input  logic [N-1:0][W-1:0] drv,
  input  logic [N-1:0]        en,
  output logic [W-1:0]        bus
);
  always_comb begin
    bus = '0;
    for (int i = 0; i < N; i++) bus |= drv[i];
  end

  always_comb
    assert ($countones(en) <= 1)
      else $error("tri_bus: %0d drivers enabled at once (en=%b)", $countones(en), en);
endmodule
