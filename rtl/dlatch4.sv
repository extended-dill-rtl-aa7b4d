// W-bit D latch: q follows d while g = 1 and holds while g = 0.
// A level-sensitive latch is the intended storage element here (it is the
// cell of the 4x4 register file reg_4x4_rw), so the latch inferred from
// always_latch is deliberate.  The document builds the part from four
// single-bit D latches; describing it by function with always_latch rather
// than as gates, and the width parameter, are this design's choices.
module dlatch4 #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] d,
  input  logic         g,
  output logic [W-1:0] q
);
  always_latch begin
    if (g) q = d;
  end
endmodule
