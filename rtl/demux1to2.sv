// W-bit 1-to-2 demultiplexer.
//
// q1 = d when s = 1, q0 = d when s = 0; the output not selected is all zeros.
// In the sub-CPU two of them steer BusA and BusB either to the adder (s = 1)
// or to the comparator (s = 0).  Combinational.
//
// The function follows the document's 1-to-2 demultiplexer; driving the
// unselected output to 0 and the width parameter are this design's choices.
module demux1to2 #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] d,
  input  logic         s,
  output logic [W-1:0] q1,
  output logic [W-1:0] q0
);
  assign q1 = d & {W{s}};
  assign q0 = d & {W{~s}};
endmodule
