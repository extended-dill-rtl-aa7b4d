// W-bit 2-to-1 multiplexer: c = a when s = 0, c = b when s = 1.
// Written as the document's AND-OR form with an inverted select.  The library
// part is 8 bits wide (the default); the sub-CPU uses W = 4.  Combinational.
module mux2to1 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         s,
  output logic [W-1:0] c
);
  assign c = (a & {W{~s}}) | (b & {W{s}});
endmodule
