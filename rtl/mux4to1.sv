// 1-bit 4-to-1 multiplexer: q = d[s].
//
// The library names it Multiplexer4to1[D3,D2,D1,D0,S1,S0,Q]; the select is
// {S1,S0} with S1 the most significant bit, as the port order suggests.  It is
// built as an AND-OR of the decoded select, the same form as mux2to1; the
// structure is this design's choice.  Combinational.
module mux4to1 (
  input  logic [3:0] d,
  input  logic [1:0] s,
  output logic       q
);
  logic [3:0] sel;
  decoder2to4 u_dec (.d(s), .q(sel));
  assign q = |(sel & d);
endmodule
