// 1-bit 2-to-4 demultiplexer: the data bit d appears on output q[s], the
// other three outputs are 0.
//
// The library names it Demultiplexer2to4[D,S1,S0,Q3,Q2,Q1,Q0]; the select is
// {S1,S0} with S1 the most significant bit, as the port order suggests.  The
// AND-with-decoded-select structure, like demux1to2, is this design's choice.
// Combinational.
module demux2to4 (
  input  logic       d,
  input  logic [1:0] s,
  output logic [3:0] q
);
  logic [3:0] sel;
  decoder2to4 u_dec (.d(s), .q(sel));
  assign q = sel & {4{d}};
endmodule
