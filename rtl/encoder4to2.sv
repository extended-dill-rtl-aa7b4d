// 4-to-2 encoder with 1-active inputs: q = index of the active input.
//
// The library names it Encoder4to2[D3,D2,D1,D0,Q1,Q0] ("inputs 1 active").
// It is built here as the plain OR encoder, q1 = d3 | d2, q0 = d3 | d1, which
// is correct when at most one input is active; with several active inputs the
// result is the OR of their indices (no priority logic, this design's choice).
// No input active gives q = 0.  Input d[0] encodes index 0 and so drives no
// gate; it is kept as a port for the part's pin list.  Combinational.
module encoder4to2 (
  input  logic [3:0] d,
  output logic [1:0] q
);
  assign q[1] = d[3] | d[2];
  assign q[0] = d[3] | d[1];
endmodule
