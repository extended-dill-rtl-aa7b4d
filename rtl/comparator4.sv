// 4-bit magnitude comparator: four comparator1 slices, most significant first.
//
// ls_in / gr_in are the results of a more significant part (tie both to 0
// for a stand-alone compare).  ls = 1 when X < Y, gr = 1 when X > Y, both 0
// when equal.  Combinational; the decision ripples from bit 3 to bit 0.
//
// The slice order and the cascade wiring follow the document's 4-bit
// comparator netlist; the port names and the packed vectors are this design's.
module comparator4 (
  input  logic       ls_in,
  input  logic       gr_in,
  input  logic [3:0] x,
  input  logic [3:0] y,
  output logic       ls,
  output logic       gr
);
  logic [4:0] l, g;
  assign l[4] = ls_in;
  assign g[4] = gr_in;
  for (genvar i = 3; i >= 0; i--) begin : g_slice
    comparator1 u_c (.ai(l[i+1]), .bi(g[i+1]), .xi(x[i]), .yi(y[i]), .ap(l[i]), .bp(g[i]));
  end
  assign ls = l[0];
  assign gr = g[0];
endmodule
