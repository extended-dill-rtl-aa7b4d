// 8-bit magnitude comparator: two comparator4 stages, the upper nibble
// first, with the cascade inputs of the upper stage tied to 0.
// ls = (x < y), gr = (x > y).  Combinational.
//
// The two-stage structure and the tied-off cascade inputs follow the
// document's 8-bit comparator; the packed ports are this design's choice.
module comparator8 (
  input  logic [7:0] x,
  input  logic [7:0] y,
  output logic       ls,
  output logic       gr
);
  logic ls4, gr4;
  comparator4 u_hi (.ls_in(1'b0), .gr_in(1'b0), .x(x[7:4]), .y(y[7:4]), .ls(ls4), .gr(gr4));
  comparator4 u_lo (.ls_in(ls4),  .gr_in(gr4),  .x(x[3:0]), .y(y[3:0]), .ls(ls),  .gr(gr));
endmodule
