// Edge-triggered RS flip-flop: outputs change at the falling clock edge.
//
// At a falling edge of ck, s = 1 (r = 0) sets Q, r = 1 (s = 0) resets it;
// otherwise Q holds (r = s = 1 is left open by the document and holds here).
// The document's netlist produces a short pulse from the delays of its gates
// when the clock falls; a zero-delay description cannot, so the flip-flop is
// written by its function.  Qbar is always NOT Q.
module rs_ff_edge (
  input  logic r,
  input  logic s,
  input  logic ck,
  output logic q,
  output logic qbar
);
  always_ff @(negedge ck) begin
    if (s && !r)      q <= 1'b1;
    else if (r && !s) q <= 1'b0;
  end
  assign qbar = ~q;
endmodule
