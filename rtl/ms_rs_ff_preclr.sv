// Master-slave RS flip-flop with asynchronous preset and clear (both 0
// active).  Outputs change at the falling clock edge.
//
// Function: at a falling edge of ck, s = 1 (r = 0) sets Q, r = 1 (s = 0)
// resets it, r = s = 0 holds; r = s = 1 also holds here (the document leaves
// that case open).  preset_n = 0 forces Q = 1 / Qbar = 0 and clear_n = 0
// forces Q = 0 / Qbar = 1 at once; with both active both outputs are 1, as
// the cross-coupled NAND output stage gives.  The master and slave latches
// of the document's gate netlist are written as one edge-triggered state bit:
// a zero-delay description cannot settle the netlist's gate loops.
module ms_rs_ff_preclr (
  input  logic r,
  input  logic s,
  input  logic preset_n,
  input  logic clear_n,
  input  logic ck,
  output logic q,
  output logic qbar
);
  logic state;

  always_ff @(negedge ck or negedge preset_n or negedge clear_n) begin
    if (!preset_n)        state <= 1'b1;
    else if (!clear_n)    state <= 1'b0;
    else if (s && !r)     state <= 1'b1;
    else if (r && !s)     state <= 1'b0;
  end

  assign q    = !preset_n ? 1'b1 : (!clear_n ? 1'b0 : state);
  assign qbar = !clear_n  ? 1'b1 : (!preset_n ? 1'b0 : ~state);
endmodule
