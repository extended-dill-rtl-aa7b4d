// Reset-set latch without a clock, the cross-coupled NOR pair.
//
// S = 1, R = 0 sets (q = 1, qbar = 0); R = 1, S = 0 resets (q = 0, qbar = 1);
// R = S = 0 holds.  R = S = 1 drives both outputs to 0, as two NOR gates do.
// These four cases follow the document's latch behaviour.  When R and S
// return to 0 together from R = S = 1, the document lets either output win
// the race; this design resolves it deterministically by going back to the
// state held before R = S = 1 was applied.
//
// The latch is written by function with always_latch, not as two
// cross-coupled gates, because a zero-delay two-state simulator cannot settle
// the gate loop.  The state bit st is a latch that is transparent while
// exactly one of R and S is active.  Asynchronous: outputs follow the inputs
// with no clock.
module rs_latch (
  input  logic r,
  input  logic s,
  output logic q,
  output logic qbar
);
  logic st;
  always_latch begin
    if (r ^ s) st = s;
  end
  assign q    = st  & ~r;
  assign qbar = ~st & ~s;
endmodule
