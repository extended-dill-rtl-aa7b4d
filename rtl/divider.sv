// Divide-by-2^N counter: an N-bit binary counter advanced by every active
// edge of c.  Output q[k] has the clock frequency divided by 2^(k+1), so the
// top bit divides by 2^N.
//
// The library names Divider2[C,Q], Divider4[C,Q1,Q0] and Divider8[C,Q2,Q1,Q0]
// with variants on the negative and on the positive clock edge; they are
// N = 1, 2 and 3 of this module, and NEG_EDGE picks the edge (default 1,
// the falling edge, like the library's master-slave parts: this design's
// choice).  The parts have no reset input, so neither has this module: the
// count starts from whatever the flip-flops power up in, and only the
// division ratio is defined.  A synchronous counter is used; the library does
// not say whether its dividers ripple.
module divider #(
  parameter int unsigned N        = 3,
  parameter bit          NEG_EDGE = 1'b1
) (
  input  logic         c,
  output logic [N-1:0] q
);
  logic ck;
  assign ck = NEG_EDGE ? ~c : c;
  always_ff @(posedge ck) q <= q + 1'b1;
endmodule
