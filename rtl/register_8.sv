// W-bit register of master-slave D flip-flops with a common clock: q takes d
// at the falling edge of c, qbar = NOT q.  No reset, as in the document.
module register_8 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] d,
  input  logic         c,
  output logic [W-1:0] q,
  output logic [W-1:0] qbar
);
  always_ff @(negedge c) q <= d;
  assign qbar = ~q;
endmodule
