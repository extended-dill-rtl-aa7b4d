// Master-slave D flip-flop with asynchronous preset and clear (0 active):
// Q takes D at the falling clock edge.  Built as in the document from the JK
// flip-flop with J = D and K = NOT D.
module d_ff_preclr (
  input  logic d,
  input  logic preset_n,
  input  logic clear_n,
  input  logic ck,
  output logic q,
  output logic qbar
);
  jk_ff_preclr u_jk (.j(d), .k(~d), .preset_n, .clear_n, .ck, .q, .qbar);
endmodule
