// Master-slave JK flip-flop with asynchronous preset and clear (0 active),
// outputs changing at the falling clock edge.
//
// Built as in the document from an RS master-slave flip-flop whose set input
// is J AND Qbar and whose reset input is K AND Q: J sets, K resets, J = K = 1
// toggles, J = K = 0 holds.
module jk_ff_preclr (
  input  logic j,
  input  logic k,
  input  logic preset_n,
  input  logic clear_n,
  input  logic ck,
  output logic q,
  output logic qbar
);
  logic sint, rint;
  assign sint = j & qbar;
  assign rint = k & q;
  ms_rs_ff_preclr u_ms (.r(rint), .s(sint), .preset_n, .clear_n, .ck, .q, .qbar);
endmodule
