// W-bit 2-to-1 multiplexer with a registered output: at the falling edge of
// ck, q takes a (s = 0) or b (s = 1).  A mux2to1 feeding a register_8, as in
// the document.
module mux2to1_reg_8 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         s,
  input  logic         ck,
  output logic [W-1:0] q
);
  logic [W-1:0] c, qbar_unused;
  mux2to1 #(.W(W)) u_mux (.a, .b, .s, .c);
  register_8 #(.W(W)) u_reg (.d(c), .c(ck), .q, .qbar(qbar_unused));
endmodule
