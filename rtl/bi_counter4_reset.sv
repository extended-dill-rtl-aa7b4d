// 4-bit ripple binary counter with asynchronous reset, in the manner of the
// 74LS93.
//
// Four JK flip-flops with J = K = 1 toggle on the falling edge of their
// clock.  The first stage (output q[3]) is clocked by the input q4, each
// further stage by the output of the stage before it, so the count
// {q[0], q[1], q[2], q[3]} (q[3] least significant) advances by one at every
// falling edge of q4.  When r1 and r2 are both 1, the 0-active clear of every
// stage (clear_n = r1 NAND r2) resets the count to 0 at once.  Bit numbering
// follows the document's part.  The stages ripple: the outputs settle one
// flip-flop after another, not on a common clock.
module bi_counter4_reset (
  input  logic       q4,
  input  logic       r1,
  input  logic       r2,
  output logic [3:0] q
);
  logic       r1r2_n;
  logic [4:0] ck;
  logic [3:0] qbar;

  assign r1r2_n = ~(r1 & r2);
  assign ck[4]  = q4;
  for (genvar i = 3; i >= 0; i--) begin : g_stage
    jk_ff_preclr u_jk (.j(1'b1), .k(1'b1), .preset_n(1'b1), .clear_n(r1r2_n),
                       .ck(ck[i+1]), .q(q[i]), .qbar(qbar[i]));
    assign ck[i] = q[i];
  end
endmodule
