// 4-bit D register with load enable, asynchronous clear and tri-state outputs,
// in the manner of the 74LS173.
//
// Load: at a rising edge of clk the register takes d when g1_n and g2_n are
// both 0 and recirculates its value otherwise (an AND-OR selector in front
// of each flip-flop).  clr_n = 0 clears it at once.  The flip-flops are the
// falling-edge master-slave D flip-flops, clocked by the inverted clock, so
// the outputs change at the rising clock edge.  Output: q_en = NOT (m OR n);
// q shows the stored value while q_en = 1 and contributes zeros to a shared
// bus otherwise (two-valued tri-state model, see tri_repeater).
//
// The gating of the loads, the clear, the inverted clock and the output
// enable follow the document's netlist; the separate q_en output, which
// stands in for a high-impedance state, is this design's choice.
module register_4_tri (
  input  logic       m,
  input  logic       n,
  input  logic [3:0] d,
  input  logic       g1_n,
  input  logic       g2_n,
  input  logic       clr_n,
  input  logic       clk,
  output logic [3:0] q,
  output logic       q_en
);
  logic       g, clkin;
  logic [3:0] ind, qin, qbar;

  assign g     = ~(g1_n | g2_n);
  assign clkin = ~clk;
  assign q_en  = ~(m | n);
  assign ind   = (d & {4{g}}) | (qin & {4{~g}});

  for (genvar i = 0; i < 4; i++) begin : g_bit
    d_ff_preclr u_ff (.d(ind[i]), .preset_n(1'b1), .clear_n(clr_n), .ck(clkin),
                      .q(qin[i]), .qbar(qbar[i]));
  end
  tri_repeater #(.W(4)) u_out (.d(~qbar), .en(q_en), .drv(q));
endmodule
