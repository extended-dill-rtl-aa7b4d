// Data transfer through a shared tri-state bus.
//
// Four W-bit registers A..D drive one bus through tri-state outputs.  A
// 2-to-4 decoder with 0-active outputs turns the select {e, f} into the
// enables ENA..END, so exactly one register drives the bus at any time, and
// register G takes the bus value at every rising clock edge.  The transfer
// structure follows the document; how A..D are loaded is this design's own
// (din with one load strobe per register, on the rising edge).
module bus_transfer #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         e,     // select, more significant bit
  input  logic         f,     // select, less significant bit
  input  logic [3:0]   ld,    // ld[0] loads A ... ld[3] loads D
  input  logic [W-1:0] din,
  output logic [W-1:0] g
);
  logic [3:0]        sel, en_n;
  logic [3:0][W-1:0] rq, drv;
  logic [W-1:0]      bus;

  decoder2to4 u_dec (.d({e, f}), .q(sel));
  assign en_n = ~sel;

  for (genvar i = 0; i < 4; i++) begin : g_src
    always_ff @(posedge clk) if (ld[i]) rq[i] <= din;
    tri_repeater #(.W(W)) u_tri (.d(rq[i]), .en(~en_n[i]), .drv(drv[i]));
  end
  tri_bus #(.N(4), .W(W)) u_bus (.drv, .en(~en_n), .bus);

  always_ff @(posedge clk) g <= bus;
endmodule
