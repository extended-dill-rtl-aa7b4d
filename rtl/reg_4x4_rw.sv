// 4 words x 4 bits register file with separate write and read ports, in the
// manner of the 74LS170.
//
// Write: while gw_n = 0 the word addressed by {wb, wa} is transparent to d
// (a 4-bit D latch per word, its gate = decoder output AND NOT gw_n) and it
// keeps the last value when gw_n returns to 1 or the address moves on.
// Read: q = word[{rb, ra}] while gr_n = 0; with gr_n = 1 every output is 1
// (each output bit is ORed with gr_n, standing in for the open-collector
// outputs of the real part).  Reads and writes are independent and
// combinational; b is the more significant address bit.
// The latches are deliberate (see dlatch4).
//
// The decoder, the latch per word, the read multiplexer and the OR with the
// read enable follow the document's netlist, including which address bit is
// the more significant; the packed ports are this design's.
module reg_4x4_rw (
  input  logic [3:0] d,
  input  logic       gw_n,
  input  logic       wb,
  input  logic       wa,
  input  logic       gr_n,
  input  logic       rb,
  input  logic       ra,
  output logic [3:0] q
);
  logic [3:0]      w;      // write address decode, 1 active
  logic [3:0]      gwin;   // latch gates
  logic [3:0][3:0] word;
  logic [3:0]      qin;

  decoder2to4 u_wdec (.d({wb, wa}), .q(w));
  assign gwin = w & {4{~gw_n}};
  for (genvar i = 0; i < 4; i++) begin : g_word
    dlatch4 #(.W(4)) u_lat (.d(d), .g(gwin[i]), .q(word[i]));
  end
  assign qin = word[{rb, ra}];
  assign q   = qin | {4{gr_n}};
endmodule
