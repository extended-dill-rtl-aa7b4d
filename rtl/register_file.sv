// Register file of the sub-CPU: R0..R3 with one write port and two
// tri-state read buses.
//
// Register i loads reg_in on the rising clock edge when rw and dr[i] are both
// 1 (dr is the one-hot decode of the DR field).  Every register drives both
// BusA and BusB through a tri-state repeater; the one-hot selects sa and sb
// enable exactly one repeater on each bus, so bus_a = R[SA] and bus_b = R[SB]
// combinationally.  The structure (four load-enabled registers, eight
// repeaters) follows the document; the two-valued bus model is described in
// tri_repeater.
module register_file #(
  parameter int unsigned W    = 4,
  parameter int unsigned NREG = 4
) (
  input  logic                     clk,
  input  logic                     clr_n,
  input  logic                     rw,
  input  logic [NREG-1:0]          dr,
  input  logic [NREG-1:0]          sa,
  input  logic [NREG-1:0]          sb,
  input  logic [W-1:0]             reg_in,
  output logic [NREG-1:0][W-1:0]   r,
  output logic [W-1:0]             bus_a,
  output logic [W-1:0]             bus_b
);
  logic [NREG-1:0][W-1:0] drv_a, drv_b;

  for (genvar i = 0; i < NREG; i++) begin : g_reg
    reg_load_clr #(.W(W)) u_reg (
      .clk, .clr_n, .g(rw & dr[i]), .d(reg_in), .q(r[i])
    );
    tri_repeater #(.W(W)) u_rep_a (.d(r[i]), .en(sa[i]), .drv(drv_a[i]));
    tri_repeater #(.W(W)) u_rep_b (.d(r[i]), .en(sb[i]), .drv(drv_b[i]));
  end

  tri_bus #(.N(NREG), .W(W)) u_bus_a (.drv(drv_a), .en(sa), .bus(bus_a));
  tri_bus #(.N(NREG), .W(W)) u_bus_b (.drv(drv_b), .en(sb), .bus(bus_b));
endmodule
