// Single-cycle 4-bit sub-CPU: control logic and datapath of a small CPU.
//
// The sub-CPU executes one 9-bit instruction per clock cycle.  The instruction
// is applied at ir while the clock is high, the decoded control signals, the
// two register buses and the ALU settle while the clock is low, and the result
// is written into the register file and the flags on the next rising edge.
// Five instructions exist (see dill_pkg):
//   Load  DR, #imm   R[DR] <= IR[3:0]               (IR[8] = 1)
//   Load  DR, SA     R[DR] <= M[R[SA]]  via dt_in   (IR[8] = 0)
//   Store SA, SB     M[R[SA]] <= R[SB], mw = 1
//   Add   DR, SA, SB {Flag1, R[DR]} <= R[SA] + R[SB]
//   Cmp   SA, SB     Flag0 <= (R[SA] == R[SB])
//
// Datapath, as in the document's block diagram: three 2-to-4 decoders turn the
// DR/SA/SB fields into one-hot selects; the register file puts R[SA] on BusA
// and R[SB] on BusB through tri-state repeaters; BusA doubles as the memory
// address and BusB as the memory write data.  Two demultiplexers steer the
// buses into the 4-bit adder (Add) or the 4-bit comparator (otherwise).  The
// write-back value RegIn is picked by two multiplexers: MorF chooses the adder
// sum or the memory data, LI then chooses that or the immediate operand.  The
// flags are 1-bit load-enabled registers, loaded only by Add (carry) and Cmp
// (equal = neither less nor greater).
//
// The memory itself is outside: mw, bus_a_or_marr and bus_b_or_dtout go to
// it, and dt_in must return M[bus_a_or_marr] within the same cycle.
// clr_n is this design's addition: the document ties the clear inputs of all
// registers inactive; here they are a port so the state can start defined.
module sub_cpu
  import dill_pkg::*;
#(
  parameter int unsigned W    = DATA_W,
  parameter int unsigned NREG = NUM_REG,
  parameter int unsigned IRW  = IR_W
) (
  input  logic                   clk,
  input  logic                   clr_n,
  input  logic [IRW-1:0]         ir,
  input  logic [W-1:0]           dt_in,
  output logic [NREG-1:0][W-1:0] r,
  output logic                   flag1,
  output logic                   flag0,
  output logic [W-1:0]           bus_a_or_marr,
  output logic [W-1:0]           bus_b_or_dtout,
  output logic                   mw
);
  // The instruction format and the 4-bit comparator fix these sizes.
  if (W != 4 || NREG != 4 || IRW != 9) begin : g_size_check
    $error("sub_cpu: only W=4, NREG=4, IRW=9 are supported");
  end

  ctrl_t ctrl;
  logic [NREG-1:0] dr_sel, sa_sel, sb_sel;
  logic [W-1:0] add_a, add_b, com_a, com_b, sum, mem_or_sum, reg_in;
  logic carry, ls, gr, equal;

  // ---- control ----
  ctrl_word u_ctrl (.ir_hi(ir[8:6]), .ctrl(ctrl));
  decoder2to4 u_dec_dr (.d(ir[5:4]), .q(dr_sel));
  decoder2to4 u_dec_sa (.d(ir[3:2]), .q(sa_sel));
  decoder2to4 u_dec_sb (.d(ir[1:0]), .q(sb_sel));
  assign mw = ctrl.mw;

  // ---- register file and buses ----
  register_file #(.W(W), .NREG(NREG)) u_rf (
    .clk, .clr_n, .rw(ctrl.rw), .dr(dr_sel), .sa(sa_sel), .sb(sb_sel),
    .reg_in, .r, .bus_a(bus_a_or_marr), .bus_b(bus_b_or_dtout)
  );

  // ---- ALU ----
  demux1to2 #(.W(W)) u_dmx_a (.d(bus_a_or_marr),  .s(ctrl.aor_c), .q1(add_a), .q0(com_a));
  demux1to2 #(.W(W)) u_dmx_b (.d(bus_b_or_dtout), .s(ctrl.aor_c), .q1(add_b), .q0(com_b));
  ripple_adder #(.N(W)) u_add (.a(add_a), .b(add_b), .c0(1'b0), .s(sum), .cn(carry));
  comparator4 u_cmp (.ls_in(1'b0), .gr_in(1'b0), .x(com_a), .y(com_b), .ls(ls), .gr(gr));
  assign equal = ~(ls | gr);

  // ---- flags ----
  reg_load_clr #(.W(1)) u_flag1 (.clk, .clr_n, .g(ctrl.add), .d(carry), .q(flag1));
  reg_load_clr #(.W(1)) u_flag0 (.clk, .clr_n, .g(ctrl.cmp), .d(equal), .q(flag0));

  // ---- write-back selection ----
  mux2to1 #(.W(W)) u_mux_morf (.a(sum), .b(dt_in), .s(ctrl.mor_f), .c(mem_or_sum));
  mux2to1 #(.W(W)) u_mux_li (.a(mem_or_sum), .b(ir[W-1:0]), .s(ctrl.li), .c(reg_in));
endmodule
