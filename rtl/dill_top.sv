// Top level: the 4-bit single-cycle sub-CPU and, beside it, the stand-alone
// parts of the component library that accompanies it.
//
// The sub-CPU (sub_cpu) is the main design; its ports cpu_* go to an external
// data memory and instruction source.  The other instances are independent
// designs with their own ports, prefixed by the part they belong to: the
// tri-state bus transfer example, the 8-bit ripple adder and comparator, the
// code converters, the parity generator, the 4 x 4 register file, the 4-bit
// tri-state register, the ripple counter, the edge-triggered RS flip-flop, the
// RS latch with preset and clear, the shift register, the registered
// multiplexer, the half adder, 4-to-2 encoder, 2-to-4 demultiplexer, 4-to-1
// multiplexer, the divide-by-8 counter and the
// unclocked RS latch.  Nothing is shared between them except that the synchronous
// parts clocked on a common system clock (bus example, tri-state register)
// use clk.  Timing of each part is described in its own module.
module dill_top
  import dill_pkg::*;
(
  input  logic                        clk,
  // ---- sub-CPU ----
  input  logic                        cpu_clr_n,
  input  logic [IR_W-1:0]             cpu_ir,
  input  logic [DATA_W-1:0]           cpu_dt_in,
  output logic [NUM_REG-1:0][DATA_W-1:0] cpu_r,
  output logic                        cpu_flag1,
  output logic                        cpu_flag0,
  output logic [DATA_W-1:0]           cpu_bus_a_or_marr,
  output logic [DATA_W-1:0]           cpu_bus_b_or_dtout,
  output logic                        cpu_mw,
  // ---- bus transfer example ----
  input  logic                        bt_e,
  input  logic                        bt_f,
  input  logic [3:0]                  bt_ld,
  input  logic [7:0]                  bt_din,
  output logic [7:0]                  bt_g,
  // ---- 8-bit ripple adder ----
  input  logic [7:0]                  add8_a,
  input  logic [7:0]                  add8_b,
  input  logic                        add8_c0,
  output logic [7:0]                  add8_s,
  output logic                        add8_c8,
  // ---- 8-bit comparator ----
  input  logic [7:0]                  cmp8_x,
  input  logic [7:0]                  cmp8_y,
  output logic                        cmp8_ls,
  output logic                        cmp8_gr,
  // ---- decoders ----
  input  logic [2:0]                  dec38_d,
  output logic [7:0]                  dec38_y,
  input  logic [3:0]                  bcd_d,
  output logic [9:0]                  bcd_y_n,
  input  logic [3:0]                  xs3_d,
  output logic [9:0]                  xs3_y_n,
  input  logic [3:0]                  xs3g_d,
  output logic [9:0]                  xs3g_y_n,
  // ---- parity ----
  input  logic [7:0]                  par_d,
  output logic                        par_p,
  // ---- 4 x 4 register file ----
  input  logic [3:0]                  rf_d,
  input  logic                        rf_gw_n,
  input  logic                        rf_wb,
  input  logic                        rf_wa,
  input  logic                        rf_gr_n,
  input  logic                        rf_rb,
  input  logic                        rf_ra,
  output logic [3:0]                  rf_q,
  // ---- 4-bit tri-state register ----
  input  logic                        tr_m,
  input  logic                        tr_n,
  input  logic [3:0]                  tr_d,
  input  logic                        tr_g1_n,
  input  logic                        tr_g2_n,
  input  logic                        tr_clr_n,
  output logic [3:0]                  tr_q,
  output logic                        tr_q_en,
  // ---- ripple counter ----
  input  logic                        cnt_q4,
  input  logic                        cnt_r1,
  input  logic                        cnt_r2,
  output logic [3:0]                  cnt_q,
  // ---- edge-triggered RS flip-flop ----
  input  logic                        rsff_r,
  input  logic                        rsff_s,
  input  logic                        rsff_ck,
  output logic                        rsff_q,
  output logic                        rsff_qbar,
  // ---- RS latch with preset and clear ----
  input  logic                        lat_r,
  input  logic                        lat_s,
  input  logic                        lat_preset_n,
  input  logic                        lat_clear_n,
  input  logic                        lat_ck,
  output logic                        lat_q,
  output logic                        lat_qbar,
  // ---- shift register ----
  input  logic                        sr_d8,
  input  logic                        sr_c,
  output logic                        sr_d0,
  // ---- registered multiplexer ----
  input  logic [7:0]                  mr_a,
  input  logic [7:0]                  mr_b,
  input  logic                        mr_s,
  input  logic                        mr_ck,
  output logic [7:0]                  mr_q,
  // ---- small combinational parts ----
  input  logic                        ha_a,
  input  logic                        ha_b,
  output logic                        ha_s,
  output logic                        ha_c,
  input  logic [3:0]                  enc_d,
  output logic [1:0]                  enc_q,
  input  logic                        dmx4_d,
  input  logic [1:0]                  dmx4_s,
  output logic [3:0]                  dmx4_q,
  input  logic [3:0]                  mux4_d,
  input  logic [1:0]                  mux4_s,
  output logic                        mux4_q,
  // ---- divide-by-8 counter ----
  input  logic                        div_c,
  output logic [2:0]                  div_q,
  // ---- unclocked RS latch ----
  input  logic                        rsl_r,
  input  logic                        rsl_s,
  output logic                        rsl_q,
  output logic                        rsl_qbar
);
  sub_cpu u_cpu (
    .clk, .clr_n(cpu_clr_n), .ir(cpu_ir), .dt_in(cpu_dt_in), .r(cpu_r),
    .flag1(cpu_flag1), .flag0(cpu_flag0), .bus_a_or_marr(cpu_bus_a_or_marr),
    .bus_b_or_dtout(cpu_bus_b_or_dtout), .mw(cpu_mw)
  );

  bus_transfer #(.W(8)) u_bus_transfer (.clk, .e(bt_e), .f(bt_f), .ld(bt_ld), .din(bt_din), .g(bt_g));

  ripple_adder #(.N(8)) u_add8 (.a(add8_a), .b(add8_b), .c0(add8_c0), .s(add8_s), .cn(add8_c8));
  comparator8 u_cmp8 (.x(cmp8_x), .y(cmp8_y), .ls(cmp8_ls), .gr(cmp8_gr));

  decoder3to8        u_dec38 (.d(dec38_d), .y(dec38_y));
  bcd_to_dec         u_bcd   (.d(bcd_d),   .y(bcd_y_n));
  excess3_to_dec     u_xs3   (.d(xs3_d),   .y(xs3_y_n));
  excess3gray_to_dec u_xs3g  (.d(xs3g_d),  .y(xs3g_y_n));
  parity8            u_par   (.d(par_d),   .p(par_p));

  reg_4x4_rw u_rf (.d(rf_d), .gw_n(rf_gw_n), .wb(rf_wb), .wa(rf_wa),
                   .gr_n(rf_gr_n), .rb(rf_rb), .ra(rf_ra), .q(rf_q));
  register_4_tri u_treg (.m(tr_m), .n(tr_n), .d(tr_d), .g1_n(tr_g1_n), .g2_n(tr_g2_n),
                         .clr_n(tr_clr_n), .clk, .q(tr_q), .q_en(tr_q_en));
  bi_counter4_reset u_cnt (.q4(cnt_q4), .r1(cnt_r1), .r2(cnt_r2), .q(cnt_q));
  rs_ff_edge u_rsff (.r(rsff_r), .s(rsff_s), .ck(rsff_ck), .q(rsff_q), .qbar(rsff_qbar));
  latch_preclr u_lat (.r(lat_r), .s(lat_s), .preset_n(lat_preset_n), .clear_n(lat_clear_n),
                      .ck(lat_ck), .q(lat_q), .qbar(lat_qbar));
  shift_register8 #(.N(8)) u_sr (.d8(sr_d8), .c(sr_c), .d0(sr_d0));
  mux2to1_reg_8 #(.W(8)) u_mr (.a(mr_a), .b(mr_b), .s(mr_s), .ck(mr_ck), .q(mr_q));

  half_adder  u_ha   (.a(ha_a), .b(ha_b), .s(ha_s), .c(ha_c));
  encoder4to2 u_enc  (.d(enc_d), .q(enc_q));
  demux2to4   u_dmx4 (.d(dmx4_d), .s(dmx4_s), .q(dmx4_q));
  mux4to1     u_mux4 (.d(mux4_d), .s(mux4_s), .q(mux4_q));
  divider     u_div  (.c(div_c), .q(div_q));
  rs_latch    u_rsl  (.r(rsl_r), .s(rsl_s), .q(rsl_q), .qbar(rsl_qbar));
endmodule
