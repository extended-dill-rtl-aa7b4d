// End-to-end testbench of the top level, at its default parameters.
//
// Sub-CPU: a 16 x 4 data memory model serves the memory bus.  The testbench
// runs a small program that exercises every instruction (immediate and memory
// loads, stores, adds with and without carry, equal and unequal compares),
// including a loop-free sum of four memory words computed by the CPU, and then
// random instructions, all checked against a reference model, one instruction
// per clock cycle.  Each library part beside the CPU is driven through one
// complete operation and checked: the bus transfer moves every register to G,
// the adder, comparator, decoders and parity generator see random inputs, the
// 4 x 4 register file is written and read back, the tri-state register is
// loaded, disabled and cleared, the counter wraps and is reset, the flip-flop,
// latch, shift register and registered multiplexer run through their cycles,
// the half adder, encoder, 4-way demultiplexer and multiplexer see random
// inputs, the divide-by-8 counter counts through a wrap-around, and the RS
// latch is reset, set and driven with both inputs active.
// Every mechanism counted below must occur at least once.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_dill_top;
  import dill_pkg::*;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_ld_imm = 0, n_ld_mem = 0, n_store = 0, n_add = 0, n_carry = 0, n_cmp_eq = 0, n_cmp_ne = 0;
  int n_bus_src[4];
  int n_cnt_wrap = 0, n_cnt_reset = 0, n_tri_off = 0, n_tri_clr = 0, n_lat_pc = 0;

  logic clk = 0;
  always #5 clk = ~clk;

  // ---------------- sub-CPU ----------------
  logic cpu_clr_n = 1; logic [8:0] cpu_ir = 0; logic [3:0] cpu_dt_in;
  logic [3:0][3:0] cpu_r; logic cpu_flag1, cpu_flag0, cpu_mw; logic [3:0] cpu_ba, cpu_bb;
  logic [3:0] mem [16];
  // ---------------- library parts ----------------
  logic bt_e = 0, bt_f = 0; logic [3:0] bt_ld = 0; logic [7:0] bt_din = 0, bt_g;
  logic [7:0] add8_a = 0, add8_b = 0, add8_s; logic add8_c0 = 0, add8_c8;
  logic [7:0] cmp8_x = 0, cmp8_y = 0; logic cmp8_ls, cmp8_gr;
  logic [2:0] dec38_d = 0; logic [7:0] dec38_y;
  logic [3:0] bcd_d = 0, xs3_d = 0, xs3g_d = 0; logic [9:0] bcd_y_n, xs3_y_n, xs3g_y_n;
  logic [7:0] par_d = 0; logic par_p;
  logic [3:0] rf_d = 0, rf_q; logic rf_gw_n = 1, rf_wb = 0, rf_wa = 0, rf_gr_n = 1, rf_rb = 0, rf_ra = 0;
  logic tr_m = 0, tr_n = 0, tr_g1_n = 1, tr_g2_n = 1, tr_clr_n = 1, tr_q_en; logic [3:0] tr_d = 0, tr_q;
  logic cnt_q4 = 1, cnt_r1 = 0, cnt_r2 = 1; logic [3:0] cnt_q;
  logic rsff_r = 1, rsff_s = 0, rsff_ck = 1, rsff_q, rsff_qbar;
  logic lat_r = 0, lat_s = 0, lat_preset_n = 1, lat_clear_n = 0, lat_ck = 0, lat_q, lat_qbar;
  logic sr_d8 = 0, sr_c = 1, sr_d0;
  logic [7:0] mr_a = 0, mr_b = 0, mr_q; logic mr_s = 0, mr_ck = 1;
  logic ha_a = 0, ha_b = 0, ha_s, ha_c; logic [3:0] enc_d = 0; logic [1:0] enc_q;
  logic dmx4_d = 0; logic [1:0] dmx4_s = 0, mux4_s = 0; logic [3:0] dmx4_q, mux4_d = 0; logic mux4_q;
  logic div_c = 1; logic [2:0] div_q;
  int n_div_wrap = 0, n_rsl_both = 0;
  logic rsl_r = 1, rsl_s = 0, rsl_q, rsl_qbar;

  dill_top dut (
    .clk, .cpu_clr_n, .cpu_ir, .cpu_dt_in, .cpu_r, .cpu_flag1, .cpu_flag0,
    .cpu_bus_a_or_marr(cpu_ba), .cpu_bus_b_or_dtout(cpu_bb), .cpu_mw,
    .bt_e, .bt_f, .bt_ld, .bt_din, .bt_g,
    .add8_a, .add8_b, .add8_c0, .add8_s, .add8_c8,
    .cmp8_x, .cmp8_y, .cmp8_ls, .cmp8_gr,
    .dec38_d, .dec38_y, .bcd_d, .bcd_y_n, .xs3_d, .xs3_y_n, .xs3g_d, .xs3g_y_n,
    .par_d, .par_p,
    .rf_d, .rf_gw_n, .rf_wb, .rf_wa, .rf_gr_n, .rf_rb, .rf_ra, .rf_q,
    .tr_m, .tr_n, .tr_d, .tr_g1_n, .tr_g2_n, .tr_clr_n, .tr_q, .tr_q_en,
    .cnt_q4, .cnt_r1, .cnt_r2, .cnt_q,
    .rsff_r, .rsff_s, .rsff_ck, .rsff_q, .rsff_qbar,
    .lat_r, .lat_s, .lat_preset_n, .lat_clear_n, .lat_ck, .lat_q, .lat_qbar,
    .sr_d8, .sr_c, .sr_d0,
    .mr_a, .mr_b, .mr_s, .mr_ck, .mr_q,
    .ha_a, .ha_b, .ha_s, .ha_c, .enc_d, .enc_q, .dmx4_d, .dmx4_s, .dmx4_q,
    .mux4_d, .mux4_s, .mux4_q, .div_c, .div_q, .rsl_r, .rsl_s, .rsl_q, .rsl_qbar
  );

  assign cpu_dt_in = mem[cpu_ba];
  always @(posedge clk) if (cpu_mw) mem[cpu_ba] <= cpu_bb;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end

  // ---- sub-CPU reference model and instruction runner ----
  logic [3:0] m_r [4];
  logic m_f1 = 0, m_f0 = 0;

  function automatic logic [8:0] I(bit imm, logic [1:0] op, int dr, int sa, int sb);
    return {imm, op, 2'(dr), 2'(sa), 2'(sb)};
  endfunction
  function automatic logic [8:0] LDI(int dr, logic [3:0] v);
    return {1'b1, 2'b10, 2'(dr), v};
  endfunction

  task automatic exec(logic [8:0] x);
    logic [3:0] a, b; logic [4:0] s; int dr;
    a = m_r[x[3:2]]; b = m_r[x[1:0]]; dr = int'(x[5:4]);
    @(negedge clk); cpu_ir = x; #1;
    `CHECK(cpu_ba, a, "CPU BusA")
    `CHECK(cpu_bb, b, "CPU BusB")
    `CHECK(cpu_mw, x[7:6] == 2'b01, "CPU MW")
    n_bus_src[x[3:2]]++;
    case (x[7:6])
      2'b00: begin m_f0 = (a == b); if (m_f0) n_cmp_eq++; else n_cmp_ne++; end
      2'b01: n_store++;
      2'b10: if (x[8]) begin m_r[dr] = x[3:0]; n_ld_imm++; end
             else begin m_r[dr] = mem[a]; n_ld_mem++; end
      2'b11: begin s = a + b; m_r[dr] = s[3:0]; m_f1 = s[4]; n_add++; if (s[4]) n_carry++; end
    endcase
    @(posedge clk); #1;
    for (int i = 0; i < 4; i++) `CHECK(cpu_r[i], m_r[i], "CPU register after one cycle")
    `CHECK({cpu_flag1, cpu_flag0}, {m_f1, m_f0}, "CPU flags")
  endtask

  task automatic cpu_test();
    int sum;
    for (int i = 0; i < 16; i++) mem[i] = 4'(i ^ 4'h9);
    for (int i = 0; i < 4; i++) m_r[i] = 0;
    #1 cpu_clr_n = 0;
    repeat (2) @(posedge clk); #1 cpu_clr_n = 1;
    // sum of M[4..7] into R0, then store it at M[15] and read it back
    exec(LDI(0, 4'd0));
    for (int k = 4; k < 8; k++) begin
      exec(LDI(1, 4'(k)));
      exec(I(0, 2'b10, 2, 1, 0));     // Load R2, R1   (R2 = M[R1])
      exec(I(0, 2'b11, 0, 0, 2));     // Add  R0, R0, R2
    end
    sum = 0; for (int k = 4; k < 8; k++) sum += mem[k];
    `CHECK(cpu_r[0], 4'(sum), "program: sum of M[4..7]")
    exec(LDI(3, 4'd15));
    exec(I(0, 2'b01, 0, 3, 0));       // Store R3, R0  (M[15] = R0)
    `CHECK(mem[15], 4'(sum), "program: stored sum")
    exec(I(0, 2'b10, 1, 3, 0));       // Load R1, R3
    exec(I(0, 2'b00, 0, 1, 0));       // Cmp R1, R0 -> equal
    `CHECK(cpu_flag0, 1'b1, "program: read-back compares equal")
    exec(I(0, 2'b00, 0, 3, 0));       // Cmp R3, R0
    exec(LDI(2, 4'hf)); exec(I(0, 2'b11, 1, 2, 2));   // 15 + 15 gives a carry
    for (int k = 0; k < 300; k++) exec(9'($urandom));
  endtask

  // ---- library parts ----
  task automatic bus_test();
    logic [7:0] v [4];
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); bt_ld = 4'(1 << i); bt_din = 8'(8'h3c + 8'(i * 37)); v[i] = bt_din;
    end
    @(negedge clk); bt_ld = 0;
    for (int k = 0; k < 8; k++) begin
      @(negedge clk); {bt_e, bt_f} = 2'(3 - (k % 4));
      @(posedge clk); #1;
      `CHECK(bt_g, v[3 - (k % 4)], "bus transfer to G")
    end
  endtask

  task automatic comb_test();
    logic [9:0] e1, e2, e3; int g;
    for (int k = 0; k < 200; k++) begin
      add8_a = 8'($urandom); add8_b = 8'($urandom); add8_c0 = 1'($urandom);
      cmp8_x = 8'($urandom); cmp8_y = (k % 4 == 0) ? cmp8_x : 8'($urandom);
      dec38_d = 3'($urandom); bcd_d = 4'($urandom); xs3_d = 4'($urandom); xs3g_d = 4'($urandom);
      par_d = 8'($urandom);
      {ha_a, ha_b} = 2'($urandom); enc_d = 4'b0001 << (k % 4);
      {dmx4_d, dmx4_s} = 3'($urandom); {mux4_d, mux4_s} = 6'($urandom);
      #1;
      `CHECK({ha_c, ha_s}, 2'(int'(ha_a) + int'(ha_b)), "half adder")
      `CHECK(enc_q, 2'(k % 4), "4-to-2 encoder")
      `CHECK(dmx4_q, 4'(dmx4_d) << dmx4_s, "2-to-4 demultiplexer")
      `CHECK(mux4_q, mux4_d[mux4_s], "4-to-1 multiplexer")
      `CHECK({add8_c8, add8_s}, 9'(int'(add8_a) + int'(add8_b) + int'(add8_c0)), "8-bit adder")
      `CHECK({cmp8_ls, cmp8_gr}, {cmp8_x < cmp8_y, cmp8_x > cmp8_y}, "8-bit comparator")
      `CHECK(dec38_y, 8'(1 << dec38_d), "3-to-8 decoder")
      e1 = '1; e2 = '1; e3 = '1;
      for (int j = 0; j < 10; j++) begin
        g = (j + 3) ^ ((j + 3) >> 1);
        if (int'(bcd_d) == j) e1[j] = 0;
        if (int'(xs3_d) == j + 3) e2[j] = 0;
        if (int'(xs3g_d) == g) e3[j] = 0;
      end
      `CHECK(bcd_y_n, e1, "BCD decoder")
      `CHECK(xs3_y_n, e2, "excess-3 decoder")
      `CHECK(xs3g_y_n, e3, "excess-3 Gray decoder")
      `CHECK(par_p, 1'($countones(par_d)), "parity")
    end
  endtask

  task automatic rf_test();
    logic [3:0] v [4];
    for (int i = 0; i < 4; i++) begin
      {rf_wb, rf_wa} = 2'(i); rf_d = 4'(4'hc - 4'(i * 3)); v[i] = rf_d;
      #1 rf_gw_n = 0; #1 rf_gw_n = 1; #1;
    end
    rf_d = 0; rf_gr_n = 0;
    for (int i = 0; i < 4; i++) begin
      {rf_rb, rf_ra} = 2'(i); #1; `CHECK(rf_q, v[i], "4x4 register file read")
    end
    rf_gr_n = 1; #1; `CHECK(rf_q, 4'hf, "4x4 register file read disabled")
  endtask

  task automatic treg_test();
    #1 tr_clr_n = 0; #1 tr_clr_n = 1;
    @(negedge clk); tr_d = 4'ha; tr_g1_n = 0; tr_g2_n = 0;
    @(posedge clk); #1; `CHECK(tr_q, 4'ha, "tri-state register loaded")
    @(negedge clk); tr_d = 4'h5; tr_g2_n = 1;
    @(posedge clk); #1; `CHECK(tr_q, 4'ha, "tri-state register held")
    tr_m = 1; #1; `CHECK(tr_q_en, 1'b0, "tri-state register output off") n_tri_off++;
    tr_m = 0; tr_clr_n = 0; #1; `CHECK(tr_q, 4'h0, "tri-state register cleared") n_tri_clr++;
    tr_clr_n = 1;
  endtask

  task automatic cnt_test();
    int c = 0;
    #1 cnt_r1 = 1; #1 cnt_r1 = 0;
    for (int k = 0; k < 20; k++) begin
      #2 cnt_q4 = 0; #2 cnt_q4 = 1;
      c = (c + 1) % 16; if (c == 0) n_cnt_wrap++;
      `CHECK({cnt_q[0], cnt_q[1], cnt_q[2], cnt_q[3]}, 4'(c), "ripple counter")
    end
    cnt_r1 = 1; #1; `CHECK(cnt_q, 4'h0, "ripple counter reset") n_cnt_reset++;
  endtask

  task automatic seq_test();
    logic st; logic [7:0] hist = 0, mv;
    // edge-triggered RS flip-flop
    #1 rsff_ck = 0; #1 rsff_r = 0; st = 0;
    for (int k = 0; k < 20; k++) begin
      rsff_ck = 1; {rsff_r, rsff_s} = 2'($urandom); #1 rsff_ck = 0; #1;
      st = (rsff_s && !rsff_r) ? 1 : (rsff_r && !rsff_s) ? 0 : st;
      `CHECK({rsff_q, rsff_qbar}, {st, !st}, "edge-triggered RS flip-flop")
    end
    // RS latch with preset / clear
    #1 lat_clear_n = 1; #1; `CHECK(lat_q, 1'b0, "latch cleared")
    lat_s = 1; lat_ck = 1; #1; `CHECK(lat_q, 1'b1, "latch set while clock high")
    lat_s = 0; lat_ck = 0; lat_r = 1; #1; `CHECK(lat_q, 1'b1, "latch holds while clock low")
    lat_ck = 1; #1; `CHECK(lat_q, 1'b0, "latch reset while clock high")
    lat_ck = 0; lat_r = 0; lat_preset_n = 0; #1; `CHECK(lat_q, 1'b1, "latch preset") n_lat_pc++;
    lat_preset_n = 1;
    // shift register and registered multiplexer, on their own clocks
    for (int k = 0; k < 24; k++) begin
      sr_d8 = 1'($urandom); mr_a = 8'($urandom); mr_b = 8'($urandom); mr_s = 1'($urandom);
      #1 sr_c = 0; mr_ck = 0; #1;
      hist = {hist[6:0], sr_d8}; mv = mr_s ? mr_b : mr_a;
      if (k >= 8) `CHECK(sr_d0, hist[7], "shift register delay")
      `CHECK(mr_q, mv, "registered multiplexer")
      sr_c = 1; mr_ck = 1;
    end
    // unclocked RS latch: reset, set, hold, both inputs active
    #1 rsl_r = 1; rsl_s = 0; #1; `CHECK({rsl_q, rsl_qbar}, 2'b01, "RS latch reset")
    rsl_r = 0; #1; `CHECK({rsl_q, rsl_qbar}, 2'b01, "RS latch holds 0")
    rsl_s = 1; #1; `CHECK({rsl_q, rsl_qbar}, 2'b10, "RS latch set")
    rsl_s = 0; #1; `CHECK({rsl_q, rsl_qbar}, 2'b10, "RS latch holds 1")
    rsl_r = 1; rsl_s = 1; #1; `CHECK({rsl_q, rsl_qbar}, 2'b00, "RS latch with R = S = 1") n_rsl_both++;
    rsl_r = 0; rsl_s = 0; #1; `CHECK({rsl_q, rsl_qbar}, 2'b10, "RS latch back to its earlier state")
    // divide-by-8 counter: no reset, so count relative to its first value
    begin
      logic [2:0] dv;
      dv = div_q;
      for (int k = 0; k < 20; k++) begin
        #1 div_c = 0; dv = dv + 1'b1; #1;
        `CHECK(div_q, dv, "divide-by-8 counter advances on the falling edge")
        if (dv == 3'd0) n_div_wrap++;
        div_c = 1; #1;
        `CHECK(div_q, dv, "divide-by-8 counter holds on the rising edge")
      end
    end
  endtask

  initial begin
    cpu_test();
    bus_test();
    comb_test();
    rf_test();
    treg_test();
    cnt_test();
    seq_test();
    $display("mechanisms: ldi=%0d ldm=%0d st=%0d add=%0d carry=%0d eq=%0d ne=%0d bus=%0d/%0d/%0d/%0d wrap=%0d rst=%0d trioff=%0d triclr=%0d latpc=%0d divwrap=%0d rslboth=%0d",
             n_ld_imm, n_ld_mem, n_store, n_add, n_carry, n_cmp_eq, n_cmp_ne,
             n_bus_src[0], n_bus_src[1], n_bus_src[2], n_bus_src[3],
             n_cnt_wrap, n_cnt_reset, n_tri_off, n_tri_clr, n_lat_pc, n_div_wrap, n_rsl_both);
    `CHECK(n_ld_imm > 0, 1'b1, "mechanism: load immediate")
    `CHECK(n_ld_mem > 0, 1'b1, "mechanism: load from memory")
    `CHECK(n_store > 0, 1'b1, "mechanism: store (memory write)")
    `CHECK(n_add > 0, 1'b1, "mechanism: add")
    `CHECK(n_carry > 0, 1'b1, "mechanism: carry into Flag1")
    `CHECK(n_cmp_eq > 0, 1'b1, "mechanism: compare equal")
    `CHECK(n_cmp_ne > 0, 1'b1, "mechanism: compare unequal")
    for (int i = 0; i < 4; i++) `CHECK(n_bus_src[i] > 0, 1'b1, "mechanism: each register drives the tri-state bus")
    `CHECK(n_cnt_wrap > 0, 1'b1, "mechanism: counter wrap-around")
    `CHECK(n_cnt_reset > 0, 1'b1, "mechanism: counter asynchronous reset")
    `CHECK(n_tri_off > 0, 1'b1, "mechanism: tri-state output disabled")
    `CHECK(n_tri_clr > 0, 1'b1, "mechanism: register asynchronous clear")
    `CHECK(n_lat_pc > 0, 1'b1, "mechanism: latch preset")
    `CHECK(n_div_wrap > 0, 1'b1, "mechanism: divider wrap-around")
    `CHECK(n_rsl_both > 0, 1'b1, "mechanism: RS latch with both inputs active")
    `TB_DONE
  end
endmodule
