// Register file: random writes and reads.  A write lands only when rw and a
// destination are given and only at the rising edge; both buses show the
// selected registers combinationally.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_register_file;
  int checks = 0, failures = 0;
  logic clk = 0, clr_n = 1, rw = 0;
  logic [3:0] dr = 1, sa = 1, sb = 1, reg_in = 0, bus_a, bus_b;
  logic [3:0][3:0] r;
  logic [3:0] m [4];
  int ia, ib, id;
  register_file #(.W(4), .NREG(4)) dut (.clk, .clr_n, .rw, .dr, .sa, .sb, .reg_in, .r, .bus_a, .bus_b);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    for (int i = 0; i < 4; i++) m[i] = 0;
    #1 clr_n = 0; #11 clr_n = 1;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      ia = $urandom % 4; ib = $urandom % 4; id = $urandom % 4;
      sa = 4'(1 << ia); sb = 4'(1 << ib); dr = 4'(1 << id);
      rw = 1'($urandom); reg_in = 4'($urandom);
      #1;
      `CHECK(bus_a, m[ia], "BusA = R[SA]")
      `CHECK(bus_b, m[ib], "BusB = R[SB]")
      @(posedge clk); #1;
      if (rw) m[id] = reg_in;
      for (int i = 0; i < 4; i++) `CHECK(r[i], m[i], "register contents")
    end
    `TB_DONE
  end
endmodule
