// 4-bit register with load enable, clear and tri-state output: loads at the
// rising edge only with g1_n = g2_n = 0, clears asynchronously, and drives its
// output only with m = n = 0.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_register_4_tri;
  int checks = 0, failures = 0;
  logic m = 0, n = 0, g1_n = 1, g2_n = 1, clr_n = 1, clk = 0, q_en;
  logic [3:0] d = 0, q, st;
  register_4_tri dut (.m, .n, .d, .g1_n, .g2_n, .clr_n, .clk, .q, .q_en);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    #1 clr_n = 0; #11; `CHECK(q, 4'h0, "cleared") clr_n = 1; st = 0;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      {g1_n, g2_n} = 2'($urandom); d = 4'($urandom); {m, n} = 2'($urandom);
      #1; `CHECK(q_en, !(m || n), "output enable")
      `CHECK(q, q_en ? st : 4'h0, "output before the edge")
      @(posedge clk); #1;
      if (!g1_n && !g2_n) st = d;
      `CHECK(q, q_en ? st : 4'h0, "output after the rising edge")
    end
    @(negedge clk); m = 0; n = 0; #1 clr_n = 0; #1;
    `CHECK(q, 4'h0, "asynchronous clear")
    `TB_DONE
  end
endmodule
