// Edge-triggered RS flip-flop: set, reset and hold at the falling edge only.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_rs_ff_edge;
  int checks = 0, failures = 0;
  logic r = 1, s = 0, ck = 1, q, qbar, st;
  rs_ff_edge dut (.r, .s, .ck, .q, .qbar);
  always #5 ck = ~ck;
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    @(negedge ck); #1; st = 0; `CHECK(q, 1'b0, "reset")
    for (int k = 0; k < 300; k++) begin
      @(posedge ck); {r, s} = 2'($urandom); #1;
      `CHECK(q, st, "no change while the clock is high")
      @(negedge ck); #1;
      st = (s && !r) ? 1 : (r && !s) ? 0 : st;
      `CHECK({q, qbar}, {st, !st}, "after the falling edge")
    end
    `TB_DONE
  end
endmodule
