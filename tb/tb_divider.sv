// Test of the divide-by-2^N counters in the three library sizes (divide by
// 2, 4 and 8) and on both clock edges.  The counters have no reset, so the
// testbench takes the first value as the origin and checks that every active
// edge adds one modulo 2^N, that an inactive edge changes nothing, and that
// the top bit completes one period every 2^N clock periods.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_divider;
  int checks = 0, failures = 0;
  logic c = 0;
  logic [0:0] q2;
  logic [1:0] q4;
  logic [2:0] q8, q8p;
  divider #(.N(1)) u_d2 (.c, .q(q2));
  divider #(.N(2)) u_d4 (.c, .q(q4));
  divider #(.N(3)) u_d8 (.c, .q(q8));
  divider #(.N(3), .NEG_EDGE(1'b0)) u_d8p (.c, .q(q8p));
  int rises = 0;
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    logic [0:0] e2; logic [1:0] e4; logic [2:0] e8, e8p;
    logic prev_top;
    #1;
    e2 = q2; e4 = q4; e8 = q8; e8p = q8p;
    prev_top = q8[2];
    for (int k = 0; k < 40; k++) begin
      #5 c = 1; e8p = e8p + 1'b1; #1;
      `CHECK(q8p, e8p, "positive-edge divider advances on the rising edge")
      `CHECK({q2, q4, q8}, {e2, e4, e8}, "negative-edge dividers hold on the rising edge")
      #4 c = 0; e2 = e2 + 1'b1; e4 = e4 + 1'b1; e8 = e8 + 1'b1; #1;
      `CHECK(q2, e2, "divide by 2")
      `CHECK(q4, e4, "divide by 4")
      `CHECK(q8, e8, "divide by 8")
      `CHECK(q8p, e8p, "positive-edge divider holds on the falling edge")
      if (q8[2] && !prev_top) rises++;
      prev_top = q8[2];
      #4;
    end
    // 40 clock periods = 5 periods of the divide-by-8 output
    `CHECK(rises, 5, "divide-by-8 output periods in 40 clocks")
    `TB_DONE
  end
endmodule
