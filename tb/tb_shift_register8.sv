// Serial shift register: a random bit stream must come out of d0 eight
// falling edges after it went in.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_shift_register8;
  int checks = 0, failures = 0;
  logic d8 = 0, c = 1, d0;
  logic [7:0] hist = 0;
  shift_register8 dut (.d8, .c, .d0);
  always #5 c = ~c;
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    repeat (8) @(negedge c);
    for (int k = 0; k < 300; k++) begin
      @(posedge c); d8 = 1'($urandom);
      @(negedge c); hist = {hist[6:0], d8}; #1;
      `CHECK(d0, hist[7], "bit delayed by eight stages")
    end
    `TB_DONE
  end
endmodule
