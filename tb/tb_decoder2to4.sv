// Exhaustive test of the 2-to-4 decoder.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_decoder2to4;
  int checks = 0, failures = 0;
  logic [1:0] d; logic [3:0] q;
  decoder2to4 dut (.d, .q);
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    for (int i = 0; i < 4; i++) begin
      d = 2'(i); #1;
      `CHECK(q, 4'(1 << i), "one-hot output")
    end
    `TB_DONE
  end
endmodule
