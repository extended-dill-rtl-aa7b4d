// Exhaustive test of the 3-to-8 decoder.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_decoder3to8;
  int checks = 0, failures = 0;
  logic [2:0] d; logic [7:0] y;
  decoder3to8 dut (.d, .y);
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    for (int i = 0; i < 8; i++) begin
      d = 3'(i); #1;
      `CHECK(y, 8'(1 << i), "one-hot output")
    end
    `TB_DONE
  end
endmodule
