// D latch: transparent while g = 1, holds the last value while g = 0.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_dlatch4;
  int checks = 0, failures = 0;
  logic [3:0] d, q, m; logic g;
  dlatch4 #(.W(4)) dut (.d, .g, .q);
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    g = 1; d = 0; #1; m = 0;
    for (int k = 0; k < 300; k++) begin
      g = 1'($urandom); d = 4'($urandom); #1;
      if (g) m = d;
      `CHECK(q, m, g ? "transparent" : "holding")
    end
    `TB_DONE
  end
endmodule
