// Tri-state repeater: the input appears on the bus contribution only while
// enabled, zeros otherwise.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_tri_repeater;
  int checks = 0, failures = 0;
  logic [3:0] d, drv; logic en;
  tri_repeater #(.W(4)) dut (.d, .en, .drv);
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    for (int i = 0; i < 32; i++) begin
      {en, d} = 5'(i); #1;
      `CHECK(drv, en ? d : 4'h0, "contribution")
    end
    `TB_DONE
  end
endmodule
