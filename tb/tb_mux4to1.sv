// Exhaustive test of the 1-bit 4-to-1 multiplexer: all 16 data patterns
// under all 4 selects.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_mux4to1;
  int checks = 0, failures = 0;
  logic [3:0] d; logic [1:0] s; logic q;
  mux4to1 dut (.d, .s, .q);
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    for (int i = 0; i < 64; i++) begin
      {s, d} = 6'(i); #1;
      `CHECK(q, d[s], "q = d[s]")
    end
    `TB_DONE
  end
endmodule
