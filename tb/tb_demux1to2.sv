// Exhaustive test of the 4-bit 1-to-2 demultiplexer.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_demux1to2;
  int checks = 0, failures = 0;
  logic [3:0] d, q1, q0; logic s;
  demux1to2 #(.W(4)) dut (.d, .s, .q1, .q0);
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    for (int i = 0; i < 32; i++) begin
      {s, d} = 5'(i); #1;
      `CHECK(q1, s ? d : 4'h0, "q1")
      `CHECK(q0, s ? 4'h0 : d, "q0")
    end
    `TB_DONE
  end
endmodule
