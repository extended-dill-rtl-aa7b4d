// Exhaustive test of the 1-bit 2-to-4 demultiplexer.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_demux2to4;
  int checks = 0, failures = 0;
  logic d; logic [1:0] s; logic [3:0] q;
  demux2to4 dut (.d, .s, .q);
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    for (int i = 0; i < 8; i++) begin
      {d, s} = 3'(i); #1;
      for (int k = 0; k < 4; k++)
        `CHECK(q[k], (k == int'(s)) ? d : 1'b0, $sformatf("q[%0d]", k))
    end
    `TB_DONE
  end
endmodule
