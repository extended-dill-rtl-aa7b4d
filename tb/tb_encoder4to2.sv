// Test of the 4-to-2 encoder: every one-hot input must give its index, and
// no active input must give 0.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_encoder4to2;
  int checks = 0, failures = 0;
  logic [3:0] d; logic [1:0] q;
  encoder4to2 dut (.d, .q);
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    d = 4'b0000; #1;
    `CHECK(q, 2'd0, "no input active")
    for (int i = 0; i < 4; i++) begin
      d = 4'b0001 << i; #1;
      `CHECK(q, 2'(i), $sformatf("one-hot input %0d", i))
    end
    `TB_DONE
  end
endmodule
