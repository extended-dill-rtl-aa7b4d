// Exhaustive test of the 8-bit parity generator against a count of ones.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_parity8;
  int checks = 0, failures = 0;
  logic [7:0] d; logic p;
  parity8 dut (.d, .p);
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    for (int i = 0; i < 256; i++) begin
      d = 8'(i); #1;
      `CHECK(p, 1'($countones(d) % 2), "odd parity")
    end
    `TB_DONE
  end
endmodule
