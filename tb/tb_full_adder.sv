// Exhaustive test of the full adder against integer addition.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_full_adder;
  int checks = 0, failures = 0;
  logic a, b, cin, s, cout;
  full_adder dut (.a, .b, .cin, .s, .cout);
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, cin} = 3'(i); #1;
      `CHECK({cout, s}, 2'(int'(a) + int'(b) + int'(cin)), "sum and carry")
    end
    `TB_DONE
  end
endmodule
