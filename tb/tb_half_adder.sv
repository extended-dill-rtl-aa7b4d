// Exhaustive test of the half adder against integer addition.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_half_adder;
  int checks = 0, failures = 0;
  logic a, b, s, c;
  half_adder dut (.a, .b, .s, .c);
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i); #1;
      `CHECK({c, s}, 2'(int'(a) + int'(b)), "{c,s} = a + b")
    end
    `TB_DONE
  end
endmodule
