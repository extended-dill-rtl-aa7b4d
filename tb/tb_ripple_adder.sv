// Ripple-carry adder at the 8-bit default width: random operands and the
// carry-propagation corner cases, against integer addition.  A 4-bit copy
// (the sub-CPU's width) is checked exhaustively.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_ripple_adder;
  int checks = 0, failures = 0;
  logic [7:0] a, b, s; logic c0, cn;
  logic [3:0] a4, b4, s4; logic cn4;
  ripple_adder dut (.a, .b, .c0, .s, .cn);
  ripple_adder #(.N(4)) dut4 (.a(a4), .b(b4), .c0(1'b0), .s(s4), .cn(cn4));
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    a = 8'hff; b = 8'h00; c0 = 1; #1;
    `CHECK({cn, s}, 9'h100, "carry through all stages")
    for (int k = 0; k < 500; k++) begin
      a = 8'($urandom); b = 8'($urandom); c0 = 1'($urandom); #1;
      `CHECK({cn, s}, 9'(int'(a) + int'(b) + int'(c0)), "8-bit sum")
    end
    for (int i = 0; i < 256; i++) begin
      {a4, b4} = 8'(i); #1;
      `CHECK({cn4, s4}, 5'(int'(a4) + int'(b4)), "4-bit sum")
    end
    `TB_DONE
  end
endmodule
