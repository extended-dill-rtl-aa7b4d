// 8-bit comparator: random operands (a third of them equal) against integer
// compare.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_comparator8;
  int checks = 0, failures = 0;
  logic [7:0] x, y; logic ls, gr;
  comparator8 dut (.x, .y, .ls, .gr);
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    for (int k = 0; k < 1000; k++) begin
      x = 8'($urandom); y = (k % 3 == 0) ? x : (k % 3 == 1) ? {x[7:4], 4'($urandom)} : 8'($urandom); #1;
      `CHECK(ls, x < y, "x<y")
      `CHECK(gr, x > y, "x>y")
    end
    `TB_DONE
  end
endmodule
