// Exhaustive test of one comparator slice: a decision from the upper slices
// is kept, otherwise this slice's bits decide.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_comparator1;
  int checks = 0, failures = 0;
  logic ai, bi, xi, yi, ap, bp;
  comparator1 dut (.ai, .bi, .xi, .yi, .ap, .bp);
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    for (int i = 0; i < 16; i++) begin
      {ai, bi, xi, yi} = 4'(i); #1;
      if (!(ai && bi)) begin
        `CHECK(ap, ai || (!bi && !xi && yi), "less")
        `CHECK(bp, bi || (!ai && xi && !yi), "greater")
      end
    end
    `TB_DONE
  end
endmodule
