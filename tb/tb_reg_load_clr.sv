// Register with load enable and asynchronous clear: loads only at a rising
// edge with g = 1, holds otherwise, clears immediately on clr_n = 0.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_reg_load_clr;
  int checks = 0, failures = 0;
  logic clk = 0, clr_n = 1, g = 0; logic [3:0] d = 0, q, m;
  reg_load_clr #(.W(4)) dut (.clk, .clr_n, .g, .d, .q);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    #1 clr_n = 0; #11; `CHECK(q, 4'h0, "cleared") clr_n = 1; m = 0;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk); g = 1'($urandom); d = 4'($urandom);
      #1; `CHECK(q, m, "no change before the edge")
      @(posedge clk); #1;
      if (g) m = d;
      `CHECK(q, m, "value after the edge")
    end
    @(negedge clk); #2 clr_n = 0; #1;
    `CHECK(q, 4'h0, "asynchronous clear between edges")
    `TB_DONE
  end
endmodule
