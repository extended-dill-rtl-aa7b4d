// Bus transfer: load A..D, then move a random register to G over the bus
// selected by {e, f}; G must hold the chosen register one rising edge later.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_bus_transfer;
  int checks = 0, failures = 0;
  logic clk = 0, e = 0, f = 0; logic [3:0] ld = 0; logic [7:0] din = 0, g;
  logic [7:0] m [4];
  int sel;
  bus_transfer dut (.clk, .e, .f, .ld, .din, .g);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); ld = 4'(1 << i); din = 8'($urandom); m[i] = din;
    end
    @(negedge clk); ld = 0;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      sel = $urandom % 4; {e, f} = 2'(sel);
      ld = 4'($urandom); din = 8'($urandom);
      @(posedge clk); #1;
      `CHECK(g, m[sel], "register G took the selected register")
      for (int i = 0; i < 4; i++) if (ld[i]) m[i] = din;
    end
    `TB_DONE
  end
endmodule
