// 8-bit register: q takes d at the falling clock edge, qbar is its inverse.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_register_8;
  int checks = 0, failures = 0;
  logic [7:0] d = 0, q, qbar, st; logic c = 1;
  register_8 dut (.d, .c, .q, .qbar);
  always #5 c = ~c;
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    @(negedge c); #1; st = 0;
    for (int k = 0; k < 200; k++) begin
      @(posedge c); d = 8'($urandom); #1;
      `CHECK(q, st, "unchanged at the rising edge")
      @(negedge c); #1; st = d;
      `CHECK(q, st, "loaded at the falling edge")
      `CHECK(qbar, ~st, "inverted output")
    end
    `TB_DONE
  end
endmodule
