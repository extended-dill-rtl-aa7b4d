// Multiplexer with registered output: the selected input is captured at the
// falling clock edge.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_mux2to1_reg_8;
  int checks = 0, failures = 0;
  logic [7:0] a = 0, b = 0, q, st; logic s = 0, ck = 1;
  mux2to1_reg_8 dut (.a, .b, .s, .ck, .q);
  always #5 ck = ~ck;
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    @(negedge ck); #1; st = 0;
    for (int k = 0; k < 200; k++) begin
      @(posedge ck); a = 8'($urandom); b = 8'($urandom); s = 1'($urandom); #1;
      `CHECK(q, st, "unchanged at the rising edge")
      @(negedge ck); #1; st = s ? b : a;
      `CHECK(q, st, "selected input registered")
    end
    `TB_DONE
  end
endmodule
