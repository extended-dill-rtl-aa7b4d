// 2-to-1 multiplexer at the 8-bit default width, random data.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_mux2to1;
  int checks = 0, failures = 0;
  logic [7:0] a, b, c; logic s;
  mux2to1 dut (.a, .b, .s, .c);
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    for (int k = 0; k < 200; k++) begin
      a = 8'($urandom); b = 8'($urandom); s = 1'(k); #1;
      `CHECK(c, s ? b : a, "selected input")
    end
    `TB_DONE
  end
endmodule
