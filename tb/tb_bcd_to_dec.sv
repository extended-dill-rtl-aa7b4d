// Exhaustive test of the bcd_to_dec decoder (0-active outputs);
// BCD: digit k is coded as k.  All 16 input codes are applied; exactly the
// output of the coded digit must be 0, and none for an unused code.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_bcd_to_dec;
  int checks = 0, failures = 0;
  logic [3:0] d; logic [9:0] y, exp;
  int gray [10] = '{4'b0010, 4'b0110, 4'b0111, 4'b0101, 4'b0100,
                    4'b1100, 4'b1101, 4'b1111, 4'b1110, 4'b1010};
  bcd_to_dec dut (.d, .y);
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    for (int i = 0; i < 16; i++) begin
      d = 4'(i); #1;
      exp = '1;
      for (int k = 0; k < 10; k++) if (i == (k)) exp[k] = 1'b0;
      `CHECK(y, exp, $sformatf("outputs for code %b", d))
    end
    `TB_DONE
  end
endmodule
