// Clocked RS latch with preset and clear: follows s / r while ck = 1, holds
// while ck = 0, and obeys preset / clear at any time.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_latch_preclr;
  int checks = 0, failures = 0;
  logic r, s, preset_n, clear_n, ck, q, qbar, st;
  latch_preclr dut (.r, .s, .preset_n, .clear_n, .ck, .q, .qbar);
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    r = 0; s = 0; ck = 0; preset_n = 1; clear_n = 0; #1;
    `CHECK({q, qbar}, 2'b01, "clear") clear_n = 1; #1;
    `CHECK({q, qbar}, 2'b01, "holds after clear") st = 0;
    for (int k = 0; k < 400; k++) begin
      ck = 1'($urandom); {r, s} = 2'($urandom);
      if (r && s) s = 0;
      preset_n = ($urandom % 8 != 0); clear_n = ($urandom % 8 != 0);
      #1;
      if (!preset_n && !clear_n) `CHECK({q, qbar}, 2'b11, "preset and clear together")
      else begin
        if (!preset_n) st = 1;
        else if (!clear_n) st = 0;
        else if (ck && s) st = 1;
        else if (ck && r) st = 0;
        `CHECK({q, qbar}, {st, !st}, "latch output")
      end
      preset_n = 1; clear_n = 1; ck = 0; r = 0; s = 0; #1;
      `CHECK({q, qbar}, {st, !st}, "holds with clock low")
    end
    `TB_DONE
  end
endmodule
