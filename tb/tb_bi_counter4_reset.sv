// Ripple binary counter: counts falling edges of q4, resets at once when r1
// and r2 are both 1, and not when only one of them is.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_bi_counter4_reset;
  int checks = 0, failures = 0;
  logic q4 = 1, r1 = 0, r2 = 1; logic [3:0] q;
  int cnt;
  bi_counter4_reset dut (.q4, .r1, .r2, .q);
  function automatic int value(logic [3:0] v);
    return {v[0], v[1], v[2], v[3]};   // q[3] is the least significant bit
  endfunction
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    #1 r1 = 1; #1; `CHECK(value(q), 0, "reset") r2 = 0; cnt = 0;
    for (int k = 0; k < 40; k++) begin
      #5 q4 = 0; #5;
      cnt = (cnt + 1) % 16;
      `CHECK(value(q), cnt, "count after a falling edge")
      q4 = 1; #1;
      `CHECK(value(q), cnt, "no count at a rising edge")
      if (k == 20) begin r1 = 1; r2 = 0; #1; `CHECK(value(q), cnt, "one reset input alone") end
      if (k == 30) begin r2 = 1; #1; `CHECK(value(q), 0, "asynchronous reset") r2 = 0; cnt = 0; end
    end
    `TB_DONE
  end
endmodule
