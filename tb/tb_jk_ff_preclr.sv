// Flip-flop jk_ff_preclr (JK: j sets, k resets, both toggle), outputs changing at the falling clock edge;
// 0-active asynchronous preset and clear, both active giving Q = Qbar = 1.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_jk_ff_preclr;
  int checks = 0, failures = 0;
  logic j, k;
  logic preset_n = 1, clear_n = 1, ck = 1, q, qbar;
  logic st;
  jk_ff_preclr dut (.j, .k, .preset_n, .clear_n, .ck, .q, .qbar);
  always #5 ck = ~ck;
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    #1 clear_n = 0; #1; `CHECK({q, qbar}, 2'b01, "clear") clear_n = 1;
    #1 preset_n = 0; #1; `CHECK({q, qbar}, 2'b10, "preset") 
    clear_n = 0; #1; `CHECK({q, qbar}, 2'b11, "preset and clear together")
    preset_n = 1; #1; `CHECK({q, qbar}, 2'b01, "clear alone again") clear_n = 1;
    st = 0;
    for (int i = 0; i < 300; i++) begin
      @(posedge ck); {j, k} = 2'($urandom);
      #1; `CHECK(q, st, "no change at the rising edge")
      @(negedge ck); #1;
      st = (j && k) ? !st : j ? 1 : k ? 0 : st;
      `CHECK({q, qbar}, {st, !st}, "after the falling edge")
      if (i % 50 == 25) begin
        #1 preset_n = 0; #1; `CHECK(q, 1'b1, "asynchronous preset") preset_n = 1; st = 1;
      end
    end
    `TB_DONE
  end
endmodule
