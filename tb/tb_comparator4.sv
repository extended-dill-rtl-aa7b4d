// Exhaustive test of the 4-bit comparator, with and without a decision
// arriving on the cascade inputs.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_comparator4;
  int checks = 0, failures = 0;
  logic [3:0] x, y; logic ls_in, gr_in, ls, gr;
  comparator4 dut (.ls_in, .gr_in, .x, .y, .ls, .gr);
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    for (int c = 0; c < 3; c++) begin
      {ls_in, gr_in} = (c == 0) ? 2'b00 : (c == 1) ? 2'b10 : 2'b01;
      for (int i = 0; i < 256; i++) begin
        {x, y} = 8'(i); #1;
        if (c == 0) begin
          `CHECK(ls, x < y, "x<y")
          `CHECK(gr, x > y, "x>y")
        end else begin
          `CHECK({ls, gr}, {ls_in, gr_in}, "upstream decision kept")
        end
      end
    end
    `TB_DONE
  end
endmodule
