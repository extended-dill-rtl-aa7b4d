// Bus resolution: with one driver enabled the bus carries that driver's
// data, with none it reads 0.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_tri_bus;
  int checks = 0, failures = 0;
  logic [3:0][3:0] data, drv; logic [3:0] en; logic [3:0] bus;
  tri_bus #(.N(4), .W(4)) dut (.drv, .en, .bus);
  always_comb for (int i = 0; i < 4; i++) drv[i] = data[i] & {4{en[i]}};
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    for (int k = 0; k < 200; k++) begin
      int s = $urandom % 5;
      data = 16'($urandom);
      en = (s == 4) ? 4'b0 : 4'(1 << s);
      #1;
      `CHECK(bus, (s == 4) ? 4'h0 : data[s], "bus value")
    end
    `TB_DONE
  end
endmodule
