// 4 x 4 register file with separate write and read ports: random writes
// (gw_n pulsed low) and reads (gr_n low, or high giving all ones) against an
// array model.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_reg_4x4_rw;
  int checks = 0, failures = 0;
  logic [3:0] d, q; logic gw_n, wb, wa, gr_n, rb, ra;
  logic [3:0] m [4];
  reg_4x4_rw dut (.d, .gw_n, .wb, .wa, .gr_n, .rb, .ra, .q);
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    gw_n = 1; gr_n = 1; {wb, wa, rb, ra} = 0; d = 0;
    for (int i = 0; i < 4; i++) begin
      {wb, wa} = 2'(i); d = 4'(i + 5); #1 gw_n = 0; #1 gw_n = 1; #1; m[i] = d;
    end
    for (int k = 0; k < 400; k++) begin
      {wb, wa} = 2'($urandom); d = 4'($urandom); #1;
      if ($urandom % 2) begin gw_n = 0; #1; gw_n = 1; #1; m[{wb, wa}] = d; end
      d = 4'($urandom); #1;   // data changing while gw_n = 1 must not write
      {rb, ra} = 2'($urandom); gr_n = 1'($urandom % 4 == 0); #1;
      `CHECK(q, gr_n ? 4'hf : m[{rb, ra}], "read port")
    end
    `TB_DONE
  end
endmodule
