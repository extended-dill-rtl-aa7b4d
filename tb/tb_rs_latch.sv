// Test of the unclocked RS latch: random sequences of R and S are checked
// against a reference state machine of the NOR latch (set, reset, hold, both
// outputs 0 while R = S = 1).  The reference resolves the R = S = 1 exit to
// the state held before it, as the latch does.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_rs_latch;
  int checks = 0, failures = 0;
  int n_both = 0, n_set = 0, n_reset = 0;
  logic r = 0, s = 0, q, qbar;
  rs_latch dut (.r, .s, .q, .qbar);
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    logic m;
    r = 1; #1;
    `CHECK({q, qbar}, 2'b01, "reset")
    m = 0; r = 0; #1;
    `CHECK({q, qbar}, 2'b01, "hold after reset")
    for (int k = 0; k < 400; k++) begin
      {r, s} = 2'($urandom); #1;
      case ({r, s})
        2'b01: begin m = 1; n_set++; end
        2'b10: begin m = 0; n_reset++; end
        default: ;
      endcase
      if (r && s) begin
        n_both++;
        `CHECK({q, qbar}, 2'b00, "R = S = 1 drives both outputs to 0")
      end else
        `CHECK({q, qbar}, {m, ~m}, "set / reset / hold")
    end
    `CHECK(n_both > 0 && n_set > 0 && n_reset > 0, 1'b1, "all input cases seen")
    `TB_DONE
  end
endmodule
