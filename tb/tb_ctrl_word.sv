// Exhaustive test of the instruction decoder: all eight values of IR[8:6]
// against the control word expected for each opcode.
//
// The behaviour checked is the one the document gives for this part (or,
// where the document only names it, the standard function of that name); the
// stimulus, the reference values and the checks are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_ctrl_word;
  import dill_pkg::*;
  int checks = 0, failures = 0;
  logic [2:0] ir_hi;
  ctrl_t ctrl, exp;
  ctrl_word dut (.ir_hi, .ctrl);
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_DONE end
  initial begin
    for (int i = 0; i < 8; i++) begin
      ir_hi = 3'(i);
      #1;
      exp = '0;
      case (ir_hi[1:0])
        2'b00: begin exp.cmp = 1; end                          // Cmp
        2'b01: begin exp.mw = 1; exp.aor_c = 1; end            // Store
        2'b10: begin exp.rw = 1; exp.mor_f = 1; exp.li = ir_hi[2]; end  // Load
        2'b11: begin exp.rw = 1; exp.aor_c = 1; exp.add = 1; end // Add
      endcase
      `CHECK(ctrl, exp, $sformatf("control word for IR[8:6]=%b", ir_hi))
    end
    `TB_DONE
  end
endmodule
