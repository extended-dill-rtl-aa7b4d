// Clocked RS latch with asynchronous preset and clear (both 0 active),
// transparent while ck = 1.
//
// Function of the document's four-NAND netlist: preset_n = 0, or ck = 1 with
// s = 1, drives Q to 1; clear_n = 0, or ck = 1 with r = 1, drives Qbar to 1;
// with neither the latch holds.  When both sides are driven at once both
// outputs are 1, as in the netlist, and the stored bit is left unchanged.
// The stored bit is a level-sensitive latch, which is what this part is.
module latch_preclr (
  input  logic r,
  input  logic s,
  input  logic preset_n,
  input  logic clear_n,
  input  logic ck,
  output logic q,
  output logic qbar
);
  logic set_a, rst_a, state;

  assign set_a = ~preset_n | (ck & s & clear_n);
  assign rst_a = ~clear_n  | (ck & r & preset_n);

  always_latch begin
    if (set_a ^ rst_a) state = set_a;
  end

  assign q    = set_a ? 1'b1 : (rst_a ? 1'b0 : state);
  assign qbar = rst_a ? 1'b1 : (set_a ? 1'b0 : ~state);
endmodule
