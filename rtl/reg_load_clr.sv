// W-bit register with load enable and asynchronous clear.
//
// On a rising clock edge the register takes d when g is 1 and keeps its value
// otherwise.  clr_n = 0 clears it at once, independent of the clock.  W = 4 is
// a data register of the sub-CPU, W = 1 a flag.  The load control is what
// keeps a flag unchanged by instructions that do not own it.
//
// Load control, positive-edge clocking and the 0-active clear follow the
// document; the width parameter and the behavioural always_ff are this
// design's choices.
module reg_load_clr #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         clr_n,  // 0 active
  input  logic         g,      // load enable, 1 active
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n)  q <= '0;
    else if (g)  q <= d;
  end
endmodule
