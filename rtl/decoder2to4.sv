// 2-to-4 line decoder with 1-active outputs.
//
// q[i] is 1 exactly when d == i.  The sub-CPU uses three of them to turn the
// DR, SA and SB fields into one-hot register selects.  Combinational.
//
// The function and the 1-active outputs follow the document's decoder;
// writing it as a one-hot assignment rather than as gates is this design's
// choice.
module decoder2to4 (
  input  logic [1:0] d,
  output logic [3:0] q
);
  always_comb begin
    q = '0;
    q[d] = 1'b1;
  end
endmodule
