// 8-bit parity generator/checker: a three-level tree of 2-input XOR gates,
// as in the document (pairs of inputs, then pairs of pairs, then the last
// XOR).  p = 1 when d holds an odd number of ones.  Combinational.
module parity8 (
  input  logic [7:0] d,
  output logic       p
);
  logic [3:0] a;
  logic [1:0] b;
  for (genvar i = 0; i < 4; i++) begin : g_l1
    assign a[i] = d[2*i+1] ^ d[2*i];
  end
  for (genvar i = 0; i < 2; i++) begin : g_l2
    assign b[i] = a[2*i+1] ^ a[2*i];
  end
  assign p = b[1] ^ b[0];
endmodule
