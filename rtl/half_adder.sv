// 1-bit half adder: s = a ^ b, c = a & b.
//
// The library names this part (HalfAdder[A,B,S,C]) without drawing it; the
// XOR/AND pair is the textbook circuit and this design's choice.
// Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
