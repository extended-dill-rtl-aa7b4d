// 1-bit full adder: s = a ^ b ^ cin, cout = majority(a, b, cin).
// Combinational; the cell of the ripple-carry adder.
//
// The document uses the full adder of its earlier library without drawing
// it; the XOR/majority equations are the textbook circuit, chosen here.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  assign s    = a ^ b ^ cin;
  assign cout = (a & b) | (cin & (a ^ b));
endmodule
