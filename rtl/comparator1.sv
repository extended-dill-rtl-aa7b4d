// One slice of the cascaded magnitude comparator.
//
// ai / bi are the "less" / "greater" results of the more significant slices
// (both 0 while the numbers are equal so far); xi and yi are this slice's bits
// of X and Y.  The slice keeps a decision already taken and otherwise decides
// on its own bits:
//   ap = ai | (~bi & ~xi & yi)     X < Y
//   bp = bi | (~ai & xi & ~yi)     X > Y
// It is written, as in the document, as two NAND-NAND paths with input
// inverters.  Combinational.
module comparator1 (
  input  logic ai,
  input  logic bi,
  input  logic xi,
  input  logic yi,
  output logic ap,
  output logic bp
);
  logic inx, iny, ina, inb, a3, b3;
  assign inx = ~xi;
  assign iny = ~yi;
  assign ina = ~ai;
  assign inb = ~bi;
  assign a3  = ~(inx & yi & inb);
  assign ap  = ~(a3 & ina);
  assign b3  = ~(xi & iny & ina);
  assign bp  = ~(b3 & inb);
endmodule
