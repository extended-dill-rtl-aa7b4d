// N-bit ripple-carry adder built from full adders.
//
// Stage i adds a[i], b[i] and the carry of stage i-1; c0 feeds stage 0 and cn
// is the carry out of the top stage, so {cn, s} = a + b + c0.  The document's
// library part is 8 bits wide (the default); the sub-CPU uses N = 4 with
// c0 = 0.  Combinational; the carry ripples through N cells.
module ripple_adder #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         c0,
  output logic [N-1:0] s,
  output logic         cn
);
  logic [N:0] c;
  assign c[0] = c0;
  for (genvar i = 0; i < N; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(s[i]), .cout(c[i+1]));
  end
  assign cn = c[N];
endmodule
