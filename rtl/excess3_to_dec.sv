// Excess-3-to-decimal decoder with 0-active outputs.
// Decimal digit k is coded as k + 3; y[k] = 0 exactly when d == k + 3, using
// one 4-input NAND per output as in the document.  The six unused codes
// (0..2, 13..15) leave all outputs 1.  Combinational.
module excess3_to_dec (
  input  logic [3:0] d,
  output logic [9:0] y
);
  logic [3:0] ind;
  assign ind = ~d;
  for (genvar k = 0; k < 10; k++) begin : g_nand
    localparam logic [3:0] C = 4'(k + 3);
    assign y[k] = ~((C[3] ? d[3] : ind[3]) & (C[2] ? d[2] : ind[2]) &
                    (C[1] ? d[1] : ind[1]) & (C[0] ? d[0] : ind[0]));
  end
endmodule
