// 3-to-8 line decoder, 1-active outputs.
// Built as in the document: three input inverters and eight 3-input AND
// gates, y[k] = 1 exactly when d == k.  Combinational.
module decoder3to8 (
  input  logic [2:0] d,
  output logic [7:0] y
);
  logic [2:0] ind;
  assign ind = ~d;
  for (genvar k = 0; k < 8; k++) begin : g_and
    assign y[k] = (k[2] ? d[2] : ind[2]) & (k[1] ? d[1] : ind[1]) & (k[0] ? d[0] : ind[0]);
  end
endmodule
