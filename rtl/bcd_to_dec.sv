// BCD-to-decimal decoder with 0-active outputs.
// One 4-input NAND per output over the true or inverted input bits:
// y[k] = 0 exactly when d == k (k = 0..9); codes 10..15 leave all outputs 1.
// Combinational; structure as in the document.
module bcd_to_dec (
  input  logic [3:0] d,
  output logic [9:0] y
);
  logic [3:0] ind;
  assign ind = ~d;
  for (genvar k = 0; k < 10; k++) begin : g_nand
    localparam logic [3:0] C = 4'(k);
    assign y[k] = ~((C[3] ? d[3] : ind[3]) & (C[2] ? d[2] : ind[2]) &
                    (C[1] ? d[1] : ind[1]) & (C[0] ? d[0] : ind[0]));
  end
endmodule
