// Excess-3-Gray-to-decimal decoder with 0-active outputs.
// Digit k is coded as the Gray code of k + 3 (0010, 0110, 0111, 0101, 0100,
// 1100, 1101, 1111, 1110, 1010 for 0..9); y[k] = 0 exactly when d holds that
// code.  One 4-input NAND per output, as in the document; the code of each
// output is computed as g = n ^ (n >> 1) with n = k + 3.  Combinational.
module excess3gray_to_dec (
  input  logic [3:0] d,
  output logic [9:0] y
);
  logic [3:0] ind;
  assign ind = ~d;
  for (genvar k = 0; k < 10; k++) begin : g_nand
    localparam logic [3:0] N = 4'(k + 3);
    localparam logic [3:0] C = N ^ (N >> 1);
    assign y[k] = ~((C[3] ? d[3] : ind[3]) & (C[2] ? d[2] : ind[2]) &
                    (C[1] ? d[1] : ind[1]) & (C[0] ? d[0] : ind[0]));
  end
endmodule
