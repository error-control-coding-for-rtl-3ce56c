// hv_encoder: H-V-parity (row/column product parity) encoder.
//
// The ROWS*COLS data bits form an array, row-major: d[COLS*r + c] is row r,
// column c. hpar[r] is the even parity of row r (H-group) and vpar[c] the
// even parity of column c (V-group). The code is the product of two single
// parity codes, minimum distance 4, SEC-DED. Defaults give the (19,12) code:
// 12 data bits in 3 rows of 4, 3 H-parity and 4 V-parity bits. The parity of
// the parity bits is not produced. Combinational.
module hv_encoder #(
  parameter int ROWS = 3,
  parameter int COLS = 4
) (
  input  logic [ROWS*COLS-1:0] data,
  output logic [ROWS-1:0]      hpar,
  output logic [COLS-1:0]      vpar
);
  always_comb begin
    hpar = '0;
    vpar = '0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        hpar[r] ^= data[COLS*r + c];
        vpar[c] ^= data[COLS*r + c];
      end
  end
endmodule
