// mh_encoder: modified Hamming (odd-weight-column) SEC-DED encoder.
//
// The parity check matrix is H = [D | I_R]: each information bit owns an
// odd-weight column of D (built by ecc_pkg::mh_data_columns, weight-3 columns
// first, then weight-5, ...) and check bit c_i owns the unit column of row i.
// Check bit c_i is the XOR of every data bit whose column has a 1 in row i,
// so a stored codeword has an all-zero syndrome. Defaults give the (72,64)
// code used for main-memory words; K=4, R=4 gives the (8,4) code
//   c0 = d0^d1^d2, c1 = d0^d1^d3, c2 = d0^d2^d3, c3 = d1^d2^d3.
// Which odd-weight columns are picked (row-balancing greedy choice) is this
// design's own. Purely combinational.
module mh_encoder #(
  parameter int K = 64,  // information bits
  parameter int R = 8    // check bits
) (
  input  logic [K-1:0] data,
  output logic [R-1:0] check
);
  import ecc_pkg::*;
  localparam mh_cols_t COLS = mh_data_columns(K, R);

  always_comb begin
    check = '0;
    for (int j = 0; j < K; j++)
      for (int i = 0; i < R; i++)
        if (COLS[j][i]) check[i] ^= data[j];
  end
endmodule
