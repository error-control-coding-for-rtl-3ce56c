// ols_codec: Orthogonal Latin Square code, encoder and one-step
// majority-logic decoder.
//
// The K = M*M data bits are indexed d(M*i + j), i = row, j = column of an
// M x M square. The 2*T*M check bits come in 2T groups of M, one group per
// sub-matrix of H: group 0 checks rows (M1), group 1 checks columns (M2),
// group s >= 2 checks the cells holding symbol g in the Latin square
// L_(s-1)[i][j] = (a*i + j) mod M with a = s-1 (M3, M4, ...). Check bit
// check[s*M + g] is the even parity of its M data bits.
//
// Every data bit lies in exactly one equation of each group and any two of
// its 2T equations share no other bit (they are orthogonal on it). The
// decoder forms, for each data bit, 2T estimates (the check bit XOR the other
// data bits of that equation) plus the received bit itself and takes the
// majority of these 2T+1 votes, so any T errors in the codeword are
// corrected. Each extra pair of groups (T+1) adds a module of the same form
// without touching the others. Defaults: M=5, T=3, the (55,25)
// triple-error-correcting code; T=1 and T=2 give the (35,25) and (45,25)
// codes. M must be prime for the Latin-square rule above. err is the OR of
// all check equations. Combinational.
module ols_codec #(
  parameter int M = 5,
  parameter int T = 3
) (
  input  logic [M*M-1:0]   data,
  output logic [2*T*M-1:0] check,
  input  logic [M*M-1:0]   rd_data,
  input  logic [2*T*M-1:0] rd_check,
  output logic [M*M-1:0]   data_out,
  output logic             err
);
  import ecc_pkg::ols_group;
  localparam int K  = M * M;
  localparam int NC = 2 * T * M;

  typedef logic [NC-1:0][K-1:0] hmat_t;

  // row r = s*M + g of H: the data bits (i, j) whose group-s symbol is g
  function automatic hmat_t build_h();
    hmat_t h = '0;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++)
        for (int s = 0; s < 2 * T; s++)
          h[s*M + ols_group(s, i, j, M)][M*i + j] = 1'b1;
    return h;
  endfunction

  localparam hmat_t H = build_h();

  logic [NC-1:0] syn;

  for (genvar r = 0; r < NC; r++) begin : g_row
    assign check[r] = ^(data & H[r]);
    assign syn[r]   = rd_check[r] ^ (^(rd_data & H[r]));
  end
  assign err = |syn;

  // per data bit: received bit plus 2T orthogonal estimates, majority vote
  for (genvar i = 0; i < M; i++) begin : g_i
    for (genvar j = 0; j < M; j++) begin : g_j
      logic [2*T:0] vote;
      assign vote[2*T] = rd_data[M*i + j];
      for (genvar s = 0; s < 2 * T; s++) begin : g_s
        assign vote[s] = syn[s*M + ols_group(s, i, j, M)] ^ rd_data[M*i + j];
      end
      assign data_out[M*i + j] = (ecc_pkg::popcount(64'(vote), 2 * T + 1) > T);
    end
  end
endmodule
