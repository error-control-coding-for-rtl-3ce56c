// ecc_pkg: constants and elaboration-time functions shared by the error
// control coding blocks.
//
// mh_data_columns() builds the information-bit columns of a modified Hamming
// (odd-weight-column) SEC-DED parity check matrix by the textbook procedure:
// all weight-1 columns go to the check bits, then weight-3 columns are taken,
// then weight-5, and so on, until K columns are found. Which columns of a
// weight are taken is this design's choice: a greedy pass takes, in descending
// binary order (row 0 as the most significant bit), the candidate whose rows
// carry the fewest ones so far, which keeps the row weights as equal as
// possible. For R=4, K=4 it yields the (8,4) matrix
//   d0=1110, d1=1101, d2=1011, d3=0111 (rows s0..s3).
// Column j is returned in element [j]; bit i of an element is row i.
//
// ols_group() gives, for an Orthogonal Latin Square code of order M, the row
// (0..M-1) of sub-matrix s that data bit d(M*i+j) belongs to: s=0 groups by
// row i, s=1 by column j, s>=2 by the Latin square L_a[i][j] = (a*i+j) mod M
// with a = s-1, which reproduces the 5x5 squares used for the (45,25) and
// (55,25) codes.
package ecc_pkg;

  localparam int MH_MAXK = 256;
  localparam int MH_MAXR = 10;

  typedef logic [MH_MAXK-1:0][MH_MAXR-1:0] mh_cols_t;

  function automatic int popcount(input logic [63:0] v, input int width);
    int n = 0;
    for (int b = 0; b < width; b++) if (v[b]) n++;
    return n;
  endfunction

  function automatic mh_cols_t mh_data_columns(input int k, input int r);
    mh_cols_t cols = '0;
    int load [MH_MAXR];
    logic used [1 << MH_MAXR];
    int picked = 0;
    for (int i = 0; i < MH_MAXR; i++) load[i] = 0;
    for (int v = 0; v < (1 << MH_MAXR); v++) used[v] = 1'b0;
    for (int w = 3; w <= r && picked < k; w += 2) begin
      for (int guard = 0; guard < (1 << r) && picked < k; guard++) begin
        int best = -1;
        int best_cost = 1 << 30;
        for (int v = (1 << r) - 1; v > 0; v--) begin
          if (!used[v] && popcount(64'(v), r) == w) begin
            int cost = 0;
            for (int i = 0; i < r; i++) if (v[r-1-i]) cost += load[i];
            if (cost < best_cost) begin
              best_cost = cost;
              best = v;
            end
          end
        end
        if (best < 0) break;
        used[best] = 1'b1;
        for (int i = 0; i < r; i++) begin
          cols[picked][i] = best[r-1-i];
          if (best[r-1-i]) load[i]++;
        end
        picked++;
      end
    end
    return cols;
  endfunction

  function automatic int ols_group(input int s, input int i, input int j, input int m);
    if (s == 0) return i;
    if (s == 1) return j;
    return ((s - 1) * i + j) % m;
  endfunction

  function automatic int clog2_min1(input int v);
    return (v <= 1) ? 1 : $clog2(v);
  endfunction

endpackage
