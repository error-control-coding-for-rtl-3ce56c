// balanced_codec: efficient balanced (K/2-of-K information part) code with
// parallel encoding and decoding.
//
// Encoder: X^j is X with its first j bits (the most significant ones)
// complemented. Its weight moves by +-1 as j steps from 0 to K, from W(X) to
// K - W(X), so some j in 0..K-1 gives weight exactly K/2. The smallest such
// j is taken and a check word naming j is appended; the check words are the
// R-bit words of weight floor(R/2), the j-th one in ascending binary order,
// so the whole codeword {X^j, check} has constant weight. R must satisfy
// C(R, floor(R/2)) >= K.
//
// Decoder: the check word is looked up to recover j and X = (X^j)^j.
// error is raised when the information part is not balanced or the check
// word is not in the table, which catches every unidirectional error.
// Defaults K=10, R=5. For X = 0111001101 the text names j = 5 and j = 9;
// j = 3 (X^3 = 1001001101) balances it as well and is the one chosen here.
// The smallest-j rule and the check-word table order are this design's
// choices.
// K must be even. Combinational.
module balanced_codec #(
  parameter int K = 10,
  parameter int R = 5
) (
  input  logic [K-1:0]   x,
  output logic [K+R-1:0] code,      // {X^j, check}
  input  logic [K+R-1:0] rd_code,
  output logic [K-1:0]   x_out,
  output logic           error
);
  localparam int JW = $clog2(K);

  typedef logic [K-1:0][R-1:0] table_t;

  function automatic table_t check_table();
    table_t t = '0;
    int     n = 0;
    for (int v = 0; v < (1 << R); v++) begin
      int w = 0;
      for (int b = 0; b < R; b++) w += (v >> b) & 1;
      if (w == R / 2 && n < K) begin
        t[n] = R'(v);
        n++;
      end
    end
    return t;
  endfunction

  localparam table_t CHK = check_table();

  // mask with the first (most significant) j bits set
  function automatic logic [K-1:0] head_mask(input int j);
    logic [K-1:0] m = '0;
    for (int b = 0; b < K; b++) if (b >= K - j) m[b] = 1'b1;
    return m;
  endfunction

  logic [JW-1:0]  j_enc, j_dec;
  logic           found_enc, found_dec;
  logic [K-1:0]   rd_info;
  logic [R-1:0]   rd_chk;

  always_comb begin
    // encoder: smallest balancing j
    j_enc     = '0;
    found_enc = 1'b0;
    for (int j = K - 1; j >= 0; j--)
      if (ecc_pkg::popcount(64'(x ^ head_mask(j)), 64) == K / 2) begin
        j_enc     = JW'(j);
        found_enc = 1'b1;
      end
    code = {x ^ head_mask(int'(j_enc)), CHK[j_enc]};

    // decoder: check-word lookup
    rd_info   = rd_code[K+R-1:R];
    rd_chk    = rd_code[R-1:0];
    j_dec     = '0;
    found_dec = 1'b0;
    for (int j = 0; j < K; j++)
      if (rd_chk == CHK[j]) begin
        j_dec     = JW'(j);
        found_dec = 1'b1;
      end
    x_out = rd_info ^ head_mask(int'(j_dec));
    error = !found_dec || (ecc_pkg::popcount(64'(rd_info), 64) != K / 2);
  end

  // a balancing j always exists for even K
  always_comb assert (found_enc || $isunknown(x));
endmodule
