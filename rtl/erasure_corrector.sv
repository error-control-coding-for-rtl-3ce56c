// erasure_corrector: look-up-table correction of erasures (known defective
// cell positions) in words protected by a modified Hamming code.
//
// A code of minimum distance d corrects up to d-1 erasures; for the SEC-DED
// (K+R, K) code that is 3. The procedure:
//  - learn: an erasure vector (a 1 at each defective position, e.g. from
//    erasure_locator) is merged into the set of known erasures. For every
//    non-empty combination of the first MAXE known positions, the syndrome
//    the code would produce if exactly those cells were wrong is computed
//    and stored together with the combination, in a table of 2^MAXE - 1
//    entries (registered one clock after learn).
//  - read (combinational): the syndrome of the word read is generated and
//    compared with every stored syndrome. Zero syndrome: clean. A match: the
//    stored combination is the error pattern and is flipped out of the
//    word (hit); data_out/check_out give the corrected codeword.
//    No match: a new defect has appeared (miss); the caller locates it and
//    issues learn again, which adds its syndromes to the table.
// Codeword positions: p < K is data bit p, p >= K is check bit p-K; the
// columns are the ones mh_encoder uses, so any word mh_encoder produced can
// be corrected.
//
// Defaults K=4, R=4 (the 8-bit (8,4) word), MAXE=3. The procedure follows
// the stored-syndrome scheme; the table layout, its size (one entry per
// combination of up to MAXE erasures), the merge rule and the one-clock
// learn are this design's choices. Erasures beyond the first MAXE known
// positions are not covered.
module erasure_corrector #(
  parameter int K    = 4,
  parameter int R    = 4,
  parameter int MAXE = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           learn,
  input  logic [K+R-1:0] erase_mask,
  input  logic [K-1:0]   rd_data,
  input  logic [R-1:0]   rd_check,
  output logic [K-1:0]   data_out,
  output logic [R-1:0]   check_out,
  output logic           clean,
  output logic           hit,
  output logic           miss,
  output logic [K+R-1:0] known
);
  import ecc_pkg::*;
  localparam int N  = K + R;
  localparam int NE = (1 << MAXE) - 1;
  localparam mh_cols_t COLS = mh_data_columns(K, R);

  // column of H for codeword position p
  function automatic logic [R-1:0] h_col(input int p);
    if (p < K) return COLS[p][R-1:0];
    return R'(1) << (p - K);
  endfunction

  logic [NE-1:0]        ent_valid;
  logic [NE-1:0][R-1:0] ent_syn;
  logic [NE-1:0][N-1:0] ent_pat;
  logic [N-1:0]         merged;
  logic [NE-1:0][R-1:0] new_syn;
  logic [NE-1:0][N-1:0] new_pat;
  logic [NE-1:0]        new_valid;

  // syndromes of every combination of the first MAXE merged erasures
  always_comb begin
    int pos [MAXE];
    int cnt;
    merged = known | erase_mask;
    cnt    = 0;
    for (int m = 0; m < MAXE; m++) pos[m] = 0;
    for (int p = 0; p < N; p++)
      if (merged[p] && cnt < MAXE) begin
        pos[cnt] = p;
        cnt++;
      end
    for (int e = 0; e < NE; e++) begin
      new_syn[e]   = '0;
      new_pat[e]   = '0;
      new_valid[e] = 1'b1;
      for (int m = 0; m < MAXE; m++)
        if ((((e + 1) >> m) & 1) != 0) begin
          if (m < cnt) begin
            new_syn[e]         ^= h_col(pos[m]);
            new_pat[e][pos[m]]  = 1'b1;
          end else begin
            new_valid[e] = 1'b0;
          end
        end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      known     <= '0;
      ent_valid <= '0;
      ent_syn   <= '0;
      ent_pat   <= '0;
    end else if (learn) begin
      known     <= merged;
      ent_valid <= new_valid;
      ent_syn   <= new_syn;
      ent_pat   <= new_pat;
    end
  end

  // read path: syndrome generation and table search
  logic [R-1:0] syn;
  logic [N-1:0] fix;
  always_comb begin
    syn = rd_check;
    for (int j = 0; j < K; j++) if (rd_data[j]) syn ^= COLS[j][R-1:0];
    fix = '0;
    hit = 1'b0;
    for (int e = 0; e < NE; e++)
      if (ent_valid[e] && ent_syn[e] == syn && !hit && syn != '0) begin
        fix = ent_pat[e];
        hit = 1'b1;
      end
    clean    = (syn == '0);
    miss     = !clean && !hit;
    data_out  = rd_data ^ fix[K-1:0];
    check_out = rd_check ^ fix[N-1:K];
  end
endmodule
