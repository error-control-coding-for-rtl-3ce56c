// ngp_codec: single-error-correcting / all-unidirectional-error-detecting
// (SEC-AUED) code of the NGP type, built on a modified Hamming code C*.
//
// Encoding: X = (d0 .. d(K-1), c0 .. c(R-1)) is the C* codeword, written
// left to right as the most significant bits of code. With k0 = number of
// 0's in X, two check symbols follow: B1 = k0 and B2 = floor(k0 / 2), in
// binary (B1W and B2W bits). code = {X, B1, B2}.
//
// Decoding, for a word R' = X' B1' B2' read back:
//  1. syndrome S of X' (mh_decoder);
//  2. S = 0: Z = 0, X'' = X'. S equal to a column of H: Z = 1 and X'' is X'
//     with that bit flipped. Any other S: errors detected, uncorrectable;
//  3. D' = check symbols recomputed from X'', Q = Z + W(B1'B2' xor D');
//  4. Q <= 1: X'' is accepted (ok) and d_out is its information part;
//     otherwise the errors are only detected (detected).
// clean is S = 0 with matching check symbols (no error at all). For the
// default (8,4) C* every single error is corrected and every unidirectional
// error pattern is detected. B2 is given enough bits to hold floor(n/2)
// (3 bits for the (8,4) code): a 2-bit B2 would let some unidirectional
// errors through. Combinational.
module ngp_codec #(
  parameter int K = 4,
  parameter int R = 4,
  parameter int B1W = $clog2(K + R + 1),
  parameter int B2W = $clog2((K + R) / 2 + 1)
) (
  input  logic [K-1:0]             d,
  output logic [K+R+B1W+B2W-1:0]   code,
  input  logic [K+R+B1W+B2W-1:0]   rd_code,
  output logic [K-1:0]             d_out,
  output logic                     ok,
  output logic                     corrected,
  output logic                     detected,
  output logic                     clean
);
  localparam int NX = K + R;
  localparam int NB = B1W + B2W;

  function automatic logic [NB-1:0] symbols(input logic [NX-1:0] xv);
    int k0 = NX - ecc_pkg::popcount(64'(xv), 64);
    return {B1W'(k0), B2W'(k0 / 2)};
  endfunction

  // X as a vector, position p (0 = d0) at bit NX-1-p
  function automatic logic [NX-1:0] pack_x(input logic [K-1:0] dd, input logic [R-1:0] cc);
    logic [NX-1:0] xv;
    for (int j = 0; j < K; j++) xv[NX-1-j] = dd[j];
    for (int i = 0; i < R; i++) xv[NX-1-K-i] = cc[i];
    return xv;
  endfunction

  logic [R-1:0]  c, rd_c, syn;
  logic [K-1:0]  rd_d, d_corr;
  logic [NX-1:0] x_enc, x_rd, x_corr;
  logic [NB-1:0] b_rd;
  logic          err, single, dbl_unused, multi_unused;
  int            q;

  mh_encoder #(.K(K), .R(R)) u_enc (.data(d), .check(c));
  mh_decoder #(.K(K), .R(R)) u_dec (
    .data_in(rd_d), .check_in(rd_c), .data_out(d_corr), .syndrome(syn),
    .err(err), .single_err(single), .double_err(dbl_unused), .multi_err(multi_unused)
  );

  // split the word read back into its data and check parts
  always_comb begin
    for (int j = 0; j < K; j++) rd_d[j] = rd_code[NB+NX-1-j];
    for (int i = 0; i < R; i++) rd_c[i] = rd_code[NB+NX-1-K-i];
  end

  always_comb begin
    x_enc = pack_x(d, c);
    code  = {x_enc, symbols(x_enc)};

    x_rd = rd_code[NB +: NX];
    b_rd = rd_code[NB-1:0];

    // X'': data corrected by the decoder, a check bit flipped when the
    // syndrome is a unit column
    x_corr = pack_x(d_corr, rd_c ^ (((syn != '0) && ((syn & (syn - 1'b1)) == '0)) ? syn : '0));
    q      = int'(single) + ecc_pkg::popcount(64'(b_rd ^ symbols(x_corr)), 64);

    clean     = !err && (b_rd == symbols(x_rd));
    ok        = (!err || single) && (q <= 1);
    corrected = ok && !clean;
    detected  = !ok;
    d_out     = d_corr;
  end
endmodule
