// bp_codec: Bose-Pradhan SEC-AUED code (t = 1) on a modified Hamming C*.
//
// Encoding: X = (d0 .. d(K-1), c0 .. c(R-1)), a distance-4 C* codeword,
// written left to right as the most significant bits of code. B1 = number of
// 0's in X; B2 = number of 0's in X B1 (both in binary, BW bits).
// code = {X, B1, B2}.
//
// Decoding of X' B1' B2': B1'' = 0's in X', B2'' = 0's in X' B1';
// s_j = |B''_j - B'_j|. If both s_j exceed t = 1 the errors are detected and
// uncorrectable. Otherwise X' is corrected by the C* decoder (mh_decoder); a
// syndrome that C* cannot correct is also reported as detected. d_out is the
// corrected information. For the default (8,4) C* every single error is
// corrected and no unidirectional error pattern is accepted with wrong data.
// t = 1 and the (8,4) C* are this design's choice. Combinational.
module bp_codec #(
  parameter int K  = 4,
  parameter int R  = 4,
  parameter int BW = $clog2(K + R + $clog2(K + R + 1) + 1)
) (
  input  logic [K-1:0]          d,
  output logic [K+R+2*BW-1:0]   code,
  input  logic [K+R+2*BW-1:0]   rd_code,
  output logic [K-1:0]          d_out,
  output logic                  detected
);
  localparam int NX = K + R;
  localparam int NB = 2 * BW;

  function automatic logic [NX-1:0] pack_x(input logic [K-1:0] dd, input logic [R-1:0] cc);
    logic [NX-1:0] xv;
    for (int j = 0; j < K; j++) xv[NX-1-j] = dd[j];
    for (int i = 0; i < R; i++) xv[NX-1-K-i] = cc[i];
    return xv;
  endfunction

  logic [R-1:0]  c, rd_c, syn_unused;
  logic [K-1:0]  rd_d;
  logic [NX-1:0] x_enc, x_rd;
  logic [BW-1:0] b1, b2, rb1, rb2;
  logic          err, single, dbl_unused, multi_unused;
  int            s1, s2, z1, z2;

  mh_encoder #(.K(K), .R(R)) u_enc (.data(d), .check(c));
  mh_decoder #(.K(K), .R(R)) u_dec (
    .data_in(rd_d), .check_in(rd_c), .data_out(d_out), .syndrome(syn_unused),
    .err(err), .single_err(single), .double_err(dbl_unused), .multi_err(multi_unused)
  );

  // split the word read back into its data and check parts
  always_comb begin
    for (int j = 0; j < K; j++) rd_d[j] = rd_code[NB+NX-1-j];
    for (int i = 0; i < R; i++) rd_c[i] = rd_code[NB+NX-1-K-i];
  end

  always_comb begin
    x_enc = pack_x(d, c);
    b1    = BW'(NX - ecc_pkg::popcount(64'(x_enc), 64));
    b2    = BW'(NX + BW - ecc_pkg::popcount(64'({x_enc, b1}), 64));
    code  = {x_enc, b1, b2};

    x_rd = rd_code[2*BW +: NX];
    rb1  = rd_code[BW +: BW];
    rb2  = rd_code[BW-1:0];

    z1 = NX - ecc_pkg::popcount(64'(x_rd), 64);
    z2 = NX + BW - ecc_pkg::popcount(64'({x_rd, rb1}), 64);
    s1 = (z1 > int'(rb1)) ? z1 - int'(rb1) : int'(rb1) - z1;
    s2 = (z2 > int'(rb2)) ? z2 - int'(rb2) : int'(rb2) - z2;
    detected = ((s1 > 1) && (s2 > 1)) || (err && !single);
  end
endmodule
