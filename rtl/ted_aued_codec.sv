// ted_aued_codec: t-error-detecting / all-unidirectional-error-detecting code.
//
// Two-step systematic construction: the K information bits are first encoded
// with a distance-4 modified Hamming code C1 (mh_encoder, n1 = K+R bits, so
// any 3 random errors are detected), then the n1-bit C1 codeword is
// Berger-encoded (count of 0's on CB = ceil(log2(n1+1)) bits). Codeword:
// {x, c, b}. The checker flags a word when the Hamming syndrome is non-zero
// or the Berger count disagrees; the first catches up to 3 random errors,
// the second every unidirectional error. Defaults K=8, R=5: a 17-bit
// codeword. The choice of C1 and K is this design's. Combinational.
module ted_aued_codec #(
  parameter int K  = 8,
  parameter int R  = 5,
  parameter int CB = $clog2(K + R + 1)
) (
  input  logic [K-1:0]      x,
  output logic [K+R+CB-1:0] code,
  input  logic [K+R+CB-1:0] rd_code,
  output logic              error
);
  localparam int N1 = K + R;

  logic [R-1:0]  c, rd_c_new;
  logic [CB-1:0] b, b_unused;
  logic          berger_err, berger_err_unused;
  logic [K-1:0]  rd_x;
  logic [R-1:0]  rd_c;
  logic [CB-1:0] rd_b;

  assign rd_x = rd_code[K+R+CB-1:R+CB];
  assign rd_c = rd_code[R+CB-1:CB];
  assign rd_b = rd_code[CB-1:0];

  mh_encoder #(.K(K), .R(R)) u_enc   (.data(x),    .check(c));
  mh_encoder #(.K(K), .R(R)) u_recmp (.data(rd_x), .check(rd_c_new));

  berger_codec #(.K(N1), .CB(CB)) u_berger_enc (
    .x({x, c}), .p(b), .rd_x('0), .rd_p('0), .error(berger_err_unused)
  );
  berger_codec #(.K(N1), .CB(CB)) u_berger_chk (
    .x({rd_x, rd_c}), .p(b_unused), .rd_x({rd_x, rd_c}), .rd_p(rd_b), .error(berger_err)
  );

  always_comb begin
    code  = {x, c, b};
    error = (rd_c_new != rd_c) || berger_err;
  end
endmodule
