// mh_decoder: modified Hamming SEC-DED decoder, fully parallel.
//
// Six parts, all combinational:
//  - syndrome generator: s_i = XOR of received data bits selected by row i of
//    H, XOR the received check bit c_i;
//  - syndrome decoder: one R-input AND per data column, high when the
//    syndrome equals that column;
//  - single-error corrector: flips the data bit whose column matched;
//  - error detector: OR of the syndrome (err);
//  - double-error detector: a non-zero syndrome of even weight. Every column
//    has odd weight, so two errors always leave an even, non-matching
//    syndrome;
//  - multiple-error detector: non-zero, odd-weight syndrome that matches no
//    column, i.e. three or more (odd) errors.
// A single error in a check bit matches a unit column; it is reported as
// single_err and the data pass through unchanged. Flag decoding follows the
// textbook algorithm (match, else even parity -> double, else multiple).
// H matrix as in mh_encoder.
module mh_decoder #(
  parameter int K = 64,
  parameter int R = 8
) (
  input  logic [K-1:0] data_in,
  input  logic [R-1:0] check_in,
  output logic [K-1:0] data_out,
  output logic [R-1:0] syndrome,
  output logic         err,
  output logic         single_err,
  output logic         double_err,
  output logic         multi_err
);
  import ecc_pkg::*;
  localparam mh_cols_t COLS = mh_data_columns(K, R);

  logic [K-1:0] match;      // syndrome decoder outputs, one per data column
  logic         check_hit;  // syndrome is a unit column (check-bit error)

  // syndrome generator
  always_comb begin
    logic [R-1:0] s;
    s = check_in;
    for (int j = 0; j < K; j++)
      for (int i = 0; i < R; i++)
        if (COLS[j][i]) s[i] ^= data_in[j];
    syndrome = s;
  end

  // syndrome decoder, corrector and error detectors
  always_comb begin
    for (int j = 0; j < K; j++) match[j] = (syndrome == COLS[j][R-1:0]);
    check_hit = (syndrome != '0) && ((syndrome & (syndrome - 1'b1)) == '0);

    data_out   = data_in ^ match;
    err        = |syndrome;
    single_err = (|match) | check_hit;
    double_err = err & ~(^syndrome);
    multi_err  = err & ~single_err & (^syndrome);
  end
endmodule
