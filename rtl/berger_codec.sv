// berger_codec: Berger code encoder and checker.
//
// The check word p is the number of 0's in the K-bit information word, in
// binary on CB = ceil(log2(K+1)) bits; the codeword is {x, p}. Any number of
// unidirectional errors either raises the count of 0's in x while p can only
// fall, or the reverse, so the recount never matches and error is raised.
// The code is systematic: decoding is just taking x. Defaults: K=8, CB=4
// (x = 00010110 gives p = 0101). Combinational.
module berger_codec #(
  parameter int K  = 8,
  parameter int CB = $clog2(K + 1)
) (
  input  logic [K-1:0]  x,
  output logic [CB-1:0] p,
  input  logic [K-1:0]  rd_x,
  input  logic [CB-1:0] rd_p,
  output logic          error
);
  logic [CB-1:0] rd_zeros;
  always_comb begin
    p        = '0;
    rd_zeros = '0;
    for (int i = 0; i < K; i++) begin
      p        += CB'(!x[i]);
      rd_zeros += CB'(!rd_x[i]);
    end
    error = (rd_zeros != rd_p);
  end
endmodule
