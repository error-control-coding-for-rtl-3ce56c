// m_of_n_checker: constant-weight (m-of-n) code checker.
//
// Every codeword of an m-of-n code has exactly M ones among its N bits. The
// checker counts the ones and raises error for any other weight: a single
// error moves the weight to M+1 or M-1, and any number of errors that are all
// 1->0 or all 0->1 (unidirectional) also changes it, so those are always
// detected. The default is the balanced 8-of-16 code (a data byte followed by
// its complement); N and M are this design's choice. Combinational.
module m_of_n_checker #(
  parameter int N = 16,
  parameter int M = 8
) (
  input  logic [N-1:0]         word,
  output logic [$clog2(N+1)-1:0] weight,
  output logic                 error
);
  always_comb begin
    weight = '0;
    for (int i = 0; i < N; i++) weight += $clog2(N+1)'(word[i]);
    error = (weight != $clog2(N+1)'(M));
  end
endmodule
