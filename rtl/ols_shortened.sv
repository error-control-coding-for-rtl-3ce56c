// ols_shortened: Orthogonal Latin Square code shortened to (M-1)^2 data bits
// by deleting row 0 and column 0 of the M x M data square.
//
// Shortening deletes data columns of H, which is the same as holding those
// data bits at 0: orthogonality and the number of orthogonal equations per
// bit are unchanged, so the majority decoder still corrects T errors. This
// block deletes the M bits of row 0 (d0..d(M-1)) and then the remaining
// M-1 bits of column 0 (dM, d2M, ...). For M=5 that is d0..d4 and d5, d10,
// d15, d20, leaving 16 data bits. The row-0 check (group 0, symbol 0) and
// the column-0 check (group 1, symbol 0) then cover no data bit and are
// dropped, so the code has 2*T*M-2 check bits (28 for T=3: a (44,16) code),
// and no remaining check equation covers more than M-1 data bits.
//
// Data bit k of this block is square cell (i, j) = (1 + k/(M-1), 1 + k%(M-1)).
// Check bit c of this block is check bit c+1 of ols_codec for c < M-1 and
// check bit c+2 from there on (check bits 0 and M of the full code are the
// dropped ones). It is built on ols_codec: the deleted data inputs and the
// two dropped check inputs are tied to 0, which synthesis removes.
// Combinational, like ols_codec.
//
// The deletion scheme is the document's second one for M=5 (the one that
// lowers the widest check to M-1 inputs); the bit order of the shortened
// word and the generalisation to any prime M are this design's choices.
module ols_shortened #(
  parameter int M = 5,
  parameter int T = 3
) (
  input  logic [(M-1)*(M-1)-1:0] data,
  output logic [2*T*M-3:0]       check,
  input  logic [(M-1)*(M-1)-1:0] rd_data,
  input  logic [2*T*M-3:0]       rd_check,
  output logic [(M-1)*(M-1)-1:0] data_out,
  output logic                   err
);
  localparam int KF = M * M;
  localparam int NF = 2 * T * M;
  localparam int KS = (M - 1) * (M - 1);

  logic [KF-1:0] f_data, f_rd_data, f_data_out;
  logic [NF-1:0] f_check, f_rd_check;

  // data: shortened bit k sits at full position M*i + j, i, j >= 1
  always_comb begin
    f_data    = '0;
    f_rd_data = '0;
    for (int k = 0; k < KS; k++) begin
      f_data[M*(1 + k/(M-1)) + 1 + k%(M-1)]    = data[k];
      f_rd_data[M*(1 + k/(M-1)) + 1 + k%(M-1)] = rd_data[k];
      data_out[k] = f_data_out[M*(1 + k/(M-1)) + 1 + k%(M-1)];
    end
  end

  // checks: drop full check bits 0 (row 0) and M (column 0)
  always_comb begin
    f_rd_check = '0;
    for (int c = 0; c < NF - 2; c++) begin
      if (c < M - 1) begin
        check[c]          = f_check[c + 1];
        f_rd_check[c + 1] = rd_check[c];
      end else begin
        check[c]          = f_check[c + 2];
        f_rd_check[c + 2] = rd_check[c];
      end
    end
  end

  ols_codec #(.M(M), .T(T)) u_full (
    .data(f_data), .check(f_check), .rd_data(f_rd_data), .rd_check(f_rd_check),
    .data_out(f_data_out), .err(err)
  );
endmodule
