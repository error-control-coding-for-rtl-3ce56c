// product_sec_aued: SEC-AUED product code (row parity x column Berger).
//
// The K1*K2 information bits form a K1 x K2 matrix. Step 1: each row is
// extended by an even parity bit (a distance-2 row code), giving K1 rows of
// N2 = K2+1 bits. Step 2: each of the N2 columns is extended by its Berger
// check (number of 0's among its K1 bits, CB = ceil(log2(K1+1)) bits, most
// significant bit first, downwards). The codeword is the (K1+CB) x N2
// matrix, row-major: bit code[N2*r + c] is row r, column c.
//
// Decoder: e1 = number of the K1 top rows whose parity fails, e2 = number of
// columns whose Berger check fails. e1 = e2 = 0: no error. e1 = e2 = 1: one
// error at the intersection; it is corrected when it lies in the
// information block (an intersection in the parity column leaves the data
// intact). Any other combination is reported as multiple errors (multi_err),
// including an error confined to the Berger rows. Defaults K1=3, K2=2
// reproduce the 5 x 3 example matrix. Combinational.
module product_sec_aued #(
  parameter int K1 = 3,
  parameter int K2 = 2,
  parameter int CB = $clog2(K1 + 1)
) (
  input  logic [K1*K2-1:0]        info,
  output logic [(K1+CB)*(K2+1)-1:0] code,
  input  logic [(K1+CB)*(K2+1)-1:0] rd_code,
  output logic [K1*K2-1:0]        info_out,
  output logic                    corrected,
  output logic                    multi_err
);
  localparam int N2 = K2 + 1;
  localparam int EW = $clog2(N2 + K1 + 1);

  logic [K1-1:0] row_fail;
  logic [N2-1:0] col_fail;
  logic [CB-1:0] zeros, rd_zeros, rd_b;
  logic [EW-1:0] e1, e2;
  int            fr, fc;

  always_comb begin
    // ---- encoder ----
    code = '0;
    for (int r = 0; r < K1; r++) begin
      for (int c = 0; c < K2; c++) begin
        code[N2*r + c]  = info[K2*r + c];
        code[N2*r + K2] ^= info[K2*r + c];
      end
    end
    for (int c = 0; c < N2; c++) begin
      zeros = '0;
      for (int r = 0; r < K1; r++) zeros += CB'(!code[N2*r + c]);
      for (int b = 0; b < CB; b++) code[N2*(K1 + b) + c] = zeros[CB-1-b];
    end

    // ---- decoder ----
    e1 = '0;
    e2 = '0;
    fr = 0;
    fc = 0;
    for (int r = 0; r < K1; r++) begin
      row_fail[r] = ^rd_code[N2*r +: N2];
      if (row_fail[r]) begin
        e1 += 1'b1;
        fr = r;
      end
    end
    for (int c = 0; c < N2; c++) begin
      rd_zeros = '0;
      for (int r = 0; r < K1; r++) rd_zeros += CB'(!rd_code[N2*r + c]);
      for (int b = 0; b < CB; b++) rd_b[CB-1-b] = rd_code[N2*(K1 + b) + c];
      col_fail[c] = (rd_zeros != rd_b);
      if (col_fail[c]) begin
        e2 += 1'b1;
        fc = c;
      end
    end
    for (int r = 0; r < K1; r++)
      for (int c = 0; c < K2; c++) info_out[K2*r + c] = rd_code[N2*r + c];
    corrected = (e1 == EW'(1)) && (e2 == EW'(1));
    multi_err = !corrected && ((e1 != '0) || (e2 != '0));
    if (corrected && fc < K2) info_out[K2*fr + fc] = ~rd_code[N2*fr + fc];
  end
endmodule
