// hv_decoder: bit-serial H-V-parity decoder, one data bit per subcycle.
//
// A start pulse captures a codeword (data, H-parity, V-parity) as it comes
// off the word line. Decoding then takes ROWS*COLS subcycles, one clock each;
// in subcycle n (bit d_n, row r = n / COLS, column c = n % COLS):
//  - the H-group data selector passes row r to the H-parity generator, which
//    forms the new H-parity h'_r;
//  - the V-group data selector passes column c to the V-parity generator,
//    which forms v'_c;
//  - the correction circuit compares h'_r with the stored hpar[r] and v'_c
//    with vpar[c]; when both disagree the error lies at their intersection,
//    d_n, and the correcting signal corr is 1;
//  - the output multiplexer selects d_n and toggles it when corr is 1.
// During each subcycle bit_valid is high and bit_idx/bit_out give the
// corrected bit; it is also collected into data_out. done pulses for one
// clock after the last subcycle, when data_out holds the corrected word and
// n_corr the number of corrections. A single error is corrected; a double
// error in one row or column produces no correction (it is only visible as
// mismatching parity). The selectors read the word as captured, not the
// partially corrected one.
//
// Defaults decode the (19,12) code, 12 subcycles per word. The start/done
// handshake and the one-clock subcycle are this design's choices; start is
// ignored while a word is in progress.
module hv_decoder #(
  parameter int ROWS = 3,
  parameter int COLS = 4
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                start,
  input  logic [ROWS*COLS-1:0]                data,
  input  logic [ROWS-1:0]                     hpar,
  input  logic [COLS-1:0]                     vpar,
  output logic                                bit_valid,
  output logic [$clog2(ROWS*COLS)-1:0]        bit_idx,
  output logic                                bit_out,
  output logic                                corr,
  output logic                                done,
  output logic [ROWS*COLS-1:0]                data_out,
  output logic [$clog2(ROWS*COLS+1)-1:0]      n_corr
);
  localparam int NB = ROWS * COLS;
  localparam int IW = $clog2(NB);

  logic [NB-1:0]   word_q;
  logic [ROWS-1:0] hpar_q;
  logic [COLS-1:0] vpar_q;
  logic            busy;
  logic [IW-1:0]   n;

  // row and column of the current bit
  int row, col;
  always_comb begin
    row = int'(n) / COLS;
    col = int'(n) % COLS;
  end

  // H-group and V-group data selectors
  logic [COLS-1:0] hgroup;
  logic [ROWS-1:0] vgroup;
  always_comb begin
    for (int c = 0; c < COLS; c++) hgroup[c] = word_q[COLS*row + c];
    for (int r = 0; r < ROWS; r++) vgroup[r] = word_q[COLS*r + col];
  end

  // parity generators, correction circuit, output multiplexer
  logic h_new, v_new, h_fail, v_fail;
  always_comb begin
    h_new     = ^hgroup;
    v_new     = ^vgroup;
    h_fail    = h_new ^ hpar_q[row];
    v_fail    = v_new ^ vpar_q[col];
    corr      = busy & h_fail & v_fail;
    bit_out   = word_q[n] ^ corr;
    bit_idx   = n;
    bit_valid = busy;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      n        <= '0;
      n_corr   <= '0;
      word_q   <= '0;
      hpar_q   <= '0;
      vpar_q   <= '0;
      data_out <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          word_q <= data;
          hpar_q <= hpar;
          vpar_q <= vpar;
          busy   <= 1'b1;
          n      <= '0;
          n_corr <= '0;
        end
      end else begin
        data_out[n] <= bit_out;
        if (corr) n_corr <= n_corr + 1'b1;
        if (n == IW'(NB - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          n <= n + 1'b1;
        end
      end
    end
endmodule
