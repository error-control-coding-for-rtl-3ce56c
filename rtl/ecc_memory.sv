// ecc_memory: main-memory array protected by a (K+R, K) modified Hamming
// SEC-DED code, with bit-per-byte parity on the bus side.
//
// On the bus a word is K data bits cut into bytes, each followed by its
// parity bit: byte b sits in bus[9b +: 8] and its parity in bus[9b+8]
// (default: 64 data bits + 8 parity bits = 72 bus bits). The parity follows
// bpb_parity (even-numbered bytes odd, odd-numbered bytes even).
//
// Write (wr_en): the bus parity is checked first. A valid word has its
// parity bits stripped, the K data bits are encoded by mh_encoder and the
// (K+R)-bit codeword is stored at addr in the same cycle. A word with a bus
// parity error is not stored and wr_reject is raised for one cycle.
//
// Read (rd_en): the codeword is read from the array at the clock edge; in the
// next cycle (rd_valid) mh_decoder corrects a single error, fresh byte parity
// is added and the word is presented on bus_rdata. corrected reports a
// single-bit correction; a double or multiple error raises err_irq (the interrupt), and the
// data are then not to be trusted (the processor decides to retry or
// recover). The corrected word is not written back.
//
// Array depth, one-cycle timing, rejection of bad bus words and the absence
// of write-back are this design's choices. A read and a write in the same
// cycle to the same address return the old contents.
module ecc_memory #(
  parameter int K     = 64,
  parameter int R     = 8,
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [K+K/8-1:0]         bus_wdata,
  output logic [K+K/8-1:0]         bus_rdata,
  output logic                     rd_valid,
  output logic                     wr_reject,
  output logic                     corrected,
  output logic                     err_irq
);
  localparam int NB = K / 8;
  localparam int N  = K + R;

  // ---- bus word packing ----
  logic [K-1:0]  wdata;
  logic [NB-1:0] wpar;
  always_comb
    for (int b = 0; b < NB; b++) begin
      wdata[8*b +: 8] = bus_wdata[9*b +: 8];
      wpar[b]         = bus_wdata[9*b+8];
    end

  logic [NB-1:0] wpar_gen_unused, wbyte_err_unused;
  logic          wpar_error;
  bpb_parity #(.DATA_W(K)) u_bus_check (
    .data(wdata), .p_in(wpar), .p_gen(wpar_gen_unused), .byte_err(wbyte_err_unused), .error(wpar_error)
  );

  logic [R-1:0] wcheck;
  mh_encoder #(.K(K), .R(R)) u_enc (.data(wdata), .check(wcheck));

  // ---- storage array ----
  logic [N-1:0] mem [DEPTH];
  logic [N-1:0] rword;

  always_ff @(posedge clk) begin
    if (wr_en && !wpar_error) mem[addr] <= {wcheck, wdata};
    if (rd_en) rword <= mem[addr];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rd_valid  <= 1'b0;
      wr_reject <= 1'b0;
    end else begin
      rd_valid  <= rd_en;
      wr_reject <= wr_en & wpar_error;
    end

  // ---- read path ----
  logic [K-1:0] rdata;
  logic [R-1:0] rsyn_unused;
  logic         rerr_unused, rsingle, rdouble, rmulti;
  mh_decoder #(.K(K), .R(R)) u_dec (
    .data_in(rword[K-1:0]), .check_in(rword[N-1:K]), .data_out(rdata),
    .syndrome(rsyn_unused), .err(rerr_unused), .single_err(rsingle), .double_err(rdouble), .multi_err(rmulti)
  );

  logic [NB-1:0] rpar, rpar_err_unused;
  logic          rpar_error_unused;
  bpb_parity #(.DATA_W(K)) u_bus_gen (
    .data(rdata), .p_in('0), .p_gen(rpar), .byte_err(rpar_err_unused), .error(rpar_error_unused)
  );

  always_comb begin
    for (int b = 0; b < NB; b++) begin
      bus_rdata[9*b +: 8] = rdata[8*b +: 8];
      bus_rdata[9*b+8]    = rpar[b];
    end
    corrected = rd_valid & rsingle;
    err_irq = rd_valid & (rdouble | rmulti);
  end
endmodule
