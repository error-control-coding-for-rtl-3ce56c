// parity_memory: a small memory protected by a single-bit even parity code.
//
// On a write the parity generator (parity_gen_check) forms the parity bit of
// data_in and the word is stored together with it. On a read the word and
// its stored parity come out of the array one clock after the address; the
// parity checker regenerates the parity from the data read and raises error
// when it differs from the stored bit, i.e. when an odd number of bits of
// the stored word flipped. Detection only, no correction.
//
// Timing: synchronous write when we=1; synchronous read of addr on every
// clock, data_out/error valid in the following cycle. Depth and timing are
// this design's choices; DATA_W defaults to the 4-bit (BCD) word.
module parity_memory #(
  parameter int DATA_W = 4,
  parameter int DEPTH  = 16
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [DATA_W-1:0]        data_in,
  output logic [DATA_W-1:0]        data_out,
  output logic                     error
);
  logic [DATA_W:0] mem [DEPTH];   // {parity, data}
  logic [DATA_W:0] rword;
  logic            wpar, wpar_err_unused, rpar_unused;

  parity_gen_check #(.DATA_W(DATA_W)) u_gen (
    .data(data_in), .p(1'b0), .p_gen(wpar), .error(wpar_err_unused)
  );

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= {wpar, data_in};
    rword <= mem[addr];
  end

  parity_gen_check #(.DATA_W(DATA_W)) u_check (
    .data(rword[DATA_W-1:0]), .p(rword[DATA_W]), .p_gen(rpar_unused), .error(error)
  );

  assign data_out = rword[DATA_W-1:0];
endmodule
