// bpmc_parity: bit-per-multiple-chip parity.
//
// The word is stored in CHIP_W-bit-wide memory chips (chip c holds bits
// d[CHIP_W*c +: CHIP_W]). Parity bit i is the even parity of bit i of every
// chip, so each chip contributes one bit to every parity group and a failing
// chip that corrupts all its bits disturbs every group (chip_fail), while a
// single bit error disturbs one group. Even parity is this design's choice.
// Combinational.
module bpmc_parity #(
  parameter int DATA_W = 16,
  parameter int CHIP_W = 4
) (
  input  logic [DATA_W-1:0] data,
  input  logic [CHIP_W-1:0] p_in,
  output logic [CHIP_W-1:0] p_gen,
  output logic [CHIP_W-1:0] p_err,
  output logic              chip_fail
);
  localparam int NCHIP = DATA_W / CHIP_W;

  always_comb begin
    p_gen = '0;
    for (int c = 0; c < NCHIP; c++) p_gen ^= data[CHIP_W*c +: CHIP_W];
    p_err     = p_gen ^ p_in;
    chip_fail = &p_err;
  end
endmodule
