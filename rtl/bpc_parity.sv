// bpc_parity: bit-per-chip parity.
//
// Each CHIP_W-bit memory chip has its own even parity bit: p1 (index 0)
// covers d0..d3, p2 covers d4..d7, and so on. A single error is detected and
// chip_err names the chip that holds it, which lets maintenance replace the
// failed part. Even parity is this design's choice. Combinational.
module bpc_parity #(
  parameter int DATA_W = 16,
  parameter int CHIP_W = 4
) (
  input  logic [DATA_W-1:0]        data,
  input  logic [DATA_W/CHIP_W-1:0] p_in,
  output logic [DATA_W/CHIP_W-1:0] p_gen,
  output logic [DATA_W/CHIP_W-1:0] chip_err
);
  localparam int NCHIP = DATA_W / CHIP_W;

  always_comb begin
    for (int c = 0; c < NCHIP; c++) p_gen[c] = ^data[CHIP_W*c +: CHIP_W];
    chip_err = p_gen ^ p_in;
  end
endmodule
