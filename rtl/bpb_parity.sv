// bpb_parity: bit-per-byte parity with alternating parity sense.
//
// Each byte gets its own parity bit. Byte 0 (d7..d0) uses odd parity and
// byte 1 (d15..d8) even parity, and the pattern repeats for wider words, so
// a bus or buffer stuck at all-0 (9 zeros, even weight) fails the odd byte
// and one stuck at all-1 (9 ones, odd weight) fails the even byte. p_gen[b]
// is the bit to store for byte b; byte_err[b] flags a mismatch against p_in[b].
// Which byte is odd and which even follows the 16-bit layout this design
// implements; the repetition for wider words is this design's choice.
// Combinational.
module bpb_parity #(
  parameter int DATA_W = 16   // multiple of 8
) (
  input  logic [DATA_W-1:0]   data,
  input  logic [DATA_W/8-1:0] p_in,
  output logic [DATA_W/8-1:0] p_gen,
  output logic [DATA_W/8-1:0] byte_err,
  output logic                error
);
  localparam int NB = DATA_W / 8;

  always_comb begin
    for (int b = 0; b < NB; b++)
      p_gen[b] = (^data[8*b +: 8]) ^ ((b % 2) == 0);  // even-numbered bytes odd
    byte_err = p_gen ^ p_in;
    error    = |byte_err;
  end
endmodule
