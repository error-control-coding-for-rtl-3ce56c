// bpw_parity: bit-per-word parity, one parity bit over the whole word.
//
// p_gen is the parity bit to store: even parity (ODD=0, the default, the
// usual choice in memories) or odd parity (ODD=1). error compares it with the
// stored bit p_in and detects any odd number of flipped bits. An even code
// cannot see an all-0 word failure and an odd code with an odd total length
// cannot see an all-1 failure; bpb_parity addresses that. Combinational.
module bpw_parity #(
  parameter int   DATA_W = 16,
  parameter logic ODD    = 1'b0
) (
  input  logic [DATA_W-1:0] data,
  input  logic              p_in,
  output logic              p_gen,
  output logic              error
);
  always_comb begin
    p_gen = (^data) ^ ODD;
    error = p_gen ^ p_in;
  end
endmodule
