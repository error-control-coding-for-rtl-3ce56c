// parity_gen_check: even-parity generator and checker for one memory word.
//
// The same XOR tree serves both directions: XOR-ing the data bits gives the
// parity bit to store with the word (p_gen), and XOR-ing that regenerated bit
// with the parity bit read back gives the error signal, which is 1 when the
// word holds an odd number of flipped bits. Even parity as in most memories;
// DATA_W defaults to the 4-bit word of the worked example. Purely
// combinational, no clock.
module parity_gen_check #(
  parameter int DATA_W = 4
) (
  input  logic [DATA_W-1:0] data,   // d0..d(DATA_W-1)
  input  logic              p,      // parity bit read from memory
  output logic              p_gen,  // generated even parity bit
  output logic              error   // 1: parity mismatch
);
  always_comb begin
    p_gen = ^data;
    error = p_gen ^ p;
  end
endmodule
