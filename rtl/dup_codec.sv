// dup_codec: duplication codes for error detection.
//
// The codeword is {copy, data}: the information word followed (in the upper
// half) by a second portion derived from it, and the checker compares the two
// portions read back. Three variants, chosen by MODE:
//  DUP_PLAIN      copy = data;
//  DUP_COMPLEMENT copy = ~data, so a bit slice stuck at 0 or 1 across both
//                 portions always breaks the complement relation;
//  DUP_SWAP       copy = data with its upper and lower halves exchanged, so
//                 a faulty bit slice hits a lower half in one portion and an
//                 upper half in the other.
// Any disagreement raises error. Word width and the default variant
// (complement) are this design's choices. Combinational.
module dup_codec #(
  parameter int DATA_W = 16,  // even for DUP_SWAP
  parameter ecc_types_pkg::dup_mode_e MODE = ecc_types_pkg::DUP_COMPLEMENT
) (
  input  logic [DATA_W-1:0]   data,
  output logic [2*DATA_W-1:0] code,
  input  logic [2*DATA_W-1:0] rd_code,
  output logic                error
);
  localparam int HW = DATA_W / 2;

  function automatic logic [DATA_W-1:0] derive(input logic [DATA_W-1:0] d);
    case (MODE)
      ecc_types_pkg::DUP_PLAIN:      return d;
      ecc_types_pkg::DUP_COMPLEMENT: return ~d;
      default:                       return {d[HW-1:0], d[DATA_W-1:HW]};
    endcase
  endfunction

  always_comb begin
    code  = {derive(data), data};
    error = (derive(rd_code[DATA_W-1:0]) != rd_code[2*DATA_W-1:DATA_W]);
  end
endmodule
