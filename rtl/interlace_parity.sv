// interlace_parity: interlaced parity groups.
//
// Data bit d_j belongs to parity group j mod GROUPS (d0, d4, d8, d12 to p1;
// d3, d7, d11, d15 to p4 for the default 16-bit word), so adjacent bits never
// share a group and any burst of up to GROUPS adjacent errors changes at least
// one group parity. Even parity is this design's choice. Combinational.
module interlace_parity #(
  parameter int DATA_W = 16,
  parameter int GROUPS = 4
) (
  input  logic [DATA_W-1:0] data,
  input  logic [GROUPS-1:0] p_in,
  output logic [GROUPS-1:0] p_gen,
  output logic [GROUPS-1:0] p_err,
  output logic              error
);
  always_comb begin
    p_gen = '0;
    for (int j = 0; j < DATA_W; j++) p_gen[j % GROUPS] ^= data[j];
    p_err = p_gen ^ p_in;
    error = |p_err;
  end
endmodule
