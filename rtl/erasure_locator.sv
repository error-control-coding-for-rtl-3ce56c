// erasure_locator: finds stuck (erased) bit positions of one memory location.
//
// Procedure: write a test word d to the location, read it back as y1, write
// the bitwise complement of d, read it back as y2. A working cell follows the
// complement, so y1 and y2 differ there; a stuck cell returns the same value
// both times. erasures has a 1 at every position where y1 and y2 agree,
// E = NOT(y1 XOR y2), which locates the cells whose value the decoder must
// then fill in. Example: d = 00010110 with the last cell stuck at 1 gives
// y1 = 00010111, y2 = 11101001, erasures = 00000001.
//
// Memory port: mem_we writes mem_wdata to mem_addr; mem_re reads mem_addr and
// mem_rdata is valid one clock later. A start pulse (ignored while busy)
// runs the sequence WRITE1, READ1, CAPTURE1, WRITE2, READ2, CAPTURE2; done is
// high for one clock with the result, 7 clocks after start. The memory
// latency and the handshake are this design's choices.
module erasure_locator #(
  parameter int W  = 8,
  parameter int AW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  pattern,
  output logic          mem_we,
  output logic          mem_re,
  output logic [AW-1:0] mem_addr,
  output logic [W-1:0]  mem_wdata,
  input  logic [W-1:0]  mem_rdata,
  output logic          done,
  output logic [W-1:0]  erasures
);
  typedef enum logic [2:0] {IDLE, WRITE1, READ1, CAP1, WRITE2, READ2, CAP2} state_e;
  state_e        state;
  logic [AW-1:0] addr_q;
  logic [W-1:0]  pat_q, y1;

  always_comb begin
    mem_we    = (state == WRITE1) || (state == WRITE2);
    mem_re    = (state == READ1) || (state == READ2);
    mem_addr  = addr_q;
    mem_wdata = (state == WRITE2) ? ~pat_q : pat_q;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state    <= IDLE;
      addr_q   <= '0;
      pat_q    <= '0;
      y1       <= '0;
      done     <= 1'b0;
      erasures <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE:   if (start) begin
                  addr_q <= addr;
                  pat_q  <= pattern;
                  state  <= WRITE1;
                end
        WRITE1: state <= READ1;
        READ1:  state <= CAP1;
        CAP1:   begin y1 <= mem_rdata; state <= WRITE2; end
        WRITE2: state <= READ2;
        READ2:  state <= CAP2;
        CAP2:   begin
                  erasures <= ~(y1 ^ mem_rdata);
                  done     <= 1'b1;
                  state    <= IDLE;
                end
        default: state <= IDLE;
      endcase
    end
endmodule
