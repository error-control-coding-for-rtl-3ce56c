// tb_erasure_locator: drives the erasure locator against a behavioural
// memory with per-location stuck-at-1 and stuck-at-0 masks (one clock read
// latency). Runs the worked example (d = 00010110, last cell stuck at 1,
// expected E = 00000001), then random patterns with random stuck cells;
// checks E against the stuck mask, the 7-clock start-to-done time, and that
// start is ignored while the sequence runs.
module tb_erasure_locator;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction
  localparam int W = 8, AW = 4;
  logic          rst_n = 0, start = 0;
  logic [AW-1:0] addr = '0;
  logic [W-1:0]  pattern = '0;
  logic          mem_we, mem_re, done;
  logic [AW-1:0] mem_addr;
  logic [W-1:0]  mem_wdata, mem_rdata, erasures;

  logic [W-1:0] cells [1 << AW];
  logic [W-1:0] s1 [1 << AW];
  logic [W-1:0] s0 [1 << AW];
  int n_we = 0, n_re = 0;

  erasure_locator #(.W(W), .AW(AW)) dut (
    .clk, .rst_n, .start, .addr, .pattern, .mem_we, .mem_re, .mem_addr,
    .mem_wdata, .mem_rdata, .done, .erasures
  );

  // memory with stuck cells
  always @(posedge clk) begin
    if (mem_we) begin cells[mem_addr] <= mem_wdata; n_we++; end
    if (mem_re) begin mem_rdata <= (cells[mem_addr] | s1[mem_addr]) & ~s0[mem_addr]; n_re++; end
  end

  task automatic locate(input int a, input logic [W-1:0] p, output logic [W-1:0] e, output int clocks);
    @(negedge clk);
    addr = AW'(a); pattern = p; start = 1;
    @(negedge clk);
    start = 0;
    clocks = 1;
    while (!done && clocks < 20) begin
      if (clocks == 3) begin start = 1; pattern = ~p; end   // must be ignored
      @(negedge clk);
      start = 0;
      clocks++;
    end
    e = erasures;
  endtask

  initial begin
    logic [W-1:0] e;
    int clocks;
    for (int a = 0; a < (1 << AW); a++) begin s1[a] = '0; s0[a] = '0; cells[a] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    n_we = 0; n_re = 0;
    // worked example: 8th (last) cell of location 5 stuck at 1
    s1[5] = 8'b0000_0001;
    locate(5, 8'b0001_0110, e, clocks);
    check(e == 8'b0000_0001, $sformatf("example erasure vector %b", e));
    check(clocks == 7, $sformatf("done %0d clocks after start", clocks));
    check(n_we == 2 && n_re == 2, "two writes and two reads per location");
    @(negedge clk);
    check(!done, "done is a single-clock pulse");
    for (int it = 0; it < 2000; it++) begin
      automatic int a = $urandom_range((1 << AW) - 1);
      automatic logic [W-1:0] m1 = W'($urandom) & W'($urandom) & W'($urandom);
      automatic logic [W-1:0] m0 = W'($urandom) & W'($urandom) & W'($urandom) & ~m1;
      s1[a] = m1; s0[a] = m0;
      locate(a, W'($urandom), e, clocks);
      check(e == (m1 | m0), $sformatf("erasures %b expected %b", e, m1 | m0));
      check(clocks == 7, "latency");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
