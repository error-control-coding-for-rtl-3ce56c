// tb_ecc_memory: (72,64) SEC-DED memory with byte-parity bus. Writes random
// words with correct byte parity and reads them back (one clock of read
// latency, regenerated bus parity); then flips one stored bit (corrected,
// no interrupt), two stored bits (interrupt) and three (interrupt or a
// correction); finally a bus word with a parity error is rejected and leaves
// the location unchanged.
module tb_ecc_memory;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction
  localparam int DEPTH = 64;
  logic        rst_n = 0, wr_en = 0, rd_en = 0;
  logic [5:0]  addr = '0;
  logic [71:0] bus_wdata = '0, bus_rdata;
  logic        rd_valid, wr_reject, corrected, err_irq;
  logic [63:0] ref_mem [DEPTH];

  ecc_memory #(.K(64), .R(8), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .wr_en, .rd_en, .addr, .bus_wdata, .bus_rdata, .rd_valid,
    .wr_reject, .corrected, .err_irq
  );

  function automatic logic [71:0] to_bus(input logic [63:0] d);
    logic [71:0] b;
    for (int i = 0; i < 8; i++) begin
      b[9*i +: 8] = d[8*i +: 8];
      b[9*i+8]    = (^d[8*i +: 8]) ^ ((i % 2) == 0);
    end
    return b;
  endfunction

  task automatic write(input int a, input logic [71:0] w);
    @(negedge clk);
    addr = 6'(a); bus_wdata = w; wr_en = 1;
    @(negedge clk);
    wr_en = 0;
  endtask

  logic [71:0] got;
  logic        got_corr, got_irq;
  int          lat;
  task automatic read(input int a);
    @(negedge clk);
    addr = 6'(a); rd_en = 1;
    @(negedge clk);
    rd_en = 0;
    lat = 1;
    while (!rd_valid && lat < 5) begin @(negedge clk); lat++; end
    got = bus_rdata; got_corr = corrected; got_irq = err_irq;
  endtask

  int n_corr = 0, n_irq = 0, n_rej = 0;
  int rej_seen = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      ref_mem[a] = {$urandom, $urandom};
      write(a, to_bus(ref_mem[a]));
      check(!wr_reject, "valid bus word accepted");
    end
    for (int a = 0; a < DEPTH; a++) begin
      read(a);
      check(lat == 1, "read data one clock after rd_en");
      check(got == to_bus(ref_mem[a]) && !got_corr && !got_irq, $sformatf("clean read @%0d", a));
    end
    for (int a = 0; a < DEPTH; a++) begin
      automatic int b1 = $urandom_range(71);
      automatic int b2 = (b1 + 1 + $urandom_range(70)) % 72;
      automatic int b3 = (b2 + 1 + $urandom_range(69)) % 72;
      dut.mem[a][b1] = ~dut.mem[a][b1];
      read(a);
      check(got == to_bus(ref_mem[a]) && got_corr && !got_irq, $sformatf("single error corrected @%0d", a));
      if (got_corr) n_corr++;
      dut.mem[a][b2] = ~dut.mem[a][b2];
      read(a);
      check(got_irq && !got_corr, $sformatf("double error interrupt @%0d", a));
      if (got_irq) n_irq++;
      if (b3 != b1) begin
        dut.mem[a][b3] = ~dut.mem[a][b3];
        read(a);
        check(got_irq || got_corr, "triple error flagged");
      end
    end
    // bus parity error: rejected, memory keeps the old word
    for (int a = 0; a < 8; a++) begin
      automatic logic [63:0] nw = {$urandom, $urandom};
      automatic logic [71:0] old = dut.mem[a];
      write(a, to_bus(nw) ^ (72'd1 << (9 * a + 8)));
      check(dut.mem[a] == old, "bad bus word not stored");
      n_rej++;
      write(a, to_bus(nw) ^ (72'd1 << (9 * a + 2)));
      check(dut.mem[a] == old, "bad bus data bit not stored");
    end
    check(n_corr == DEPTH && n_irq == DEPTH && n_rej == 8, "every mechanism exercised");
    check(rej_seen == 16, $sformatf("wr_reject seen %0d times", rej_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // wr_reject is raised exactly for the bad bus words
  always @(posedge clk) if (wr_reject) rej_seen++;
endmodule
