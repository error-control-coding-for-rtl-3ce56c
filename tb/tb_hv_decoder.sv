// tb_hv_decoder: bit-serial (19,12) H-V-parity decoder. For each word:
// 12 subcycles, one per data bit, with done one clock after the last; a
// single data error is corrected in the subcycle of that bit (an error in d1
// gives corr in the second subcycle); a clean word and a parity-bit error
// give no correction; two errors in one row are left uncorrected.
module tb_hv_decoder;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic        rst_n = 0, start = 0;
  logic [11:0] data, data_out;
  logic [2:0]  hpar;
  logic [3:0]  vpar;
  logic        bit_valid, bit_out, corr, done;
  logic [3:0]  bit_idx, n_corr;

  hv_decoder #(.ROWS(3), .COLS(4)) dut (
    .clk, .rst_n, .start, .data, .hpar, .vpar, .bit_valid, .bit_idx, .bit_out,
    .corr, .done, .data_out, .n_corr
  );

  function automatic logic [6:0] enc(input logic [11:0] w);
    logic [2:0] h;
    logic [3:0] v;
    for (int r = 0; r < 3; r++) h[r] = w[4*r] ^ w[4*r+1] ^ w[4*r+2] ^ w[4*r+3];
    for (int c = 0; c < 4; c++) v[c] = w[c] ^ w[c+4] ^ w[c+8];
    return {h, v};
  endfunction

  int n_valid, corr_idx, n_corr_seen, cycles;

  // decode one word; returns subcycle count and where corr was seen
  task automatic run(input logic [11:0] w, input logic [2:0] h, input logic [3:0] v);
    @(negedge clk);
    data = w; hpar = h; vpar = v; start = 1;
    @(negedge clk);
    start = 0;
    n_valid = 0; corr_idx = -1; n_corr_seen = 0; cycles = 0;
    while (!done) begin
      if (bit_valid) begin
        check(int'(bit_idx) == n_valid, "bits come out in order d0..d11");
        n_valid++;
        if (corr) begin corr_idx = int'(bit_idx); n_corr_seen++; end
      end
      cycles++;
      @(negedge clk);
      if (cycles > 40) break;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 120; t++) begin
      automatic logic [11:0] w = 12'($urandom);
      automatic logic [6:0] p = enc(w);
      automatic int e = t % 12;
      // clean
      run(w, p[6:4], p[3:0]);
      check(n_valid == 12 && cycles == 12, $sformatf("12 subcycles (got %0d, %0d)", n_valid, cycles));
      check(data_out == w && n_corr == 0 && n_corr_seen == 0, "clean word untouched");
      // single data error
      run(w ^ (12'd1 << e), p[6:4], p[3:0]);
      check(data_out == w && n_corr == 1, $sformatf("single error in d%0d corrected", e));
      check(corr_idx == e && n_corr_seen == 1, $sformatf("corr in subcycle %0d", e + 1));
      // parity-bit error only: nothing corrected
      run(w, p[6:4] ^ 3'(1 << (t % 3)), p[3:0]);
      check(data_out == w && n_corr == 0, "H-parity error leaves data");
      // double error in one row: detected by V-parity only, not corrected
      run(w ^ (12'b11 << (4 * (t % 3))), p[6:4], p[3:0]);
      check(n_corr == 0 && data_out == (w ^ (12'b11 << (4 * (t % 3)))), "row double error not corrected");
    end
    // example: d1 in error is corrected in the second subcycle
    run(12'h0 ^ 12'b10, 3'b000, 4'b0000);
    check(corr_idx == 1 && data_out == 12'h0, "d1 example");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
