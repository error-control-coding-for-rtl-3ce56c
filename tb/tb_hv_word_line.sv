// tb_hv_word_line: the H-V parity scheme at the size of the 256K RAM word
// line: 512 data cells as a 16 x 32 array with 16 H-parity and 32 V-parity
// cells, decoded bit-serially in 512 subcycles. hv_encoder and hv_decoder
// run with ROWS=16, COLS=32. Random word lines with no error and with one
// error anywhere in the data cells; checks the corrected line, one
// correction per faulty line, and that decoding takes exactly 512 subcycles.
// With 16 ns subcycles a word line takes 512 x 16 ns = 8.192 us.
module tb_hv_word_line;
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
  localparam int ROWS = 16, COLS = 32, NB = ROWS * COLS;
  logic           rst_n = 0, start = 0;
  logic [NB-1:0]  w, data, data_out;
  logic [ROWS-1:0] hpar, hp;
  logic [COLS-1:0] vpar, vp;
  logic           bit_valid, bit_out, corr, done;
  logic [8:0]     bit_idx;
  logic [9:0]     n_corr;

  hv_encoder #(.ROWS(ROWS), .COLS(COLS)) enc (.data(w), .hpar(hp), .vpar(vp));
  hv_decoder #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk, .rst_n, .start, .data, .hpar, .vpar, .bit_valid, .bit_idx, .bit_out,
    .corr, .done, .data_out, .n_corr
  );

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      automatic int sub = 0;
      automatic int b = $urandom_range(NB - 1);
      for (int i = 0; i < NB / 32; i++) w[32*i +: 32] = $urandom;
      #1;
      @(negedge clk);
      data = w;
      if (t % 4 != 0) data[b] = ~data[b];
      hpar = hp; vpar = vp; start = 1;
      @(negedge clk);
      start = 0;
      while (!done && sub < 2 * NB) begin
        if (bit_valid) sub++;
        @(negedge clk);
      end
      check(sub == NB, $sformatf("%0d subcycles per word line", sub));
      check(data_out == w, "word line corrected");
      check(int'(n_corr) == ((t % 4 != 0) ? 1 : 0), "one correction per faulty word line");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
