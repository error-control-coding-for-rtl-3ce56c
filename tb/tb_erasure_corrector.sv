// tb_erasure_corrector: stored-syndrome erasure correction on the (8,4)
// code. For every set of 1, 2 or 3 erased positions (92 sets) and every data
// word: learn the set, then make every combination of the erased cells wrong
// and check that the word is corrected (hit) or clean. With a single known
// erasure, an error elsewhere must give miss; learning that new position
// afterwards adds it to the table (known grows) and the error is corrected.
// Codewords come from mh_encoder.
module tb_erasure_corrector;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction
  localparam int K = 4, R = 4, N = 8;
  logic          rst_n = 0, learn = 0;
  logic [N-1:0]  erase_mask = '0, known;
  logic [K-1:0]  d, rd_data, data_out;
  logic [R-1:0]  c, rd_check, check_out;
  logic          clean, hit, miss;
  int n_hit = 0, n_miss = 0;

  mh_encoder #(.K(K), .R(R)) enc (.data(d), .check(c));
  erasure_corrector #(.K(K), .R(R), .MAXE(3)) dut (
    .clk, .rst_n, .learn, .erase_mask, .rd_data, .rd_check, .data_out, .check_out,
    .clean, .hit, .miss, .known
  );

  task automatic do_learn(input logic [N-1:0] m);
    @(negedge clk); erase_mask = m; learn = 1;
    @(negedge clk); learn = 0; erase_mask = '0;
  endtask

  task automatic do_reset();
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
  endtask

  initial begin
    d = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 1; m < (1 << N); m++) begin
      automatic logic [N-1:0] mask = N'(m);
      if ($countones(mask) > 3) continue;
      do_reset();
      do_learn(mask);
      check(known == mask, "known erasures stored");
      for (int v = 0; v < 16; v++) begin
        d = 4'(v); #1;
        for (int s = 0; s < (1 << N); s++) begin
          automatic logic [N-1:0] pat = N'(s);
          if ((pat & ~mask) != '0) continue;
          {rd_check, rd_data} = {c, d} ^ pat; #1;
          if (pat == '0) check(clean && !hit && !miss && data_out == d, "clean word");
          else check(hit && !miss && data_out == d && check_out == c, $sformatf("erasures %b, errors %b", mask, pat));
          if (hit) n_hit++;
        end
      end
    end
    // a new defect: miss, then learn it and correct
    for (int p = 0; p < N; p++) begin
      automatic int q = (p + 1 + $urandom_range(N - 2)) % N;
      do_reset();
      do_learn(N'(1) << p);
      d = 4'($urandom); #1;
      {rd_check, rd_data} = {c, d} ^ (N'(1) << q); #1;
      check(miss && !hit, "error outside the known erasures gives miss");
      if (miss) n_miss++;
      do_learn(N'(1) << q);
      check(known == ((N'(1) << p) | (N'(1) << q)), "new erasure added to the set");
      #1;
      check(hit && data_out == d, "new erasure corrected after learning");
      {rd_check, rd_data} = {c, d} ^ (N'(1) << q) ^ (N'(1) << p); #1;
      check(hit && data_out == d, "both erasures corrected");
    end
    check(n_hit > 0 && n_miss > 0, "hit and miss both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
