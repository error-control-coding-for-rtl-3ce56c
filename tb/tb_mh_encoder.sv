// tb_mh_encoder: modified Hamming encoders for the code sizes of the usual
// memory words, (8,4) (13,8) (22,16) (39,32) (72,64). Each H matrix is read
// back column by column (one-hot data words) and checked for the properties
// that make it SEC-DED and fast: every column odd weight >= 3 and distinct,
// minimum total number of ones, row weights within one of each other. The
// (8,4) code must give exactly the printed check equations.
module tb_mh_encoder;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction
  localparam int NG = 5;
  localparam int KS [NG] = '{4, 8, 16, 32, 64};
  localparam int RS [NG] = '{4, 5, 6, 7, 8};
  int done_cnt = 0;

  function automatic int binom(input int n, input int k);
    longint r = 1;
    for (int i = 0; i < k; i++) r = r * (n - i) / (i + 1);
    return int'(r);
  endfunction

  for (genvar g = 0; g < NG; g++) begin : G
    localparam int K = KS[g];
    localparam int R = RS[g];
    logic [K-1:0] data;
    logic [R-1:0] check_bits;
    mh_encoder #(.K(K), .R(R)) dut (.data, .check(check_bits));

    initial begin
      logic [R-1:0] cols [K];
      int rows [R];
      int total, min_total, left, w, rmax, rmin;
      for (int i = 0; i < R; i++) rows[i] = 0;
      total = 0;
      for (int j = 0; j < K; j++) begin
        data = K'(1) << j;
        #1;
        cols[j] = check_bits;
        w = $countones(check_bits);
        total += w;
        for (int i = 0; i < R; i++) rows[i] += int'(check_bits[i]);
        check(w % 2 == 1 && w >= 3, $sformatf("(%0d,%0d) column %0d odd weight >= 3", K+R, K, j));
        for (int q = 0; q < j; q++) check(cols[q] != cols[j], $sformatf("(%0d,%0d) columns %0d,%0d distinct", K+R, K, q, j));
      end
      // minimum total: weight-3 columns first, then weight-5, ...
      min_total = 0; left = K;
      for (int ww = 3; left > 0; ww += 2) begin
        automatic int n = binom(R, ww);
        automatic int take = (n < left) ? n : left;
        min_total += take * ww;
        left -= take;
      end
      check(total == min_total, $sformatf("(%0d,%0d) total ones %0d, minimum %0d", K+R, K, total, min_total));
      rmax = rows[0]; rmin = rows[0];
      for (int i = 1; i < R; i++) begin
        if (rows[i] > rmax) rmax = rows[i];
        if (rows[i] < rmin) rmin = rows[i];
      end
      check(rmax - rmin <= 1, $sformatf("(%0d,%0d) row weights %0d..%0d", K+R, K, rmin, rmax));
      // linearity: random word equals XOR of its columns
      for (int t = 0; t < 200; t++) begin
        automatic logic [R-1:0] ref_c = '0;
        for (int j = 0; j < K; j++) data[j] = 1'($urandom);
        #1;
        for (int j = 0; j < K; j++) if (data[j]) ref_c ^= cols[j];
        check(check_bits == ref_c, "check bits are the XOR of the selected columns");
      end
      done_cnt++;
    end
  end

  initial begin
    wait (done_cnt == NG);
    // (8,4): c0 = d0^d1^d2, c1 = d0^d1^d3, c2 = d0^d2^d3, c3 = d1^d2^d3
    for (int v = 0; v < 16; v++) begin
      automatic logic [3:0] d = 4'(v);
      G[0].data = d;
      #1;
      check(G[0].check_bits == {d[1]^d[2]^d[3], d[0]^d[2]^d[3], d[0]^d[1]^d[3], d[0]^d[1]^d[2]},
            $sformatf("(8,4) equations for %b", d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
