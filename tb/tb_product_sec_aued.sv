// tb_product_sec_aued: row-parity x column-Berger product code, K1=3, K2=2.
// Checks the 5 x 3 example matrix (information rows 00, 10, 10 give the
// codeword rows 000, 101, 101, 010, 111), then, for all 64 information
// words: clean words pass, every single error leaves the information
// correct and is flagged, a single information-bit error is corrected, and
// no unidirectional error pattern of any size is accepted with wrong data.
module tb_product_sec_aued;
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
  localparam int K1 = 3, K2 = 2, N2 = 3, NR = 5, N = NR * N2;
  logic [K1*K2-1:0] info, info_out;
  logic [N-1:0]     code, rd_code;
  logic             corrected, multi_err;
  int n_corr = 0, n_multi = 0;

  product_sec_aued #(.K1(K1), .K2(K2)) dut (.info, .code, .rd_code, .info_out, .corrected, .multi_err);

  string rows [NR] = '{"000", "101", "101", "010", "111"};

  initial begin
    // example: row r, column c is character c of rows[r]
    info = '0;
    info[K2*1 + 0] = 1'b1;
    info[K2*2 + 0] = 1'b1;
    #1;
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < N2; c++)
        check(code[N2*r + c] == (rows[r][c] == "1"), $sformatf("example matrix row %0d col %0d", r, c));
    for (int v = 0; v < (1 << (K1 * K2)); v++) begin
      info = (K1*K2)'(v); #1;
      rd_code = code; #1;
      check(!corrected && !multi_err && info_out == info, "clean word");
      for (int b = 0; b < N; b++) begin
        rd_code = code ^ (N'(1) << b); #1;
        check(info_out == info && (corrected || multi_err), $sformatf("single error bit %0d", b));
        if (b / N2 < K1 && b % N2 < K2) check(corrected, "information-bit error corrected");
        if (corrected) n_corr++;
      end
      for (int m = 1; m < (1 << N); m++) begin
        automatic logic [N-1:0] mm = N'(m);
        if ((mm & code) == '0) begin
          rd_code = code | mm; #1;
          check(multi_err || info_out == info, "0->1 errors never give wrong data silently");
          if (multi_err) n_multi++;
        end
        if ((mm & ~code) == '0) begin
          rd_code = code & ~mm; #1;
          check(multi_err || info_out == info, "1->0 errors never give wrong data silently");
        end
      end
    end
    check(n_corr > 0 && n_multi > 0, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
