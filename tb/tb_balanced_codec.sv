// tb_balanced_codec: efficient balanced code, K=10, R=5. Exhaustive over all
// 1024 information words: the codeword has exactly (K+R)/2 ones in total
// and K/2 in the information part, decodes back to X without error, and any
// random unidirectional error (a set of 0->1 flips, or of 1->0 flips) is
// detected. Also checks the text's example: X^5 = 1000101101 and
// X^9 = 1000110011 are balanced, and the encoder's smallest choice j = 3.
module tb_balanced_codec;
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
  localparam int K = 10, R = 5;
  logic [K-1:0]   x, x_out;
  logic [K+R-1:0] code, rd_code;
  logic           error;

  balanced_codec #(.K(K), .R(R)) dut (.x, .code, .rd_code, .x_out, .error);

  initial begin
    x = 10'b01110_01101;
    #1;
    check($countones(10'b10001_01101) == 5 && $countones(10'b10001_10011) == 5,
          "X^5 and X^9 of the example are balanced");
    check(code[K+R-1:R] == 10'b10010_01101, "smallest balancing j = 3");
    for (int v = 0; v < (1 << K); v++) begin
      x = K'(v); #1;
      check($countones(code[K+R-1:R]) == K / 2, "information part balanced");
      check($countones(code[R-1:0]) == R / 2, "check word balanced");
      rd_code = code; #1;
      check(!error && x_out == x, $sformatf("decode %b", x));
      for (int k = 0; k < 8; k++) begin
        automatic logic [K+R-1:0] m = (K+R)'($urandom) & (K+R)'($urandom);
        if (k % 2 == 0) begin
          m = m & ~code;          // 0 -> 1 errors
          rd_code = code | m;
        end else begin
          m = m & code;           // 1 -> 0 errors
          rd_code = code & ~m;
        end
        if (m == '0) continue;
        #1;
        check(error, $sformatf("unidirectional error %b on %b", m, code));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
