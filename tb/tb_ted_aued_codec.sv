// tb_ted_aued_codec: Hamming-then-Berger tED-AUED code, K=8, R=5, 17-bit
// codeword. Exhaustive over the 256 information words: clean words pass,
// every pattern of 1, 2 or 3 random errors is detected, and random
// unidirectional errors of any size are detected.
module tb_ted_aued_codec;
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
  localparam int K = 8, R = 5, CB = 4, N = K + R + CB;
  logic [K-1:0] x;
  logic [N-1:0] code, rd_code;
  logic         error;

  ted_aued_codec #(.K(K), .R(R)) dut (.x, .code, .rd_code, .error);

  initial begin
    for (int v = 0; v < (1 << K); v++) begin
      x = K'(v); #1;
      check(code[N-1:N-K] == x, "systematic");
      check(int'(code[CB-1:0]) == K + R - $countones(code[N-1:CB]), "Berger part counts zeros of the Hamming word");
      rd_code = code; #1;
      check(!error, "clean");
      for (int a = 0; a < N; a++)
        for (int b = a; b < N; b++)
          for (int c = b; c < N; c++) begin
            automatic logic [N-1:0] m = (N'(1) << a) | (N'(1) << b) | (N'(1) << c);
            if (v % 16 != 0 && !(a == b || b == c)) continue;  // triples on a subset
            rd_code = code ^ m; #1;
            check(error, $sformatf("random error %0d,%0d,%0d", a, b, c));
          end
      for (int k = 0; k < 20; k++) begin
        automatic logic [N-1:0] m = N'($urandom) & N'($urandom);
        m = (k % 2 == 1) ? (m & code) : (m & ~code);
        if (m == '0) continue;
        rd_code = (k % 2 == 1) ? (code & ~m) : (code | m); #1;
        check(error, "unidirectional error");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
