// tb_berger_codec: Berger code with K=8 and 4 check bits. Checks the text's
// example (00010110 has five 0's, p = 0101), that p counts the 0's for all
// 256 words, that clean codewords pass, and that every unidirectional error
// pattern applied to the full codeword {x, p} is detected.
module tb_berger_codec;
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
  localparam int K = 8, CB = 4;
  logic [K-1:0]  x, rd_x;
  logic [CB-1:0] p, rd_p;
  logic          error;

  berger_codec #(.K(K)) dut (.x, .p, .rd_x, .rd_p, .error);

  initial begin
    x = 8'b0001_0110; #1;
    check(p == 4'b0101, "example: k0 = 5, p = 0101");
    for (int v = 0; v < (1 << K); v++) begin
      automatic logic [K+CB-1:0] cw;
      x = K'(v); #1;
      check(int'(p) == K - $countones(x), "p counts zeros");
      cw = {x, p};
      {rd_x, rd_p} = cw; #1;
      check(!error, "clean codeword passes");
      // every non-empty 0->1 and 1->0 pattern
      for (int m = 1; m < (1 << (K + CB)); m++) begin
        automatic logic [K+CB-1:0] mm = (K+CB)'(m);
        if ((mm & cw) == '0) begin
          {rd_x, rd_p} = cw | mm; #1;
          check(error, "0->1 unidirectional error detected");
        end
        if ((mm & ~cw) == '0) begin
          {rd_x, rd_p} = cw & ~mm; #1;
          check(error, "1->0 unidirectional error detected");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
