// tb_ngp_codec: NGP SEC-AUED code on the (8,4) modified Hamming code, B1 = k0
// (4 bits), B2 = floor(k0/2) (3 bits). Checks the worked example
// (X = 11101000, B1 = 0100, B2 = 2 = 010; an error in the third bit is
// corrected with Q = 1), then for all 16 data words: clean words are clean,
// every single error in the 15-bit codeword is corrected, and every
// unidirectional error pattern is either detected or leaves the data
// correct.
module tb_ngp_codec;
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
  localparam int N = 15;
  logic [3:0]   d, d_out;
  logic [N-1:0] code, rd_code;
  logic         ok, corrected, detected, clean;
  int n_det = 0;

  ngp_codec dut (.d, .code, .rd_code, .d_out, .ok, .corrected, .detected, .clean);

  initial begin
    d = 4'b0111;                      // d0 = d1 = d2 = 1, d3 = 0
    #1;
    check(code == 15'b11101000_0100_010, $sformatf("example codeword %b", code));
    rd_code = 15'b11001000_0100_010; #1;
    check(ok && corrected && !detected && d_out == d && dut.q == 1, "example: third bit corrected, Q = 1");
    for (int v = 0; v < 16; v++) begin
      d = 4'(v); #1;
      rd_code = code; #1;
      check(clean && ok && !corrected && !detected && d_out == d, "clean word");
      for (int b = 0; b < N; b++) begin
        rd_code = code ^ (N'(1) << b); #1;
        check(ok && corrected && d_out == d, $sformatf("single error bit %0d", b));
      end
      for (int m = 1; m < (1 << N); m++) begin
        automatic logic [N-1:0] mm = N'(m);
        if ((mm & code) == '0) begin
          rd_code = code | mm; #1;
          check(detected || (ok && d_out == d), "0->1 unidirectional errors");
          if (detected) n_det++;
        end
        if ((mm & ~code) == '0) begin
          rd_code = code & ~mm; #1;
          check(detected || (ok && d_out == d), "1->0 unidirectional errors");
        end
      end
    end
    check(n_det > 0, "detection seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
