// tb_bp_codec: Bose-Pradhan SEC-AUED code (t = 1) on the (8,4) modified
// Hamming code, B1 and B2 of 4 bits each. For all 16 data words: B1 counts
// the 0's of X and B2 those of X B1, clean words decode, every single error
// in the 16-bit codeword is corrected without a detection flag, and every
// unidirectional error pattern is either detected or leaves the data
// correct.
module tb_bp_codec;
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
  localparam int N = 16;
  logic [3:0]   d, d_out;
  logic [N-1:0] code, rd_code;
  logic         detected;
  int n_det = 0;

  bp_codec dut (.d, .code, .rd_code, .d_out, .detected);

  initial begin
    for (int v = 0; v < 16; v++) begin
      d = 4'(v); #1;
      check(int'(code[7:4]) == 8 - $countones(code[15:8]), "B1 = zeros of X");
      check(int'(code[3:0]) == 12 - $countones(code[15:4]), "B2 = zeros of X B1");
      rd_code = code; #1;
      check(!detected && d_out == d, "clean word");
      for (int b = 0; b < N; b++) begin
        rd_code = code ^ (N'(1) << b); #1;
        check(!detected && d_out == d, $sformatf("single error bit %0d", b));
      end
      for (int m = 1; m < (1 << N); m++) begin
        automatic logic [N-1:0] mm = N'(m);
        if ((mm & code) == '0) begin
          rd_code = code | mm; #1;
          check(detected || d_out == d, "0->1 unidirectional errors");
          if (detected) n_det++;
        end
        if ((mm & ~code) == '0) begin
          rd_code = code & ~mm; #1;
          check(detected || d_out == d, "1->0 unidirectional errors");
        end
      end
    end
    check(n_det > 0, "detection seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
