// tb_m_of_n_checker: 8-of-16 weight checker: weight output, valid words
// accepted, any number of unidirectional errors (all 1->0 or all 0->1)
// detected.
module tb_m_of_n_checker;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic [15:0] word;
  logic [4:0]  weight;
  logic        error;
  m_of_n_checker #(.N(16), .M(8)) dut (.word, .weight, .error);

  initial begin
    for (int t = 0; t < 500; t++) begin
      automatic logic [15:0] w = 16'($urandom);
      automatic int n = 0;
      automatic logic [7:0] x = 8'($urandom);
      automatic logic [15:0] cw = {~x, x};
      automatic logic [15:0] m = 16'($urandom) | 16'd1;
      for (int i = 0; i < 16; i++) n += int'(w[i]);
      word = w; #1;
      check(weight == 5'(n) && error == (n != 8), "weight of random word");
      word = cw; #1;
      check(!error, "balanced codeword accepted");
      word = cw & ~(m & cw); #1;   // 1->0 errors on a subset of the ones
      check(error == ((m & cw) != 0), "unidirectional 1->0 errors");
      word = cw | (m & ~cw); #1;   // 0->1 errors
      check(error == ((m & ~cw) != 0), "unidirectional 0->1 errors");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
