// tb_interlace_parity: interlaced parity (4 groups): group membership
// (d0,d4,d8,d12 -> p1 ... d3,d7,d11,d15 -> p4) and detection of every burst
// of two to four adjacent errors.
module tb_interlace_parity;
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
  logic [15:0] data;
  logic [3:0]  p_in, p_gen, p_err;
  logic        error;
  interlace_parity #(.DATA_W(16), .GROUPS(4)) dut (.data, .p_in, .p_gen, .p_err, .error);

  initial begin
    // membership: a single 1 in d_j sets parity group j mod 4 only
    for (int j = 0; j < 16; j++) begin
      data = 16'd1 << j; p_in = '0; #1;
      check(p_gen == 4'(1 << (j % 4)), $sformatf("d%0d membership", j));
    end
    for (int t = 0; t < 200; t++) begin
      automatic logic [15:0] w = 16'($urandom);
      automatic logic [3:0] pp;
      data = w; p_in = '0; #1;
      pp = p_gen;
      p_in = pp; #1;
      check(!error, "clean word");
      for (int len = 2; len <= 4; len++)
        for (int s = 0; s + len <= 16; s++) begin
          data = w ^ 16'(((1 << len) - 1) << s); #1;
          check(error && $countones(p_err) == len, $sformatf("burst len %0d at %0d", len, s));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
