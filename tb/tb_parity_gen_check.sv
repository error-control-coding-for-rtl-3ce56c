// tb_parity_gen_check: exhaustive test of the 4-bit even-parity generator and
// checker, including the even-parity column of the BCD table (digits 0..9).
module tb_parity_gen_check;
  int checks = 0, failures = 0;
  logic       clk = 0;
  logic [3:0] data;
  logic       p, p_gen, error;

  parity_gen_check #(.DATA_W(4)) dut (.data, .p, .p_gen, .error);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // even parity bits of BCD digits 0..9
  localparam logic [9:0] BCD_P = 10'b0110010110;  // bit i = digit i

  initial begin
    for (int v = 0; v < 16; v++)
      for (int pp = 0; pp < 2; pp++) begin
        automatic int ones = 0;
        data = 4'(v);
        p = 1'(pp);
        #1;
        for (int b = 0; b < 4; b++) ones += int'(data[b]);
        check(p_gen == 1'((ones % 2)), $sformatf("p_gen for %b", data));
        check(error == 1'(((ones + pp) % 2)), $sformatf("error for %b p=%0d", data, pp));
      end
    for (int dgt = 0; dgt < 10; dgt++) begin
      data = 4'(dgt);
      p = 1'b0;
      #1;
      check(p_gen == BCD_P[dgt], $sformatf("BCD digit %0d", dgt));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
