// tb_bpc_parity: bit-per-chip parity: p1 covers d0..d3 and so on; a single
// error anywhere in a chip is reported against that chip.
module tb_bpc_parity;
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
  logic [3:0]  p_in, p_gen, chip_err;
  bpc_parity #(.DATA_W(16), .CHIP_W(4)) dut (.data, .p_in, .p_gen, .chip_err);

  initial begin
    for (int t = 0; t < 300; t++) begin
      automatic logic [15:0] w = 16'($urandom);
      automatic logic [3:0] pp;
      automatic int bi = t % 16;
      for (int c = 0; c < 4; c++) pp[c] = w[4*c] ^ w[4*c+1] ^ w[4*c+2] ^ w[4*c+3];
      data = w; p_in = pp; #1;
      check(p_gen == pp && chip_err == '0, "clean word");
      data = w ^ (16'd1 << bi); #1;
      check(chip_err == 4'(1 << (bi / 4)), $sformatf("error in d%0d located to chip", bi));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
