// tb_bpmc_parity: bit-per-multiple-chip parity (4 chips of 4 bits): single
// errors hit one group, a fully failed chip (all its bits inverted) hits every
// group and raises chip_fail.
module tb_bpmc_parity;
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
  logic        chip_fail;
  bpmc_parity #(.DATA_W(16), .CHIP_W(4)) dut (.data, .p_in, .p_gen, .p_err, .chip_fail);

  initial begin
    for (int t = 0; t < 300; t++) begin
      automatic logic [15:0] w = 16'($urandom);
      automatic logic [3:0] pp = '0;
      automatic int bi = t % 16;
      for (int j = 0; j < 16; j++) pp[j % 4] ^= w[j];
      data = w; p_in = pp; #1;
      check(p_gen == pp && p_err == '0 && !chip_fail, "clean word");
      data = w ^ (16'd1 << bi); #1;
      check(p_err == 4'(1 << (bi % 4)) && !chip_fail, "single error group");
      data = w ^ (16'hF << (4 * (t % 4))); #1;
      check(p_err == 4'hF && chip_fail, "whole-chip failure");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
