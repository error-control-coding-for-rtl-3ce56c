// tb_hv_encoder: H-V parity encoder, (19,12) and 4x4 arrays: row and column
// parities against a reference, including the example groups
// P1 = d0^d1^d2^d3 and P5 = d0^d4^d8^d12.
module tb_hv_encoder;
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
  logic [11:0] data;
  logic [2:0]  hpar;
  logic [3:0]  vpar;
  logic [15:0] data4;
  logic [3:0]  hpar4, vpar4;
  hv_encoder #(.ROWS(3), .COLS(4)) dut  (.data, .hpar, .vpar);
  hv_encoder #(.ROWS(4), .COLS(4)) dut4 (.data(data4), .hpar(hpar4), .vpar(vpar4));

  initial begin
    for (int t = 0; t < 500; t++) begin
      automatic logic [11:0] w = 12'($urandom);
      automatic logic [15:0] w4 = 16'($urandom);
      data = w; data4 = w4; #1;
      for (int r = 0; r < 3; r++)
        check(hpar[r] == (w[4*r] ^ w[4*r+1] ^ w[4*r+2] ^ w[4*r+3]), "H parity");
      for (int c = 0; c < 4; c++)
        check(vpar[c] == (w[c] ^ w[c+4] ^ w[c+8]), "V parity");
      check(hpar4[0] == ^w4[3:0], "P1 = d0..d3");
      check(vpar4[0] == (w4[0] ^ w4[4] ^ w4[8] ^ w4[12]), "P5 = d0,d4,d8,d12");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
