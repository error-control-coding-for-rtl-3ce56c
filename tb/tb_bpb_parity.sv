// tb_bpb_parity: bit-per-byte parity (lower byte odd, upper byte even) on a
// 16-bit and a 64-bit word: generated bits, single errors located to their
// byte, and detection of all-0 and all-1 failures.
module tb_bpb_parity;
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
  logic [1:0]  p_in, p_gen, byte_err;
  logic        error;
  logic [63:0] wdata;
  logic [7:0]  wp_in, wp_gen, wbyte_err;
  logic        werror;
  bpb_parity #(.DATA_W(16)) dut   (.data, .p_in, .p_gen, .byte_err, .error);
  bpb_parity #(.DATA_W(64)) dut64 (.data(wdata), .p_in(wp_in), .p_gen(wp_gen), .byte_err(wbyte_err), .error(werror));

  function automatic logic par(input logic [7:0] v, input bit odd);
    int n = 0;
    for (int i = 0; i < 8; i++) n += int'(v[i]);
    return odd ? 1'((n + 1) % 2) : 1'(n % 2);
  endfunction

  initial begin
    for (int t = 0; t < 300; t++) begin
      automatic logic [15:0] w = 16'($urandom);
      automatic logic [1:0] pp = {par(w[15:8], 0), par(w[7:0], 1)};
      automatic int bit_i = t % 16;
      data = w; p_in = pp; #1;
      check(p_gen == pp, "generated parity");
      check(!error && byte_err == 2'b00, "clean word");
      data = w ^ (16'd1 << bit_i); #1;
      check(error && byte_err == (bit_i < 8 ? 2'b01 : 2'b10), "single error located to its byte");
    end
    // stuck-at-0 and stuck-at-1 of data and parity lines
    data = '0; p_in = '0; #1;
    check(error && byte_err[0], "all-0 caught by the odd byte");
    data = '1; p_in = '1; #1;
    check(error && byte_err[1], "all-1 caught by the even byte");
    for (int t = 0; t < 100; t++) begin
      automatic logic [63:0] w = {$urandom, $urandom};
      automatic logic [7:0] pp;
      for (int b = 0; b < 8; b++) pp[b] = par(w[8*b +: 8], (b % 2) == 0);
      wdata = w; wp_in = pp; #1;
      check(wp_gen == pp && !werror, "64-bit word parity");
      wdata = w ^ (64'd1 << (t % 64)); #1;
      check(wbyte_err == 8'(1 << ((t % 64) / 8)), "64-bit single error byte");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
