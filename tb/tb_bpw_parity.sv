// tb_bpw_parity: bit-per-word parity, even and odd variants: random words,
// every single-bit error detected, and the all-0 / all-1 blind spots.
module tb_bpw_parity;
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
  logic        p_in, pe_gen, pe_err, po_gen, po_err;
  bpw_parity #(.DATA_W(16), .ODD(1'b0)) dut_e (.data, .p_in, .p_gen(pe_gen), .error(pe_err));
  bpw_parity #(.DATA_W(16), .ODD(1'b1)) dut_o (.data, .p_in, .p_gen(po_gen), .error(po_err));

  function automatic logic ones_odd(input logic [15:0] v);
    int n = 0;
    for (int i = 0; i < 16; i++) n += int'(v[i]);
    return 1'(n % 2);
  endfunction

  initial begin
    for (int t = 0; t < 200; t++) begin
      automatic logic [15:0] w = 16'($urandom);
      automatic logic pe, po;
      data = w; p_in = 0; #1;
      pe = ones_odd(w);
      po = ~pe;
      check(pe_gen == pe && po_gen == po, "generated parity");
      // stored even word read back clean, then with one flipped bit
      p_in = pe; #1;
      check(!pe_err, "even clean");
      data = w ^ (16'd1 << (t % 16)); #1;
      check(pe_err, "even single error");
      data = w; p_in = po; #1;
      check(!po_err, "odd clean");
      p_in = ~po; #1;
      check(po_err, "odd parity-bit error");
    end
    // all-0 failure passes an even code; all-1 (17 ones) passes an odd code
    data = '0; p_in = 0; #1;
    check(!pe_err && po_err, "all-0 word: even blind, odd detects");
    data = '1; p_in = 1; #1;
    check(pe_err && !po_err, "all-1 word: odd blind, even detects");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
