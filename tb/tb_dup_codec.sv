// tb_dup_codec: the three duplication variants. Codeword layout, clean
// read-back, single-error detection, and a stuck bit slice (the same bit
// position of both portions forced to one value): the plain copy misses it
// whenever the two bits agree, the complemented copy catches it always.
module tb_dup_codec;
  import ecc_types_pkg::*;
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
  logic [31:0] code_p, code_c, code_s, rd_p, rd_c, rd_s;
  logic        err_p, err_c, err_s;
  dup_codec #(.DATA_W(16), .MODE(DUP_PLAIN))      dut_p (.data, .code(code_p), .rd_code(rd_p), .error(err_p));
  dup_codec #(.DATA_W(16), .MODE(DUP_COMPLEMENT)) dut_c (.data, .code(code_c), .rd_code(rd_c), .error(err_c));
  dup_codec #(.DATA_W(16), .MODE(DUP_SWAP))       dut_s (.data, .code(code_s), .rd_code(rd_s), .error(err_s));

  function automatic logic [31:0] stuck(input logic [31:0] c, input int b, input logic v);
    c[b] = v;
    c[b + 16] = v;
    return c;
  endfunction

  int plain_missed = 0;

  initial begin
    for (int t = 0; t < 300; t++) begin
      automatic logic [15:0] w = 16'($urandom);
      automatic int b = t % 16;
      automatic logic v = 1'(t / 16);
      data = w; #1;
      check(code_p == {w, w}, "plain layout");
      check(code_c == {~w, w}, "complement layout");
      check(code_s == {w[7:0], w[15:8], w}, "swap layout");
      rd_p = code_p; rd_c = code_c; rd_s = code_s; #1;
      check(!err_p && !err_c && !err_s, "clean read");
      rd_p = code_p ^ (32'd1 << (t % 32)); rd_c = code_c ^ (32'd1 << (t % 32));
      rd_s = code_s ^ (32'd1 << (t % 32)); #1;
      check(err_p && err_c && err_s, "single error detected");
      rd_c = stuck(code_c, b, v); rd_p = stuck(code_p, b, v); #1;
      check(err_c, "complement: stuck slice detected");
      if (!err_p) plain_missed++;
      // swap: a slice stuck in the lower half of the data portion meets an
      // upper-half bit of the copy
      rd_s = stuck(code_s, b, v); #1;
      check(err_s == (w[b] != v || w[(b + 8) % 16] != v), "swap: stuck slice");
    end
    check(plain_missed > 0, "plain copy misses some stuck slices");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
