// tb_mh_decoder: (72,64) and (8,4) modified Hamming decoders. Clean words
// pass untouched; every single error (data or check bit) is corrected and
// flagged single_err; every double error raises double_err and nothing else;
// triple errors raise multi_err unless they alias a column. The (8,4) case
// also checks the worked syndrome: 11001000 read for 11101000 gives
// S = (1,0,1,1), the column of d2.
module tb_mh_decoder;
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
  logic [63:0] d64, rd64, out64;
  logic [7:0]  c64, rc64, s64;
  logic        e64, se64, de64, me64;
  logic [3:0]  d4, rd4, out4;
  logic [3:0]  c4, rc4, s4;
  logic        e4, se4, de4, me4;

  mh_encoder #(.K(64), .R(8)) enc64 (.data(d64), .check(c64));
  mh_decoder dut (
    .data_in(rd64), .check_in(rc64), .data_out(out64), .syndrome(s64),
    .err(e64), .single_err(se64), .double_err(de64), .multi_err(me64)
  );
  mh_encoder #(.K(4), .R(4)) enc4 (.data(d4), .check(c4));
  mh_decoder #(.K(4), .R(4)) dut4 (
    .data_in(rd4), .check_in(rc4), .data_out(out4), .syndrome(s4),
    .err(e4), .single_err(se4), .double_err(de4), .multi_err(me4)
  );

  int n_multi = 0;

  initial begin
    for (int t = 0; t < 100; t++) begin
      automatic logic [71:0] cw, bad;
      d64 = {$urandom, $urandom};
      #1;
      cw = {c64, d64};
      {rc64, rd64} = cw; #1;
      check(!e64 && !se64 && !de64 && !me64 && out64 == d64 && s64 == 0, "clean word");
      for (int b = 0; b < 72; b++) begin
        bad = cw ^ (72'd1 << b);
        {rc64, rd64} = bad; #1;
        check(e64 && se64 && !de64 && !me64 && out64 == d64, $sformatf("single error bit %0d", b));
      end
      for (int k = 0; k < 40; k++) begin
        automatic int b1 = $urandom_range(71), b2 = $urandom_range(71);
        if (b1 == b2) b2 = (b1 + 1) % 72;
        bad = cw ^ (72'd1 << b1) ^ (72'd1 << b2);
        {rc64, rd64} = bad; #1;
        check(e64 && de64 && !se64 && !me64, $sformatf("double error %0d,%0d", b1, b2));
        begin
          automatic int b3 = (b2 + 1 + $urandom_range(69)) % 72;
          if (b3 != b1 && b3 != b2) begin
            {rc64, rd64} = bad ^ (72'd1 << b3); #1;
            check(e64 && !de64 && (se64 ^ me64), "triple error: odd syndrome");
            if (me64) n_multi++;
          end
        end
      end
    end
    check(n_multi > 0, "multiple-error detector fired");
    // (8,4) exhaustive single and double errors
    for (int v = 0; v < 16; v++) begin
      d4 = 4'(v); #1;
      for (int b = 0; b < 8; b++) begin
        {rc4, rd4} = {c4, d4} ^ (8'd1 << b); #1;
        check(se4 && out4 == d4, "(8,4) single error corrected");
        for (int b2 = b + 1; b2 < 8; b2++) begin
          {rc4, rd4} = {c4, d4} ^ (8'd1 << b) ^ (8'd1 << b2); #1;
          check(de4 && !se4, "(8,4) double error detected");
        end
      end
    end
    // worked example: X = 1110 1000 (d0..d3, c0..c3), error in the third bit
    rd4 = 4'b0011; rc4 = 4'b0001; #1;   // d0=1 d1=1 d2=0 d3=0, c0=1
    check(s4 == 4'b1101 && se4 && out4 == 4'b0111, "(8,4) syndrome example S=(1,0,1,1)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
