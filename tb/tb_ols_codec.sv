// tb_ols_codec: OLS majority-logic codes with m = 5, t = 1, 2, 3, i.e. the
// (35,25), (45,25) and (55,25) codes. The check-bit equations of the third
// and fourth groups are compared with the incidence rows M3 and M4 written
// out in the text (data bit p = 5*i + j, leftmost character = bit 0). Then
// random words get every pattern of up to t random errors (data and check
// bits mixed) and must decode to the original data; t+1 errors must at
// least raise err.
module tb_ols_codec;
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
  localparam int M = 5, K = 25;
  logic [K-1:0]  d, rd1, rd2, rd3, o1, o2, o3;
  logic [9:0]    c1, rc1;
  logic [19:0]   c2, rc2;
  logic [29:0]   c3, rc3;
  logic          e1, e2, e3;

  ols_codec #(.M(M), .T(1)) u1 (.data(d), .check(c1), .rd_data(rd1), .rd_check(rc1), .data_out(o1), .err(e1));
  ols_codec #(.M(M), .T(2)) u2 (.data(d), .check(c2), .rd_data(rd2), .rd_check(rc2), .data_out(o2), .err(e2));
  ols_codec #(.M(M), .T(3)) dut (.data(d), .check(c3), .rd_data(rd3), .rd_check(rc3), .data_out(o3), .err(e3));

  // incidence rows of Eq. (4.28) and (4.29), spaces removed
  string m3 [5] = '{"1000000001000100010001000", "0100010000000010001000100",
                    "0010001000100000000100010", "0001000100010001000000001",
                    "0000100010001000100010000"};
  string m4 [5] = '{"1000000010010000000100100", "0100000001001001000000010",
                    "0010010000000100100000001", "0001001000000010010010000",
                    "0000100100100000001001000"};

  task automatic inject(input int t, input logic [K-1:0] dd, input logic [29:0] cc);
    automatic logic [55:0] cw = 56'({cc, dd});
    automatic int n = K + 10 * t;
    automatic int pos [4];
    automatic logic [55:0] bad = cw;
    for (int e = 0; e <= t; e++) begin
      automatic bit fresh;
      do begin
        pos[e] = $urandom_range(n - 1);
        fresh = 1;
        for (int f = 0; f < e; f++) if (pos[f] == pos[e]) fresh = 0;
      end while (!fresh);
      bad[pos[e]] = ~bad[pos[e]];
      case (t)
        1: begin rd1 = bad[K-1:0]; rc1 = bad[K+:10]; end
        2: begin rd2 = bad[K-1:0]; rc2 = bad[K+:20]; end
        default: begin rd3 = bad[K-1:0]; rc3 = bad[K+:30]; end
      endcase
      #1;
      if (e < t) begin
        case (t)
          1: check(o1 == dd && e1, "(35,25) corrects 1 error");
          2: check(o2 == dd && e2, $sformatf("(45,25) corrects %0d errors", e + 1));
          default: check(o3 == dd && e3, $sformatf("(55,25) corrects %0d errors", e + 1));
        endcase
      end
    end
  endtask

  initial begin
    // H-matrix rows against the text
    for (int p = 0; p < K; p++) begin
      d = K'(1) << p; #1;
      for (int g = 0; g < M; g++) begin
        check(c3[2*M + g] == (m3[g][p] == "1"), $sformatf("M3 row %0d bit %0d", g, p));
        check(c3[3*M + g] == (m4[g][p] == "1"), $sformatf("M4 row %0d bit %0d", g, p));
        check(c3[g] == (p / M == g) && c3[M + g] == (p % M == g), "M1/M2 rows");
      end
      check(c1 == c3[9:0] && c2 == c3[19:0], "shorter codes are prefixes of (55,25)");
    end
    for (int it = 0; it < 3000; it++) begin
      d = K'($urandom); #1;
      rd1 = d; rc1 = c1; rd2 = d; rc2 = c2; rd3 = d; rc3 = c3; #1;
      check(!e1 && !e2 && !e3 && o1 == d && o2 == d && o3 == d, "clean word");
      inject(1, d, 30'(c1));
      inject(2, d, 30'(c2));
      inject(3, d, c3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
