// tb_ols_shortened: self-checking testbench for ols_shortened at M=5, T=3,
// the (44,16) code.
//
// A reference H for the shortened code is built here from the Latin-square
// rule (row i, column j, and symbol (a*i + j) mod 5 for a = 1..4) over the
// cells with i, j >= 1, dropping the two checks that cover no data bit. The
// testbench checks that no reference row covers more than 4 data bits,
// compares the check bits with the reference for random data, and then
// flips every single bit and random sets of 2 and 3 distinct bits of the
// 44-bit codeword, expecting the data back unchanged and err set.
// Error-free words must give err = 0. A watchdog ends the run.
module tb_ols_shortened;
  localparam int M  = 5;
  localparam int T  = 3;
  localparam int KS = (M - 1) * (M - 1);
  localparam int NS = 2 * T * M - 2;
  localparam int N  = KS + NS;

  logic [KS-1:0] data, rd_data, data_out;
  logic [NS-1:0] check, rd_check;
  logic          err;
  int            checks = 0, failures = 0;
  logic [NS-1:0][KS-1:0] href;

  ols_shortened #(.M(M), .T(T)) dut (
    .data(data), .check(check), .rd_data(rd_data), .rd_check(rd_check),
    .data_out(data_out), .err(err)
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NS-1:0] ref_check(input logic [KS-1:0] d);
    logic [NS-1:0] c;
    for (int r = 0; r < NS; r++) c[r] = ^(d & href[r]);
    return c;
  endfunction

  initial begin
    logic [N-1:0] cw, e;
    int pos, nerr;
    // reference matrix: full row s*M+g, with rows 0 and M removed
    href = '0;
    for (int i = 1; i < M; i++)
      for (int j = 1; j < M; j++)
        for (int s = 0; s < 2 * T; s++) begin
          int g, full, row;
          if (s == 0) g = i;
          else if (s == 1) g = j;
          else g = ((s - 1) * i + j) % M;
          full = s * M + g;
          row  = (full < M) ? full - 1 : full - 2;
          href[row][(i - 1) * (M - 1) + (j - 1)] = 1'b1;
        end
    for (int r = 0; r < NS; r++) begin
      chk($countones(href[r]) <= M - 1 && $countones(href[r]) >= 1,
            $sformatf("row %0d covers %0d data bits", r, $countones(href[r])));
    end

    for (int t = 0; t < 400; t++) begin
      data = KS'($urandom);
      #1;
      chk(check == ref_check(data), $sformatf("check bits for %h", data));
      cw = {check, data};
      // no error
      {rd_check, rd_data} = cw;
      #1;
      chk(data_out == data && !err, "clean word");
      // every single error
      for (int p = 0; p < N; p++) begin
        {rd_check, rd_data} = cw ^ (N'(1) << p);
        #1;
        chk(data_out == data && err, $sformatf("single error at %0d", p));
      end
      // random double and triple errors
      for (int k = 0; k < 20; k++) begin
        nerr = 2 + (k % 2);
        e = '0;
        while ($countones(e) < nerr) begin
          pos = int'($urandom % N);
          e[pos] = 1'b1;
        end
        {rd_check, rd_data} = cw ^ e;
        #1;
        chk(data_out == data && err, $sformatf("%0d errors %h", nerr, e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
