// tb_parity_memory: writes every word of the parity-protected memory, reads
// them back (no error, one-cycle read latency), then flips one and two stored
// bits and checks that a single flip is flagged and a double flip is not.
module tb_parity_memory;
  int checks = 0, failures = 0;
  logic       clk = 0;
  logic       we = 0;
  logic [3:0] addr = '0, data_in = '0, data_out;
  logic       error;
  logic [3:0] ref_mem [16];

  parity_memory #(.DATA_W(4), .DEPTH(16)) dut (.clk, .we, .addr, .data_in, .data_out, .error);

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

  task automatic read_word(input int a, output logic [3:0] d, output logic e);
    @(negedge clk);
    addr = 4'(a);
    we   = 0;
    @(negedge clk);   // one clock of read latency
    d = data_out;
    e = error;
  endtask

  initial begin
    logic [3:0] d;
    logic       e;
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      ref_mem[a] = 4'($urandom);
      addr = 4'(a); data_in = ref_mem[a]; we = 1;
    end
    @(negedge clk) we = 0;
    for (int a = 0; a < 16; a++) begin
      read_word(a, d, e);
      check(d == ref_mem[a], $sformatf("data @%0d", a));
      check(e == 1'b0, $sformatf("no error @%0d", a));
      // stored parity must be the even parity of the data
      check(dut.mem[a][4] == ^ref_mem[a], $sformatf("stored parity @%0d", a));
    end
    for (int a = 0; a < 16; a++) begin
      automatic int b = a % 5;   // bit 4 is the parity bit itself
      dut.mem[a][b] = ~dut.mem[a][b];
      read_word(a, d, e);
      check(e == 1'b1, $sformatf("single flip bit %0d @%0d detected", b, a));
      dut.mem[a][(b + 1) % 5] = ~dut.mem[a][(b + 1) % 5];
      read_word(a, d, e);
      check(e == 1'b0, $sformatf("double flip @%0d not detected", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
