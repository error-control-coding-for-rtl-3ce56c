// tb_ecc_suite_top: end-to-end test of the whole collection at its default
// sizes (no parameter overrides): the 1K x (72,64) SEC-DED memory with its
// byte-parity bus, the parity memory, the five parity arrangements,
// duplication and m-of-n checking, H-V parity encode + serial decode, the
// (55,25) OLS code and its (44,16) shortened form, the erasure locator (against a behavioural memory with
// stuck cells, kept here in the testbench) with the erasure corrector that
// learns what it finds, and the balanced, Berger,
// tED-AUED, product, NGP and BP codes. Each error-control mechanism is
// counted (corrections, detections, interrupts, rejections, erasures, ...)
// and a mechanism that never happened counts as a failure.
module tb_ecc_suite_top;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction
  // ---------------- DUT ports ----------------
  logic rst_n = 0;
  logic mem_wr_en = 0, mem_rd_en = 0;  logic [9:0] mem_addr = '0;
  logic [71:0] mem_bus_wdata = '0, mem_bus_rdata;
  logic mem_rd_valid, mem_wr_reject, mem_corrected, mem_err_irq;
  logic pm_we = 0; logic [3:0] pm_addr = '0, pm_data_in = '0, pm_data_out; logic pm_error;
  logic [15:0] pw_data, pb_data, pmc_data, pc_data, pi_data;
  logic pw_p_in, pw_p_gen, pw_error;
  logic [1:0] pb_p_in, pb_p_gen, pb_byte_err; logic pb_error;
  logic [3:0] pmc_p_in, pmc_p_gen, pmc_p_err; logic pmc_chip_fail;
  logic [3:0] pc_p_in, pc_p_gen, pc_chip_err;
  logic [3:0] pi_p_in, pi_p_gen, pi_p_err; logic pi_error;
  logic [15:0] dup_data, mon_word; logic [31:0] dup_code, dup_rd_code; logic dup_error;
  logic [4:0] mon_weight; logic mon_error;
  logic [11:0] hv_enc_data, hv_data, hv_data_out; logic [2:0] hv_enc_hpar, hv_hpar;
  logic [3:0] hv_enc_vpar, hv_vpar, hv_bit_idx, hv_n_corr;
  logic hv_start = 0, hv_bit_valid, hv_bit_out, hv_corr, hv_done;
  logic [24:0] ols_data, ols_rd_data, ols_data_out; logic [29:0] ols_check, ols_rd_check; logic ols_err;
  logic [15:0] olss_data, olss_rd_data, olss_data_out; logic [27:0] olss_check, olss_rd_check; logic olss_err;
  logic er_start = 0; logic [7:0] er_addr = '0, er_pattern = '0, er_mem_addr, er_mem_wdata, er_mem_rdata, er_erasures;
  logic er_mem_we, er_mem_re, er_done;
  logic [3:0] ec_rd_data, ec_rd_check, ec_data_out, ec_check_out; logic ec_clean, ec_hit, ec_miss;
  logic [7:0] ec_known;
  logic [3:0] ec_c, ec_d_ref;
  mh_encoder #(.K(4), .R(4)) ec_ref_enc (.data(ec_d_ref), .check(ec_c));
  logic [9:0] bal_x, bal_x_out; logic [14:0] bal_code, bal_rd_code; logic bal_error;
  logic [7:0] bg_x, bg_rd_x; logic [3:0] bg_p, bg_rd_p; logic bg_error;
  logic [7:0] ted_x; logic [16:0] ted_code, ted_rd_code; logic ted_error;
  logic [5:0] pr_info, pr_info_out; logic [14:0] pr_code, pr_rd_code; logic pr_corrected, pr_multi_err;
  logic [3:0] ngp_d, ngp_d_out; logic [14:0] ngp_code, ngp_rd_code;
  logic ngp_ok, ngp_corrected, ngp_detected, ngp_clean;
  logic [3:0] bp_d, bp_d_out; logic [15:0] bp_code, bp_rd_code; logic bp_detected;

  ecc_suite_top dut (.*);

  // ---------------- mechanism counters ----------------
  typedef enum int {
    M_MEM_CORR, M_MEM_IRQ, M_MEM_REJECT, M_PM_DETECT, M_PW_DETECT, M_PB_DETECT,
    M_PMC_CHIPFAIL, M_PC_CHIP, M_PI_DETECT, M_DUP_DETECT, M_MON_DETECT,
    M_HV_CORR, M_OLS_CORR, M_OLSS_CORR, M_ER_ERASURE, M_EC_CORR, M_EC_MISS, M_BAL_DETECT, M_BG_DETECT, M_TED_DETECT,
    M_PR_CORR, M_PR_DETECT, M_NGP_CORR, M_NGP_DETECT, M_BP_CORR, M_BP_DETECT, M_COUNT
  } mech_e;
  int seen [M_COUNT];

  // ---------------- behavioural memory for the erasure locator ----------------
  logic [7:0] er_cells [256];
  logic [7:0] er_s1 [256];
  logic [7:0] er_s0 [256];
  always @(posedge clk) begin
    if (er_mem_we) er_cells[er_mem_addr] <= er_mem_wdata;
    if (er_mem_re) er_mem_rdata <= (er_cells[er_mem_addr] | er_s1[er_mem_addr]) & ~er_s0[er_mem_addr];
  end

  function automatic logic [71:0] to_bus(input logic [63:0] d);
    logic [71:0] b;
    for (int i = 0; i < 8; i++) begin
      b[9*i +: 8] = d[8*i +: 8];
      b[9*i+8]    = (^d[8*i +: 8]) ^ ((i % 2) == 0);
    end
    return b;
  endfunction

  function automatic int flip_pos(input int n, input int taken);
    int p;
    do p = $urandom_range(n - 1); while (p == taken);
    return p;
  endfunction

  // ---------------- sequential parts ----------------
  task automatic mem_test();
    logic [63:0] ref_w [16];
    for (int a = 0; a < 1024; a += 64) begin
      ref_w[a/64] = {$urandom, $urandom};
      @(negedge clk); mem_addr = 10'(a); mem_bus_wdata = to_bus(ref_w[a/64]); mem_wr_en = 1;
      @(negedge clk); mem_wr_en = 0;
    end
    for (int a = 0; a < 1024; a += 64) begin
      automatic int b1 = $urandom_range(71);
      automatic int b2 = flip_pos(72, b1);
      for (int e = 0; e < 3; e++) begin
        if (e == 1) dut.u_mem.mem[a][b1] = ~dut.u_mem.mem[a][b1];
        if (e == 2) dut.u_mem.mem[a][b2] = ~dut.u_mem.mem[a][b2];
        @(negedge clk); mem_addr = 10'(a); mem_rd_en = 1;
        @(negedge clk); mem_rd_en = 0;
        check(mem_rd_valid, "memory read valid after one clock");
        case (e)
          0: check(mem_bus_rdata == to_bus(ref_w[a/64]) && !mem_corrected && !mem_err_irq, "memory clean read");
          1: check(mem_bus_rdata == to_bus(ref_w[a/64]) && mem_corrected && !mem_err_irq, "memory single error corrected");
          default: check(mem_err_irq, "memory double error interrupt");
        endcase
        if (mem_corrected) seen[M_MEM_CORR]++;
        if (mem_err_irq) seen[M_MEM_IRQ]++;
      end
    end
    @(negedge clk); mem_addr = 10'd3; mem_bus_wdata = to_bus(64'h0123_4567_89ab_cdef) ^ 72'h1; mem_wr_en = 1;
    @(negedge clk); mem_wr_en = 0;
    check(mem_wr_reject, "bus parity error rejected");
    if (mem_wr_reject) seen[M_MEM_REJECT]++;
  endtask

  task automatic pm_test();
    for (int a = 0; a < 16; a++) begin
      @(negedge clk); pm_addr = 4'(a); pm_data_in = 4'($urandom); pm_we = 1;
      @(negedge clk); pm_we = 0;
      if (a % 2 == 1) begin
        automatic int b = $urandom_range(4);
        dut.u_pm.mem[a][b] = ~dut.u_pm.mem[a][b];
      end
      @(negedge clk);
      check(pm_error == (a % 2 == 1), "parity memory detects a flipped bit");
      if (a % 2 == 0) check(pm_data_out == pm_data_in, "parity memory data");
      if (pm_error) seen[M_PM_DETECT]++;
    end
  endtask

  task automatic hv_test();
    for (int t = 0; t < 24; t++) begin
      automatic logic [11:0] w = 12'($urandom);
      automatic int b = t % 12;
      hv_enc_data = w; #1;
      @(negedge clk);
      hv_data = w ^ (12'(1) << b); hv_hpar = hv_enc_hpar; hv_vpar = hv_enc_vpar; hv_start = 1;
      @(negedge clk); hv_start = 0;
      for (int n = 0; n < 40 && !hv_done; n++) begin
        if (hv_corr) seen[M_HV_CORR]++;
        @(negedge clk);
      end
      check(hv_done && hv_data_out == w && hv_n_corr == 1, "H-V serial decoder corrects one error");
    end
  endtask

  task automatic er_test();
    for (int t = 0; t < 8; t++) begin
      automatic int a = $urandom_range(255);
      // stuck cells drawn from three positions, so the corrector's table
      // (up to three erasures) covers all of them
      automatic int sp [3] = '{1, 4, 6};
      automatic logic [7:0] m1 = 8'(1 << sp[$urandom_range(2)]);
      er_s1[a] = m1; er_s0[a] = '0;
      @(negedge clk); er_addr = 8'(a); er_pattern = 8'($urandom); er_start = 1;
      @(negedge clk); er_start = 0;
      for (int n = 0; n < 20 && !er_done; n++) @(negedge clk);
      check(er_done && er_erasures == m1, "erasure located");
      if (er_done && er_erasures != 0) seen[M_ER_ERASURE]++;
      @(negedge clk);
      check(ec_known == 8'(m1) || t > 0, "corrector learned the erasure");
      // (8,4) codeword d0..d3 c0..c3 laid out as bits 0..7; flip the erased cell
      begin
        automatic logic [3:0] dd = 4'($urandom);
        automatic int p = $clog2(int'(m1));
        ec_d_ref = dd; #1;
        ec_rd_data = dd; ec_rd_check = ec_c;
        if (p < 4) ec_rd_data = dd ^ (4'(1) << p);
        else ec_rd_check = ec_c ^ (4'(1) << (p - 4));
        #1;
        check(ec_hit && ec_data_out == dd, "erased cell corrected");
        if (ec_hit) seen[M_EC_CORR]++;
        if (t == 0) begin
          ec_rd_data = dd; ec_rd_check = ec_c ^ 4'b1000;   // cell 7, never erased here
          #1;
          check(ec_miss, "error outside the known erasures missed");
          if (ec_miss) seen[M_EC_MISS]++;
        end
      end
    end
  endtask

  // ---------------- combinational codes ----------------
  task automatic comb_test();
    for (int t = 0; t < 200; t++) begin
      automatic int k;
      // parity forms: one flipped data bit
      pw_data = 16'($urandom); #1; pw_p_in = pw_p_gen;
      pb_data = pw_data; pmc_data = pw_data; pc_data = pw_data; pi_data = pw_data; #1;
      pb_p_in = pb_p_gen; pmc_p_in = pmc_p_gen; pc_p_in = pc_p_gen; pi_p_in = pi_p_gen;
      k = $urandom_range(15);
      pw_data[k] ^= 1'b1; pb_data[k] ^= 1'b1; pc_data[k] ^= 1'b1; pi_data[k] ^= 1'b1;
      pmc_data[3:0] = ~pmc_data[3:0];   // chip 0 (one bit in every group) fails whole
      #1;
      check(pw_error && pb_error && pi_error && pc_chip_err != 0 && pmc_chip_fail, "parity forms detect");
      if (pw_error) seen[M_PW_DETECT]++;
      if (pb_error) seen[M_PB_DETECT]++;
      if (pmc_chip_fail) seen[M_PMC_CHIPFAIL]++;
      if (pc_chip_err != 0) seen[M_PC_CHIP]++;
      if (pi_error) seen[M_PI_DETECT]++;
      // duplication, m-of-n
      dup_data = 16'($urandom); #1;
      dup_rd_code = dup_code ^ (32'(1) << $urandom_range(31)); #1;
      check(dup_error, "duplication detects");
      if (dup_error) seen[M_DUP_DETECT]++;
      mon_word = 16'hff00 | 16'(1 << $urandom_range(7)); #1;
      check(mon_error && mon_weight == 9, "m-of-n detects weight 9");
      if (mon_error) seen[M_MON_DETECT]++;
      // OLS (55,25): three errors
      ols_data = 25'($urandom); #1;
      begin
        automatic logic [54:0] cw = {ols_check, ols_data};
        automatic int p1 = $urandom_range(54), p2 = flip_pos(55, p1), p3;
        do p3 = $urandom_range(54); while (p3 == p1 || p3 == p2);
        cw[p1] ^= 1'b1; cw[p2] ^= 1'b1; cw[p3] ^= 1'b1;
        {ols_rd_check, ols_rd_data} = cw; #1;
        check(ols_data_out == ols_data && ols_err, "OLS corrects three errors");
        if (ols_data_out == ols_data && ols_err) seen[M_OLS_CORR]++;
      end
      // shortened OLS (44,16): three errors
      olss_data = 16'($urandom); #1;
      begin
        automatic logic [43:0] cw = {olss_check, olss_data};
        automatic int p1 = $urandom_range(43), p2 = flip_pos(44, p1), p3;
        do p3 = $urandom_range(43); while (p3 == p1 || p3 == p2);
        cw[p1] ^= 1'b1; cw[p2] ^= 1'b1; cw[p3] ^= 1'b1;
        {olss_rd_check, olss_rd_data} = cw; #1;
        check(olss_data_out == olss_data && olss_err, "shortened OLS corrects three errors");
        if (olss_data_out == olss_data && olss_err) seen[M_OLSS_CORR]++;
      end
      // unidirectional codes: 1->0 errors on the ones of the codeword
      bal_x = 10'($urandom); #1;
      bal_rd_code = bal_code & ~(15'(1) << $urandom_range(14)) & ~(15'(1) << $urandom_range(14));
      #1;
      check(bal_error == (bal_rd_code != bal_code), "balanced code detects");
      if (bal_error) seen[M_BAL_DETECT]++;
      bg_x = 8'($urandom); #1;
      {bg_rd_x, bg_rd_p} = {bg_x, bg_p} | 12'($urandom); #1;
      check(bg_error == ({bg_rd_x, bg_rd_p} != {bg_x, bg_p}), "Berger code detects");
      if (bg_error) seen[M_BG_DETECT]++;
      ted_x = 8'($urandom); #1;
      ted_rd_code = ted_code ^ (17'(1) << $urandom_range(16)) ^ (17'(1) << $urandom_range(16)); #1;
      check(ted_error == (ted_rd_code != ted_code), "tED-AUED detects up to 2 random errors");
      if (ted_error) seen[M_TED_DETECT]++;
      pr_info = 6'($urandom); #1;
      pr_rd_code = pr_code ^ (15'(1) << (3 * $urandom_range(2) + $urandom_range(1))); #1;
      check(pr_corrected && pr_info_out == pr_info, "product code corrects");
      if (pr_corrected) seen[M_PR_CORR]++;
      pr_rd_code = pr_code & 15'h0fff; #1;
      check(pr_multi_err || pr_rd_code == pr_code, "product code detects Berger-row errors");
      if (pr_multi_err) seen[M_PR_DETECT]++;
      ngp_d = 4'($urandom); bp_d = ngp_d; #1;
      ngp_rd_code = ngp_code ^ (15'(1) << $urandom_range(14));
      bp_rd_code  = bp_code ^ (16'(1) << $urandom_range(15)); #1;
      check(ngp_corrected && ngp_d_out == ngp_d && !bp_detected && bp_d_out == bp_d, "NGP / BP correct one error");
      if (ngp_corrected) seen[M_NGP_CORR]++;
      if (bp_rd_code != bp_code && bp_d_out == bp_d) seen[M_BP_CORR]++;
      ngp_rd_code = ngp_code | 15'b110000000000000 | 15'(ngp_code >> 1);
      bp_rd_code  = bp_code | 16'b1100000000000000 | 16'(bp_code >> 1); #1;
      check((ngp_detected || ngp_d_out == ngp_d) && (bp_detected || bp_d_out == bp_d),
            "NGP / BP never accept wrong data after unidirectional errors");
      if (ngp_detected) seen[M_NGP_DETECT]++;
      if (bp_detected) seen[M_BP_DETECT]++;
    end
  endtask

  initial begin
    for (int a = 0; a < 256; a++) begin er_cells[a] = '0; er_s1[a] = '0; er_s0[a] = '0; end
    for (int m = 0; m < M_COUNT; m++) seen[m] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    mem_test();
    pm_test();
    hv_test();
    er_test();
    comb_test();
    for (int m = 0; m < M_COUNT; m++) begin
      automatic mech_e e = mech_e'(m);
      $display("mechanism %-15s happened %0d times", e.name(), seen[m]);
      check(seen[m] > 0, $sformatf("mechanism %s never happened", e.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
