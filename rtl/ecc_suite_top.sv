// ecc_suite_top: the memory error-control circuits side by side.
//
// The codes are independent of one another, so each stands alone with its
// own ports (prefix in brackets):
//  [mem_]   (72,64) SEC-DED main memory with bit-per-byte parity on the bus
//           (ecc_memory: mh_encoder, mh_decoder, bpb_parity);
//  [pm_]    4-bit memory with single-bit even parity (parity_memory:
//           parity_gen_check);
//  [pw_ pb_ pmc_ pc_ pi_]  the five 16-bit parity forms: per word, per byte,
//           per multiple-chip group, per chip, interlaced;
//  [dup_]   complemented duplication code; [mon_] m-of-n weight checker;
//  [hv_]    H-V-parity (19,12) encoder and its bit-serial decoder;
//  [ols_]   (55,25) triple-error-correcting OLS code;
//  [olss_]  the same code shortened to (44,16) (row 0 and column 0 of
//           the data square deleted);
//  [er_]    erasure locator, with a memory port to the array under test;
//  [ec_]    erasure corrector for (8,4) words: every erasure vector the
//           locator finds (er_done) is learned into its syndrome table;
//  [bal_ bg_ ted_ pr_ ngp_ bp_]  unidirectional codes: balanced, Berger,
//           tED-AUED, product SEC-AUED, NGP SEC-AUED, BP SEC-AUED.
// clk and rst_n are shared by the clocked parts (ecc_memory, parity_memory,
// hv_decoder, erasure_locator, erasure_corrector); the rest are combinational. All parameters
// are the blocks' defaults.
module ecc_suite_top (
  input  logic         clk,
  input  logic         rst_n,
  // (72,64) SEC-DED memory
  input  logic         mem_wr_en,
  input  logic         mem_rd_en,
  input  logic [9:0]   mem_addr,
  input  logic [71:0]  mem_bus_wdata,
  output logic [71:0]  mem_bus_rdata,
  output logic         mem_rd_valid,
  output logic         mem_wr_reject,
  output logic         mem_corrected,
  output logic         mem_err_irq,
  // parity memory
  input  logic         pm_we,
  input  logic [3:0]   pm_addr,
  input  logic [3:0]   pm_data_in,
  output logic [3:0]   pm_data_out,
  output logic         pm_error,
  // parity forms
  input  logic [15:0]  pw_data,
  input  logic         pw_p_in,
  output logic         pw_p_gen,
  output logic         pw_error,
  input  logic [15:0]  pb_data,
  input  logic [1:0]   pb_p_in,
  output logic [1:0]   pb_p_gen,
  output logic [1:0]   pb_byte_err,
  output logic         pb_error,
  input  logic [15:0]  pmc_data,
  input  logic [3:0]   pmc_p_in,
  output logic [3:0]   pmc_p_gen,
  output logic [3:0]   pmc_p_err,
  output logic         pmc_chip_fail,
  input  logic [15:0]  pc_data,
  input  logic [3:0]   pc_p_in,
  output logic [3:0]   pc_p_gen,
  output logic [3:0]   pc_chip_err,
  input  logic [15:0]  pi_data,
  input  logic [3:0]   pi_p_in,
  output logic [3:0]   pi_p_gen,
  output logic [3:0]   pi_p_err,
  output logic         pi_error,
  // duplication and m-of-n
  input  logic [15:0]  dup_data,
  output logic [31:0]  dup_code,
  input  logic [31:0]  dup_rd_code,
  output logic         dup_error,
  input  logic [15:0]  mon_word,
  output logic [4:0]   mon_weight,
  output logic         mon_error,
  // H-V parity
  input  logic [11:0]  hv_enc_data,
  output logic [2:0]   hv_enc_hpar,
  output logic [3:0]   hv_enc_vpar,
  input  logic         hv_start,
  input  logic [11:0]  hv_data,
  input  logic [2:0]   hv_hpar,
  input  logic [3:0]   hv_vpar,
  output logic         hv_bit_valid,
  output logic [3:0]   hv_bit_idx,
  output logic         hv_bit_out,
  output logic         hv_corr,
  output logic         hv_done,
  output logic [11:0]  hv_data_out,
  output logic [3:0]   hv_n_corr,
  // OLS
  input  logic [24:0]  ols_data,
  output logic [29:0]  ols_check,
  input  logic [24:0]  ols_rd_data,
  input  logic [29:0]  ols_rd_check,
  output logic [24:0]  ols_data_out,
  output logic         ols_err,
  // shortened OLS
  input  logic [15:0]  olss_data,
  output logic [27:0]  olss_check,
  input  logic [15:0]  olss_rd_data,
  input  logic [27:0]  olss_rd_check,
  output logic [15:0]  olss_data_out,
  output logic         olss_err,
  // erasure locator
  input  logic         er_start,
  input  logic [7:0]   er_addr,
  input  logic [7:0]   er_pattern,
  output logic         er_mem_we,
  output logic         er_mem_re,
  output logic [7:0]   er_mem_addr,
  output logic [7:0]   er_mem_wdata,
  input  logic [7:0]   er_mem_rdata,
  output logic         er_done,
  output logic [7:0]   er_erasures,
  // erasure correction of (8,4) words, fed by the erasure locator
  input  logic [3:0]   ec_rd_data,
  input  logic [3:0]   ec_rd_check,
  output logic [3:0]   ec_data_out,
  output logic [3:0]   ec_check_out,
  output logic         ec_clean,
  output logic         ec_hit,
  output logic         ec_miss,
  output logic [7:0]   ec_known,
  // balanced code
  input  logic [9:0]   bal_x,
  output logic [14:0]  bal_code,
  input  logic [14:0]  bal_rd_code,
  output logic [9:0]   bal_x_out,
  output logic         bal_error,
  // Berger code
  input  logic [7:0]   bg_x,
  output logic [3:0]   bg_p,
  input  logic [7:0]   bg_rd_x,
  input  logic [3:0]   bg_rd_p,
  output logic         bg_error,
  // tED-AUED
  input  logic [7:0]   ted_x,
  output logic [16:0]  ted_code,
  input  logic [16:0]  ted_rd_code,
  output logic         ted_error,
  // product SEC-AUED
  input  logic [5:0]   pr_info,
  output logic [14:0]  pr_code,
  input  logic [14:0]  pr_rd_code,
  output logic [5:0]   pr_info_out,
  output logic         pr_corrected,
  output logic         pr_multi_err,
  // NGP SEC-AUED
  input  logic [3:0]   ngp_d,
  output logic [14:0]  ngp_code,
  input  logic [14:0]  ngp_rd_code,
  output logic [3:0]   ngp_d_out,
  output logic         ngp_ok,
  output logic         ngp_corrected,
  output logic         ngp_detected,
  output logic         ngp_clean,
  // BP SEC-AUED
  input  logic [3:0]   bp_d,
  output logic [15:0]  bp_code,
  input  logic [15:0]  bp_rd_code,
  output logic [3:0]   bp_d_out,
  output logic         bp_detected
);

  ecc_memory u_mem (
    .clk, .rst_n, .wr_en(mem_wr_en), .rd_en(mem_rd_en), .addr(mem_addr),
    .bus_wdata(mem_bus_wdata), .bus_rdata(mem_bus_rdata), .rd_valid(mem_rd_valid),
    .wr_reject(mem_wr_reject), .corrected(mem_corrected), .err_irq(mem_err_irq)
  );

  parity_memory u_pm (
    .clk, .we(pm_we), .addr(pm_addr), .data_in(pm_data_in), .data_out(pm_data_out), .error(pm_error)
  );

  bpw_parity u_pw (.data(pw_data), .p_in(pw_p_in), .p_gen(pw_p_gen), .error(pw_error));
  bpb_parity u_pb (.data(pb_data), .p_in(pb_p_in), .p_gen(pb_p_gen), .byte_err(pb_byte_err), .error(pb_error));
  bpmc_parity u_pmc (.data(pmc_data), .p_in(pmc_p_in), .p_gen(pmc_p_gen), .p_err(pmc_p_err), .chip_fail(pmc_chip_fail));
  bpc_parity u_pc (.data(pc_data), .p_in(pc_p_in), .p_gen(pc_p_gen), .chip_err(pc_chip_err));
  interlace_parity u_pi (.data(pi_data), .p_in(pi_p_in), .p_gen(pi_p_gen), .p_err(pi_p_err), .error(pi_error));

  dup_codec u_dup (.data(dup_data), .code(dup_code), .rd_code(dup_rd_code), .error(dup_error));
  m_of_n_checker u_mon (.word(mon_word), .weight(mon_weight), .error(mon_error));

  hv_encoder u_hv_enc (.data(hv_enc_data), .hpar(hv_enc_hpar), .vpar(hv_enc_vpar));
  hv_decoder u_hv_dec (
    .clk, .rst_n, .start(hv_start), .data(hv_data), .hpar(hv_hpar), .vpar(hv_vpar),
    .bit_valid(hv_bit_valid), .bit_idx(hv_bit_idx), .bit_out(hv_bit_out), .corr(hv_corr),
    .done(hv_done), .data_out(hv_data_out), .n_corr(hv_n_corr)
  );

  ols_shortened u_olss (
    .data(olss_data), .check(olss_check), .rd_data(olss_rd_data), .rd_check(olss_rd_check),
    .data_out(olss_data_out), .err(olss_err)
  );

  ols_codec u_ols (
    .data(ols_data), .check(ols_check), .rd_data(ols_rd_data), .rd_check(ols_rd_check),
    .data_out(ols_data_out), .err(ols_err)
  );

  erasure_locator u_er (
    .clk, .rst_n, .start(er_start), .addr(er_addr), .pattern(er_pattern),
    .mem_we(er_mem_we), .mem_re(er_mem_re), .mem_addr(er_mem_addr), .mem_wdata(er_mem_wdata),
    .mem_rdata(er_mem_rdata), .done(er_done), .erasures(er_erasures)
  );

  // every located erasure vector is learned by the corrector when done pulses
  erasure_corrector u_ec (
    .clk, .rst_n, .learn(er_done), .erase_mask(er_erasures),
    .rd_data(ec_rd_data), .rd_check(ec_rd_check), .data_out(ec_data_out),
    .check_out(ec_check_out), .clean(ec_clean), .hit(ec_hit), .miss(ec_miss),
    .known(ec_known)
  );

  balanced_codec u_bal (.x(bal_x), .code(bal_code), .rd_code(bal_rd_code), .x_out(bal_x_out), .error(bal_error));
  berger_codec u_bg (.x(bg_x), .p(bg_p), .rd_x(bg_rd_x), .rd_p(bg_rd_p), .error(bg_error));
  ted_aued_codec u_ted (.x(ted_x), .code(ted_code), .rd_code(ted_rd_code), .error(ted_error));
  product_sec_aued u_pr (
    .info(pr_info), .code(pr_code), .rd_code(pr_rd_code), .info_out(pr_info_out),
    .corrected(pr_corrected), .multi_err(pr_multi_err)
  );
  ngp_codec u_ngp (
    .d(ngp_d), .code(ngp_code), .rd_code(ngp_rd_code), .d_out(ngp_d_out),
    .ok(ngp_ok), .corrected(ngp_corrected), .detected(ngp_detected), .clean(ngp_clean)
  );
  bp_codec u_bp (.d(bp_d), .code(bp_code), .rd_code(bp_rd_code), .d_out(bp_d_out), .detected(bp_detected));

endmodule
