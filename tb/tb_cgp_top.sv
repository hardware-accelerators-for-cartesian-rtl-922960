// End-to-end testbench of cgp_top with all parameters at their defaults.
// Both accelerators run at once, each driven by its environment: the
// symbolic-regression side searches for an edge-like 3x3 filter on a
// 24-vector training set (40 evaluations), the logic-circuit side evolves a
// 4 x 5-bit multiplier over all 512 input vectors (24 evaluations). Every
// fitness value is checked against a reference model, and each mechanism
// (back-to-back streaming, queued results behind irq, evaluation limit,
// phenotype size, L-back 2 connections) must occur at least once; see sr_env
// and lc_env.
module tb_cgp_top;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, rst_n_lc;
  // symbolic regression side
  logic sr_hst_we, sr_pop_wr_en, sr_pop_set_valid, sr_irq, sr_irqack;
  logic [2:0] sr_hst_addr, sr_pop_wr_col, sr_pop_wr_bank, sr_pop_set_bank, sr_fit_bank;
  logic [31:0] sr_hst_wdata, sr_hst_rdata, sr_fit_value;
  logic [47:0] sr_pop_wr_data;
  logic [7:0] sr_bank_valid;
  logic sr_sram1_re, sr_sram2_re, sr_sram3_we;
  logic [17:0] sr_sram1_addr, sr_sram2_addr, sr_sram3_addr;
  logic [8:0][7:0] sr_sram1_rdata;
  logic [7:0] sr_sram2_rdata, sr_sram3_wdata;
  // logic circuit side
  logic lc_hst_we, lc_tt_we, lc_pop_wr_en, lc_pop_set_valid, lc_irq, lc_irqack;
  logic [2:0] lc_hst_addr, lc_pop_wr_bank, lc_pop_set_bank, lc_fit_bank;
  logic [3:0] lc_pop_wr_col;
  logic [6:0] lc_tt_addr;
  logic [35:0] lc_tt_wdata;
  logic [31:0] lc_hst_wdata, lc_hst_rdata, lc_fit_value;
  logic [119:0] lc_pop_wr_data;
  logic [7:0] lc_bank_valid;

  int c_sr, f_sr, c_lc, f_lc;
  logic d_sr, d_lc;

  cgp_top dut (.*);

  sr_env #(.NBANKS(8), .K(24), .NEVALS(40), .BW(3)) env_sr (
    .clk, .rst_n,
    .hst_we (sr_hst_we), .hst_addr (sr_hst_addr), .hst_wdata (sr_hst_wdata), .hst_rdata (sr_hst_rdata),
    .pop_wr_en (sr_pop_wr_en), .pop_wr_bank (sr_pop_wr_bank), .pop_wr_col (sr_pop_wr_col),
    .pop_wr_data (sr_pop_wr_data), .pop_set_valid (sr_pop_set_valid), .pop_set_bank (sr_pop_set_bank),
    .bank_valid (sr_bank_valid), .irq (sr_irq), .fit_value (sr_fit_value), .fit_bank (sr_fit_bank),
    .irqack (sr_irqack),
    .sram1_re (sr_sram1_re), .sram1_addr (sr_sram1_addr), .sram1_rdata (sr_sram1_rdata),
    .sram2_re (sr_sram2_re), .sram2_addr (sr_sram2_addr), .sram2_rdata (sr_sram2_rdata),
    .sram3_we (sr_sram3_we), .sram3_addr (sr_sram3_addr), .sram3_wdata (sr_sram3_wdata),
    .fu_start (dut.u_sr.fu_start), .res_queued (dut.u_sr.u_pmi.u_results.count > 1),
    .checks (c_sr), .failures (f_sr), .done (d_sr));

  // the reset of the top comes from the regression environment; the logic
  // environment's reset output is only used to hold off its own traffic
  lc_env #(.NBANKS(8), .NEVALS(24), .BW(3)) env_lc (
    .clk, .rst_n (rst_n_lc),
    .hst_we (lc_hst_we), .hst_addr (lc_hst_addr), .hst_wdata (lc_hst_wdata), .hst_rdata (lc_hst_rdata),
    .tt_we (lc_tt_we), .tt_addr (lc_tt_addr), .tt_wdata (lc_tt_wdata),
    .pop_wr_en (lc_pop_wr_en), .pop_wr_bank (lc_pop_wr_bank), .pop_wr_col (lc_pop_wr_col),
    .pop_wr_data (lc_pop_wr_data), .pop_set_valid (lc_pop_set_valid), .pop_set_bank (lc_pop_set_bank),
    .bank_valid (lc_bank_valid), .irq (lc_irq), .fit_value (lc_fit_value), .fit_bank (lc_fit_bank),
    .irqack (lc_irqack),
    .fu_start (dut.u_lc.fu_start), .res_queued (dut.u_lc.u_pmi.u_results.count > 1),
    .checks (c_lc), .failures (f_lc), .done (d_lc));

  initial begin
    #60000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c_sr + c_lc, f_sr + f_lc + 1);
    $finish;
  end

  initial begin
    wait (d_sr && d_lc);
    $display("TB_RESULT checks=%0d failures=%0d", c_sr + c_lc, f_sr + f_lc);
    $finish;
  end
endmodule
