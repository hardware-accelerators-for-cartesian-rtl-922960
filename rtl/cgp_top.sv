// Top level: the two application-specific CGP accelerators side by side.
//
// Both accelerators share one architecture, a reusable genetic engine of
// population memory, Processor and Memory Interface and control unit, and
// differ in the virtual reconfigurable circuit and fitness unit:
//   sr_*  symbolic regression over 8-bit data (8 x 4 CFBs, 9 inputs, SRAM
//         training set, sum-of-absolute-errors fitness), see sr_accel;
//   lc_*  logic circuits (10 x 10 bit-parallel PEs, L-back 2, truth table on
//         chip, correct-bit count plus phenotype size), see lc_accel.
// Each has its own host register port and processor port; the processor
// that runs the search algorithm, the external SRAMs and the host bus bridge
// are outside this design and connect through these ports. One clock, one
// active-low synchronous reset.
module cgp_top #(
  parameter int unsigned NBANKS = 8,
  localparam int unsigned BW    = (NBANKS > 1) ? $clog2(NBANKS) : 1,
  // symbolic regression accelerator
  localparam int unsigned SR_CW  = 4 * 12,
  localparam int unsigned SR_AW  = 18,
  // logic circuit accelerator
  localparam int unsigned LC_CW  = 10 * 12,
  localparam int unsigned LC_TAW = 7,
  localparam int unsigned LC_TTW = 9 * 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // ---- symbolic regression accelerator ----
  input  logic              sr_hst_we,
  input  logic [2:0]        sr_hst_addr,
  input  logic [31:0]       sr_hst_wdata,
  output logic [31:0]       sr_hst_rdata,
  input  logic              sr_pop_wr_en,
  input  logic [BW-1:0]     sr_pop_wr_bank,
  input  logic [2:0]        sr_pop_wr_col,
  input  logic [SR_CW-1:0]  sr_pop_wr_data,
  input  logic              sr_pop_set_valid,
  input  logic [BW-1:0]     sr_pop_set_bank,
  output logic [NBANKS-1:0] sr_bank_valid,
  output logic              sr_irq,
  output logic [31:0]       sr_fit_value,
  output logic [BW-1:0]     sr_fit_bank,
  input  logic              sr_irqack,
  output logic              sr_sram1_re,
  output logic [SR_AW-1:0]  sr_sram1_addr,
  input  logic [8:0][7:0]   sr_sram1_rdata,
  output logic              sr_sram2_re,
  output logic [SR_AW-1:0]  sr_sram2_addr,
  input  logic [7:0]        sr_sram2_rdata,
  output logic              sr_sram3_we,
  output logic [SR_AW-1:0]  sr_sram3_addr,
  output logic [7:0]        sr_sram3_wdata,
  // ---- logic circuit accelerator ----
  input  logic              lc_hst_we,
  input  logic [2:0]        lc_hst_addr,
  input  logic [31:0]       lc_hst_wdata,
  output logic [31:0]       lc_hst_rdata,
  input  logic              lc_tt_we,
  input  logic [LC_TAW-1:0] lc_tt_addr,
  input  logic [LC_TTW-1:0] lc_tt_wdata,
  input  logic              lc_pop_wr_en,
  input  logic [BW-1:0]     lc_pop_wr_bank,
  input  logic [3:0]        lc_pop_wr_col,
  input  logic [LC_CW-1:0]  lc_pop_wr_data,
  input  logic              lc_pop_set_valid,
  input  logic [BW-1:0]     lc_pop_set_bank,
  output logic [NBANKS-1:0] lc_bank_valid,
  output logic              lc_irq,
  output logic [31:0]       lc_fit_value,
  output logic [BW-1:0]     lc_fit_bank,
  input  logic              lc_irqack
);

  sr_accel #(.NBANKS(NBANKS), .COLS(8), .ROWS(4), .NI(9), .AW(SR_AW)) u_sr (
    .clk, .rst_n,
    .hst_we (sr_hst_we), .hst_addr (sr_hst_addr), .hst_wdata (sr_hst_wdata),
    .hst_rdata (sr_hst_rdata),
    .pop_wr_en (sr_pop_wr_en), .pop_wr_bank (sr_pop_wr_bank), .pop_wr_col (sr_pop_wr_col),
    .pop_wr_data (sr_pop_wr_data), .pop_set_valid (sr_pop_set_valid),
    .pop_set_bank (sr_pop_set_bank), .bank_valid (sr_bank_valid),
    .irq (sr_irq), .fit_value (sr_fit_value), .fit_bank (sr_fit_bank), .irqack (sr_irqack),
    .sram1_re (sr_sram1_re), .sram1_addr (sr_sram1_addr), .sram1_rdata (sr_sram1_rdata),
    .sram2_re (sr_sram2_re), .sram2_addr (sr_sram2_addr), .sram2_rdata (sr_sram2_rdata),
    .sram3_we (sr_sram3_we), .sram3_addr (sr_sram3_addr), .sram3_wdata (sr_sram3_wdata)
  );

  lc_accel #(.NBANKS(NBANKS), .NI(9), .NO(9), .COLS(10), .ROWS(10), .DW(4), .LBACK(2)) u_lc (
    .clk, .rst_n,
    .hst_we (lc_hst_we), .hst_addr (lc_hst_addr), .hst_wdata (lc_hst_wdata),
    .hst_rdata (lc_hst_rdata),
    .tt_we (lc_tt_we), .tt_addr (lc_tt_addr), .tt_wdata (lc_tt_wdata),
    .pop_wr_en (lc_pop_wr_en), .pop_wr_bank (lc_pop_wr_bank), .pop_wr_col (lc_pop_wr_col),
    .pop_wr_data (lc_pop_wr_data), .pop_set_valid (lc_pop_set_valid),
    .pop_set_bank (lc_pop_set_bank), .bank_valid (lc_bank_valid),
    .irq (lc_irq), .fit_value (lc_fit_value), .fit_bank (lc_fit_bank), .irqack (lc_irqack)
  );

endmodule
