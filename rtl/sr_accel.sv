// CGP accelerator for symbolic regression over 8-bit fixed-point data.
//
// Candidate programs are 8-column x 4-row grids of 8-bit function blocks
// evaluated by a virtual reconfigurable circuit (vrc_sr). The processor (off
// this module) writes candidate configurations into the banks of the
// population memory and sets their validity bits; the PMI loads a valid bank
// into the VRC column by column and starts the fitness unit (fu_sr), which
// streams training vectors from external SRAM1 through the VRC, compares the
// outputs with SRAM2, logs them in SRAM3 and returns the sum of absolute
// errors. The PMI hands the result to the processor with irq/irqack. The
// control unit (cu) holds the host registers: run, training-set size and an
// evaluation limit. Because reconfiguration and evaluation are both
// pipelined, a candidate costs num_vectors clocks when banks are kept valid.
//
// Ports: host register port (see cu), processor port (population-memory
// writes, validity set, irq/irqack with fitness and bank), and the three
// external SRAM ports (see fu_sr for their timing). rst_n is active low and
// synchronous.
module sr_accel #(
  parameter int unsigned NBANKS = 8,
  parameter int unsigned COLS   = 8,
  parameter int unsigned ROWS   = 4,
  parameter int unsigned NI     = 9,
  parameter int unsigned AW     = 18,
  parameter int unsigned KW     = 24,
  parameter int unsigned FITW   = 32,
  localparam int unsigned CW    = ROWS * 12,
  localparam int unsigned BW    = (NBANKS > 1) ? $clog2(NBANKS) : 1,
  localparam int unsigned CLW   = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // host
  input  logic              hst_we,
  input  logic [2:0]        hst_addr,
  input  logic [31:0]       hst_wdata,
  output logic [31:0]       hst_rdata,
  // processor
  input  logic              pop_wr_en,
  input  logic [BW-1:0]     pop_wr_bank,
  input  logic [CLW-1:0]    pop_wr_col,
  input  logic [CW-1:0]     pop_wr_data,
  input  logic              pop_set_valid,
  input  logic [BW-1:0]     pop_set_bank,
  output logic [NBANKS-1:0] bank_valid,
  output logic              irq,
  output logic [FITW-1:0]   fit_value,
  output logic [BW-1:0]     fit_bank,
  input  logic              irqack,
  // external SRAMs
  output logic              sram1_re,
  output logic [AW-1:0]     sram1_addr,
  input  logic [NI-1:0][7:0] sram1_rdata,
  output logic              sram2_re,
  output logic [AW-1:0]     sram2_addr,
  input  logic [7:0]        sram2_rdata,
  output logic              sram3_we,
  output logic [AW-1:0]     sram3_addr,
  output logic [7:0]        sram3_wdata
);
  logic            run, eval_done;
  logic [KW-1:0]   num_vectors;
  logic            clr_valid, rd_en, conf_we, fu_start, fu_busy, fit_we;
  logic [BW-1:0]   clr_bank, rd_bank;
  logic [CLW-1:0]  rd_col, conf_col;
  logic [CW-1:0]   rd_data, conf_data;
  logic [FITW-1:0] fu_fit;
  logic [NI-1:0][7:0] vrc_in;
  logic [7:0]      vrc_out;

  cu #(.KW(KW)) u_cu (
    .clk, .rst_n, .hst_we, .hst_addr, .hst_wdata, .hst_rdata,
    .eval_done, .run, .num_vectors
  );

  population_memory #(.NBANKS(NBANKS), .NCOLS(COLS), .W(CW)) u_pop (
    .clk, .rst_n,
    .wr_en (pop_wr_en), .wr_bank (pop_wr_bank), .wr_col (pop_wr_col), .wr_data (pop_wr_data),
    .set_valid (pop_set_valid), .set_bank (pop_set_bank),
    .rd_en, .rd_bank, .rd_col, .rd_data, .clr_valid, .clr_bank,
    .valid (bank_valid)
  );

  pmi #(.NBANKS(NBANKS), .NCOLS(COLS), .CW(CW), .FITW(FITW), .KW(KW)) u_pmi (
    .clk, .rst_n, .run, .num_cycles (num_vectors),
    .bank_valid, .clr_valid, .clr_bank, .rd_en, .rd_bank, .rd_col, .rd_data,
    .conf_we, .conf_col, .conf_data,
    .fu_start, .fit_we, .fit_in (fu_fit),
    .irq, .fit_value, .fit_bank, .irqack, .eval_done
  );

  vrc_sr #(.COLS(COLS), .ROWS(ROWS), .NI(NI)) u_vrc (
    .clk, .conf_we, .conf_col, .conf_data, .vin (vrc_in), .vout (vrc_out)
  );

  fu_sr #(.NI(NI), .COLS(COLS), .AW(AW), .KW(KW), .FITW(FITW)) u_fu (
    .clk, .rst_n, .start (fu_start), .num_vectors, .busy (fu_busy),
    .sram1_re, .sram1_addr, .sram1_rdata,
    .vrc_in, .vrc_out,
    .sram2_re, .sram2_addr, .sram2_rdata,
    .sram3_we, .sram3_addr, .sram3_wdata,
    .fit_we, .fit_value (fu_fit)
  );

endmodule
