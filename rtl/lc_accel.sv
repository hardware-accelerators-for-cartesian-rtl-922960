// CGP accelerator for the evolution of combinational logic circuits.
//
// Candidate circuits are COLS x ROWS grids (10 x 10 by default) of logic PEs
// with L-back 2, evaluated by a bit-parallel virtual reconfigurable circuit
// (vrc_lc) that simulates DW input combinations per clock. The processor
// writes candidate configurations into the population-memory banks and sets
// their validity bits; the PMI loads a valid bank into the VRC column by
// column, while the phenotype-size unit counts the PEs configured as wires,
// and starts the fitness unit (fu_lc). The fitness unit applies all 2^NI
// input combinations, compares the outputs with the truth table held on chip
// and returns {correct output bits, wire count[7:0]} through the PMI to the
// processor (irq/irqack). The control unit holds the run enable and the
// evaluation limit; the number of clocks per candidate is fixed by the
// parameters, ceil(2^NI / DW), so the CU's vector-count register is unused.
//
// Ports: host register port (see cu), processor port (population-memory
// writes, validity set, irq/irqack with fitness and bank), truth-table write
// port (see fu_lc). rst_n is active low and synchronous.
module lc_accel #(
  parameter int unsigned NBANKS = 8,
  parameter int unsigned NI     = 9,
  parameter int unsigned NO     = 9,
  parameter int unsigned COLS   = 10,
  parameter int unsigned ROWS   = 10,
  parameter int unsigned DW     = 4,
  parameter int unsigned LBACK  = 2,
  parameter int unsigned FITW   = 32,
  localparam int unsigned SELW  = $clog2(NI + LBACK * ROWS),
  localparam int unsigned PEW   = 2 * SELW + 2,
  localparam int unsigned CW    = ROWS * PEW,
  localparam int unsigned BW    = (NBANKS > 1) ? $clog2(NBANKS) : 1,
  localparam int unsigned CLW   = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int unsigned NCYC  = ((1 << NI) + DW - 1) / DW,
  localparam int unsigned TAW   = (NCYC > 1) ? $clog2(NCYC) : 1,
  localparam int unsigned COSTW = $clog2(COLS * ROWS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // host
  input  logic              hst_we,
  input  logic [2:0]        hst_addr,
  input  logic [31:0]       hst_wdata,
  output logic [31:0]       hst_rdata,
  input  logic              tt_we,
  input  logic [TAW-1:0]    tt_addr,
  input  logic [NO*DW-1:0]  tt_wdata,
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
  input  logic              irqack
);
  localparam int unsigned KW = 24;

  logic            run, eval_done;
  logic [KW-1:0]   num_vectors_unused;
  logic            clr_valid, rd_en, conf_we, fu_start, fu_busy, fit_we;
  logic [BW-1:0]   clr_bank, rd_bank;
  logic [CLW-1:0]  rd_col, conf_col;
  logic [CW-1:0]   rd_data, conf_data;
  logic [FITW-1:0] fu_fit;
  logic [NI-1:0][DW-1:0] vrc_in;
  logic [NO-1:0][DW-1:0] vrc_out;
  logic [COSTW-1:0] size;
  logic            size_valid;

  cu #(.KW(KW)) u_cu (
    .clk, .rst_n, .hst_we, .hst_addr, .hst_wdata, .hst_rdata,
    .eval_done, .run, .num_vectors (num_vectors_unused)
  );

  population_memory #(.NBANKS(NBANKS), .NCOLS(COLS), .W(CW)) u_pop (
    .clk, .rst_n,
    .wr_en (pop_wr_en), .wr_bank (pop_wr_bank), .wr_col (pop_wr_col), .wr_data (pop_wr_data),
    .set_valid (pop_set_valid), .set_bank (pop_set_bank),
    .rd_en, .rd_bank, .rd_col, .rd_data, .clr_valid, .clr_bank,
    .valid (bank_valid)
  );

  pmi #(.NBANKS(NBANKS), .NCOLS(COLS), .CW(CW), .FITW(FITW), .KW(KW)) u_pmi (
    .clk, .rst_n, .run, .num_cycles (KW'(NCYC)),
    .bank_valid, .clr_valid, .clr_bank, .rd_en, .rd_bank, .rd_col, .rd_data,
    .conf_we, .conf_col, .conf_data,
    .fu_start, .fit_we, .fit_in (fu_fit),
    .irq, .fit_value, .fit_bank, .irqack, .eval_done
  );

  vrc_lc #(.NI(NI), .NO(NO), .COLS(COLS), .ROWS(ROWS), .DW(DW), .LBACK(LBACK)) u_vrc (
    .clk, .conf_we, .conf_col, .conf_data, .vin (vrc_in), .vout (vrc_out)
  );

  phenotype_size #(.COLS(COLS), .ROWS(ROWS), .PEW(PEW)) u_size (
    .clk, .rst_n, .conf_we, .conf_col, .conf_data, .cost (size), .cost_valid (size_valid)
  );

  fu_lc #(.NI(NI), .NO(NO), .DW(DW), .COLS(COLS), .COSTW(COSTW), .FITW(FITW)) u_fu (
    .clk, .rst_n, .start (fu_start), .busy (fu_busy),
    .tt_we, .tt_addr, .tt_wdata,
    .vrc_in, .vrc_out, .size_valid, .size,
    .fit_we, .fit_value (fu_fit)
  );

endmodule
