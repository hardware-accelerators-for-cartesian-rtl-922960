// One logic-circuit workload: an lc_accel of the given size driven by lc_env
// (multiplier target, hill-climbing processor model, reference-checked
// fitness). Used by tb_lc_workloads to run the configurations of the
// multiplier experiments and of the data-width study.
module lc_workload #(
  parameter int NI = 9,
  parameter int NO = 9,
  parameter int COLS = 10,
  parameter int ROWS = 10,
  parameter int DW = 4,
  parameter int LBACK = 2,
  parameter int ABITS = 4,
  parameter int NEVALS = 12
) (
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int NB = 8, BW = 3;
  localparam int SELW = $clog2(NI + LBACK * ROWS), PEW = 2 * SELW + 2, CW = ROWS * PEW;
  localparam int NCYC = ((1 << NI) + DW - 1) / DW;
  localparam int TAW = (NCYC > 1) ? $clog2(NCYC) : 1;
  localparam int CLW = (COLS > 1) ? $clog2(COLS) : 1;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, hst_we, tt_we, pop_wr_en, pop_set_valid, irq, irqack;
  logic [2:0] hst_addr;
  logic [CLW-1:0] pop_wr_col;
  logic [TAW-1:0] tt_addr;
  logic [NO*DW-1:0] tt_wdata;
  logic [31:0] hst_wdata, hst_rdata, fit_value;
  logic [BW-1:0] pop_wr_bank, pop_set_bank, fit_bank;
  logic [CW-1:0] pop_wr_data;
  logic [NB-1:0] bank_valid;

  lc_accel #(.NBANKS(NB), .NI(NI), .NO(NO), .COLS(COLS), .ROWS(ROWS), .DW(DW), .LBACK(LBACK)) dut (.*);

  lc_env #(.NBANKS(NB), .NEVALS(NEVALS), .BW(BW), .NI(NI), .NO(NO), .COLS(COLS), .ROWS(ROWS),
           .DW(DW), .LBACK(LBACK), .ABITS(ABITS)) env (
    .*, .fu_start (dut.fu_start), .res_queued (dut.u_pmi.u_results.count > 1));
endmodule
