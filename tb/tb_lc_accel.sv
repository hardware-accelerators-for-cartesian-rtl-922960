// End-to-end testbench of lc_accel at its default parameters (8 banks,
// 10 x 10 PEs, 9 inputs, 9 outputs, dw = 4, L-back 2): evolution of a
// 4 x 5-bit multiplier by the hill-climbing processor model in lc_env, with
// every reported fitness checked against a reference simulation.
module tb_lc_accel;
  localparam int NB = 8, BW = 3;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, hst_we, tt_we, pop_wr_en, pop_set_valid, irq, irqack;
  logic [2:0] hst_addr;
  logic [3:0] pop_wr_col;
  logic [6:0] tt_addr;
  logic [35:0] tt_wdata;
  logic [31:0] hst_wdata, hst_rdata, fit_value;
  logic [BW-1:0] pop_wr_bank, pop_set_bank, fit_bank;
  logic [119:0] pop_wr_data;
  logic [NB-1:0] bank_valid;
  int checks, failures;
  logic done;

  lc_accel dut (.*);

  lc_env #(.NBANKS(NB), .NEVALS(24), .BW(BW)) env (
    .*, .fu_start (dut.fu_start), .res_queued (dut.u_pmi.u_results.count > 1));

  initial begin
    #50000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
