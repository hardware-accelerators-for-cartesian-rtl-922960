// End-to-end testbench of sr_accel at its default parameters (8 banks,
// 8 x 4 CFBs): host set-up, hill-climbing processor model, SRAM models and
// the checks described in sr_env, over 40 evaluations of a 24-vector
// training set.
module tb_sr_accel;
  localparam int NB = 8, BW = 3;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, hst_we, pop_wr_en, pop_set_valid, irq, irqack;
  logic [2:0] hst_addr, pop_wr_col;
  logic [31:0] hst_wdata, hst_rdata, fit_value;
  logic [BW-1:0] pop_wr_bank, pop_set_bank, fit_bank;
  logic [47:0] pop_wr_data;
  logic [NB-1:0] bank_valid;
  logic sram1_re, sram2_re, sram3_we;
  logic [17:0] sram1_addr, sram2_addr, sram3_addr;
  logic [8:0][7:0] sram1_rdata;
  logic [7:0] sram2_rdata, sram3_wdata;
  int checks, failures;
  logic done;

  sr_accel dut (.*);

  sr_env #(.NBANKS(NB), .K(24), .NEVALS(40), .BW(BW)) env (
    .*, .fu_start (dut.fu_start), .res_queued (dut.u_pmi.u_results.count > 1));

  initial begin
    #20000000;
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
