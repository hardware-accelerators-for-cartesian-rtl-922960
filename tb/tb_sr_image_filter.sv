// Workload testbench for sr_accel at its default parameters with the
// image-filter training-set size: 15876 vectors per candidate (a 126 x 126
// pixel image, 3x3 windows). Six candidates are evaluated and checked against
// the reference; consecutive candidates must follow each other every 15876
// clocks, which at 100 MHz is about 6300 evaluations per second.
module tb_sr_image_filter;
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

  sr_env #(.NBANKS(NB), .K(15876), .NEVALS(6), .BW(BW)) env (
    .*, .fu_start (dut.fu_start), .res_queued (dut.u_pmi.u_results.count > 1));

  initial begin
    #200000000;
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
