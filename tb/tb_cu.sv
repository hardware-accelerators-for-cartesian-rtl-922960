// Testbench for cu: register writes and read-back, run gating by CTRL.run,
// counting of eval_done pulses, the evaluation limit (run drops when the
// count reaches MAX_EVALS, STATUS shows it) and clearing of the count.
module tb_cu;
  logic clk = 0, rst_n = 0;
  logic hst_we = 0;
  logic [2:0] hst_addr = 0;
  logic [31:0] hst_wdata = 0, hst_rdata;
  logic eval_done = 0, run;
  logic [23:0] num_vectors;
  int checks = 0, failures = 0;

  cu #(.KW(24)) dut (.clk, .rst_n, .hst_we, .hst_addr, .hst_wdata, .hst_rdata,
                     .eval_done, .run, .num_vectors);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, int d);
    @(negedge clk);
    hst_we = 1; hst_addr = 3'(a); hst_wdata = 32'(d);
    @(negedge clk);
    hst_we = 0;
  endtask

  task automatic expect_rd(int a, int d, string what);
    hst_addr = 3'(a);
    #1;
    checks++;
    if (hst_rdata !== 32'(d)) begin
      failures++;
      $display("FAIL %s: read %0d exp %0d", what, hst_rdata, d);
    end
  endtask

  task automatic expect_run(logic r, string what);
    checks++;
    if (run !== r) begin failures++; $display("FAIL %s: run=%b", what, run); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_run(0, "after reset");
    wr(1, 15876);
    expect_rd(1, 15876, "NUM_VECTORS");
    checks++;
    if (num_vectors !== 24'd15876) failures++;
    wr(2, 5);
    expect_rd(2, 5, "MAX_EVALS");
    wr(0, 1);
    expect_rd(0, 1, "CTRL");
    expect_run(1, "enabled");
    for (int i = 0; i < 4; i++) begin
      eval_done = 1; @(negedge clk); eval_done = 0; @(negedge clk);
    end
    expect_rd(3, 4, "EVAL_COUNT");
    expect_run(1, "below limit");
    eval_done = 1; @(negedge clk); eval_done = 0;
    expect_run(0, "limit reached");
    expect_rd(4, 2, "STATUS limit");
    wr(3, 0);
    expect_rd(3, 0, "EVAL_COUNT cleared");
    expect_run(1, "after clear");
    expect_rd(4, 1, "STATUS running");
    wr(2, 0);
    for (int i = 0; i < 20; i++) begin
      eval_done = 1; @(negedge clk);
    end
    eval_done = 0;
    expect_run(1, "no limit");
    expect_rd(3, 20, "EVAL_COUNT 20");
    wr(0, 0);
    expect_run(0, "disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
