// Testbench for phenotype_size (10 x 10 PEs, 12-bit PE fields). Random
// candidates, with a random share of wire PEs, are written column by column,
// sometimes back to back and sometimes with idle clocks between columns;
// the count reported with cost_valid is compared with the number of PEs whose
// function field is the wire code, and cost_valid must come exactly one
// clock after the last column.
module tb_phenotype_size;
  import cgp_ref_pkg::*;
  localparam int COLS = 10, ROWS = 10, PEW = 12, CW = ROWS * PEW;
  logic clk = 0, rst_n = 0;
  logic conf_we = 0;
  logic [3:0] conf_col;
  logic [CW-1:0] conf_data;
  logic [6:0] cost;
  logic cost_valid;
  int checks = 0, failures = 0;

  phenotype_size #(.COLS(COLS), .ROWS(ROWS), .PEW(PEW)) dut (
    .clk, .rst_n, .conf_we, .conf_col, .conf_data, .cost, .cost_valid);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_q[$];
  int pulses = 0;
  longint cyc = 0, last_col_cyc = -10;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && conf_we && conf_col == 4'(COLS - 1)) last_col_cyc <= cyc;
    if (rst_n && cost_valid) begin
      int e;
      pulses++;
      checks += 2;
      e = exp_q.pop_front();
      if (int'(cost) != e) begin failures++; $display("FAIL cost=%0d exp=%0d", cost, e); end
      if (last_col_cyc != cyc - 1) begin failures++; $display("FAIL cost_valid not one clock after last column"); end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 60; m++) begin
      int exp, pw;
      exp = 0;
      pw = $urandom_range(0, 100);
      for (int c = 0; c < COLS; c++) begin
        colw_t w;
        w = rand_col(ROWS, PEW);
        for (int r = 0; r < ROWS; r++) begin
          if ($urandom_range(0, 99) < pw) w[r*PEW +: 2] = 2'd0;
          else if (w[r*PEW +: 2] == 2'd0) w[r*PEW +: 2] = 2'($urandom_range(1, 3));
          if (w[r*PEW +: 2] == 2'd0) exp++;
        end
        if (c == COLS - 1) exp_q.push_back(exp);
        @(negedge clk);
        conf_we = 1; conf_col = 4'(c); conf_data = w[CW-1:0];
        if (m % 4 == 1) begin
          @(negedge clk);
          conf_we = 0;
          repeat ($urandom_range(0, 2)) @(negedge clk);
        end
      end
    end
    @(negedge clk);
    conf_we = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (pulses != 60) begin failures++; $display("FAIL %0d cost_valid pulses", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
