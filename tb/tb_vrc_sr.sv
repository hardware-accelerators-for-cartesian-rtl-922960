// Testbench for vrc_sr at its default size (8 x 4 CFBs, 9 inputs).
// Several random candidates are streamed back to back, each for a random
// number of vectors (at least one per column); the configuration of
// candidate m is written column by column so that column c changes in the
// clock just before the candidate's first vector reaches it. Every output is
// compared with the reference evaluation of the candidate its vector belongs
// to, COLS clocks after the vector was applied (the pipeline latency).
module tb_vrc_sr;
  import cgp_ref_pkg::*;
  localparam int COLS = 8, ROWS = 4, NI = 9, CW = ROWS * 12, NCAND = 12;
  logic clk = 0;
  logic conf_we;
  logic [2:0] conf_col;
  logic [CW-1:0] conf_data;
  logic [NI-1:0][7:0] vin;
  logic [7:0] vout;
  int checks = 0, failures = 0;

  vrc_sr #(.COLS(COLS), .ROWS(ROWS), .NI(NI)) dut (.clk, .conf_we, .conf_col, .conf_data, .vin, .vout);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  colw_t conf[NCAND][];
  int    start[NCAND + 1];
  int    total;
  logic [7:0] vecs[$][];
  int    cand_of[$];

  initial begin
    start[0] = 0;
    for (int m = 0; m < NCAND; m++) begin
      conf[m] = new[COLS];
      foreach (conf[m][c]) conf[m][c] = rand_col(ROWS, 12);
      start[m+1] = start[m] + ((m % 3 == 0) ? COLS : $urandom_range(COLS, COLS + 6));
    end
    total = start[NCAND];
    for (int g = 0; g < total; g++) begin
      logic [7:0] v[];
      v = new[NI];
      foreach (v[i]) v[i] = 8'($urandom);
      vecs.push_back(v);
      for (int m = 0; m < NCAND; m++) if (g >= start[m] && g < start[m+1]) cand_of.push_back(m);
    end

    conf_we = 0;
    for (int g = -1; g < total + COLS; g++) begin
      conf_we = 0;
      for (int m = 0; m < NCAND; m++) begin
        int c;
        c = g - (start[m] - 1);
        if (c >= 0 && c < COLS) begin
          conf_we   = 1;
          conf_col  = 3'(c);
          conf_data = conf[m][c][CW-1:0];
        end
      end
      if (g >= 0 && g < total) foreach (vin[i]) vin[i] = vecs[g][i];
      else vin = '0;
      @(posedge clk);
      #1;
      if (g - COLS + 1 >= 0 && g - COLS + 1 < total) begin
        int n;
        logic [7:0] exp;
        n = g - COLS + 1;
        exp = sr_eval(conf[cand_of[n]], ROWS, NI, vecs[n]);
        checks++;
        if (vout !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL vector %0d cand %0d out=%0d exp=%0d", n, cand_of[n], vout, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
