// Testbench for vrc_lc at its default size (10 x 10 PEs, 9 inputs, 9
// outputs, dw = 4, L-back 2). Random candidates stream back to back with
// column-wise reconfiguration timed to the data wave; each of the DW bit
// lanes of every output is compared, COLS clocks after its inputs were
// applied, with a scalar one-vector-at-a-time reference evaluation. The
// testbench also counts how many PE inputs of the candidates read the
// column two back (the L-back 2 connections) and fails if none did.
module tb_vrc_lc;
  import cgp_ref_pkg::*;
  localparam int NI = 9, NO = 9, COLS = 10, ROWS = 10, DW = 4, LBACK = 2;
  localparam int SELW = $clog2(NI + LBACK * ROWS), PEW = 2 * SELW + 2, CW = ROWS * PEW;
  localparam int NCAND = 10;
  logic clk = 0;
  logic conf_we;
  logic [3:0] conf_col;
  logic [CW-1:0] conf_data;
  logic [NI-1:0][DW-1:0] vin;
  logic [NO-1:0][DW-1:0] vout;
  int checks = 0, failures = 0, lback2_refs = 0;

  vrc_lc #(.NI(NI), .NO(NO), .COLS(COLS), .ROWS(ROWS), .DW(DW), .LBACK(LBACK)) dut (
    .clk, .conf_we, .conf_col, .conf_data, .vin, .vout);

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
  logic [NI-1:0][DW-1:0] vecs[$];
  int    cand_of[$];

  initial begin
    start[0] = 0;
    for (int m = 0; m < NCAND; m++) begin
      conf[m] = new[COLS];
      foreach (conf[m][c]) begin
        conf[m][c] = rand_col(ROWS, PEW);
        for (int r = 0; r < ROWS; r++)
          for (int k = 0; k < 2; k++) begin
            int s;
            s = int'(conf[m][c][r*PEW + 2 + k*SELW +: SELW]);
            if (c >= 2 && s >= NI + ROWS && s < NI + 2 * ROWS) lback2_refs++;
          end
      end
      start[m+1] = start[m] + ((m % 3 == 0) ? COLS : $urandom_range(COLS, COLS + 6));
    end
    total = start[NCAND];
    for (int g = 0; g < total; g++) begin
      logic [NI-1:0][DW-1:0] v;
      foreach (v[i]) v[i] = DW'($urandom);
      vecs.push_back(v);
      for (int m = 0; m < NCAND; m++) if (g >= start[m] && g < start[m+1]) cand_of.push_back(m);
    end

    for (int g = -1; g < total + COLS; g++) begin
      conf_we = 0;
      for (int m = 0; m < NCAND; m++) begin
        int c;
        c = g - (start[m] - 1);
        if (c >= 0 && c < COLS) begin
          conf_we   = 1;
          conf_col  = 4'(c);
          conf_data = conf[m][c][CW-1:0];
        end
      end
      vin = (g >= 0 && g < total) ? vecs[g] : '0;
      @(posedge clk);
      #1;
      if (g - COLS + 1 >= 0 && g - COLS + 1 < total) begin
        int n;
        n = g - COLS + 1;
        for (int k = 0; k < DW; k++) begin
          logic [63:0] v, e;
          v = 0;
          for (int j = 0; j < NI; j++) v[j] = vecs[n][j][k];
          e = lc_eval(conf[cand_of[n]], ROWS, NI, NO, LBACK, SELW, v);
          for (int o = 0; o < NO; o++) begin
            checks++;
            if (vout[o][k] !== e[o]) begin
              failures++;
              if (failures < 10) $display("FAIL vec %0d lane %0d out %0d got %b exp %b", n, k, o, vout[o][k], e[o]);
            end
          end
        end
      end
    end
    checks++;
    if (lback2_refs == 0) failures++;
    $display("L-back 2 references exercised: %0d", lback2_refs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
