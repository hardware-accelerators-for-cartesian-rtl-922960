// Environment for the symbolic-regression accelerator: everything around
// it, for tb_sr_accel and tb_cgp_top.
//
// Models the three external SRAMs (one-clock reads), the host (register
// writes: training-set size, evaluation limit, run) and the processor, which
// runs a simple hill climber: it fills every bank with a random candidate,
// and on each irq checks the reported fitness against a reference
// evaluation of that bank's candidate over the training set, acknowledges,
// keeps the best candidate and writes a mutant of it (MUTB random bits
// inverted) into the bank, then sets the bank's validity bit. The training
// target is r = max(x0..x8) - saturated - min(...), an edge-like filter.
// Counts and checks the mechanisms: back-to-back candidates (starts spaced
// by exactly the training-set size), several results queued behind one
// irq, stop at the evaluation limit with every started candidate reported,
// and that the search improves at least once.
module sr_env #(
  parameter int NBANKS = 8,
  parameter int K      = 24,
  parameter int NEVALS = 40,
  parameter int MUTB   = 6,
  parameter int BW     = 3,
  localparam int COLS = 8, ROWS = 4, NI = 9, CW = ROWS * 12, AW = 18
) (
  input  logic              clk,
  output logic              rst_n,
  output logic              hst_we,
  output logic [2:0]        hst_addr,
  output logic [31:0]       hst_wdata,
  input  logic [31:0]       hst_rdata,
  output logic              pop_wr_en,
  output logic [BW-1:0]     pop_wr_bank,
  output logic [2:0]        pop_wr_col,
  output logic [CW-1:0]     pop_wr_data,
  output logic              pop_set_valid,
  output logic [BW-1:0]     pop_set_bank,
  input  logic [NBANKS-1:0] bank_valid,
  input  logic              irq,
  input  logic [31:0]       fit_value,
  input  logic [BW-1:0]     fit_bank,
  output logic              irqack,
  input  logic              sram1_re,
  input  logic [AW-1:0]     sram1_addr,
  output logic [NI-1:0][7:0] sram1_rdata,
  input  logic              sram2_re,
  input  logic [AW-1:0]     sram2_addr,
  output logic [7:0]        sram2_rdata,
  input  logic              sram3_we,
  input  logic [AW-1:0]     sram3_addr,
  input  logic [7:0]        sram3_wdata,
  // probe: the PMI's start pulse and result-queue occupancy
  input  logic              fu_start,
  input  logic              res_queued,
  output int                checks,
  output int                failures,
  output logic              done
);
  import cgp_ref_pkg::*;

  logic [7:0] s1[K][NI];
  logic [NI-1:0][7:0] s1w[K];
  logic [7:0] s2[K], s3[K];

  always_ff @(posedge clk) begin
    if (sram1_re) sram1_rdata <= s1w[sram1_addr];
    if (sram2_re) sram2_rdata <= s2[sram2_addr];
    if (sram3_we) s3[sram3_addr] <= sram3_wdata;
  end

  colw_t cand[NBANKS][];
  colw_t best[];
  int    best_fit;

  function automatic int ref_fitness(colw_t c[]);
    int e = 0;
    for (int i = 0; i < K; i++) begin
      logic [7:0] v[];
      int d;
      v = new[NI];
      foreach (v[j]) v[j] = s1[i][j];
      d = int'(sr_eval(c, ROWS, NI, v)) - int'(s2[i]);
      e += (d < 0) ? -d : d;
    end
    return e;
  endfunction

  task automatic write_bank(int b, colw_t c[]);
    cand[b] = c;
    for (int col = 0; col < COLS; col++) begin
      @(negedge clk);
      pop_wr_en = 1; pop_wr_bank = BW'(b); pop_wr_col = 3'(col); pop_wr_data = c[col][CW-1:0];
    end
    @(negedge clk);
    pop_wr_en = 0;
    pop_set_valid = 1; pop_set_bank = BW'(b);
    @(negedge clk);
    pop_set_valid = 0;
  endtask

  task automatic host_wr(int a, int d);
    @(negedge clk);
    hst_we = 1; hst_addr = 3'(a); hst_wdata = 32'(d);
    @(negedge clk);
    hst_we = 0;
  endtask

  // mechanism counters
  longint cyc = 0, last_start = -1;
  int starts = 0, back_to_back = 0, queued = 0, results = 0, improved = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && fu_start) begin
      starts++;
      if (last_start >= 0 && cyc - last_start == K) back_to_back++;
      last_start = cyc;
    end
  end

  initial begin
    checks = 0; failures = 0; done = 0;
    rst_n = 0; hst_we = 0; pop_wr_en = 0; pop_set_valid = 0; irqack = 0;
    hst_addr = 0; hst_wdata = 0; pop_wr_bank = 0; pop_wr_col = 0; pop_wr_data = 0; pop_set_bank = 0;
    for (int i = 0; i < K; i++) begin
      int mx, mn;
      mx = 0; mn = 255;
      for (int j = 0; j < NI; j++) begin
        s1[i][j] = 8'($urandom);
        s1w[i][j] = s1[i][j];
        if (int'(s1[i][j]) > mx) mx = int'(s1[i][j]);
        if (int'(s1[i][j]) < mn) mn = int'(s1[i][j]);
      end
      s2[i] = 8'(mx - mn);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    host_wr(1, K);
    host_wr(2, NEVALS);
    best = new[COLS];
    foreach (best[c]) best[c] = rand_col(ROWS, 12);
    best_fit = 1 << 30;
    for (int b = 0; b < NBANKS; b++) begin
      colw_t c[];
      c = new[COLS];
      foreach (c[i]) c[i] = rand_col(ROWS, 12);
      write_bank(b, c);
    end
    host_wr(0, 1);
    while (results < NEVALS) begin
      int b, e;
      colw_t m[];
      while (!irq) @(negedge clk);
      if (results % 4 == 0) repeat (3 * K) @(negedge clk);   // a slow service routine now and then
      if (res_queued) queued++;
      b = int'(fit_bank);
      e = ref_fitness(cand[b]);
      checks++;
      if (fit_value != 32'(e)) begin
        failures++;
        $display("SR FAIL result %0d bank %0d fitness %0d exp %0d", results, b, fit_value, e);
      end
      results++;
      irqack = 1;
      @(negedge clk);
      irqack = 0;
      if (e <= best_fit) begin
        if (e < best_fit) improved++;
        best_fit = e;
        best = cand[b];
      end
      m = new[COLS];
      foreach (m[i]) m[i] = best[i];
      for (int i = 0; i < MUTB; i++) begin
        int p;
        p = $urandom_range(0, COLS * CW - 1);
        m[p / CW][p % CW] = ~m[p / CW][p % CW];
      end
      write_bank(b, m);
    end
    // the limit stops new candidates; candidates already started finish
    repeat (4 * K + 40) @(negedge clk);
    while (irq) begin
      int b, e;
      b = int'(fit_bank);
      e = ref_fitness(cand[b]);
      checks++;
      if (fit_value != 32'(e)) begin failures++; $display("SR FAIL late result bank %0d", b); end
      results++;
      irqack = 1;
      @(negedge clk);
      irqack = 0;
      repeat (4 * K + 40) @(negedge clk);
    end
    hst_addr = 3'd3;
    #1;
    checks++;
    if (hst_rdata != 32'(results)) begin failures++; $display("SR FAIL EVAL_COUNT %0d", hst_rdata); end
    hst_addr = 3'd4;
    #1;
    checks++;
    if (hst_rdata[1] !== 1'b1) begin failures++; $display("SR FAIL limit not flagged"); end
    checks += 4;
    if (back_to_back == 0) begin failures++; $display("SR FAIL no back-to-back candidates"); end
    if (queued == 0)       begin failures++; $display("SR FAIL no queued results"); end
    if (starts != results || results < NEVALS || results >= NEVALS + NBANKS) begin
      failures++;
      $display("SR FAIL %0d starts, %0d results, limit %0d", starts, results, NEVALS);
    end
    if (improved == 0)     begin failures++; $display("SR FAIL search never improved"); end
    $display("SR: evaluations=%0d back_to_back=%0d queued_irq=%0d improvements=%0d best_fitness=%0d",
             results, back_to_back, queued, improved, best_fit);
    done = 1;
  end
endmodule
