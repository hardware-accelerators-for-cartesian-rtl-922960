// Environment for the logic-circuit accelerator: everything around it, for
// tb_lc_accel and tb_cgp_top.
//
// The host loads the truth table of a multiplier (by default 4 x 5 bits: 9
// inputs, 9 outputs, the product of inputs 0..ABITS-1 and the remaining
// inputs, low NO bits) and sets an evaluation
// limit and run. The processor model runs a hill climber as in the
// multiplier experiments: random candidates in every bank at first, then on
// each irq it checks the reported fitness against a reference evaluation
// (all 2^NI input vectors simulated one at a time: correct output bits in
// bits 31..8, number of wire PEs in bits 7..0), acknowledges, keeps the best
// candidate and writes a mutant of it (MUTB bits inverted) into the bank.
// Counts and checks the mechanisms: back-to-back candidates (starts spaced
// by exactly ceil(2^NI/DW) clocks), results queued behind one irq, non-zero phenotype
// size, L-back 2 connections in use (when LBACK = 2), stop at the
// evaluation limit.
module lc_env #(
  parameter int NBANKS = 8,
  parameter int NEVALS = 24,
  parameter int MUTB   = 8,
  parameter int BW     = 3,
  parameter int NI     = 9,
  parameter int NO     = 9,
  parameter int COLS   = 10,
  parameter int ROWS   = 10,
  parameter int DW     = 4,
  parameter int LBACK  = 2,
  parameter int ABITS  = 4,
  localparam int SELW = $clog2(NI + LBACK * ROWS), PEW = 2 * SELW + 2, CW = ROWS * PEW,
  localparam int NVEC = 1 << NI, NCYC = (NVEC + DW - 1) / DW,
  localparam int TAW = (NCYC > 1) ? $clog2(NCYC) : 1,
  localparam int CLW = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int SPACING = (NCYC > COLS) ? NCYC : COLS
) (
  input  logic              clk,
  output logic              rst_n,
  output logic              hst_we,
  output logic [2:0]        hst_addr,
  output logic [31:0]       hst_wdata,
  input  logic [31:0]       hst_rdata,
  output logic              tt_we,
  output logic [TAW-1:0]    tt_addr,
  output logic [NO*DW-1:0]  tt_wdata,
  output logic              pop_wr_en,
  output logic [BW-1:0]     pop_wr_bank,
  output logic [CLW-1:0]    pop_wr_col,
  output logic [CW-1:0]     pop_wr_data,
  output logic              pop_set_valid,
  output logic [BW-1:0]     pop_set_bank,
  input  logic [NBANKS-1:0] bank_valid,
  input  logic              irq,
  input  logic [31:0]       fit_value,
  input  logic [BW-1:0]     fit_bank,
  output logic              irqack,
  // probe: the PMI's start pulse and result-queue occupancy
  input  logic              fu_start,
  input  logic              res_queued,
  output int                checks,
  output int                failures,
  output logic              done
);
  import cgp_ref_pkg::*;

  // multiplier: inputs 0..ABITS-1 times inputs ABITS..NI-1, NO product bits
  function automatic logic [63:0] target(int v);
    return 64'(((v & ((1 << ABITS) - 1)) * (v >> ABITS)) & ((1 << NO) - 1));
  endfunction

  colw_t cand[NBANKS][];
  colw_t best[];
  int    best_fit;

  function automatic int ref_fitness(colw_t c[]);
    int ok = 0, wires = 0;
    for (int v = 0; v < NVEC; v++) begin
      logic [63:0] y;
      y = lc_eval(c, ROWS, NI, NO, LBACK, SELW, 64'(v));
      ok += NO - popcount64(y ^ target(v));
    end
    foreach (c[col])
      for (int r = 0; r < ROWS; r++) if (c[col][r*PEW +: 2] == 2'd0) wires++;
    return (ok << 8) | wires;
  endfunction

  function automatic int lback2_uses(colw_t c[]);
    int n = 0;
    if (LBACK < 2) return 0;
    for (int col = 2; col < COLS; col++)
      for (int r = 0; r < ROWS; r++)
        for (int k = 0; k < 2; k++) begin
          int s;
          s = int'(c[col][r*PEW + 2 + k*SELW +: SELW]);
          if (s >= NI + ROWS && s < NI + 2 * ROWS) n++;
        end
    return n;
  endfunction

  task automatic write_bank(int b, colw_t c[]);
    cand[b] = c;
    for (int col = 0; col < COLS; col++) begin
      @(negedge clk);
      pop_wr_en = 1; pop_wr_bank = BW'(b); pop_wr_col = CLW'(col); pop_wr_data = c[col][CW-1:0];
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

  longint cyc = 0, last_start = -1;
  int starts = 0, back_to_back = 0, queued = 0, results = 0, improved = 0;
  int wires_seen = 0, lb2 = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && fu_start) begin
      starts++;
      if (last_start >= 0 && cyc - last_start == SPACING) back_to_back++;
      last_start = cyc;
    end
  end

  task automatic serve(bit mutate);
    int b, e;
    colw_t m[];
    b = int'(fit_bank);
    e = ref_fitness(cand[b]);
    checks++;
    if (fit_value != 32'(e)) begin
      failures++;
      $display("LC FAIL result %0d bank %0d fitness %h exp %h", results, b, fit_value, e);
    end
    if ((e & 255) != 0) wires_seen++;
    lb2 += lback2_uses(cand[b]);
    results++;
    irqack = 1;
    @(negedge clk);
    irqack = 0;
    if (!mutate) return;
    if (e >= best_fit) begin
      if (e > best_fit) improved++;
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
  endtask

  initial begin
    checks = 0; failures = 0; done = 0;
    rst_n = 0; hst_we = 0; pop_wr_en = 0; pop_set_valid = 0; irqack = 0; tt_we = 0;
    hst_addr = 0; hst_wdata = 0; pop_wr_bank = 0; pop_wr_col = 0; pop_wr_data = 0; pop_set_bank = 0;
    tt_addr = 0; tt_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < NCYC; w++) begin
      @(negedge clk);
      tt_we = 1;
      tt_addr = TAW'(w);
      for (int k = 0; k < DW; k++)
        for (int o = 0; o < NO; o++) tt_wdata[o*DW + k] = (w*DW + k < NVEC) ? target(w*DW + k)[o] : 1'b0;
    end
    @(negedge clk);
    tt_we = 0;
    host_wr(2, NEVALS);
    best = new[COLS];
    best_fit = -1;
    for (int b = 0; b < NBANKS; b++) begin
      colw_t c[];
      c = new[COLS];
      foreach (c[i]) c[i] = rand_col(ROWS, PEW);
      write_bank(b, c);
    end
    host_wr(0, 1);
    while (results < NEVALS) begin
      while (!irq) @(negedge clk);
      if (results % 4 == 0) repeat (3 * SPACING + 30) @(negedge clk);   // a slow service routine now and then
      if (res_queued) queued++;
      serve(1);
    end
    repeat (6 * SPACING + 60) @(negedge clk);
    while (irq) begin
      serve(0);
      repeat (6 * SPACING + 60) @(negedge clk);
    end
    hst_addr = 3'd3;
    #1;
    checks++;
    if (hst_rdata != 32'(results)) begin failures++; $display("LC FAIL EVAL_COUNT %0d", hst_rdata); end
    checks += 6;
    if (back_to_back == 0) begin failures++; $display("LC FAIL no back-to-back candidates"); end
    if (queued == 0)       begin failures++; $display("LC FAIL no queued results"); end
    if (wires_seen == 0)   begin failures++; $display("LC FAIL phenotype size never non-zero"); end
    if (LBACK >= 2 && lb2 == 0) begin failures++; $display("LC FAIL no L-back 2 connections"); end
    if (improved == 0)     begin failures++; $display("LC FAIL search never improved"); end
    if (starts != results || results < NEVALS || results >= NEVALS + NBANKS) begin
      failures++;
      $display("LC FAIL %0d starts, %0d results, limit %0d", starts, results, NEVALS);
    end
    $display("LC: evaluations=%0d back_to_back=%0d queued_irq=%0d wire_results=%0d lback2=%0d improvements=%0d best=%0d/%0d bits, %0d wires",
             results, back_to_back, queued, wires_seen, lb2, improved, best_fit >> 8, NVEC * NO, best_fit & 255);
    done = 1;
  end
endmodule
