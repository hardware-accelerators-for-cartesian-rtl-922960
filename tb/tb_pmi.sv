// Testbench for pmi (4 banks, 8 columns). The testbench models the
// population memory (validity bits and one-clock reads), a fitness unit that
// answers each fu_start after num_cycles + 9 clocks with a checksum of the
// column words the PMI wrote into the VRC for that candidate, and a
// processor that serves irq after a random delay, checks that fit_value is
// the checksum of the bank named by fit_bank, acknowledges, writes a new
// candidate into that bank and sets its validity bit.
// Checked: columns written 0..NCOLS-1 on consecutive clocks, column 0 in the
// clock of fu_start; only valid banks taken; starts spaced by exactly
// max(num_cycles, NCOLS) when banks are ready (back-to-back streaming
// observed); several results queued behind one irq observed; no start while
// run is low; every result delivered once.
module tb_pmi;
  localparam int NB = 4, NC = 8, CW = 48, FITW = 32;
  logic clk = 0, rst_n = 0, run = 0;
  logic [23:0] num_cycles;
  logic [NB-1:0] bank_valid;
  logic clr_valid, rd_en, conf_we, fu_start, fit_we = 0, irq, irqack = 0, eval_done;
  logic [1:0] clr_bank, rd_bank, fit_bank;
  logic [2:0] rd_col, conf_col;
  logic [CW-1:0] rd_data, conf_data;
  logic [FITW-1:0] fit_in, fit_value;
  int checks = 0, failures = 0;

  pmi #(.NBANKS(NB), .NCOLS(NC), .CW(CW), .FITW(FITW), .KW(24)) dut (
    .clk, .rst_n, .run, .num_cycles, .bank_valid, .clr_valid, .clr_bank, .rd_en, .rd_bank,
    .rd_col, .rd_data, .conf_we, .conf_col, .conf_data, .fu_start, .fit_we, .fit_in,
    .irq, .fit_value, .fit_bank, .irqack, .eval_done);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- population memory model ----
  logic [CW-1:0] mem[NB][NC];
  always_ff @(posedge clk) if (rd_en) rd_data <= mem[rd_bank][rd_col];

  function automatic logic [31:0] csum(logic [CW-1:0] w[NC]);
    logic [31:0] s = 0;
    for (int c = 0; c < NC; c++) s = (s * 31) ^ 32'(w[c]) ^ 32'(w[c] >> 32) ^ 32'(c);
    return s;
  endfunction

  // ---- monitor of the configuration stream and fake fitness unit ----
  longint cyc = 0, last_start = -1;
  int expect_col = -1;
  logic [CW-1:0] cur_cols[NC];
  logic [31:0] pend_sum[$];
  longint pend_due[$];
  int starts = 0, back_to_back = 0, queued_irq = 0, results = 0, starts_while_stopped = 0;
  int res_waiting = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (clr_valid) begin
        checks++;
        if (!bank_valid[clr_bank]) begin failures++; $display("FAIL took invalid bank"); end
        if (!run) starts_while_stopped++;
      end
      if (fu_start) begin
        starts++;
        checks++;
        if (!(conf_we && conf_col == 0)) begin failures++; $display("FAIL col 0 not with fu_start"); end
        if (last_start >= 0) begin
          int sp;
          sp = (int'(num_cycles) > NC) ? int'(num_cycles) : NC;
          checks++;
          if (cyc - last_start < sp) begin failures++; $display("FAIL starts %0d apart", cyc - last_start); end
          if (cyc - last_start == sp) back_to_back++;
        end
        last_start = cyc;
        expect_col = 0;
      end
      if (conf_we) begin
        checks++;
        if (int'(conf_col) != expect_col) begin
          failures++;
          $display("FAIL conf col %0d exp %0d", conf_col, expect_col);
        end
        cur_cols[conf_col] = conf_data;
        if (expect_col == NC - 1) begin
          pend_sum.push_back(csum(cur_cols));
          pend_due.push_back(last_start + longint'(num_cycles) + 9);
          expect_col = -1;
        end else expect_col++;
      end else if (expect_col > 0) begin
        failures++;
        $display("FAIL column stream interrupted");
        expect_col = -1;
      end
    end
  end

  always @(negedge clk) begin
    fit_we = 0;
    if (pend_due.size() > 0 && cyc >= pend_due[0]) begin
      void'(pend_due.pop_front());
      fit_in = pend_sum.pop_front();
      fit_we = 1;
    end
  end

  // ---- processor model ----
  logic [CW-1:0] shadow[NB][NC];
  task automatic new_candidate(int b);
    for (int c = 0; c < NC; c++) begin
      mem[b][c] = {$urandom, $urandom};
      shadow[b][c] = mem[b][c];
    end
  endtask

  always @(posedge clk) begin
    if (!rst_n) bank_valid <= '0;
    else if (clr_valid) bank_valid[clr_bank] <= 1'b0;
  end

  initial begin
    num_cycles = 24'd12;
    for (int b = 0; b < NB; b++) new_candidate(b);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    bank_valid = '1;
    repeat (20) @(negedge clk);
    checks++;
    if (starts != 0) begin failures++; $display("FAIL started while run low"); end
    run = 1;
    for (int n = 0; n < 150; n++) begin
      int b;
      if (n == 60) num_cycles = 24'd5;      // shorter than the column count
      if (n == 100) num_cycles = 24'd30;
      while (!irq) @(negedge clk);
      if (n % 3 == 0) repeat ($urandom_range(0, 40)) @(negedge clk);
      if (dut.u_results.count > 1) queued_irq++;
      b = int'(fit_bank);
      checks++;
      if (fit_value !== csum(shadow[b])) begin
        failures++;
        $display("FAIL result %0d bank %0d fitness %h exp %h", n, b, fit_value, csum(shadow[b]));
      end
      results++;
      irqack = 1;
      @(negedge clk);
      irqack = 0;
      new_candidate(b);
      @(posedge clk);
      bank_valid[b] <= 1'b1;
      @(negedge clk);
    end
    run = 0;
    repeat (100) @(negedge clk);
    while (irq) begin irqack = 1; @(negedge clk); irqack = 0; results++; end
    checks += 4;
    if (back_to_back == 0) begin failures++; $display("FAIL no back-to-back starts"); end
    if (queued_irq == 0) begin failures++; $display("FAIL never queued results"); end
    if (starts_while_stopped != 0) failures++;
    if (results != starts) begin failures++; $display("FAIL %0d starts %0d results", starts, results); end
    $display("starts=%0d back_to_back=%0d queued=%0d", starts, back_to_back, queued_irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
