// Test harness for fu_lc, used by tb_fu_lc at two sizes.
//
// Loads a truth table, stands in for the VRC with a COLS-stage bit-parallel
// pipeline computing a fixed Boolean function per output (parity of a
// mask of the inputs), and supplies a phenotype size per candidate a few
// clocks after each start, as the size unit would. For each of NCAND
// candidates, started back to back or with gaps, the fitness must be
// {number of correct output bits over the 2^NI vectors, size}, and fit_we
// must rise exactly NCYC + COLS + 1 clocks after the start. The truth table
// is rewritten between candidates (a different target each time). Reports
// its counts through checks/failures and raises done.
module fu_lc_harness #(
  parameter int NI = 9,
  parameter int NO = 9,
  parameter int DW = 4,
  parameter int COLS = 10,
  parameter int NCAND = 6
) (
  output int  checks,
  output int  failures,
  output logic done
);
  localparam int NVEC = 1 << NI;
  localparam int NCYC = (NVEC + DW - 1) / DW;
  localparam int TAW = (NCYC > 1) ? $clog2(NCYC) : 1;
  localparam int COSTW = 7;

  logic clk = 0, rst_n = 0, start = 0, busy, tt_we = 0, size_valid = 0, fit_we;
  logic [TAW-1:0] tt_addr;
  logic [NO*DW-1:0] tt_wdata;
  logic [NI-1:0][DW-1:0] vrc_in;
  logic [NO-1:0][DW-1:0] vrc_out;
  logic [COSTW-1:0] size;
  logic [31:0] fit_value;

  fu_lc #(.NI(NI), .NO(NO), .DW(DW), .COLS(COLS), .COSTW(COSTW), .FITW(32)) dut (
    .clk, .rst_n, .start, .busy, .tt_we, .tt_addr, .tt_wdata, .vrc_in, .vrc_out,
    .size_valid, .size, .fit_we, .fit_value);

  always #5 clk = ~clk;

  logic [NI-1:0] mask[NO];
  function automatic logic g(int v, int o);
    return ^(NI'(v) & mask[o]);
  endfunction

  // stand-in VRC
  logic [NO-1:0][DW-1:0] pipe[COLS];
  always_ff @(posedge clk) begin
    for (int k = 0; k < DW; k++)
      for (int o = 0; o < NO; o++) begin
        logic [NI-1:0] x;
        for (int j = 0; j < NI; j++) x[j] = vrc_in[j][k];
        pipe[0][o][k] <= ^(x & mask[o]);
      end
    for (int i = 1; i < COLS; i++) pipe[i] <= pipe[i-1];
  end
  assign vrc_out = pipe[COLS-1];

  longint cyc = 0;
  longint due[$];
  int exp_fit[$];
  int got = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && fit_we) begin
      checks += 2;
      got++;
      if (due.size() == 0 || cyc != due[0]) begin failures++; $display("FAIL fit_we at %0d", cyc); end
      if (exp_fit.size() == 0 || fit_value != 32'(exp_fit[0])) begin
        failures++;
        $display("FAIL fitness %h exp %h", fit_value, exp_fit[0]);
      end
      if (due.size() > 0) begin void'(due.pop_front()); void'(exp_fit.pop_front()); end
    end
  end

  logic req[NVEC][NO];

  initial begin
    checks = 0;
    failures = 0;
    done = 0;
    foreach (mask[o]) mask[o] = NI'($urandom) | NI'(1);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NCAND; n++) begin
      int ok, sz, pflip;
      // new target: the stand-in's function with a share of bits flipped
      // (all correct for candidate 0)
      pflip = (n == 0) ? 0 : $urandom_range(1, 60);
      ok = 0;
      for (int v = 0; v < NVEC; v++)
        for (int o = 0; o < NO; o++) begin
          req[v][o] = g(v, o) ^ ($urandom_range(0, 99) < pflip);
          if (req[v][o] == g(v, o)) ok++;
        end
      // wait until the previous candidate has finished with the table
      while (due.size() > 0) @(negedge clk);
      for (int w = 0; w < NCYC; w++) begin
        tt_we = 1;
        tt_addr = TAW'(w);
        for (int k = 0; k < DW; k++)
          for (int o = 0; o < NO; o++)
            tt_wdata[o*DW + k] = (w*DW + k < NVEC) ? req[w*DW + k][o] : 1'($urandom);
        @(negedge clk);
      end
      tt_we = 0;
      sz = $urandom_range(0, 100);
      exp_fit.push_back((ok << 8) | sz);
      start = 1;
      due.push_back(cyc + NCYC + COLS + 1);
      @(negedge clk);
      start = 0;
      repeat (COLS) @(negedge clk);
      size = COSTW'(sz);
      size_valid = 1;
      @(negedge clk);
      size_valid = 0;
    end
    while (due.size() > 0) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (got != NCAND) begin failures++; $display("FAIL %0d results", got); end
    done = 1;
  end
endmodule
