// Testbench for fu_sr (9 inputs, VRC latency 8). The testbench models the
// three external SRAMs (one-clock read latency) and stands in for the VRC
// with an 8-stage pipeline computing a fixed function of the nine inputs.
// Candidates with different training-set sizes are started back to back and
// with gaps; for each the fitness must equal the sum of |f(x_i) - r_i| over
// its vectors, fit_we must rise exactly num_vectors + COLS + 1 clocks after
// the start, and SRAM3 must hold f(x_i) for every vector.
module tb_fu_sr;
  localparam int NI = 9, COLS = 8, AW = 18, NV = 300;
  logic clk = 0, rst_n = 0, start = 0;
  logic [23:0] num_vectors;
  logic busy, sram1_re, sram2_re, sram3_we, fit_we;
  logic [AW-1:0] sram1_addr, sram2_addr, sram3_addr;
  logic [NI-1:0][7:0] sram1_rdata, vrc_in;
  logic [7:0] sram2_rdata, sram3_wdata, vrc_out;
  logic [31:0] fit_value;
  int checks = 0, failures = 0;

  fu_sr #(.NI(NI), .COLS(COLS), .AW(AW), .KW(24), .FITW(32)) dut (
    .clk, .rst_n, .start, .num_vectors, .busy,
    .sram1_re, .sram1_addr, .sram1_rdata, .vrc_in, .vrc_out,
    .sram2_re, .sram2_addr, .sram2_rdata, .sram3_we, .sram3_addr, .sram3_wdata,
    .fit_we, .fit_value);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NI-1:0][7:0] s1[NV];
  logic [7:0] s2[NV], s3[NV];

  function automatic logic [7:0] f(logic [NI-1:0][7:0] x);
    return 8'((int'(x[0]) + int'(x[4])) ^ int'(x[8]));
  endfunction

  always_ff @(posedge clk) begin
    if (sram1_re) sram1_rdata <= s1[sram1_addr];
    if (sram2_re) sram2_rdata <= s2[sram2_addr];
    if (sram3_we) s3[sram3_addr] <= sram3_wdata;
  end

  // stand-in VRC: COLS-stage pipeline
  logic [7:0] pipe[COLS];
  always_ff @(posedge clk) begin
    pipe[0] <= f(vrc_in);
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
      if (fit_value != 32'(exp_fit[0])) begin
        failures++;
        $display("FAIL fitness %0d exp %0d", fit_value, exp_fit[0]);
      end
      if (due.size() > 0) begin void'(due.pop_front()); void'(exp_fit.pop_front()); end
    end
  end

  initial begin
    int ks[8] = '{1, 8, 37, 300, 9, 2, 120, 16};
    foreach (s1[i]) begin
      foreach (s1[i][j]) s1[i][j] = 8'($urandom);
      s2[i] = 8'($urandom);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (ks[n]) begin
      int e;
      e = 0;
      for (int i = 0; i < ks[n]; i++) begin
        int d;
        d = int'(f(s1[i])) - int'(s2[i]);
        e += (d < 0) ? -d : d;
      end
      exp_fit.push_back(e);
      foreach (s3[i]) s3[i] = 8'hxx;
      start = 1; num_vectors = 24'(ks[n]);
      due.push_back(cyc + ks[n] + COLS + 1);
      @(negedge clk);
      start = 0;
      // back to back: next start in the clock after the last address
      while (busy) @(negedge clk);
      if (n % 2 == 1) repeat (COLS + 5) @(negedge clk);
    end
    repeat (COLS + 6) @(negedge clk);
    // SRAM3 holds the outputs of the last (largest index covered) candidate
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (s3[i] !== f(s1[i])) begin failures++; $display("FAIL SRAM3[%0d]", i); end
    end
    checks++;
    if (got != 8) begin failures++; $display("FAIL %0d results", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
