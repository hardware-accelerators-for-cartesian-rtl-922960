// Testbench for population_memory (8 banks x 8 column words of 48 bits).
// Fills all banks with random words, reads them back in random order and
// checks the one-clock read latency; then exercises the validity bits: set,
// clear, and set winning over clear on the same bank, against a model.
module tb_population_memory;
  localparam int NB = 8, NC = 8, W = 48;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, set_valid = 0, rd_en = 0, clr_valid = 0;
  logic [2:0] wr_bank, set_bank, rd_bank, clr_bank, wr_col, rd_col;
  logic [W-1:0] wr_data, rd_data;
  logic [NB-1:0] valid;
  logic [W-1:0] model[NB][NC];
  logic [NB-1:0] vmodel;
  int checks = 0, failures = 0;

  population_memory #(.NBANKS(NB), .NCOLS(NC), .W(W)) dut (
    .clk, .rst_n, .wr_en, .wr_bank, .wr_col, .wr_data, .set_valid, .set_bank,
    .rd_en, .rd_bank, .rd_col, .rd_data, .clr_valid, .clr_bank, .valid);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (valid !== '0) failures++;
    for (int b = 0; b < NB; b++)
      for (int c = 0; c < NC; c++) begin
        model[b][c] = {$urandom, $urandom};
        wr_en = 1; wr_bank = 3'(b); wr_col = 3'(c); wr_data = model[b][c];
        @(negedge clk);
      end
    wr_en = 0;
    for (int t = 0; t < 200; t++) begin
      int b, c;
      b = $urandom_range(0, NB - 1);
      c = $urandom_range(0, NC - 1);
      rd_en = 1; rd_bank = 3'(b); rd_col = 3'(c);
      @(posedge clk); #1;
      rd_en = 0;
      checks++;
      if (rd_data !== model[b][c]) begin
        failures++;
        $display("FAIL read bank %0d col %0d", b, c);
      end
      @(negedge clk);
    end
    vmodel = '0;
    for (int t = 0; t < 300; t++) begin
      set_valid = 1'($urandom_range(0, 1));
      clr_valid = 1'($urandom_range(0, 1));
      set_bank  = 3'($urandom_range(0, NB - 1));
      clr_bank  = (t % 7 == 0) ? set_bank : 3'($urandom_range(0, NB - 1));
      if (clr_valid) vmodel[clr_bank] = 1'b0;
      if (set_valid) vmodel[set_bank] = 1'b1;
      @(negedge clk);
      checks++;
      if (valid !== vmodel) begin failures++; $display("FAIL valid %b exp %b", valid, vmodel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
