// Processor and Memory Interface (PMI).
//
// Two parts work concurrently.
// Reconfiguration part: while run is high it picks a bank whose validity bit
// is set (round robin, starting after the bank taken last), clears that bit,
// reads the bank's NCOLS column words from the population memory on
// consecutive clocks and writes each into the VRC's configuration register of
// that column, one clock after the read. In the clock after it starts
// reading it pulses fu_start, so the first vector of the candidate reaches
// VRC column c just after column c has been reconfigured. Starts are spaced
// by max(num_cycles, NCOLS) clocks, num_cycles being how long the fitness
// unit feeds one candidate, so back-to-back candidates stream through the
// VRC without a gap.
// Result part: each fit_we from the fitness unit is matched with the bank
// it belongs to (a queue of banks in evaluation) and queued for the
// processor. While the queue is not empty irq is high and fit_value/fit_bank
// show the oldest result; irqack removes it. The processor then writes a
// new candidate into that bank and sets its validity bit.
// The two parts, the IRQ/IRQACK exchange and column-wise reconfiguration
// follow the description; queue depths, round robin and the start spacing
// are this design's choices. rst_n is active low and synchronous.
module pmi #(
  parameter int unsigned NBANKS = 8,
  parameter int unsigned NCOLS  = 8,
  parameter int unsigned CW     = 48,
  parameter int unsigned FITW   = 32,
  parameter int unsigned KW     = 24,
  localparam int unsigned BW    = (NBANKS > 1) ? $clog2(NBANKS) : 1,
  localparam int unsigned CLW   = (NCOLS > 1) ? $clog2(NCOLS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  input  logic [KW-1:0]     num_cycles,
  // population memory
  input  logic [NBANKS-1:0] bank_valid,
  output logic              clr_valid,
  output logic [BW-1:0]     clr_bank,
  output logic              rd_en,
  output logic [BW-1:0]     rd_bank,
  output logic [CLW-1:0]    rd_col,
  input  logic [CW-1:0]     rd_data,
  // VRC configuration
  output logic              conf_we,
  output logic [CLW-1:0]    conf_col,
  output logic [CW-1:0]     conf_data,
  // fitness unit
  output logic              fu_start,
  input  logic              fit_we,
  input  logic [FITW-1:0]   fit_in,
  // processor
  output logic              irq,
  output logic [FITW-1:0]   fit_value,
  output logic [BW-1:0]     fit_bank,
  input  logic              irqack,
  output logic              eval_done
);
  logic          reading, start, found;
  logic [BW-1:0] cur_bank, last_bank, pick;
  logic [CLW-1:0] col;
  logic [KW-1:0] gap, spacing;
  logic          gap_ok;
  logic          inflight_empty, inflight_full;
  logic [BW-1:0] inflight_bank;
  logic          res_empty, res_full;

  assign spacing = (num_cycles > KW'(NCOLS)) ? num_cycles : KW'(NCOLS);
  assign gap_ok  = (gap >= spacing);

  // round-robin choice of a valid bank, starting after last_bank
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int i = 1; i <= int'(NBANKS); i++) begin
      if (!found && bank_valid[(int'(last_bank) + i) % int'(NBANKS)]) begin
        found = 1'b1;
        pick  = BW'((int'(last_bank) + i) % int'(NBANKS));
      end
    end
  end

  assign start = run && found && gap_ok && !reading && !inflight_full;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      reading   <= 1'b0;
      cur_bank  <= '0;
      last_bank <= BW'(NBANKS - 1);
      col       <= '0;
      gap       <= '1;
      fu_start  <= 1'b0;
      conf_we   <= 1'b0;
      conf_col  <= '0;
    end else begin
      fu_start <= start;
      conf_we  <= rd_en;
      conf_col <= rd_col;
      if (start) begin
        gap       <= KW'(1);
        cur_bank  <= pick;
        last_bank <= pick;
      end else if (!gap_ok) begin
        gap <= gap + 1'b1;
      end
      if (start) begin
        reading <= (NCOLS > 1);
        col     <= CLW'(1);
      end else if (reading) begin
        reading <= (int'(col) != int'(NCOLS) - 1);
        col     <= col + 1'b1;
      end
    end
  end

  assign rd_en     = start || reading;
  assign rd_bank   = start ? pick : cur_bank;
  assign rd_col    = start ? '0 : col;
  assign clr_valid = start;
  assign clr_bank  = pick;
  assign conf_data = rd_data;

  // banks whose evaluation is under way, in order
  sync_fifo #(.W(BW), .DEPTH(NBANKS)) u_inflight (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (start),
    .wdata (pick),
    .pop   (fit_we),
    .rdata (inflight_bank),
    .empty (inflight_empty),
    .full  (inflight_full)
  );

  // results waiting for the processor
  sync_fifo #(.W(FITW + BW), .DEPTH(NBANKS)) u_results (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (fit_we),
    .wdata ({fit_in, inflight_bank}),
    .pop   (irqack && !res_empty),
    .rdata ({fit_value, fit_bank}),
    .empty (res_empty),
    .full  (res_full)
  );

  assign irq       = !res_empty;
  assign eval_done = fit_we;

  a_fit_has_bank: assert property (@(posedge clk) disable iff (!rst_n) fit_we |-> !inflight_empty);
  a_ack_with_irq: assert property (@(posedge clk) disable iff (!rst_n) irqack |-> irq);

endmodule
