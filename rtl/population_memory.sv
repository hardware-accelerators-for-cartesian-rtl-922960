// Population memory: on-chip storage of candidate VRC configurations.
//
// The memory is divided into NBANKS banks; each bank holds one complete
// configuration bitstream, stored as NCOLS words of one VRC column (W bits)
// so that the VRC can be reconfigured one column per clock. Every bank has a
// validity bit: the processor writes a new candidate into a bank and then
// sets its bit; the PMI clears it when it takes the bank for evaluation, and
// only banks whose bit is set are evaluated. With two or more banks the
// processor can build the next candidate while the current one is evaluated.
// Banks and validity bits follow the description; the column-word
// organisation, the bank count (the population size 8 used in the
// experiments) and the port timing are this design's choices.
//
// Ports: processor side wr_en/wr_bank/wr_col/wr_data and set_valid/set_bank;
// PMI side rd_en/rd_bank/rd_col with rd_data valid the next clock (block RAM
// timing), and clr_valid/clr_bank. If set and clear hit the same bank in one
// clock, set wins. rst_n (active low, synchronous) clears all validity bits.
module population_memory #(
  parameter int unsigned NBANKS = 8,
  parameter int unsigned NCOLS  = 8,
  parameter int unsigned W      = 48,
  localparam int unsigned BW    = (NBANKS > 1) ? $clog2(NBANKS) : 1,
  localparam int unsigned CLW   = (NCOLS > 1) ? $clog2(NCOLS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor side
  input  logic              wr_en,
  input  logic [BW-1:0]     wr_bank,
  input  logic [CLW-1:0]    wr_col,
  input  logic [W-1:0]      wr_data,
  input  logic              set_valid,
  input  logic [BW-1:0]     set_bank,
  // PMI side
  input  logic              rd_en,
  input  logic [BW-1:0]     rd_bank,
  input  logic [CLW-1:0]    rd_col,
  output logic [W-1:0]      rd_data,
  input  logic              clr_valid,
  input  logic [BW-1:0]     clr_bank,
  output logic [NBANKS-1:0] valid
);
  logic [W-1:0] mem [NBANKS * NCOLS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[int'(wr_bank) * int'(NCOLS) + int'(wr_col)] <= wr_data;
    if (rd_en) rd_data <= mem[int'(rd_bank) * int'(NCOLS) + int'(rd_col)];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid <= '0;
    end else begin
      for (int b = 0; b < int'(NBANKS); b++) begin
        if (set_valid && int'(set_bank) == b)      valid[b] <= 1'b1;
        else if (clr_valid && int'(clr_bank) == b) valid[b] <= 1'b0;
      end
    end
  end

endmodule
