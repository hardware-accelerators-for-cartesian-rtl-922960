// Small synchronous FIFO used for bookkeeping inside the PMI and the
// logic-circuit fitness unit.
//
// DEPTH entries of W bits, first-word-fall-through: rdata shows the oldest
// entry whenever empty is low, and a pop removes it at the clock edge. Push
// and pop in the same clock are allowed. Pushing while full or popping while
// empty is a usage error and is caught by assertions. rst_n is an active-low
// synchronous reset that empties the FIFO.
module sync_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] wdata,
  input  logic         pop,
  output logic [W-1:0] rdata,
  output logic         empty,
  output logic         full
);
  logic [DEPTH-1:0][W-1:0] mem;
  logic [AW-1:0]           rptr, wptr;
  logic [AW:0]             count;

  assign empty = (count == '0);
  assign full  = (int'(count) == int'(DEPTH));
  assign rdata = mem[rptr];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rptr  <= '0;
      wptr  <= '0;
      count <= '0;
    end else begin
      if (push) begin
        mem[wptr] <= wdata;
        wptr <= (int'(wptr) == int'(DEPTH) - 1) ? '0 : wptr + 1'b1;
      end
      if (pop) rptr <= (int'(rptr) == int'(DEPTH) - 1) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
