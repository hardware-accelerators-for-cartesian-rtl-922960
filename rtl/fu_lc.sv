// Fitness unit (FU) of the logic-circuit accelerator.
//
// Input generation part: after a start pulse it applies all 2^NI input
// combinations to the VRC, DW combinations per clock in bit-parallel form
// (bit k of VRC input j is bit j of vector number cnt*DW + k), so a candidate
// takes NCYC = ceil(2^NI / DW) clocks. Fitness computation part: the
// required outputs (truth table) sit in an on-chip memory of NCYC words of
// NO*DW bits (bit o*DW + k of word w is output o of vector w*DW + k); COLS
// clocks after a vector group enters the VRC the matching word is read, and
// the number of output bits that agree with it is accumulated. Lanes past
// vector 2^NI - 1 (when DW does not divide 2^NI) are not counted. The
// result is {correct bits, phenotype size[7:0]}: the number of correct bits
// (maximum 2^NI * NO) is the functional fitness, and the low 8 bits carry the
// number of wire PEs from the phenotype-size unit, which arrive on
// size/size_valid during reconfiguration and are queued per candidate.
//
// The truth table is written through tt_we/tt_addr/tt_wdata (from the host).
// Timing: start in cycle A; VRC inputs are registered and valid from A+1;
// fit_we rises in cycle A + NCYC + COLS + 1. The next start may come in cycle
// A + NCYC.
// Follows the description: exhaustive input generation, truth table in
// on-chip memory, size in the 8 low bits of the fitness. Own choices: the
// layouts, memory timing and handshakes.
module fu_lc #(
  parameter int unsigned NI    = 9,
  parameter int unsigned NO    = 9,
  parameter int unsigned DW    = 4,
  parameter int unsigned COLS  = 10,
  parameter int unsigned COSTW = 7,
  parameter int unsigned FITW  = 32,
  localparam int unsigned NCYC = ((1 << NI) + DW - 1) / DW,
  localparam int unsigned TAW  = (NCYC > 1) ? $clog2(NCYC) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  busy,
  // truth-table write port
  input  logic                  tt_we,
  input  logic [TAW-1:0]        tt_addr,
  input  logic [NO*DW-1:0]      tt_wdata,
  // VRC
  output logic [NI-1:0][DW-1:0] vrc_in,
  input  logic [NO-1:0][DW-1:0] vrc_out,
  // phenotype size
  input  logic                  size_valid,
  input  logic [COSTW-1:0]      size,
  // fitness result
  output logic                  fit_we,
  output logic [FITW-1:0]       fit_value
);
  localparam int unsigned NVEC = 1 << NI;
  localparam int unsigned MW   = $clog2(NVEC * NO + 1);
  localparam int unsigned NST  = COLS + 1;

  typedef struct packed {
    logic           valid;
    logic           first;
    logic           last;
    logic [TAW-1:0] addr;
  } tag_t;

  logic [NO*DW-1:0] tt_mem [NCYC];
  logic [NO*DW-1:0] tt_q;

  logic [TAW-1:0] cnt, cur;
  logic           issue;
  tag_t           t_in;
  tag_t [NST:1]   tp;
  logic [MW-1:0]  acc, acc_next, n_ok;
  logic [7:0]     size_head;
  logic           size_empty, size_full;

  // ---------------- input generation ----------------
  assign issue = start || busy;
  assign cur   = start ? '0 : cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (issue) begin
      cnt  <= cur + 1'b1;
      busy <= (int'(cur) != int'(NCYC) - 1);
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < int'(DW); k++) begin
      for (int j = 0; j < int'(NI); j++) begin
        vrc_in[j][k] <= 1'(((int'(cur) * int'(DW) + k) >> j) & 1);
      end
    end
  end

  assign t_in = '{valid: issue, first: issue && (cur == '0),
                  last: issue && (int'(cur) == int'(NCYC) - 1), addr: cur};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tp <= '0;
    end else begin
      tp[1] <= t_in;
      for (int s = 2; s <= int'(NST); s++) tp[s] <= tp[s-1];
    end
  end

  // ---------------- truth table memory ----------------
  always_ff @(posedge clk) begin
    if (tt_we) tt_mem[tt_addr] <= tt_wdata;
    tt_q <= tt_mem[tp[COLS].addr];
  end

  // ---------------- fitness computation ----------------
  always_comb begin
    n_ok = '0;
    for (int k = 0; k < int'(DW); k++) begin
      if (int'(tp[NST].addr) * int'(DW) + k < int'(NVEC)) begin
        for (int o = 0; o < int'(NO); o++) begin
          n_ok += MW'(vrc_out[o][k] == tt_q[o*DW + k]);
        end
      end
    end
  end

  assign acc_next = (tp[NST].first ? '0 : acc) + n_ok;

  sync_fifo #(.W(8), .DEPTH(4)) u_size_q (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (size_valid),
    .wdata (8'(size)),
    .pop   (tp[NST].valid && tp[NST].last),
    .rdata (size_head),
    .empty (size_empty),
    .full  (size_full)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc       <= '0;
      fit_we    <= 1'b0;
      fit_value <= '0;
    end else begin
      fit_we <= tp[NST].valid && tp[NST].last;
      if (tp[NST].valid) begin
        acc <= acc_next;
        if (tp[NST].last) fit_value <= {(FITW-8)'(acc_next), size_head};
      end
    end
  end

  a_start_when_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
  a_size_ready:      assert property (@(posedge clk) disable iff (!rst_n)
                                      (tp[NST].valid && tp[NST].last) |-> !size_empty);

endmodule
