// Fitness unit (FU) of the symbolic-regression accelerator.
//
// Input generation part: after a start pulse it reads num_vectors training
// vectors from external SRAM1, one address per clock, and the SRAM data go
// straight to the VRC inputs. Fitness computation part: it extends the VRC
// pipeline; COLS clocks later it reads the required output r_i from SRAM2 at
// the same address, writes the VRC output y_i to SRAM3 and adds |y_i - r_i|
// to the running fitness. After the last vector it presents the sum of
// absolute differences (lower is better) on fit_value with a one-clock
// fit_we pulse. A candidate therefore occupies the input side for exactly
// num_vectors clocks, and the next start may follow the last address with no
// gap; a small tag pipeline carries first/last marks and the address along.
//
// SRAMs are assumed synchronous with one clock of read latency (data in the
// clock after the read strobe). Timing: start in cycle A issues address 0 in
// A; fit_we rises in cycle A + num_vectors + COLS + 1.
// Follows the description: the three SRAMs and their roles, the |y - r|
// accumulation, one vector per clock. Own choices: SRAM timing, widths,
// and the start handshake.
module fu_sr #(
  parameter int unsigned NI   = 9,
  parameter int unsigned COLS = 8,
  parameter int unsigned AW   = 18,
  parameter int unsigned KW   = 24,
  parameter int unsigned FITW = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [KW-1:0]        num_vectors,
  output logic                 busy,
  // SRAM1: training inputs
  output logic                 sram1_re,
  output logic [AW-1:0]        sram1_addr,
  input  logic [NI-1:0][7:0]   sram1_rdata,
  // VRC
  output logic [NI-1:0][7:0]   vrc_in,
  input  logic [7:0]           vrc_out,
  // SRAM2: required outputs
  output logic                 sram2_re,
  output logic [AW-1:0]        sram2_addr,
  input  logic [7:0]           sram2_rdata,
  // SRAM3: produced outputs
  output logic                 sram3_we,
  output logic [AW-1:0]        sram3_addr,
  output logic [7:0]           sram3_wdata,
  // fitness result
  output logic                 fit_we,
  output logic [FITW-1:0]      fit_value
);
  typedef struct packed {
    logic          valid;
    logic          first;
    logic          last;
    logic [AW-1:0] addr;
  } tag_t;

  localparam int unsigned NST = COLS + 1;

  logic [KW-1:0] cnt, k_q, cur, k_cur;
  logic          issue;
  tag_t          t_in;
  tag_t [NST:1]  tp;
  logic [7:0]    diff;
  logic [FITW-1:0] acc, acc_next;

  // ---------------- input generation ----------------
  assign issue = start || busy;
  assign cur   = start ? '0 : cnt;
  assign k_cur = start ? num_vectors : k_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      k_q  <= '0;
    end else begin
      if (start) k_q <= num_vectors;
      if (issue) begin
        cnt  <= cur + 1'b1;
        busy <= (cur != k_cur - 1'b1);
      end
    end
  end

  assign sram1_re   = issue;
  assign sram1_addr = AW'(cur);
  assign vrc_in     = sram1_rdata;

  assign t_in = '{valid: issue, first: issue && (cur == '0),
                  last: issue && (cur == k_cur - 1'b1), addr: AW'(cur)};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tp <= '0;
    end else begin
      tp[1] <= t_in;
      for (int s = 2; s <= int'(NST); s++) tp[s] <= tp[s-1];
    end
  end

  // ---------------- fitness computation ----------------
  assign sram2_re   = tp[COLS].valid;
  assign sram2_addr = tp[COLS].addr;

  assign diff = (vrc_out > sram2_rdata) ? vrc_out - sram2_rdata : sram2_rdata - vrc_out;
  assign acc_next = (tp[NST].first ? '0 : acc) + FITW'(diff);

  assign sram3_we    = tp[NST].valid;
  assign sram3_addr  = tp[NST].addr;
  assign sram3_wdata = vrc_out;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc       <= '0;
      fit_we    <= 1'b0;
      fit_value <= '0;
    end else begin
      fit_we <= tp[NST].valid && tp[NST].last;
      if (tp[NST].valid) begin
        acc <= acc_next;
        if (tp[NST].last) fit_value <= acc_next;
      end
    end
  end

  a_start_when_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
  a_k_nonzero:       assert property (@(posedge clk) disable iff (!rst_n) start |-> num_vectors != '0);

endmodule
