// Control unit (CU): the host-facing controller of an accelerator.
//
// The host PC defines the run through a small register file and the CU
// drives the rest of the system from it. Registers (32-bit, word address):
//   0 CTRL        bit 0 = run enable (read/write)
//   1 NUM_VECTORS training vectors per candidate (read/write)
//   2 MAX_EVALS   stop after this many evaluations, 0 = no limit (read/write)
//   3 EVAL_COUNT  evaluations completed (read; any write clears it)
//   4 STATUS      bit 0 = running, bit 1 = limit reached (read only)
// run is high while CTRL.run is set and the evaluation limit is not reached;
// the PMI starts no new candidate while it is low (candidates already in the
// pipeline finish). eval_done pulses once per finished evaluation.
// That the CU is the master, controls the system and talks to the host
// follows the description; the register map and the evaluation limit (the
// "maximum number of generations" stop criterion counted in evaluations) are
// this design's choices. Host reads are combinational; writes take effect at
// the clock edge. rst_n is active low and synchronous.
module cu #(
  parameter int unsigned KW = 24
) (
  input  logic          clk,
  input  logic          rst_n,
  // host register port
  input  logic          hst_we,
  input  logic [2:0]    hst_addr,
  input  logic [31:0]   hst_wdata,
  output logic [31:0]   hst_rdata,
  // system control
  input  logic          eval_done,
  output logic          run,
  output logic [KW-1:0] num_vectors
);
  typedef enum logic [2:0] {
    R_CTRL = 3'd0, R_NUMV = 3'd1, R_MAXE = 3'd2, R_CNT = 3'd3, R_STAT = 3'd4
  } reg_e;

  logic        ctrl_run;
  logic [31:0] max_evals, eval_count;
  logic        limit_hit;

  assign limit_hit = (max_evals != '0) && (eval_count >= max_evals);
  assign run       = ctrl_run && !limit_hit;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ctrl_run    <= 1'b0;
      num_vectors <= KW'(1);
      max_evals   <= '0;
      eval_count  <= '0;
    end else begin
      if (eval_done) eval_count <= eval_count + 1'b1;
      if (hst_we) begin
        unique case (reg_e'(hst_addr))
          R_CTRL: ctrl_run    <= hst_wdata[0];
          R_NUMV: num_vectors <= KW'(hst_wdata);
          R_MAXE: max_evals   <= hst_wdata;
          R_CNT:  eval_count  <= '0;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (reg_e'(hst_addr))
      R_CTRL:  hst_rdata = {31'd0, ctrl_run};
      R_NUMV:  hst_rdata = 32'(num_vectors);
      R_MAXE:  hst_rdata = max_evals;
      R_CNT:   hst_rdata = eval_count;
      R_STAT:  hst_rdata = {30'd0, limit_hit, run};
      default: hst_rdata = '0;
    endcase
  end

endmodule
