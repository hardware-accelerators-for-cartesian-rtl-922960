// Virtual reconfigurable circuit (VRC) for the evolution of logic circuits.
//
// A grid of COLS x ROWS logic PEs (lc_pe), 10 x 10 by default, evaluates a
// candidate circuit with NI inputs and NO outputs. All data are DW bits wide:
// bit k of every signal belongs to test vector k, so DW input combinations
// are simulated per clock (data-parallel evaluation). A PE input may read a
// primary input, any PE of the preceding column, or (LBACK = 2) any PE of the
// column before that. Columns are pipeline stages: PE outputs are registered,
// primary inputs travel along a register chain, and the outputs of column
// c-2 pass through one extra register so that column c sees one vector in
// all its sources. Outputs are rows 0..NO-1 of the last column.
//
// Configuration: per column a register of ROWS x PEW bits, with
// PEW = 2*SELW + 2 and SELW = clog2(NI + LBACK*ROWS) (12 bits per PE, 1200
// bits in total at the default size). conf_we writes conf_data into column
// conf_col; PE r takes bits [PEW*r +: PEW] = {selA, selB, func}. Writing the
// columns on consecutive clocks reconfigures in step with the data wave.
//
// Source numbering in column c: 0..NI-1 primary inputs, NI..NI+ROWS-1
// column c-1, NI+ROWS..NI+2*ROWS-1 column c-2 (LBACK = 2). A column that
// does not exist (left of column 0) and codes past the end read 0.
// Timing: latency COLS clocks from vin to vout.
// Follows the description: L-back 2 with the extra registers, data width dw,
// selector and function widths (checked against the configuration bit counts
// of the synthesis tables). Own choices: numbering, layout, the output rows.
module vrc_lc #(
  parameter int unsigned NI    = 9,
  parameter int unsigned NO    = 9,
  parameter int unsigned COLS  = 10,
  parameter int unsigned ROWS  = 10,
  parameter int unsigned DW    = 4,
  parameter int unsigned LBACK = 2,
  localparam int unsigned NSRC = NI + LBACK * ROWS,
  localparam int unsigned SELW = $clog2(NSRC),
  localparam int unsigned PEW  = 2 * SELW + 2,
  localparam int unsigned CW   = ROWS * PEW,
  localparam int unsigned COLW = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic                  clk,
  input  logic                  conf_we,
  input  logic [COLW-1:0]       conf_col,
  input  logic [CW-1:0]         conf_data,
  input  logic [NI-1:0][DW-1:0] vin,
  output logic [NO-1:0][DW-1:0] vout
);
  logic [COLS-1:0][CW-1:0]          conf_reg;
  logic [COLS-1:0][NI-1:0][DW-1:0]  in_d;    // primary inputs seen by column c
  logic [COLS-1:0][ROWS-1:0][DW-1:0] col_y;  // registered PE outputs
  logic [COLS-1:0][ROWS-1:0][DW-1:0] col_yd; // PE outputs delayed one more clock

  always_ff @(posedge clk) begin
    if (conf_we) conf_reg[conf_col] <= conf_data;
  end

  assign in_d[0] = vin;

  for (genvar c = 0; c < int'(COLS); c++) begin : g_col
    logic [NSRC-1:0][DW-1:0] src;
    logic [ROWS-1:0][DW-1:0] prev1, prev2;

    always_ff @(posedge clk) col_yd[c] <= col_y[c];

    if (c > 0) begin : g_d
      always_ff @(posedge clk) in_d[c] <= in_d[c-1];
      assign prev1 = col_y[c-1];
    end else begin : g_nd
      assign prev1 = '0;
    end
    if (c > 1) begin : g_p2
      assign prev2 = col_yd[c-2];
    end else begin : g_np2
      assign prev2 = '0;
    end
    if (LBACK >= 2) begin : g_l2
      assign src = {prev2, prev1, in_d[c]};
    end else begin : g_l1
      assign src = {prev1, in_d[c]};
    end

    for (genvar r = 0; r < int'(ROWS); r++) begin : g_row
      lc_pe #(.NSRC(NSRC), .DW(DW), .SELW(SELW)) u_pe (
        .clk  (clk),
        .src  (src),
        .conf (conf_reg[c][PEW*r +: PEW]),
        .y    (col_y[c][r])
      );
    end
  end

  for (genvar o = 0; o < int'(NO); o++) begin : g_out
    assign vout[o] = col_y[COLS-1][o];
  end

endmodule
