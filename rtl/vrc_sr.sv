// Virtual reconfigurable circuit (VRC) for symbolic regression.
//
// A grid of COLS x ROWS configurable function blocks (sr_cfb), 8 columns by
// 4 rows by default, evaluates a candidate program on NI 8-bit inputs (nine
// pixels of a 3x3 window in the image-filter application) and produces one
// 8-bit output. Each CFB input can read any primary input or the output of
// any CFB of the preceding column. Every column is a pipeline stage: CFB
// outputs are registered and the primary inputs travel along a chain of
// registers (D) so that each column sees the inputs of the same vector as
// its CFB operands. The output is row 0 of the last column.
//
// Configuration: each column has its own configuration register
// (conf_reg), ROWS x 12 bits (384 bits in total at the default size). A
// column is written when conf_we is high, from conf_data, at index
// conf_col; CFB r of the column takes bits [12*r +: 12]. Writing column c
// one clock after column c-1 reconfigures the array in step with the data
// wave, so a new candidate can follow the previous one without a bubble.
//
// Source numbering of a CFB in column c: 0..NI-1 primary inputs,
// NI..NI+ROWS-1 rows of column c-1 (0 in column 0); codes beyond read 0.
// Timing: the output for an input vector presented in cycle t appears after
// COLS clock edges (latency COLS).
// Follows the description: grid size, 12 bits per CFB, column-wise
// reconfiguration, column pipeline, output from row 0 of the last column.
// Own choices: source numbering, field layout, unused codes reading 0.
module vrc_sr #(
  parameter int unsigned COLS = 8,
  parameter int unsigned ROWS = 4,
  parameter int unsigned NI   = 9,
  localparam int unsigned CW  = ROWS * 12,
  localparam int unsigned COLW = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic                  clk,
  input  logic                  conf_we,
  input  logic [COLW-1:0]       conf_col,
  input  logic [CW-1:0]         conf_data,
  input  logic [NI-1:0][7:0]    vin,
  output logic [7:0]            vout
);
  localparam int unsigned NSRC = NI + ROWS;

  logic [COLS-1:0][CW-1:0]        conf_reg;
  logic [COLS-1:0][NI-1:0][7:0]   in_d;    // primary inputs seen by column c
  logic [COLS-1:0][ROWS-1:0][7:0] col_y;   // registered CFB outputs

  always_ff @(posedge clk) begin
    if (conf_we) conf_reg[conf_col] <= conf_data;
  end

  assign in_d[0] = vin;

  for (genvar c = 0; c < int'(COLS); c++) begin : g_col
    logic [NSRC-1:0][7:0] src;
    if (c > 0) begin : g_d
      always_ff @(posedge clk) in_d[c] <= in_d[c-1];
      assign src = {col_y[c-1], in_d[c]};
    end else begin : g_first
      assign src = {{ROWS{8'd0}}, in_d[0]};
    end
    for (genvar r = 0; r < int'(ROWS); r++) begin : g_row
      sr_cfb #(.NSRC(NSRC)) u_cfb (
        .clk  (clk),
        .src  (src),
        .conf (conf_reg[c][12*r +: 12]),
        .y    (col_y[c][r])
      );
    end
  end

  assign vout = col_y[COLS-1][0];

endmodule
