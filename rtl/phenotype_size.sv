// Phenotype-size unit of the logic-circuit accelerator.
//
// While the VRC is being configured, one column per clock, this unit looks at
// the function field of every PE in the column that is written: a comparator
// per PE flags a PE configured as a wire, the flags are summed (adder tree)
// and the column sums are accumulated. After the last column the
// accumulator holds the number of wire PEs of the candidate, which the
// fitness unit puts into the low 8 bits of the fitness value (more wires =
// smaller circuit). It costs no extra clocks because it runs alongside the
// reconfiguration. Comparators, adder tree and accumulator follow the
// description; the wire code (0) and the result handshake are own choices.
//
// Interface: conf_we/conf_col/conf_data are the VRC's configuration port.
// Writing column 0 restarts the count. One clock after the last column
// (COLS-1) is written, cost_valid pulses for one clock with the total in
// cost. rst_n is an active-low synchronous reset.
module phenotype_size #(
  parameter int unsigned COLS = 10,
  parameter int unsigned ROWS = 10,
  parameter int unsigned PEW  = 12,
  localparam int unsigned CW    = ROWS * PEW,
  localparam int unsigned COLW  = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int unsigned COSTW = $clog2(COLS * ROWS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             conf_we,
  input  logic [COLW-1:0]  conf_col,
  input  logic [CW-1:0]    conf_data,
  output logic [COSTW-1:0] cost,
  output logic             cost_valid
);
  localparam logic [1:0] WIRE_CODE = 2'd0;

  logic [ROWS-1:0]        is_wire;
  logic [COSTW-1:0]       col_sum;
  logic [COSTW-1:0]       acc;

  for (genvar r = 0; r < int'(ROWS); r++) begin : g_cmp
    assign is_wire[r] = (conf_data[PEW*r +: 2] == WIRE_CODE);
  end

  always_comb begin
    col_sum = '0;
    for (int r = 0; r < int'(ROWS); r++) col_sum += COSTW'(is_wire[r]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc        <= '0;
      cost_valid <= 1'b0;
    end else begin
      cost_valid <= conf_we && (int'(conf_col) == int'(COLS) - 1);
      if (conf_we) acc <= (conf_col == '0) ? col_sum : acc + col_sum;
    end
  end

  assign cost = acc;

endmodule
