// Bit-parallel logic processing element (PE) of the logic-circuit VRC.
//
// Two input multiplexers pick operands A and B out of NSRC DW-bit candidate
// sources; the PE applies one of the four functions {wire, and, xor,
// not-a and b} to all DW bits at once (each bit is a different test vector,
// as in software parallel simulation) and registers the result. The function
// set and bit-parallel operation follow the description; the configuration
// layout {selA, selB, func} and the reading of an out-of-range select as 0
// are this design's choice.
//
// Timing: y is valid one clock after src and conf are presented.
module lc_pe
  import cgp_pkg::*;
#(
  parameter int unsigned NSRC = 29,
  parameter int unsigned DW   = 4,
  parameter int unsigned SELW = 5
) (
  input  logic                     clk,
  input  logic [NSRC-1:0][DW-1:0]  src,
  input  logic [2*SELW+1:0]        conf,
  output logic [DW-1:0]            y
);
  logic [SELW-1:0] sel_a, sel_b;
  logic [DW-1:0]   a, b, f;
  lc_func_e        func;

  assign sel_a = conf[2*SELW+1 -: SELW];
  assign sel_b = conf[SELW+1 -: SELW];
  assign func  = lc_func_e'(conf[1:0]);

  always_comb begin
    a = '0;
    b = '0;
    for (int i = 0; i < int'(NSRC); i++) begin
      if (int'(sel_a) == i) a = src[i];
      if (int'(sel_b) == i) b = src[i];
    end
  end

  always_comb begin
    unique case (func)
      LC_WIRE:    f = a;
      LC_AND:     f = a & b;
      LC_XOR:     f = a ^ b;
      LC_NAAND_B: f = ~a & b;
    endcase
  end

  always_ff @(posedge clk) y <= f;

endmodule
