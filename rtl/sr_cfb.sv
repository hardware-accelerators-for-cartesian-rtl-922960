// Configurable function block (CFB) of the symbolic-regression VRC.
//
// Two input multiplexers pick operands A and B out of NSRC 8-bit candidate
// sources; a function unit computes one of 16 8-bit functions (cgp_pkg
// sr_func_e) and the result is registered, so the block is one pipeline
// stage. The 12-bit configuration is {selA[3:0], selB[3:0], func[3:0]}, as
// the description gives (4 bits per input select, 4 bits of function); the
// field order and the function list are this design's choice. A select code
// at or above NSRC reads the value 0.
//
// Timing: y is valid one clock after src and conf are presented.
module sr_cfb
  import cgp_pkg::*;
#(
  parameter int unsigned NSRC = 13
) (
  input  logic             clk,
  input  logic [NSRC-1:0][7:0] src,
  input  logic [11:0]      conf,
  output logic [7:0]       y
);
  logic [3:0] sel_a, sel_b;
  logic [7:0] a, b, f;
  logic [8:0] sum;
  sr_func_e   func;

  assign sel_a = conf[11:8];
  assign sel_b = conf[7:4];
  assign func  = sr_func_e'(conf[3:0]);

  always_comb begin
    a = '0;
    b = '0;
    for (int i = 0; i < int'(NSRC); i++) begin
      if (int'(sel_a) == i) a = src[i];
      if (int'(sel_b) == i) b = src[i];
    end
  end

  assign sum = {1'b0, a} + {1'b0, b};

  always_comb begin
    unique case (func)
      SR_CONST255: f = 8'hFF;
      SR_X:        f = a;
      SR_NOTX:     f = ~a;
      SR_OR:       f = a | b;
      SR_NOTX_OR:  f = ~a | b;
      SR_AND:      f = a & b;
      SR_NAND:     f = ~(a & b);
      SR_XOR:      f = a ^ b;
      SR_SHR1:     f = a >> 1;
      SR_SHR2:     f = a >> 2;
      SR_SUBSAT:   f = (a > b) ? a - b : 8'd0;
      SR_ADD:      f = sum[7:0];
      SR_ADDSAT:   f = sum[8] ? 8'hFF : sum[7:0];
      SR_AVG:      f = sum[8:1];
      SR_MAX:      f = (a > b) ? a : b;
      SR_MIN:      f = (a < b) ? a : b;
    endcase
  end

  always_ff @(posedge clk) y <= f;

endmodule
