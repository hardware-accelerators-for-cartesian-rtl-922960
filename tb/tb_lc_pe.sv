// Testbench for lc_pe: random DW-bit sources, all four functions and all
// select codes; each bit lane is checked against the scalar reference
// function one clock later.
module tb_lc_pe;
  import cgp_ref_pkg::*;
  localparam int NSRC = 29, DW = 4, SELW = 5;
  logic clk = 0;
  logic [NSRC-1:0][DW-1:0] src;
  logic [2*SELW+1:0] conf;
  logic [DW-1:0] y;
  int checks = 0, failures = 0;

  lc_pe #(.NSRC(NSRC), .DW(DW), .SELW(SELW)) dut (.clk, .src, .conf, .y);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      logic [DW-1:0] a, b, exp;
      int sa, sb, f;
      foreach (src[i]) src[i] = DW'($urandom);
      sa = $urandom_range(0, 31);
      sb = $urandom_range(0, 31);
      f  = t % 4;
      conf = {SELW'(sa), SELW'(sb), 2'(f)};
      a = (sa < NSRC) ? src[sa] : '0;
      b = (sb < NSRC) ? src[sb] : '0;
      for (int k = 0; k < DW; k++) exp[k] = lc_f(f, a[k], b[k]);
      @(posedge clk);
      #1;
      checks++;
      if (y !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL f=%0d a=%h b=%h y=%h exp=%h", f, a, b, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
