// Testbench for sr_cfb: random operands, every function and select code
// (including out-of-range selects), result checked one clock later against
// the reference function set.
module tb_sr_cfb;
  import cgp_ref_pkg::*;
  localparam int NSRC = 13;
  logic clk = 0;
  logic [NSRC-1:0][7:0] src;
  logic [11:0] conf;
  logic [7:0] y;
  int checks = 0, failures = 0;
  int fseen[16];

  sr_cfb #(.NSRC(NSRC)) dut (.clk, .src, .conf, .y);

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
      logic [7:0] a, b, exp;
      int sa, sb, f;
      foreach (src[i]) src[i] = 8'($urandom);
      if (t % 5 == 0) begin src[0] = 8'd200; src[1] = 8'd100; end  // force saturation cases
      sa = (t % 5 == 0) ? 0 : $urandom_range(0, 15);
      sb = (t % 5 == 0) ? 1 : $urandom_range(0, 15);
      f  = t % 16;
      conf = {4'(sa), 4'(sb), 4'(f)};
      a = (sa < NSRC) ? src[sa] : 8'd0;
      b = (sb < NSRC) ? src[sb] : 8'd0;
      exp = sr_f(f, a, b);
      @(posedge clk);
      #1;
      checks++;
      fseen[f]++;
      if (y !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL f=%0d a=%0d b=%0d y=%0d exp=%0d", f, a, b, y, exp);
      end
    end
    foreach (fseen[i]) if (fseen[i] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
