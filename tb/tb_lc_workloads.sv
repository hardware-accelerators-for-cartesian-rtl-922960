// Runs the logic-circuit accelerator in the configurations of the multiplier
// experiments and of the data-width study, each for a dozen reference-checked
// evaluations of a hill-climbing search:
//   2 x 2 multiplier, 4 inputs, 8 x 8 PEs, L-back 1 and 2
//   2 x 3 multiplier, 5 inputs, 10 x 10 PEs, L-back 1 and 2
//   3 x 3 multiplier, 6 inputs, 10 x 10 PEs, L-back 1 and 2
//   3 x 4 multiplier, 7 inputs, 10 x 10 PEs, L-back 1 and 2
//   4 x 4 multiplier, 8 inputs, 16 x 16 PEs, L-back 2
//   4 x 5 multiplier, 9 inputs, 10 x 10 PEs, dw = 1, 2, 8 and 12
//   4 x 5 multiplier, 9 inputs, 12 x 12 PEs, dw = 2 (a larger VRC size)
// The search runs are far shorter than in the experiments; what is checked
// is that every configuration evaluates candidates correctly.
module tb_lc_workloads;
  localparam int N = 14;
  int c[N], f[N];
  logic d[N];

  lc_workload #(.NI(4), .NO(4), .COLS(8),  .ROWS(8),  .DW(4),  .LBACK(1), .ABITS(2)) w0 (c[0], f[0], d[0]);
  lc_workload #(.NI(4), .NO(4), .COLS(8),  .ROWS(8),  .DW(4),  .LBACK(2), .ABITS(2)) w1 (c[1], f[1], d[1]);
  lc_workload #(.NI(6), .NO(6), .COLS(10), .ROWS(10), .DW(4),  .LBACK(1), .ABITS(3)) w2 (c[2], f[2], d[2]);
  lc_workload #(.NI(6), .NO(6), .COLS(10), .ROWS(10), .DW(4),  .LBACK(2), .ABITS(3)) w3 (c[3], f[3], d[3]);
  lc_workload #(.NI(8), .NO(8), .COLS(16), .ROWS(16), .DW(4),  .LBACK(2), .ABITS(4)) w4 (c[4], f[4], d[4]);
  lc_workload #(.NI(9), .NO(9), .COLS(10), .ROWS(10), .DW(1),  .LBACK(2), .ABITS(4)) w5 (c[5], f[5], d[5]);
  lc_workload #(.NI(9), .NO(9), .COLS(10), .ROWS(10), .DW(2),  .LBACK(2), .ABITS(4)) w6 (c[6], f[6], d[6]);
  lc_workload #(.NI(9), .NO(9), .COLS(10), .ROWS(10), .DW(8),  .LBACK(2), .ABITS(4)) w7 (c[7], f[7], d[7]);
  lc_workload #(.NI(9), .NO(9), .COLS(10), .ROWS(10), .DW(12), .LBACK(2), .ABITS(4)) w8 (c[8], f[8], d[8]);
  lc_workload #(.NI(9), .NO(9), .COLS(12), .ROWS(12), .DW(2),  .LBACK(2), .ABITS(4)) w9 (c[9], f[9], d[9]);
  lc_workload #(.NI(5), .NO(5), .COLS(10), .ROWS(10), .DW(4),  .LBACK(1), .ABITS(2)) w10 (c[10], f[10], d[10]);
  lc_workload #(.NI(5), .NO(5), .COLS(10), .ROWS(10), .DW(4),  .LBACK(2), .ABITS(2)) w11 (c[11], f[11], d[11]);
  lc_workload #(.NI(7), .NO(7), .COLS(10), .ROWS(10), .DW(4),  .LBACK(1), .ABITS(3)) w12 (c[12], f[12], d[12]);
  lc_workload #(.NI(7), .NO(7), .COLS(10), .ROWS(10), .DW(4),  .LBACK(2), .ABITS(3)) w13 (c[13], f[13], d[13]);

  function automatic int sum(int a[N]);
    int s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  initial begin
    #100000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", sum(c), sum(f) + 1);
    $finish;
  end

  initial begin
    #1;
    wait (d.and());
    $display("TB_RESULT checks=%0d failures=%0d", sum(c), sum(f));
    $finish;
  end
endmodule
