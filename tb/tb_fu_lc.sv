// Testbench for fu_lc: runs the fu_lc harness at the default size (9 inputs,
// 9 outputs, dw = 4, 128 clocks per candidate) and at a small size where dw
// does not divide the number of input combinations (4 inputs, dw = 3: the
// last group has one unused lane that must not be counted).
module tb_fu_lc;
  int c1, f1, c2, f2;
  logic d1, d2;
  int checks, failures;

  fu_lc_harness #(.NI(9), .NO(9), .DW(4), .COLS(10), .NCAND(6)) h_full (.checks(c1), .failures(f1), .done(d1));
  fu_lc_harness #(.NI(4), .NO(3), .DW(3), .COLS(10), .NCAND(6)) h_odd  (.checks(c2), .failures(f2), .done(d2));

  initial begin
    #5000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2 + 1);
    $finish;
  end

  initial begin
    wait (d1 && d2);
    checks = c1 + c2;
    failures = f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
