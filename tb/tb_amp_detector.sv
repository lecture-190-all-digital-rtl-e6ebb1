// Self-checking test of the amplitude detector.
// Drives error sequences that model the loop: a large constant error (far
// from lock), a zero-mean dither like the MASH output in lock, random errors,
// and a slowly shrinking error. After every tick it compares gain_hi and amp
// with a reference model of the 16-sample window sum and the threshold 8, and
// counts both decisions.
module tb_amp_detector;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 0, rst_n = 1, en = 0;
  logic signed [8:0] err = '0;
  logic gain_hi;
  logic [12:0] amp;
  // Reset starts high and falls at 1 ps so that the asynchronous reset
  // sees an edge whatever the flops' power-up values.
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0, n_hi = 0, n_lo = 0;
  int hist[16];
  int wsum, mag;
  bit exp_hi;

  amp_detector dut (.clk, .rst_n, .en, .err, .gain_hi, .amp);

  always #5000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step(input int e, input bit do_en);
    @(negedge clk);
    err = 9'(e); en = do_en;
    @(posedge clk);
    #1;
    if (do_en) begin
      wsum = wsum + e - hist[15];
      for (int i = 15; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = e;
      mag = wsum < 0 ? -wsum : wsum;
      exp_hi = mag >= 8;
      if (exp_hi) n_hi++; else n_lo++;
    end
    check(gain_hi == exp_hi && int'(amp) == mag,
          $sformatf("err=%0d: gain_hi=%0d amp=%0d, expected %0d %0d", e, gain_hi, amp, exp_hi, mag));
  endtask

  initial begin
    hist = '{default: 0};
    wsum = 0; mag = 0; exp_hi = 1;
    @(negedge clk);
    rst_n = 1;
    #1 check(gain_hi == 1'b1, "gain_hi after reset");
    repeat (30) step(2, 1);                 // far from lock
    repeat (40) step(($urandom % 2) ? 1 : -1, 1);   // lock dither
    for (int i = 0; i < 40; i++) step(-3 + (i % 7), 1);
    repeat (100) step(int'($urandom % 15) - 7, ($urandom % 4) != 0);
    for (int k = 8; k >= 0; k--) repeat (10) step(k / 3, 1);
    repeat (20) step(-2, 1);
    repeat (12) step((($urandom % 2) ? 4 : -4), 1);
    check(n_hi > 10 && n_lo > 10, $sformatf("decisions hi=%0d lo=%0d", n_hi, n_lo));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(100_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
