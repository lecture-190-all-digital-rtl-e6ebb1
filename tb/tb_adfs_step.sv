// Small-step response of the locked loop against its linear model.
//
// In lock (low gain only) the loop is the first-order system of its linear
// model, H(z) = K z^-1 / (1 - z^-1 (1 - K)) for F(z) = 1, with
// K = Ka / 4096 = 1/64 at the defaults: after a frequency step the remaining
// error falls by a factor (1 - K) per reference tick, about e^-1 every 64
// ticks. The FIR filter and the pipeline add a delay of a few ticks.
// The test locks at 2440 MHz, steps to 2444 MHz (small enough that the
// fast-lock gain stays off) and back, and averages the oscillator frequency
// over 16-tick windows centred 64, 128 and 320 ticks after each step. It
// checks that the remaining error is within the linear model's prediction
// 4 MHz * (1 - K)^(n - d), with a delay d of 0 to 6 ticks and +-0.35 MHz
// for the MASH dither, and that the fast-lock gain never switched on.
module tb_adfs_step;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real TCLK_PS = 31250.0;
  localparam real KLOOP = 1.0 / 64.0;

  logic        clk_ref = 1'b0;
  logic        rst_n   = 1'b1;
  logic [5:0]  n_int   = 6'd38;
  logic [5:0]  num     = 6'd8;
  logic        f_out, f_fb, tick, gain_hi;
  logic [6:0]  ndiv;
  logic signed [8:0] err;
  logic [13:0] ctrl;
  logic [7:0]  dac_code;
  real         v_dac, i_dac, vco_freq;

  // Reset starts high and falls at 1 ps so that the asynchronous reset sees
  // an edge whatever the flops' power-up values.
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0, n_hi = 0;
  bit watch_gain = 0;

  adfs_top dut (
    .clk_ref, .rst_n, .n_int, .num, .f_out, .f_fb, .tick, .ndiv, .err,
    .gain_hi, .ctrl, .dac_code, .v_dac, .i_dac, .vco_freq
  );

  always #(TCLK_PS / 2.0) clk_ref = ~clk_ref;
  always @(posedge clk_ref) if (tick && watch_gain && gain_hi) n_hi++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Set the new channel on a tick, then average vco_freq over ticks
  // [c-8, c+8) for each centre c.
  task automatic step_to(input int f_mhz, input int f_from);
    int  centres[3] = '{64, 128, 320};
    int  n;
    real acc, rem, lo, hi, step, tol;
    step = real'(f_mhz - f_from);
    @(posedge clk_ref iff tick);
    n_int = 6'(f_mhz / 64);
    num   = 6'(f_mhz % 64);
    n = 0;
    foreach (centres[i]) begin
      while (n < centres[i] - 8) begin @(posedge clk_ref iff tick); n++; end
      acc = 0.0;
      repeat (16) begin
        @(posedge clk_ref iff tick); n++;
        acc += vco_freq / 1.0e6;
      end
      rem = (real'(f_mhz) - acc / 16.0) / step;   // remaining fraction of the step
      hi  = (1.0 - KLOOP) ** (centres[i] - 6);
      lo  = (1.0 - KLOOP) ** centres[i];
      $display("step %0d -> %0d MHz: %0d ticks after, remaining %0.3f (model %0.3f..%0.3f)",
               f_from, f_mhz, centres[i], rem, lo, hi);
      tol = 0.35 / (step > 0.0 ? step : -step);
      check(rem > lo - tol && rem < hi + tol,
            $sformatf("step to %0d MHz, %0d ticks: remaining fraction %0.3f", f_mhz, centres[i], rem));
    end
  endtask

  initial begin
    #(10 * TCLK_PS);
    rst_n = 1'b1;
    #(200.0e6);                // lock at 2440 MHz
    watch_gain = 1;
    step_to(2444, 2440);
    #(20.0e6);
    step_to(2440, 2444);
    watch_gain = 0;
    check(n_hi == 0, $sformatf("fast-lock gain switched on %0d times", n_hi));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1.0e9);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
