// End-to-end test of the frequency synthesizer at its default parameters.
//
// A 32 MHz crystal clock drives the loop. The test starts on one channel and
// hops across the band: 2400 MHz (fraction 32/64) to 2480 MHz (channel 78)
// and back, then channel 0 (2402 MHz), the 2432 MHz point (fraction 0/64) and
// a mid-band channel. For each setting it
//   - derives N and K from the frequency, independently of the design:
//     f = (64 * N + K) MHz;
//   - measures the settling time: the first time after the hop from which the
//     oscillator's average frequency over every following 2 us window stays
//     within 1 MHz of the target, and checks it against the 220 us
//     specification;
//   - 220 us after the hop counts oscillator edges over a 100 us window and
//     checks the average frequency against the +-20 ppm tolerance.
// It also counts how often each loop mechanism acts: the fast-lock gain and
// the low gain, MASH output values below and above zero (the divide ratio
// moving off N), carries between the LSB and MSB parts of the control word,
// and a non-zero fraction being held. A mechanism that never acts is a
// failure.
module tb_adfs_top;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real TCLK_PS   = 31250.0;     // 32 MHz crystal
  localparam real SETTLE_US = 220.0;
  localparam real WIN_US    = 100.0;
  localparam real TOL_PPM   = 20.0;

  logic        clk_ref = 1'b0;
  logic        rst_n   = 1'b1;
  logic [5:0]  n_int   = 6'd37;
  logic [5:0]  num     = 6'd34;
  logic        f_out, f_fb, tick, gain_hi;
  logic [6:0]  ndiv;
  logic signed [8:0] err;
  logic [13:0] ctrl;
  logic [7:0]  dac_code;
  real         v_dac, i_dac, vco_freq;

  // Reset starts high and falls at 1 ps so that the asynchronous reset
  // sees an edge whatever the flops' power-up values.
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0;
  int n_gain_hi = 0, n_gain_lo = 0, n_y_neg = 0, n_y_pos = 0, n_msb_step = 0, n_frac = 0;

  adfs_top dut (
    .clk_ref, .rst_n, .n_int, .num, .f_out, .f_fb, .tick, .ndiv, .err,
    .gain_hi, .ctrl, .dac_code, .v_dac, .i_dac, .vco_freq
  );

  always #(TCLK_PS / 2.0) clk_ref = ~clk_ref;

  // Oscillator edge counter.
  longint unsigned edges = 0;
  always @(posedge f_out) edges++;

  // Mechanism counters, sampled once per reference tick.
  logic [5:0] msb_prev = '0;
  always @(posedge clk_ref) if (rst_n && tick) begin
    if (gain_hi) n_gain_hi++; else n_gain_lo++;
    if (int'(ndiv) < int'(n_int)) n_y_neg++;
    if (int'(ndiv) > int'(n_int)) n_y_pos++;
    if (ctrl[13:8] != msb_prev) n_msb_step++;
    if (num != 0) n_frac++;
    msb_prev = ctrl[13:8];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Spread of the instantaneous oscillator frequency while measuring.
  real f_min, f_max;
  bit  track = 0;
  always @(posedge clk_ref) if (track) begin
    if (vco_freq < f_min) f_min = vco_freq;
    if (vco_freq > f_max) f_max = vco_freq;
  end

  // Average frequency (MHz) over the next us microseconds.
  task automatic measure(input real us, output real mhz);
    longint unsigned e0;
    e0 = edges;
    #(us * 1.0e6);
    mhz = real'(edges - e0) / us;
  endtask

  task automatic hop(input int f_mhz);
    real t0, mhz, t_settle, err_ppm;
    int  good;
    n_int = 6'(f_mhz / 64);
    num   = 6'(f_mhz % 64);
    t0    = $realtime;
    // Settling: 2 us windows until 10 in a row (20 us) are within 1 MHz.
    good = 0;
    t_settle = -1.0;
    while (($realtime - t0) < SETTLE_US * 1.0e6 && good < 10) begin
      measure(2.0, mhz);
      if (mhz > f_mhz - 1.0 && mhz < f_mhz + 1.0) begin
        if (good == 0) t_settle = ($realtime - t0) / 1.0e6 - 2.0;
        good++;
      end else good = 0;
    end
    check(good == 10, $sformatf("%0d MHz: no settling within %0.0f us", f_mhz, SETTLE_US));
    $display("hop to %0d MHz (N=%0d K=%0d): settled within 1 MHz after %0.1f us",
             f_mhz, n_int, num, t_settle);
    // Wait out the 220 us and measure the average carrier frequency.
    #((SETTLE_US * 1.0e6) - ($realtime - t0));
    f_min = 1.0e12; f_max = 0.0; track = 1;
    measure(WIN_US, mhz);
    track = 0;
    err_ppm = (mhz - f_mhz) / f_mhz * 1.0e6;
    $display("  average over %0.0f us after %0.0f us: %0.4f MHz (%0.2f ppm), instantaneous %0.3f..%0.3f MHz",
             WIN_US, SETTLE_US, mhz, err_ppm, f_min / 1.0e6, f_max / 1.0e6);
    check(err_ppm < TOL_PPM && err_ppm > -TOL_PPM,
          $sformatf("%0d MHz: frequency error %0.2f ppm", f_mhz, err_ppm));
  endtask

  initial begin
    int freqs[6] = '{2400, 2480, 2400, 2402, 2432, 2441};
    #(10 * TCLK_PS);
    rst_n = 1'b1;
    foreach (freqs[i]) hop(freqs[i]);
    $display("mechanisms: gain_hi=%0d gain_lo=%0d y<0=%0d y>0=%0d msb_steps=%0d frac=%0d",
             n_gain_hi, n_gain_lo, n_y_neg, n_y_pos, n_msb_step, n_frac);
    check(n_gain_hi > 0, "fast-lock gain never used");
    check(n_gain_lo > 0, "low gain never used");
    check(n_y_neg > 0,   "MASH never lowered the divide ratio");
    check(n_y_pos > 0,   "MASH never raised the divide ratio");
    check(n_msb_step > 0, "no carry into the MSB part");
    check(n_frac > 0,    "no fractional channel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: 6 hops of at most 320 us each take 1.92 ms; stop at 3 ms.
  initial begin
    #(3.0e9);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
