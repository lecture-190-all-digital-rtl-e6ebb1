// Frequency-hopping workload for the synthesizer at its default parameters.
//
// Bluetooth hops over 79 channels f_k = 2402 + k MHz, k = 0..78, with a
// dwell time of 625 us per slot. This test visits every channel once, in the
// order k(n) = 37 * n mod 79 (37 is prime to 79, so the order is a
// permutation with large jumps), one slot per channel. In every slot it
//   - derives N = f / 64 and K = f mod 64 independently of the design;
//   - finds the settling time: the start of the first run of ten 2 us windows
//     whose average oscillator frequency is within 1 MHz of the target, and
//     checks that it is at most 220 us;
//   - from 220 us to 620 us into the slot counts oscillator edges and checks
//     the average frequency against the +-20 ppm tolerance, and checks that
//     the fast-lock gain stays off in that span.
// At the end it prints the worst settling time and the worst frequency error.
module tb_adfs_fhss;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real TCLK_PS = 31250.0;
  localparam real DWELL_US = 625.0;
  localparam real SETTLE_US = 220.0;
  localparam real TOL_PPM = 20.0;

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

  // Reset starts high and falls at 1 ps so that the asynchronous reset sees
  // an edge whatever the flops' power-up values.
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0, n_hi_locked = 0;
  bit locked_window = 0;
  real worst_settle = 0.0, worst_ppm = 0.0;

  adfs_top dut (
    .clk_ref, .rst_n, .n_int, .num, .f_out, .f_fb, .tick, .ndiv, .err,
    .gain_hi, .ctrl, .dac_code, .v_dac, .i_dac, .vco_freq
  );

  always #(TCLK_PS / 2.0) clk_ref = ~clk_ref;

  longint unsigned edges = 0;
  always @(posedge f_out) edges++;

  // The fast-lock gain must stay off once the slot has settled.
  always @(posedge clk_ref) if (tick && locked_window && gain_hi) n_hi_locked++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic measure(input real us, output real mhz);
    longint unsigned e0;
    e0 = edges;
    #(us * 1.0e6);
    mhz = real'(edges - e0) / us;
  endtask

  task automatic slot(input int k);
    real t0, mhz, t_settle, ppm;
    int  f_mhz, good;
    f_mhz = 2402 + k;
    n_int = 6'(f_mhz / 64);
    num   = 6'(f_mhz % 64);
    t0    = $realtime;
    good  = 0;
    t_settle = SETTLE_US + 1.0;
    while (($realtime - t0) < SETTLE_US * 1.0e6 && good < 10) begin
      measure(2.0, mhz);
      if (mhz > f_mhz - 1.0 && mhz < f_mhz + 1.0) begin
        if (good == 0) t_settle = ($realtime - t0) / 1.0e6 - 2.0;
        good++;
      end else good = 0;
    end
    check(good == 10, $sformatf("channel %0d: not settled within %0.0f us", k, SETTLE_US));
    if (t_settle > worst_settle) worst_settle = t_settle;
    #((SETTLE_US * 1.0e6) - ($realtime - t0));
    locked_window = 1;
    measure(DWELL_US - SETTLE_US - 5.0, mhz);
    locked_window = 0;
    ppm = (mhz - f_mhz) / f_mhz * 1.0e6;
    if ((ppm < 0 ? -ppm : ppm) > worst_ppm) worst_ppm = (ppm < 0 ? -ppm : ppm);
    check(ppm < TOL_PPM && ppm > -TOL_PPM,
          $sformatf("channel %0d: error %0.2f ppm", k, ppm));
    #((DWELL_US * 1.0e6) - ($realtime - t0));
  endtask

  initial begin
    #(10 * TCLK_PS);
    rst_n = 1'b1;
    for (int n = 0; n < 79; n++) slot((37 * n) % 79);
    $display("79 channels: worst settling %0.1f us, worst average error %0.3f ppm",
             worst_settle, worst_ppm);
    check(n_hi_locked == 0, $sformatf("fast-lock gain switched on %0d times in lock", n_hi_locked));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(60.0e9);
    failures++;
    $display("FAIL: watchdog");
    check(n_hi_locked == 0, $sformatf("fast-lock gain switched on %0d times in lock", n_hi_locked));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
