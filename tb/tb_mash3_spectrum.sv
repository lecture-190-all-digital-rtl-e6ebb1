// Noise-shaping workload for the 3rd-order MASH modulator.
//
// Runs the modulator for 4096 updates with the fractions 32/64 and 17/64 and
// computes, with a Hann-windowed DFT in the test bench, the spectrum of the
// quantisation error q(n) = y(n) - x/64 (third-order shaped:
// |1 - e^-jw|^6). Checks, for each fraction:
//   - the mean of y is x/64 to within 4/4096;
//   - the error power in the band 0.002..0.02 (normalised to the update
//     rate) is at least 40 dB below the power in 0.4..0.5;
//   - the power rises with frequency: band 0.05..0.1 lies below band
//     0.1..0.2, which lies below band 0.4..0.5.
// The band powers are printed in dB.
module tb_mash3_spectrum;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int L = 4096;
  logic clk = 0, rst_n = 1, en = 1;
  logic [5:0] x = '0, e3;
  logic signed [3:0] y;
  int checks = 0, failures = 0;
  real q[L];

  // Reset starts high and falls at 1 ps so that the asynchronous reset sees
  // an edge whatever the flops' power-up values.
  initial #1 rst_n = 1'b0;

  mash3 dut (.clk, .rst_n, .en, .x, .y, .e3);

  always #5000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Mean power of the windowed DFT over bins covering [f_lo, f_hi).
  function automatic real band_power(input real f_lo, input real f_hi);
    real re, im, w, p, pi;
    int  k0, k1, nb;
    pi = 3.14159265358979;
    k0 = int'(f_lo * L); k1 = int'(f_hi * L);
    if (k0 < 1) k0 = 1;
    p = 0.0; nb = 0;
    if (k1 > L / 2) k1 = L / 2;
    for (int k = k0; k <= k1; k += 2) begin
      re = 0.0; im = 0.0;
      for (int n = 0; n < L; n++) begin
        w  = 0.5 - 0.5 * $cos(2.0 * pi * n / L);
        re += w * q[n] * $cos(2.0 * pi * k * n / L);
        im -= w * q[n] * $sin(2.0 * pi * k * n / L);
      end
      p += re * re + im * im;
      nb++;
    end
    return p / nb;
  endfunction

  function automatic real db(input real v);
    return 10.0 * $log10(v + 1.0e-30);
  endfunction

  initial begin
    int xs[2] = '{32, 17};
    int ysum;
    real p_low, p_05, p_10, p_hi;
    foreach (xs[i]) begin
      @(negedge clk);
      rst_n = 0; x = 6'(xs[i]);
      #1 rst_n = 1;
      // Discard the first outputs (pipeline and start-up).
      repeat (16) @(posedge clk);
      ysum = 0;
      for (int n = 0; n < L; n++) begin
        @(posedge clk);
        #1;
        q[n] = real'(y) - real'(xs[i]) / 64.0;
        ysum += int'(y);
      end
      check(64 * ysum - L * xs[i] <= 4 * 64 && 64 * ysum - L * xs[i] >= -4 * 64,
            $sformatf("x=%0d: mean of y %0d/%0d", xs[i], ysum, L));
      p_low = band_power(0.002, 0.02);
      p_05  = band_power(0.05, 0.1);
      p_10  = band_power(0.1, 0.2);
      p_hi  = band_power(0.4, 0.5);
      $display("x=%0d/64: error power 0.002-0.02: %0.1f dB, 0.05-0.1: %0.1f dB, 0.1-0.2: %0.1f dB, 0.4-0.5: %0.1f dB",
               xs[i], db(p_low), db(p_05), db(p_10), db(p_hi));
      check(db(p_hi) - db(p_low) >= 40.0, $sformatf("x=%0d: low band not suppressed", xs[i]));
      check(p_05 < p_10 && p_10 < p_hi, $sformatf("x=%0d: error power not rising with frequency", xs[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1_000_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
