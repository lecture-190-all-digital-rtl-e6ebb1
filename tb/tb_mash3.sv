// Self-checking test of the 3rd-order MASH 1-1-1 modulator.
// For several numerators (including the 32/64 and 0/64 fractions) and random
// enables it checks every output against an integer reference model of the
// three accumulators and the two differentiator registers, checks the
// noise-shaping identity 64 * y = x - (1 - z^-1)^3 e3 sample by sample (e3 is
// the new state of stage 3, y follows one enabled clock later), the output
// range -3..+4, and that the mean of y over 4096 updates is x / 64 to within
// 4 / 4096.
module tb_mash3;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int W = 6, M = 64;
  logic clk = 0, rst_n = 1, en = 0;
  logic [W-1:0] x = '0, e3;
  logic signed [3:0] y;
  // Reset starts high and falls at 1 ps so that the asynchronous reset
  // sees an edge whatever the flops' power-up values.
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0;

  mash3 dut (.clk, .rst_n, .en, .x, .y, .e3);

  always #5000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int xs[6] = '{32, 0, 1, 34, 63, 17};
    int a1, a2, a3, c1, c2, c3, c3d, t, td, ym, s1, s2, s3, ysum, n_upd;
    int e[4];
    foreach (xs[i]) begin
      @(negedge clk);
      rst_n = 0; x = W'(xs[i]); en = 0;
      #1 rst_n = 1;
      a1 = 0; a2 = 0; a3 = 0; c3d = 0; td = 0; ym = 0;
      e = '{0, 0, 0, 0};
      ysum = 0; n_upd = 0;
      while (n_upd < 4096) begin
        @(negedge clk);
        en = (i % 2 == 1) ? (($urandom % 3) != 0) : 1'b1;
        #1;
        // model: new states and carries
        s1 = a1 + xs[i];  c1 = s1 / M; s1 %= M;
        s2 = a2 + s1;     c2 = s2 / M; s2 %= M;
        s3 = a3 + s2;     c3 = s3 / M; s3 %= M;
        check(int'(e3) == s3, "e3 differs from model");
        @(posedge clk);
        #1;
        if (en) begin
          t = c2 + c3 - c3d;
          ym = c1 + t - td;
          td = t; c3d = c3;
          a1 = s1; a2 = s2; a3 = s3;
          e[3] = e[2]; e[2] = e[1]; e[1] = e[0]; e[0] = s3;
          check(int'(y) == ym, $sformatf("x=%0d n=%0d y=%0d model=%0d", xs[i], n_upd, y, ym));
          if (n_upd >= 3)
            check(M * int'(y) == xs[i] - (e[0] - 3 * e[1] + 3 * e[2] - e[3]),
                  $sformatf("noise-shaping identity x=%0d n=%0d", xs[i], n_upd));
          check(int'(y) >= -3 && int'(y) <= 4, "y out of range");
          ysum += int'(y);
          n_upd++;
        end else begin
          check(int'(y) == ym, "output changed while disabled");
        end
      end
      check(M * ysum - 4096 * xs[i] <= 4 * M && M * ysum - 4096 * xs[i] >= -4 * M,
            $sformatf("mean of y for x=%0d: sum %0d over 4096", xs[i], ysum));
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
