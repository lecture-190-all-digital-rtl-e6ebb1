// Self-checking test of the fractional frequency detector.
// A 32 MHz crystal clock with a tick every second clock (16 MHz reference) and
// a feedback clock of known frequency drive the detector; the divide ratio
// changes randomly every period. Checks:
//   - err equals the ndiv of the period minus the reported count;
//   - every count is the floor or the ceiling of f_fb / f_ref;
//   - the counts summed over 400 periods equal the number of feedback edges
//     the test bench saw in the same span, to within one edge, so no cycle
//     is lost or counted twice (this includes counter wrap-around).
// Three feedback frequencies are used: 600.5, 620.0 and 587.3 MHz.
module tb_frac_freq_det;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real TCLK = 31250.0;
  logic clk = 0, clk_fb = 0, rst_n = 1, tick = 0;
  logic [6:0] ndiv = 7'd37, ndiv_prev;
  logic signed [8:0] err;
  logic [7:0] count;
  real tfb = 1000.0;
  // Reset starts high and falls at 1 ps so that the asynchronous reset
  // sees an edge whatever the flops' power-up values.
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0;
  longint fb_edges = 0;

  frac_freq_det dut (.clk_fb, .clk, .rst_n, .tick, .ndiv, .err, .count);

  always #(TCLK / 2.0) clk = ~clk;
  always begin
    #(tfb / 2.0) clk_fb = ~clk_fb;
  end
  always @(posedge clk_fb) fb_edges++;

  // Tick every second crystal clock.
  always @(posedge clk) tick <= rst_n ? ~tick : 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    real fs[3] = '{600.5, 620.0, 587.3};
    real ratio;
    longint e_start;
    int csum;
    foreach (fs[i]) begin
      tfb = 1.0e6 / fs[i];
      ratio = fs[i] / 16.0;
      rst_n = 0;
      repeat (4) @(posedge clk);
      rst_n = 1;
      // Skip the first periods (synchronizer fill).
      repeat (8) begin
        @(posedge clk iff tick);
      end
      csum = 0;
      for (int n = 0; n < 400; n++) begin
        @(negedge clk iff tick);
        ndiv_prev = ndiv;
        @(posedge clk);
        #1;
        check(int'(err) == int'(ndiv_prev) - int'(count),
              $sformatf("err=%0d ndiv=%0d count=%0d", err, ndiv_prev, count));
        check(int'(count) == $floor(ratio) || int'(count) == $ceil(ratio),
              $sformatf("f=%0.1f count=%0d", fs[i], count));
        if (n == 0) e_start = fb_edges;
        else csum += int'(count);
        ndiv = 7'(30 + $urandom % 20);
      end
      check(csum - int'(fb_edges - e_start) <= 1 && csum - int'(fb_edges - e_start) >= -1,
            $sformatf("f=%0.1f: counted %0d, saw %0d", fs[i], csum, fb_edges - e_start));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(200_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
