// Self-checking test of the loop accumulator: the reset value (mid-range),
// random increments with random enables against an integer model, and runs
// of large increments that drive the word into both saturation limits, which
// must hold instead of wrapping. The MSB and LSB parts are checked against
// the model word.
module tb_loop_accum;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 0, rst_n = 1, en = 0;
  logic signed [18:0] delta = '0;
  logic [13:0] ctrl;
  logic [5:0] msb;
  logic [7:0] lsb;
  // Reset starts high and falls at 1 ps so that the asynchronous reset
  // sees an edge whatever the flops' power-up values.
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0, model, n_sat_hi = 0, n_sat_lo = 0;

  loop_accum dut (.clk, .rst_n, .en, .delta, .ctrl, .msb, .lsb);

  always #5000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step(input int d, input bit e);
    @(negedge clk);
    delta = 19'(d); en = e;
    @(posedge clk);
    #1;
    if (e) begin
      model += d;
      if (model > 16383) begin model = 16383; n_sat_hi++; end
      if (model < 0)     begin model = 0;     n_sat_lo++; end
    end
    check(int'(ctrl) == model && int'(msb) == model / 256 && int'(lsb) == model % 256,
          $sformatf("delta=%0d ctrl=%0d model=%0d", d, ctrl, model));
  endtask

  initial begin
    @(negedge clk);
    rst_n = 1;
    model = 8192;
    #1 check(ctrl == 14'd8192, "reset value");
    repeat (200) step(int'($urandom % 2049) - 1024, ($urandom % 4) != 0);
    repeat (30) step(4 * 1024, 1);
    repeat (60) step(-4 * 1024 + int'($urandom % 64), 1);
    repeat (50) step(int'($urandom % 513) - 256, 1);
    check(n_sat_hi > 0 && n_sat_lo > 0, "both limits reached");
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
