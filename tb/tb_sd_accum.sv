// Self-checking test of the first-order sigma-delta accumulator.
// Phase 1 drives random inputs and random enables and compares sum, ovf and
// the latched state with a reference model kept in integers. Phase 2 holds
// each of several constant inputs x for 2**W cycles from a cleared state and
// checks that the overflow fired exactly x times (mean output x / 2**W).
module tb_sd_accum;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int W = 6;
  logic clk = 0, rst_n = 1, en = 0;
  logic [W-1:0] x = '0, sum, acc_q;
  logic ovf;
  // Reset starts high and falls at 1 ps so that the asynchronous reset
  // sees an edge whatever the flops' power-up values.
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0;
  int model;

  sd_accum #(.W(W)) dut (.clk, .rst_n, .en, .x, .sum, .ovf, .acc_q);

  always #5000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int ones;
    int xs[5] = '{0, 1, 21, 32, 63};
    repeat (2) @(posedge clk);
    rst_n = 1;
    model = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      x  = W'($urandom);
      en = ($urandom % 4) != 0;
      #1;
      check(sum == W'(model + x) && ovf == ((model + x) >= 2**W),
            $sformatf("comb n=%0d acc=%0d x=%0d sum=%0d ovf=%0d", n, model, x, sum, ovf));
      @(posedge clk);
      if (en) model = (model + x) % (2**W);
      #1;
      check(acc_q == W'(model), $sformatf("state n=%0d", n));
    end
    foreach (xs[i]) begin
      @(negedge clk);
      rst_n = 0; en = 1; x = W'(xs[i]);
      #1 rst_n = 1;
      ones = 0;
      repeat (2**W) begin
        @(negedge clk);
        ones += ovf;
        @(posedge clk);
      end
      check(ones == xs[i], $sformatf("x=%0d: %0d overflows in %0d cycles", xs[i], ones, 2**W));
    end
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
