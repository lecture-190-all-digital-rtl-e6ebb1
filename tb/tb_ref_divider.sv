// Self-checking test of the reference divider: for the default ratio 2 and
// for ratio 5 it checks that tick is high exactly one clock in every DIV,
// the first time DIV clocks after reset.
module tb_ref_divider;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 0, rst_n = 1;
  logic tick2, tick5;
  // Reset starts high and falls at 1 ps so that the asynchronous reset
  // sees an edge whatever the flops' power-up values.
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0;

  ref_divider           dut2 (.clk, .rst_n, .tick(tick2));
  ref_divider #(.DIV(5)) dut5 (.clk, .rst_n, .tick(tick5));

  always #5000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    @(negedge clk);
    rst_n = 1;
    for (int n = 1; n <= 60; n++) begin
      @(posedge clk);
      #1;
      check(tick2 == (n % 2 == 0), $sformatf("div2 cycle %0d tick=%0d", n, tick2));
      check(tick5 == (n % 5 == 0), $sformatf("div5 cycle %0d tick=%0d", n, tick5));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
