// Self-checking test of the prescaler: with the default two stages (divide by
// 4) and with three stages (divide by 8) it checks the output after every
// input edge against the state of a down counter (the ripple chain counts
// down), so the output period is 4 (8) input cycles, and that its duty cycle
// is 50 %.
module tb_prescaler;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 0, rst_n = 1;
  logic q4, q8;
  // Reset starts high and falls at 1 ps so that the asynchronous reset
  // sees an edge whatever the flops' power-up values.
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0;

  prescaler              dut4 (.clk_in(clk), .rst_n, .clk_out(q4));
  prescaler #(.STAGES(3)) dut8 (.clk_in(clk), .rst_n, .clk_out(q8));

  always #208 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int hi4 = 0, hi8 = 0;
    int m;
    @(negedge clk);
    rst_n = 1;
    for (int n = 1; n <= 64; n++) begin
      @(posedge clk);
      #10;
      // Each stage toggles on the rising edge of the one before, so the
      // chain counts down: after n input edges a k-stage divider shows
      // bit (k-1) of -n.
      m = -n;
      check(q4 == m[1], $sformatf("div4 after %0d edges q=%0d", n, q4));
      check(q8 == m[2], $sformatf("div8 after %0d edges q=%0d", n, q8));
      hi4 += q4; hi8 += q8;
    end
    check(hi4 == 32 && hi8 == 32, "duty cycle");
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
