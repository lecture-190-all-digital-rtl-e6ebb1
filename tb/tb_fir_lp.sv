// Self-checking test of the linear-phase FIR filter with its default
// coefficients h = 1 3 3 1 and a shift of 3. Random inputs with random
// enables are compared with the direct convolution floor(sum h(k) x(n-k) / 8)
// computed in the test bench; an impulse and a step check the impulse
// response and the unity DC gain (a constant 255 must come out as 255).
module tb_fir_lp;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 0, rst_n = 1, en = 0;
  logic [7:0] x = '0, y;
  // Reset starts high and falls at 1 ps so that the asynchronous reset
  // sees an edge whatever the flops' power-up values.
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0;
  int hx[4];
  int h[4] = '{1, 3, 3, 1};

  fir_lp dut (.clk, .rst_n, .en, .x, .y);

  always #5000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step(input int v, input bit e);
    int acc;
    @(negedge clk);
    x = 8'(v); en = e;
    @(posedge clk);
    #1;
    if (e) begin
      for (int k = 3; k > 0; k--) hx[k] = hx[k-1];
      hx[0] = v;
      acc = 0;
      for (int k = 0; k < 4; k++) acc += h[k] * hx[k];
      check(int'(y) == acc / 8, $sformatf("x=%0d y=%0d expected %0d", v, y, acc / 8));
    end
  endtask

  initial begin
    hx = '{default: 0};
    @(negedge clk);
    rst_n = 1;
    // Impulse of 64: outputs 8 24 24 8 0
    step(64, 1); step(0, 1); step(0, 1); step(0, 1); step(0, 1);
    repeat (300) step(int'($urandom % 256), ($urandom % 5) != 0);
    repeat (6) step(255, 1);
    check(y == 8'd255, "unity DC gain at full scale");
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
