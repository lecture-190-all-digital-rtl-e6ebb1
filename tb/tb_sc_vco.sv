// Self-checking test of the oscillator model: for several coarse words and
// control voltages it counts output edges over 10 us and checks the average
// frequency against F0 + 4 MHz * coarse + 15.625 MHz/V * vctrl to within
// 0.2 MHz (two edges), and checks that the output stays low while disabled.
module tb_sc_vco;
  timeunit 1ps;
  timeprecision 1fs;

  logic en = 0;
  logic [5:0] coarse = '0;
  real vctrl = 0.0, freq_hz;
  logic clk_out;
  int checks = 0, failures = 0;
  longint edges = 0;

  sc_vco dut (.en, .coarse, .vctrl, .clk_out, .freq_hz);

  always @(posedge clk_out) edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int cs[4] = '{0, 25, 32, 63};
    real vs[3] = '{0.0, 0.128, 0.255};
    real f_exp, f_meas;
    longint e0;
    #100000;
    check(clk_out == 1'b0 && edges == 0, "output not idle while disabled");
    en = 1;
    foreach (cs[i]) foreach (vs[j]) begin
      coarse = 6'(cs[i]); vctrl = vs[j];
      #20000;                 // let the new frequency take effect
      e0 = edges;
      #10_000_000;            // 10 us
      f_meas = real'(edges - e0) / 10.0;          // MHz
      f_exp  = 2300.0 + 4.0 * cs[i] + 15.625 * vs[j];
      check(f_meas > f_exp - 0.2 && f_meas < f_exp + 0.2,
            $sformatf("coarse %0d v %0.3f: %0.2f MHz, expected %0.2f", cs[i], vs[j], f_meas, f_exp));
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
