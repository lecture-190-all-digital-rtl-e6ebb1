// Self-checking test of the variable gain: every error value in -256..255
// with both gain settings, compared with err * 1024 and err * 64.
module tb_var_gain;
  timeunit 1ps;
  timeprecision 1fs;

  logic signed [8:0]  err;
  logic               gain_hi;
  logic signed [18:0] dout;
  int checks = 0, failures = 0;

  var_gain dut (.err, .gain_hi, .dout);

  initial begin
    for (int e = -256; e < 256; e++) begin
      for (int g = 0; g < 2; g++) begin
        err = 9'(e); gain_hi = g[0];
        #10;
        checks++;
        if (int'(dout) != e * (g ? 1024 : 64)) begin
          failures++;
          $display("FAIL: err=%0d hi=%0d dout=%0d", e, g, dout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(100_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
