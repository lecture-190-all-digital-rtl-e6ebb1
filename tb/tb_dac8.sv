// Self-checking test of the 8-bit DAC model: for all 256 codes the output
// current is I_LSB * (16 * code[7:4] + code[3:0]) = code * 10 uA and the
// output voltage that current times 100 ohm; the transfer is monotonic.
module tb_dac8;
  timeunit 1ps;
  timeprecision 1fs;

  logic [7:0]  code;
  logic [14:0] msb_cells, lsb_cells;
  real i_out, v_out, v_prev;
  int checks = 0, failures = 0;

  dac8 dut (.code, .msb_cells, .lsb_cells, .i_out, .v_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    real i_exp;
    v_prev = -1.0;
    for (int c = 0; c < 256; c++) begin
      code = 8'(c);
      #10;
      i_exp = 10.0e-6 * real'(16 * (c / 16) + (c % 16));
      check(i_out > i_exp - 1.0e-9 && i_out < i_exp + 1.0e-9,
            $sformatf("code %0d: i_out %g expected %g", c, i_out, i_exp));
      check(v_out > i_exp * 100.0 - 1.0e-7 && v_out < i_exp * 100.0 + 1.0e-7,
            $sformatf("code %0d: v_out %g", c, v_out));
      check(v_out > v_prev, $sformatf("code %0d not monotonic", c));
      v_prev = v_out;
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
