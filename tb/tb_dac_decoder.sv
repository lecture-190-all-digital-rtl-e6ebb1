// Self-checking test of the DAC segment decoder: for all 16 codes the number
// of cells on equals the code, the cells fill row by row in order
// (cell c is on exactly when c < code), and each code's cells include those
// of the code below (monotonic).
module tb_dac_decoder;
  timeunit 1ps;
  timeprecision 1fs;

  logic [3:0]  b;
  logic [14:0] cell_on, prev;
  int checks = 0, failures = 0;

  dac_decoder dut (.b, .cell_on);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    prev = '0;
    for (int c = 0; c < 16; c++) begin
      b = 4'(c);
      #10;
      check($countones(cell_on) == c, $sformatf("code %0d: %0d cells", c, $countones(cell_on)));
      for (int k = 0; k < 15; k++)
        check(cell_on[k] == (k < c), $sformatf("code %0d cell %0d", c, k));
      check((cell_on & prev) == prev, $sformatf("code %0d not monotonic", c));
      prev = cell_on;
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
