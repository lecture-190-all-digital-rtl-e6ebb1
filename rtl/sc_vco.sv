// Behavioural model of the switched-current oscillator (an analog block).
//
// Output frequency
//   f = F0 + KC * coarse + KV * vctrl
// The coarse word (the loop accumulator's MSB part) switches binary-weighted
// current sources in or out, a wide tuning range reached at once; the fine
// control voltage (from the DAC) trims the current within one coarse step.
// By default one coarse step (4 MHz) equals the full DAC range
// (256 mV * 15.625 MHz/V), so the two controls join without a gap, and the
// range 2.300 to 2.556 GHz covers the 2.402 to 2.480 GHz band. All constants
// are this design's choice. The model computes each edge time from the
// frequency in force at the previous edge and keeps the ideal edge time in a
// real variable, so rounding to the time precision never accumulates.
//
// Ports: en (oscillates while high, output low otherwise), coarse (MSB part),
// vctrl (fine control voltage, V), clk_out (oscillator output),
// freq_hz (frequency in force, Hz).
module sc_vco #(
  parameter int unsigned CW = 6,
  parameter real F0 = 2.300e9,
  parameter real KC = 4.0e6,
  parameter real KV = 15.625e6
) (
  input  logic          en,
  input  logic [CW-1:0] coarse,
  input  real           vctrl,
  output logic          clk_out,
  output real           freq_hz
);
  timeunit 1ps;
  timeprecision 1fs;

  real t_ideal;   // ideal time of the next edge, ps
  real f_now;     // frequency used for the next half period, Hz

  always_comb freq_hz = F0 + KC * real'(coarse) + KV * vctrl;

  initial begin
    clk_out = 1'b0;
    t_ideal = 0.0;
    forever begin
      if (!en) begin
        clk_out = 1'b0;
        @(posedge en);
        t_ideal = $realtime;
      end
      // Guard against a frequency that is not yet evaluated (time zero) or
      // out of range: never below F0 / 2.
      f_now   = (freq_hz > 0.5 * F0) ? freq_hz : 0.5 * F0;
      t_ideal = t_ideal + 0.5e12 / f_now;
      if (t_ideal < $realtime + 0.001) t_ideal = $realtime + 0.001;
      #(t_ideal - $realtime);
      if (en) clk_out = ~clk_out;
    end
  end
endmodule
