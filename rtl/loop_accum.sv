// Loop accumulator: the 1/(1 - z^-1) integrator of the loop.
//
// Adds the gained frequency error to the oscillator control word on every
// reference tick. Since the frequency error summed over time is a phase
// error, the control word follows the phase error and the loop locks in
// phase. The word saturates at 0 and at its maximum instead of wrapping, so a
// large error can never flip the oscillator from one end of its range to the
// other. The upper MSB_W bits ("MSB parts") drive the oscillator's coarse
// current switches directly; the lower LSB_W bits ("LSB parts") go to the FIR
// filter and the DAC. The split follows the design; the widths, the reset
// value (mid-range) and the saturation are this design's choice.
//
// Ports: clk, rst_n (asynchronous, loads RST_VAL), en (reference tick),
// delta (signed increment), ctrl (control word), msb, lsb (its two parts).
module loop_accum
  import adfs_pkg::*;
#(
  parameter int unsigned DW      = ERR_W + 10,
  parameter int unsigned MW      = MSB_W,
  parameter int unsigned LW      = LSB_W,
  parameter logic [MW+LW-1:0] RST_VAL = (MW+LW)'(1) << (MW + LW - 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [DW-1:0] delta,
  output logic [MW+LW-1:0]     ctrl,
  output logic [MW-1:0]        msb,
  output logic [LW-1:0]        lsb
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned CW = MW + LW;
  localparam int unsigned SW = ((DW > CW) ? DW : CW) + 2;

  logic signed [SW-1:0] next_full;
  logic [CW-1:0]        next_sat;

  always_comb begin
    next_full = $signed({{(SW-CW){1'b0}}, ctrl}) + SW'(delta);
    if (next_full < 0)                                   next_sat = '0;
    else if (next_full > $signed(SW'({CW{1'b1}})))        next_sat = '1;
    else                                                 next_sat = next_full[CW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  ctrl <= RST_VAL;
    else if (en) ctrl <= next_sat;
  end

  assign msb = ctrl[CW-1:LW];
  assign lsb = ctrl[LW-1:0];
endmodule
