// Variable-gain stage Ka of the loop.
//
// Multiplies the signed frequency error by 2**SH_HI while gain_hi is set and
// by 2**SH_LO otherwise (an arithmetic left shift, no multiplier). With the
// default oscillator and DAC constants one control-word step moves the
// oscillator by 1/4096 of a feedback cycle per reference period, so the loop
// gain K = Ka / 4096 is 1/4 in fast-lock mode and 1/64 in lock. The design
// shows a variable gain steered by the amplitude detector; the two gains are
// this design's choice. Combinational.
//
// Ports: err (signed error), gain_hi (gain select), dout (err * Ka).
module var_gain
  import adfs_pkg::*;
#(
  parameter int unsigned EW    = ERR_W,
  parameter int unsigned SH_HI = 10,
  parameter int unsigned SH_LO = 6,
  parameter int unsigned OW    = EW + SH_HI
) (
  input  logic signed [EW-1:0] err,
  input  logic                 gain_hi,
  output logic signed [OW-1:0] dout
);
  timeunit 1ps;
  timeprecision 1fs;

  always_comb begin
    if (gain_hi) dout = OW'(err) <<< SH_HI;
    else         dout = OW'(err) <<< SH_LO;
  end
endmodule
