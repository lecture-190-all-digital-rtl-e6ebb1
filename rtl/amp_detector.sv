// Amplitude detector: decides how large the frequency error is.
//
// Keeps the sum of the last WIN frequency errors (a moving window, updated on
// each reference tick) and raises gain_hi while the magnitude of that sum is
// at least TH. The window sum is WIN times the mean error, so gain_hi means
// the oscillator is off by at least TH/WIN feedback cycles per reference
// period (32 MHz with the defaults). In lock the window sum is the phase
// change over the window, which the MASH dither alone keeps within about
// +-5 feedback cycles, below TH; a window of 8 with a threshold of 4 proved
// too tight (the dither tripped the fast-lock gain and upset the lock). gain_hi selects the large loop gain for fast locking.
// The design names this block and shows that it steers the variable gain;
// the window sum and the threshold are this design's choice.
//
// Ports: clk, rst_n (asynchronous), en (reference tick), err (signed error),
// gain_hi (registered decision, one tick after the error it reflects),
// amp (registered magnitude of the window sum).
module amp_detector
  import adfs_pkg::*;
#(
  parameter int unsigned EW  = ERR_W,
  parameter int unsigned WIN = 16,
  parameter int unsigned TH  = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [EW-1:0] err,
  output logic                 gain_hi,
  output logic [EW+$clog2(WIN)-1:0] amp
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned SW = EW + $clog2(WIN) + 1;

  logic signed [EW-1:0] hist [WIN];
  logic signed [SW-1:0] wsum, wsum_next;
  logic        [SW-1:0] mag;

  always_comb begin
    wsum_next = wsum + SW'(err) - SW'(hist[WIN-1]);
    mag       = wsum_next[SW-1] ? SW'(-wsum_next) : SW'(wsum_next);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < WIN; i++) hist[i] <= '0;
      wsum    <= '0;
      gain_hi <= 1'b1;
      amp     <= '0;
    end else if (en) begin
      hist[0] <= err;
      for (int i = 1; i < WIN; i++) hist[i] <= hist[i-1];
      wsum    <= wsum_next;
      gain_hi <= (mag >= SW'(TH));
      amp     <= mag[SW-2:0];
    end
  end
endmodule
