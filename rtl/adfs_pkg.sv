// Shared constants and types of the all-digital fractional-N frequency
// synthesizer.
//
// The synthesizer locks an oscillator to f_out = P * f_ref * (N + K/F), where
// P is the prescaler ratio, f_ref the divided reference rate, N the integer
// part of the divide ratio and K/F the fraction fed to the 3rd-order MASH.
// With the defaults chosen here (P = 4, f_ref = 16 MHz, F = 64) one step of
// K is exactly 1 MHz, the Bluetooth channel spacing, and channel k
// (2402 + k MHz) is reached with N = (2402 + k) / 64, K = (2402 + k) mod 64.
// The fraction width F = 64 follows the 32/64 and 0/64 examples of the
// design's noise simulations; the other widths are this design's choices.
package adfs_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  // Fraction (MASH accumulator) width: denominator F = 2**FRAC_W.
  localparam int unsigned FRAC_W  = 6;
  // Integer part of the divide ratio.
  localparam int unsigned NINT_W  = 6;
  // Divide ratio handed to the frequency detector (integer part + MASH output).
  localparam int unsigned NDIV_W  = 7;
  // Free-running feedback cycle counter in the frequency detector.
  localparam int unsigned CNT_W   = 8;
  // Signed frequency error.
  localparam int unsigned ERR_W   = 9;
  // Oscillator control word: MSB part drives the oscillator's coarse current
  // switches directly, LSB part goes through the FIR filter and the DAC.
  localparam int unsigned MSB_W   = 6;
  localparam int unsigned LSB_W   = 8;
  localparam int unsigned CTRL_W  = MSB_W + LSB_W;

  // MASH 1-1-1 output: c1 + (1-z^-1) c2 + (1-z^-1)^2 c3 lies in -3..+4.
  typedef logic signed [3:0] mash_y_t;
  typedef logic signed [ERR_W-1:0] err_t;
  typedef logic [CTRL_W-1:0] ctrl_t;
endpackage
