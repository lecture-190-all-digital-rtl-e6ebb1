// Linear-phase FIR low-pass filter in transposed direct form.
//
// y(n) = (sum_k h(k) * x(n-k)) >> SHIFT for k = 0..TAPS-1, with symmetric
// coefficients h(k) = h(TAPS-1-k). Only the first TAPS/2 coefficients are
// given (H); each product h(k)*x(n) is formed once and fed to the two adders
// of the delay chain that need it, the folded transposed form of the design's
// linear-phase filter: TAPS/2 multipliers, TAPS-1 partial-sum registers.
// The default H = {1, 3} (h = 1 3 3 1) with SHIFT = 3 is a binomial low-pass
// with unity DC gain, so an unsigned input word can never overflow the
// output. The structure follows the design; TAPS, the coefficients and the
// scaling are this design's choice.
//
// Ports: clk, rst_n (asynchronous, clears the delay line), en (reference
// tick), x (unsigned input, the LSB part of the control word), y (registered
// output): y after tick n is the filter output for x(n), x(n-1), ...
module fir_lp
  import adfs_pkg::*;
#(
  parameter int unsigned W     = LSB_W,
  parameter int unsigned TAPS  = 4,
  parameter int unsigned CW    = 4,
  parameter int unsigned SHIFT = 3,
  parameter logic [CW-1:0] H [TAPS/2] = '{4'd1, 4'd3}
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned AW = W + CW + $clog2(TAPS) + 1;

  logic [AW-1:0] prod [TAPS/2];
  logic [AW-1:0] s [TAPS];       // s[0] unused: y = p(0) + s[1]
  logic [AW-1:0] acc;

  // Coefficient index of tap k in the folded array.
  function automatic int unsigned fold(int unsigned k);
    return (k < TAPS / 2) ? k : TAPS - 1 - k;
  endfunction

  always_comb begin
    for (int k = 0; k < TAPS / 2; k++) prod[k] = AW'(x) * AW'(H[k]);
    acc = prod[fold(0)] + s[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) s[k] <= '0;
      y <= '0;
    end else if (en) begin
      s[0]      <= '0;
      s[TAPS-1] <= prod[fold(TAPS - 1)];
      for (int k = 1; k < TAPS - 1; k++) s[k] <= prod[fold(k)] + s[k+1];
      y <= W'(acc >> SHIFT);
    end
  end
endmodule
