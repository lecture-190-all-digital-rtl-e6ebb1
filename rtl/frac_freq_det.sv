// Fractional frequency detector.
//
// Measures, once per reference period, how many feedback (prescaler) cycles
// the period held and subtracts that count from the wanted divide ratio:
//   err = ndiv - count = N * (f_ref - f_fb / N) / f_ref,
// the "N / w_ref" frequency comparison of the loop's linear model. Because
// ndiv is the integer part plus the MASH output, the mean of err is zero
// exactly when f_fb = f_ref * (N + K/F). Summed over time, err is the phase
// error in feedback cycles, so the loop accumulator behind it closes a phase
// lock.
//
// How: a Gray-coded counter runs on the feedback clock. The crystal-clock
// side passes it through a two-flop synchronizer, converts it to binary and,
// on every reference tick, takes the difference to the value of the previous
// tick (modulo 2**CW). The counting method, the Gray code and the
// synchronizer are this design's choice; the design gives only the function.
//
// Ports: clk_fb (feedback clock), clk (crystal clock), rst_n (asynchronous),
// tick (reference tick), ndiv (divide ratio of this period), err (signed
// error, registered on the tick), count (measured cycles, registered on the
// tick).
module frac_freq_det
  import adfs_pkg::*;
#(
  parameter int unsigned CW = CNT_W,
  parameter int unsigned NW = NDIV_W,
  parameter int unsigned EW = ERR_W
) (
  input  logic                 clk_fb,
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 tick,
  input  logic [NW-1:0]        ndiv,
  output logic signed [EW-1:0] err,
  output logic [CW-1:0]        count
);
  timeunit 1ps;
  timeprecision 1fs;

  // Feedback-clock side: binary counter and its Gray image.
  logic [CW-1:0] bin_fb, gray_fb;
  always_ff @(posedge clk_fb or negedge rst_n) begin
    if (!rst_n) begin
      bin_fb  <= '0;
      gray_fb <= '0;
    end else begin
      bin_fb  <= bin_fb + 1'b1;
      gray_fb <= (bin_fb + 1'b1) ^ ((bin_fb + 1'b1) >> 1);
    end
  end

  // Crystal-clock side.
  logic [CW-1:0] sync1, sync2, bin_now, bin_prev, diff;

  always_comb begin
    bin_now[CW-1] = sync2[CW-1];
    for (int i = CW - 2; i >= 0; i--) bin_now[i] = bin_now[i+1] ^ sync2[i];
    diff = bin_now - bin_prev;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1    <= '0;
      sync2    <= '0;
      bin_prev <= '0;
      count    <= '0;
      err      <= '0;
    end else begin
      sync1 <= gray_fb;
      sync2 <= sync1;
      if (tick) begin
        bin_prev <= bin_now;
        count    <= diff;
        err      <= EW'($signed({1'b0, ndiv})) - EW'($signed({1'b0, diff}));
      end
    end
  end
endmodule
