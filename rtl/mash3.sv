// Third-order MASH 1-1-1 sigma-delta modulator of the fractional divide ratio.
//
// Three first-order stages (sd_accum) are cascaded: stage 1 adds the
// numerator x, stage 2 adds the new state of stage 1, stage 3 the new state of
// stage 2. Their carries c1, c2, c3 are recombined as in the block diagram:
//   t = c2 + c3 - z^-1 c3,   y = c1 + t - z^-1 t
// so y = c1 + (1-z^-1) c2 + (1-z^-1)^2 c3 and
//   2**W * y = x - (1-z^-1)^3 e3,
// where e3 is the new state of stage 3: the mean of y is x / 2**W and its
// quantisation noise is third-order high-pass shaped. y lies in -3..+4.
//
// Ports: clk, rst_n (asynchronous, clears all state), en (one update per
// reference period), x (numerator K, denominator F = 2**W), y (registered
// output, valid one enabled clock after the x it belongs to), e3 (new state
// of stage 3, for observation).
// The structure follows the design; the width W = 6 (F = 64) follows its
// 32/64 simulation example; the output register is this design's choice.
module mash3
  import adfs_pkg::*;
#(
  parameter int unsigned W = FRAC_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] x,
  output mash_y_t      y,
  output logic [W-1:0] e3
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [W-1:0] s1, s2, s3;
  logic         c1, c2, c3;

  sd_accum #(.W(W)) u_st1 (.clk, .rst_n, .en, .x(x),  .sum(s1), .ovf(c1), .acc_q());
  sd_accum #(.W(W)) u_st2 (.clk, .rst_n, .en, .x(s1), .sum(s2), .ovf(c2), .acc_q());
  sd_accum #(.W(W)) u_st3 (.clk, .rst_n, .en, .x(s2), .sum(s3), .ovf(c3), .acc_q());

  assign e3 = s3;

  // Differentiator: the two z^-1 registers of the block diagram.
  logic                c3_d;
  logic signed [2:0]   t, t_d;     // t in -1..+2
  mash_y_t             y_next;

  always_comb begin
    t      = $signed({2'b00, c2}) + $signed({2'b00, c3}) - $signed({2'b00, c3_d});
    y_next = mash_y_t'($signed({3'b000, c1})) + mash_y_t'(t) - mash_y_t'(t_d);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c3_d <= 1'b0;
      t_d  <= '0;
      y    <= '0;
    end else if (en) begin
      c3_d <= c3;
      t_d  <= t;
      y    <= y_next;
    end
  end
endmodule
