// First-order sigma-delta modulator: an accumulator that overflows.
//
// Every enabled clock the W-bit state adds the input x. The carry out of the
// adder (ovf) is the 1-bit modulator output, so over 2**W cycles ovf is high
// exactly x times and its mean is x / 2**W. In z-terms
// ovf = (x - (1 - z^-1) * sum) / 2**W, where sum is the new state: the
// truncation error is first-order high-pass shaped. This is the X+Y adder and
// latch of one MASH stage; sum and ovf are combinational (the new state before
// it is latched) so that stages can be chained without extra delay.
//
// Ports: clk, rst_n (asynchronous, active low, clears the state), en (clock
// enable), x (input word), sum (new state, combinational), ovf (carry,
// combinational), acc_q (latched state).
module sd_accum #(
  parameter int unsigned W = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] x,
  output logic [W-1:0] sum,
  output logic         ovf,
  output logic [W-1:0] acc_q
);
  timeunit 1ps;
  timeprecision 1fs;

  always_comb {ovf, sum} = {1'b0, acc_q} + {1'b0, x};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc_q <= '0;
    else if (en) acc_q <= sum;
  end
endmodule
