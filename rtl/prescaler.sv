// Prescaler: divides the oscillator output by 2**STAGES.
//
// A ripple chain of toggle flip-flops: stage 0 toggles on every rising edge
// of the oscillator, each later stage on the rising edge of the stage before.
// The chain counts down (each stage toggles when the one before rises); the
// last stage is the feedback clock f_fb = f_out / 2**STAGES with a 50 %
// duty cycle. The design builds this divider from two cascaded feedback
// current-mode-logic flip-flops; here they are ordinary flip-flops, and the
// two-stage (divide-by-4) default follows the two flip-flops drawn.
//
// Ports: clk_in (oscillator), rst_n (asynchronous), clk_out (feedback clock).
module prescaler #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk_in,
  input  logic rst_n,
  output logic clk_out
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [STAGES:0] stage_clk;
  assign stage_clk[0] = clk_in;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    logic q;
    always_ff @(posedge stage_clk[i] or negedge rst_n) begin
      if (!rst_n) q <= 1'b0;
      else        q <= ~q;
    end
    assign stage_clk[i+1] = q;
  end

  assign clk_out = stage_clk[STAGES];
endmodule
