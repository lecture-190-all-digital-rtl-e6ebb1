// Reference divider.
//
// Divides the crystal reference by DIV and marks every DIV-th clock with a
// one-cycle tick. The rest of the loop runs on the crystal clock and updates
// once per tick, so the tick rate is the loop's reference rate f_ref.
// With the default DIV = 2 a 32 MHz crystal gives f_ref = 16 MHz; the design
// names the divider but not its ratio, so DIV and the crystal frequency are
// this design's choice.
//
// Ports: clk (crystal), rst_n (asynchronous), tick (high one clock in DIV,
// first tick DIV clocks after reset).
module ref_divider #(
  parameter int unsigned DIV = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
