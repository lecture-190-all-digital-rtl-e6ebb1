// Behavioural model of the 8-bit segmented current-steering DAC (an analog
// block: current sources and a load resistor).
//
// The code is split into a 4-bit MSB and a 4-bit LSB segment. Each segment is
// decoded to a thermometer code by a synthesizable dac_decoder (row, column
// and matrix switching decoders) and switches on that many of its 15
// unweighted current cells. MSB cells carry I_MSB = 16 * I_LSB, so
//   I_out = I_MSB * (number of MSB cells on) + I_LSB * (number of LSB cells on)
//         = code * I_LSB,        V_out = I_out * R_LOAD.
// The segmentation, the 16:1 cell ratio and the output equation follow the
// design; the cell current and the load resistance are this design's choice
// (1 mV per LSB by default). The output follows the code without delay.
//
// Ports: code (8-bit input, B7..B0), msb_cells, lsb_cells (switch states of
// the two matrices), i_out (A), v_out (V).
module dac8 #(
  parameter real I_LSB  = 10.0e-6,
  parameter real R_LOAD = 100.0
) (
  input  logic [7:0]  code,
  output logic [14:0] msb_cells,
  output logic [14:0] lsb_cells,
  output real         i_out,
  output real         v_out
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam real I_MSB = 16.0 * I_LSB;

  dac_decoder u_msb (.b(code[7:4]), .cell_on(msb_cells));
  dac_decoder u_lsb (.b(code[3:0]), .cell_on(lsb_cells));

  always_comb begin
    i_out = I_MSB * real'($countones(msb_cells)) + I_LSB * real'($countones(lsb_cells));
    v_out = i_out * R_LOAD;
  end
endmodule
