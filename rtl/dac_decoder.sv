// Thermometer decoder of one 4-bit DAC segment (a 4 x 4 current-cell matrix
// with 15 used cells).
//
// The two upper bits go to the row decoder, the two lower bits to the column
// decoder, both binary-to-thermometer:
//   row_th[i] = (b[3:2] >= i)  for i = 0..4     col_th[j] = (b[1:0] > j)
// The matrix switching decoder of cell (i, j) turns its current source on when
// the next row is full, or when this row is the one being filled and the
// column line is on:
//   on(i, j) = row_th[i+1] | (row_th[i] & ~row_th[i+1] & col_th[j])
// Cells fill row by row, so code b turns on exactly b cells and raising the
// code only ever adds cells: the conversion is monotonic. Cell (3, 3) is never
// used. The segmentation and the row/column/matrix decoders follow the
// design; the exact switching equation is the usual one for such a matrix.
// Combinational.
//
// Ports: b (4-bit segment code), cell_on (cell 4*i + j on, 15 cells).
module dac_decoder (
  input  logic [3:0]  b,
  output logic [14:0] cell_on
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [4:0] row_th;
  logic [3:0] col_th;

  always_comb begin
    for (int i = 0; i <= 4; i++) row_th[i] = ({1'b0, b[3:2]} >= 3'(i));
    for (int j = 0; j < 4; j++)  col_th[j] = ({1'b0, b[1:0]} > 3'(j));
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        if (4 * i + j < 15)
          cell_on[4*i+j] = row_th[i+1] | (row_th[i] & ~row_th[i+1] & col_th[j]);
      end
    end
  end
endmodule
