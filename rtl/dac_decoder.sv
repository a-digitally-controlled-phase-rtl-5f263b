// dac_decoder: row/column decoder of one 5-bit current-steering sub-DAC.
//
// The 32 equal current cells of a sub-DAC sit in 4 rows (nodes v0-v3) of 8.
// The two upper code bits drive a row decoder and the three lower bits a
// column decoder; cell (i,j) is switched on when row i is below the
// selected row, or is the selected row and column j is below the selected
// column. The switched-on cells therefore form a thermometer code: exactly
// 'code' cells are on, and raising the code only adds cells, which is what
// makes the DAC monotonic. The 4 x 8 grouping follows the paper; the
// decoding rule is the usual one for such arrays. Purely combinational.
module dac_decoder #(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 8
) (
  input  logic [$clog2(ROWS*COLS)-1:0] code,
  output logic [ROWS-1:0][COLS-1:0]    sw
);
  timeunit 1ns; timeprecision 1fs;

  localparam int unsigned CB = $clog2(COLS);
  localparam int unsigned RB = $clog2(ROWS);

  logic [RB-1:0]   row_sel;
  logic [CB-1:0]   col_sel;
  logic [ROWS-1:0] row_full;  // row decoder: rows entirely on
  logic [ROWS-1:0] row_part;  // row decoder: the partly-on row
  logic [COLS-1:0] col_on;    // column decoder: thermometer of col_sel

  assign row_sel = code[CB +: RB];
  assign col_sel = code[CB-1:0];

  always_comb begin
    for (int i = 0; i < ROWS; i++) begin
      row_full[i] = (RB'(i) < row_sel);
      row_part[i] = (RB'(i) == row_sel);
    end
    for (int j = 0; j < COLS; j++)
      col_on[j] = (CB'(j) < col_sel);
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++)
        sw[i][j] = row_full[i] | (row_part[i] & col_on[j]);
  end
endmodule
