// rowcol_dec: row/column thermometer decoder of the DCO engine.
//
// Splits the 8-bit integer DCO code into a row index (upper 4 bits) and a
// column index (lower 4 bits) and thermometer-codes them:
// row[i] = (i <= code[7:4]) marks the rows that hold enabled units,
// col[j] = (j <  code[3:0]) marks the enabled columns of the partial row.
// 16 row and 16 column signals follow the source design; the exact encoding
// is this design's own.
//
// Timing: combinational.
`timescale 1ps / 1fs
module rowcol_dec
  import adpll_pkg::*;
(
  input  logic [INT_W-1:0] code,
  output logic [ROWS-1:0]  row,
  output logic [COLS-1:0]  col
);

  always_comb begin
    for (int i = 0; i < ROWS; i++) row[i] = (i <= int'(code[7:4]));
    for (int j = 0; j < COLS; j++) col[j] = (j <  int'(code[3:0]));
  end

endmodule
