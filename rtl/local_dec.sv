// local_dec: local decoder of the DCO engine.
//
// One small gate per varactor unit combines its row and column signals:
// unit (i, j) is enabled when row i is full (row[i+1] set) or when row i is
// the partial row (row[i] set) and column j is enabled. The number of
// enabled units therefore equals the 8-bit code, and raising the code by one
// enables exactly one more unit (unary, monotonic). Unit index is 16*i + j.
// The 256 outputs follow the source design; the gate equation is the usual
// row/column matrix decoding chosen here.
//
// Timing: combinational.
`timescale 1ps / 1fs
module local_dec
  import adpll_pkg::*;
(
  input  logic [ROWS-1:0]  row,
  input  logic [COLS-1:0]  col,
  output logic [UNITS-1:0] unit_en
);

  logic [ROWS:0] row_x;

  always_comb begin
    row_x = {1'b0, row};
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++)
        unit_en[i*COLS + j] = row_x[i+1] | (row_x[i] & col[j]);
  end

endmodule
