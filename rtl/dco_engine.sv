// dco_engine: DCO engine of the digital control system.
//
// Maps the 14-bit control word onto the oscillator's delay units: the 8
// integer bits go through the row/column thermometer decoder and the local
// decoder to 256 unary varactor enables, and the 6 fractional bits go to the
// sigma-delta modulator, which drives the 3 dithering units while sdm_en is
// set. This partitioning follows the source design.
//
// Timing: unit_en is combinational from code; dith is registered on clk.
`timescale 1ps / 1fs
module dco_engine
  import adpll_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CODE_W-1:0] code,
  input  logic              sdm_en,
  output logic [UNITS-1:0]  unit_en,
  output logic [DITH_N-1:0] dith
);

  logic [ROWS-1:0] row;
  logic [COLS-1:0] col;

  sdm u_sdm (.clk, .rst_n, .en(sdm_en), .frac(code[FRAC_W-1:0]), .dith);

  rowcol_dec u_rc (.code(code[CODE_W-1:FRAC_W]), .row, .col);

  local_dec u_ld (.row, .col, .unit_en);

endmodule
