// adpll_pkg: types and constants shared by the varactor-based multi-phase
// ADPLL with random-sampling reference spur suppression (RSS).
//
// The DCO control word is 14 bits: 8 integer bits drive the 256 unary
// varactor units through the row/column and local decoders, and 6 fractional
// bits are dithered by the sigma-delta modulator onto 3 extra units.
// The mode sequence is frequency acquisition (FA), phase acquisition (PA),
// dithering and spur suppression (RSS). Loop gains are powers of two,
// expressed as left shifts in units of one fractional LSB (1/64 code LSB);
// the default PA gains alpha = 1/64 and beta = 1/8 code LSB are shifts 0 and 3.
// The configuration struct and its field widths are this design's own choice.
`timescale 1ps / 1fs
package adpll_pkg;

  localparam int CODE_W = 14;   // DCO control word
  localparam int INT_W  = 8;    // integer part -> 256 varactor units
  localparam int FRAC_W = 6;    // fractional part -> sigma-delta dithering
  localparam int UNITS  = 256;  // unary varactor delay units
  localparam int DITH_N = 3;    // dithering delay units
  localparam int ROWS   = 16;
  localparam int COLS   = 16;

  typedef enum logic [1:0] {
    MODE_FA     = 2'd0,   // frequency acquisition, linear phase error
    MODE_PA     = 2'd1,   // phase acquisition, slicer (bang-bang) error
    MODE_DITHER = 2'd2,   // locked, sigma-delta dithering on
    MODE_RSS    = 2'd3    // locked, random-sampling spur suppression on
  } mode_e;

  typedef struct packed {
    logic [7:0] n_div;        // division ratio N (fDCO = N * fref)
    logic [3:0] fa_alpha_sh;  // FA integral gain shift
    logic [3:0] fa_beta_sh;   // FA proportional gain shift
    logic [3:0] alpha_sh;     // PA/dither/RSS integral gain shift
    logic [3:0] beta_sh;      // PA/dither/RSS proportional gain shift
    logic [7:0] pa_sum_th;    // max |sum of slicer decisions| over a window
    logic [7:0] pa_int_th;    // max |change of integral| over a window
    logic       rss_en;       // allow the spur suppression mode
  } adpll_cfg_t;

  // Configuration of the fabricated chip (N = 10, alpha/beta = 1/64, 1/8).
  localparam adpll_cfg_t CFG_DEFAULT = '{
    n_div: 8'd10, fa_alpha_sh: 4'd6, fa_beta_sh: 4'd10,
    alpha_sh: 4'd0, beta_sh: 4'd3,
    pa_sum_th: 8'd8, pa_int_th: 8'd64, rss_en: 1'b1
  };

endpackage
