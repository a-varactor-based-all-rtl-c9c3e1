// sdm: digital sigma-delta modulator of the DCO engine.
//
// Dithers the 6 fractional bits of the DCO control word onto 3 extra
// varactor delay units, so that the time-averaged DCO frequency falls
// between two integer code steps. This design uses a second-order MASH 1-1:
// two cascaded 6-bit accumulators with carries c1, c2 give
// y = c1 + c2[n] - c2[n-1] in {-1, 0, 1, 2}, whose mean is frac/64. The unit
// count y + 1 (0..3, mean 1 + frac/64) is thermometer-coded onto the three
// dithering units. With dithering off the count is held at 1, so turning it
// on does not step the mean frequency. The 6-bit input and the 3 dithering
// units follow the source design; the modulator order, the MASH structure,
// the +1 offset and the CK_ref clock are this design's own.
//
// Timing: dith is a register updated on each clk rising edge.
`timescale 1ps / 1fs
module sdm
  import adpll_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [FRAC_W-1:0] frac,
  output logic [DITH_N-1:0] dith
);

  logic [FRAC_W-1:0] acc1, acc2;
  logic              c2_prev;
  logic [FRAC_W:0]   s1, s2;
  logic [1:0]        cnt;

  always_comb begin
    s1  = {1'b0, acc1} + {1'b0, frac};
    s2  = {1'b0, acc2} + {1'b0, s1[FRAC_W-1:0]};
    // y + 1 = c1 + c2 + (1 - c2_prev), always in 0..3
    cnt = 2'(s1[FRAC_W]) + 2'(s2[FRAC_W]) + 2'(!c2_prev);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc1    <= '0;
      acc2    <= '0;
      c2_prev <= 1'b0;
      dith    <= 3'b001;
    end else if (!en) begin
      acc1    <= '0;
      acc2    <= '0;
      c2_prev <= 1'b0;
      dith    <= 3'b001;
    end else begin
      acc1    <= s1[FRAC_W-1:0];
      acc2    <= s2[FRAC_W-1:0];
      c2_prev <= s2[FRAC_W];
      dith    <= 3'((4'b0001 << cnt) - 4'd1);
    end
  end

endmodule
