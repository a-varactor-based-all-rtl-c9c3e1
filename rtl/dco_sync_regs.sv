// dco_sync_regs: synchronized registers of the DCO system.
//
// Hold the 256 varactor enables and 3 dithering enables that load the DCO,
// and update them only on rising edges of RM_clk. RM_clk is the reference
// clock CK_ref, or the random-sampling reference RM_ref when Spur_En is
// set, so in spur suppression mode the DCO frequency changes at a random
// one of P instants inside each reference period instead of at a fixed one.
// The registers and the RM_clk selection follow the source design; the
// clock multiplexer is a plain gate chosen here. Spur_En changes just after
// a CK_ref rising edge, when CK_ref is high and RM_ref is normally low, so
// the switch itself creates no extra rising edge.
//
// Timing: outputs change on rising edges of rm_clk; reset clears them.
`timescale 1ps / 1fs
module dco_sync_regs
  import adpll_pkg::*;
(
  input  logic              ck_ref,
  input  logic              rm_ref,
  input  logic              spur_en,
  input  logic              rst_n,
  input  logic [UNITS-1:0]  unit_en_d,
  input  logic [DITH_N-1:0] dith_d,
  output logic [UNITS-1:0]  unit_en_q,
  output logic [DITH_N-1:0] dith_q,
  output logic              rm_clk
);

  assign rm_clk = spur_en ? rm_ref : ck_ref;

  always_ff @(posedge rm_clk or negedge rst_n) begin
    if (!rst_n) begin
      unit_en_q <= '0;
      dith_q    <= '0;
    end else begin
      unit_en_q <= unit_en_d;
      dith_q    <= dith_d;
    end
  end

endmodule
