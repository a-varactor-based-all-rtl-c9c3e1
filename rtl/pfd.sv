// pfd: phase-frequency detector of the ADPLL engine.
//
// A subtractor of the two phase accumulators: phi_e = PA2 - PA1 in units of
// one DCO period, computed modulo 2^PHASE_W and saturated to ERR_W bits.
// Positive phi_e means the DCO has run ahead of the reference. The sign
// convention and the saturation are this design's own.
//
// Timing: combinational.
`timescale 1ps / 1fs
module pfd #(
  parameter int PHASE_W = 16,
  parameter int ERR_W   = 10
) (
  input  logic [PHASE_W-1:0]      pa_ref,
  input  logic [PHASE_W-1:0]      pa_dco,
  output logic signed [ERR_W-1:0] phi_e
);

  localparam logic signed [PHASE_W-1:0] EMAX = PHASE_W'((1 << (ERR_W - 1)) - 1);
  localparam logic signed [PHASE_W-1:0] EMIN = -EMAX - 1;

  logic signed [PHASE_W-1:0] diff;

  always_comb begin
    diff = $signed(pa_dco - pa_ref);
    if (diff > EMAX)      phi_e = EMAX[ERR_W-1:0];
    else if (diff < EMIN) phi_e = EMIN[ERR_W-1:0];
    else                  phi_e = diff[ERR_W-1:0];
  end

endmodule
