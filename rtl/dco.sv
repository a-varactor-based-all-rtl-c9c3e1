// dco: behavioural model of the low-jitter multi-phase varactor ring DCO.
// This is a simulation model of an analog circuit, not synthesizable logic.
//
// The real oscillator is a 4-stage differential ring (8 phases) whose stages
// are loaded by 256 unary minimum-size NMOS varactor units plus 3 dithering
// units. The model keeps that interface and reproduces the measured
// characteristic: the period is T_MIN_PS (134.5 MHz with no unit loaded)
// plus T_LSB_PS (14 ps) for every enabled unit, so all 259 units give
// 90.4 MHz (the chip measured 90.8 MHz). The period is sampled from the control inputs at the start of
// each DCO cycle; phase[k] lags phase[0] by k/8 of a period, and phase[0] is
// DCO_OUT. Linearity is ideal; noise and supply dependence are not modelled.
//
// Timing: free-running from time zero; inputs take effect at the next
// rising edge of phase[0].
`timescale 1fs / 1fs
module dco
  import adpll_pkg::*;
#(
  parameter int  T_MIN_PS = 7435,    // period with no unit loaded, ps
  parameter int  T_LSB_PS = 14,      // delay added per loaded unit, ps
  parameter int  PHASES   = 8
) (
  input  logic [UNITS-1:0]  unit_en,
  input  logic [DITH_N-1:0] dith,
  output logic [PHASES-1:0] phase
);

  localparam int STEPS = 2 * PHASES;   // phase-step grid, 1/16 period

  longint period_fs;

  // One pass per DCO cycle: sample the load, then step the phase pattern
  // 16 times; step s lasts floor((s+1)T/16) - floor(sT/16) fs, so a period
  // is exactly T.
  always begin
    period_fs = 64'(T_MIN_PS + T_LSB_PS * ($countones(unit_en) + $countones(dith))) * 64'd1000;
    for (int s = 0; s < STEPS; s++) begin
      for (int k = 0; k < PHASES; k++)
        phase[k] = (((s - 2 * k) % STEPS + STEPS) % STEPS) < PHASES;
      #((period_fs * 64'(s + 1)) / 64'(STEPS) - (period_fs * 64'(s)) / 64'(STEPS));
    end
  end

endmodule
