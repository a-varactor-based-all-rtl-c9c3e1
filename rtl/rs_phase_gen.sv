// rs_phase_gen: random-sampling phase generator of the RSS engine.
//
// Once per reference period it picks one of the P multi-phase reference
// clocks, according to the pseudo-random index RM_N, and delivers it as the
// random-sampling reference RM_ref. Selecting phase k delays the update of
// the DCO's synchronized registers by k DCO periods, so consecutive updates
// are (1 +- m/N) reference periods apart (|m| <= P-1) while exactly one
// update still happens per reference period on average.
//
// Implementation (this design's own, to keep RM_ref glitch-free): the
// multiplexer selects the rising-edge detect ck_ph[k] & ~ck_ph[k+1] of the
// chosen phase and a flip-flop on DCO_OUT registers it, so RM_ref is a pulse
// one DCO period wide. The select register loads RM_N when the last phase
// rises, which is after every pulse of the current period and well after
// RM_N changed at the CK_ref edge.
//
// Timing: with select k, RM_ref rises k+1 DCO edges after tap 0 rises.
`timescale 1ps / 1fs
module rs_phase_gen #(
  parameter int P     = 8,
  parameter int SEL_W = 3
) (
  input  logic             dco_clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [P:0]       ck_ph,
  input  logic [SEL_W-1:0] rm_n,
  output logic             rm_ref
);

  logic [SEL_W-1:0] sel_q;
  logic [P-1:0]     rise;
  logic             last_rise;

  always_comb begin
    for (int k = 0; k < P; k++) rise[k] = ck_ph[k] & ~ck_ph[k+1];
  end
  assign last_rise = rise[P-1];

  always_ff @(posedge dco_clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q  <= '0;
      rm_ref <= 1'b0;
    end else begin
      if (last_rise) sel_q <= SEL_W'(int'(rm_n) % P);
      rm_ref <= en & rise[sel_q];
    end
  end

endmodule
