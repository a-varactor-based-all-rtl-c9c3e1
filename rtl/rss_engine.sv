// rss_engine: reference spur suppression engine.
//
// Combines the PRBS pseudo-random number generator (CK_ref domain), the
// multi-phase generator and the random-sampling phase generator (DCO_OUT
// domain). When Spur_En is set it outputs RM_ref: one pulse per reference
// period, placed 0..P-1 DCO periods after the aligned reference edge
// according to RM_N. The two-flip-flop synchroniser that brings Spur_En into
// the DCO domain is this design's own; the three sub-blocks follow the
// source design.
//
// Timing: RM_N advances on every CK_ref rising edge; RM_ref pulses start two
// DCO edges after Spur_En rises.
`timescale 1ps / 1fs
module rss_engine #(
  parameter int P = 8
) (
  input  logic       ck_ref,
  input  logic       dco_clk,
  input  logic       rst_n,
  input  logic       spur_en,
  output logic       rm_ref,
  output logic [2:0] rm_n
);

  logic [P:0] ck_ph;
  logic [1:0] en_sync;

  prbs7 u_prbs (.clk(ck_ref), .rst_n, .en(1'b1), .rm_n);

  multiphase_gen #(.P(P)) u_mpg (.dco_clk, .rst_n, .ck_ref, .ck_ph);

  always_ff @(posedge dco_clk or negedge rst_n) begin
    if (!rst_n) en_sync <= '0;
    else        en_sync <= {en_sync[0], spur_en};
  end

  rs_phase_gen #(.P(P), .SEL_W(3)) u_rspg (
    .dco_clk, .rst_n, .en(en_sync[1]), .ck_ph, .rm_n, .rm_ref
  );

endmodule
