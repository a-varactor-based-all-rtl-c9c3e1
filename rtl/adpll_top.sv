// adpll_top: varactor-based all-digital multi-phase PLL with random-sampling
// reference spur suppression.
//
// Digital control system: the ADPLL engine compares the reference phase
// (N per CK_ref cycle) with the counted DCO phase and filters the error into
// a 14-bit control word; the DCO engine decodes its 8 integer bits into 256
// unary varactor enables and dithers its 6 fractional bits onto 3 more
// units; the RSS engine builds RM_ref, one pulse per reference period at a
// pseudo-randomly chosen multiple of the DCO period after the reference
// edge. DCO system: the synchronized registers load the decoded enables on
// RM_clk (CK_ref, or RM_ref once Spur_En is set) and drive the DCO, modelled
// behaviourally. Modes advance FA -> PA -> dithering -> RSS on their own.
// This top follows the block diagram of the source design; the DCO is a
// behavioural model, so this top is for simulation.
//
// Interface: ck_ref is the reference clock (10 MHz with N = 10 for 100 MHz
// output); cfg holds N, gains, thresholds and the RSS enable.
`timescale 1ps / 1fs
module adpll_top
  import adpll_pkg::*;
#(
  parameter int P       = 8,
  parameter int PHASE_W = 16,
  parameter int ERR_W   = 10
) (
  input  logic                    ck_ref,
  input  logic                    rst_n,
  input  adpll_cfg_t              cfg,
  output logic [7:0]              dco_phase,
  output mode_e                   mode,
  output logic                    locked,
  output logic                    spur_en,
  output logic [CODE_W-1:0]       code,
  output logic                    rm_clk,
  output logic [2:0]              rm_n,
  output logic signed [ERR_W-1:0] phi_e
);

  logic               dco_clk;
  logic               sdm_en, rm_ref;
  logic [UNITS-1:0]   unit_en_d, unit_en_q;
  logic [DITH_N-1:0]  dith_d, dith_q;

  assign dco_clk = dco_phase[0];

  adpll_engine #(.PHASE_W(PHASE_W), .ERR_W(ERR_W)) u_adpll (
    .ck_ref, .dco_clk, .rst_n, .cfg, .code, .mode, .sdm_en, .spur_en,
    .locked, .phi_e
  );

  dco_engine u_dcoe (
    .clk(ck_ref), .rst_n, .code, .sdm_en, .unit_en(unit_en_d), .dith(dith_d)
  );

  rss_engine #(.P(P)) u_rss (
    .ck_ref, .dco_clk, .rst_n, .spur_en, .rm_ref, .rm_n
  );

  dco_sync_regs u_sync (
    .ck_ref, .rm_ref, .spur_en, .rst_n, .unit_en_d, .dith_d,
    .unit_en_q, .dith_q, .rm_clk
  );

  dco u_dco (.unit_en(unit_en_q), .dith(dith_q), .phase(dco_phase));

endmodule
