// adpll_engine: ADPLL engine of the digital control system.
//
// PA1 accumulates N per reference cycle, PA2 counts DCO cycles, the PFD
// subtracts them into the phase error phi_e, and the loop filter turns phi_e
// (linear in FA mode, sliced to Up/Down afterwards) into the 14-bit DCO
// control word. The ADPLL controller chooses the mode, the filter gains,
// dithering and Spur_En. This partitioning follows the source design.
//
// Timing: everything but the PA2 counter runs on CK_ref; code and the mode
// outputs change just after CK_ref rising edges.
`timescale 1ps / 1fs
module adpll_engine
  import adpll_pkg::*;
#(
  parameter int PHASE_W = 16,
  parameter int ERR_W   = 10
) (
  input  logic                    ck_ref,
  input  logic                    dco_clk,
  input  logic                    rst_n,
  input  adpll_cfg_t              cfg,
  output logic [CODE_W-1:0]       code,
  output mode_e                   mode,
  output logic                    sdm_en,
  output logic                    spur_en,
  output logic                    locked,
  output logic signed [ERR_W-1:0] phi_e
);

  logic [PHASE_W-1:0] pa_ref, pa_dco;
  logic [CODE_W-1:0]  phi_int;
  logic               use_slicer;
  logic [3:0]         alpha_sh, beta_sh;

  phase_acc_ref #(.PHASE_W(PHASE_W)) u_pa1 (
    .clk(ck_ref), .rst_n, .n_div(cfg.n_div), .phase(pa_ref)
  );

  phase_acc_dco #(.PHASE_W(PHASE_W)) u_pa2 (
    .dco_clk, .ck_ref, .rst_n, .phase(pa_dco)
  );

  pfd #(.PHASE_W(PHASE_W), .ERR_W(ERR_W)) u_pfd (.pa_ref, .pa_dco, .phi_e);

  dlf #(.ERR_W(ERR_W)) u_dlf (
    .clk(ck_ref), .rst_n, .phi_e, .use_slicer, .alpha_sh, .beta_sh,
    .phi_int, .code
  );

  adpll_ctrl #(.ERR_W(ERR_W)) u_ctrl (
    .clk(ck_ref), .rst_n, .phi_e, .phi_int, .cfg, .mode, .use_slicer,
    .alpha_sh, .beta_sh, .sdm_en, .spur_en, .locked
  );

endmodule
