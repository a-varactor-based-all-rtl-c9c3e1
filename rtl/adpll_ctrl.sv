// adpll_ctrl: ADPLL controller with DLF controller and spur reduction
// controller.
//
// Steps the loop through its four modes and selects the loop filter's input
// and gains:
//   FA     : linear phase error, large gains (cfg.fa_alpha_sh/fa_beta_sh).
//            Leaves for PA after |phi_e| <= 1 for FA_LOCK_N cycles in a row.
//   PA     : slicer Up/Down error, gains cfg.alpha_sh/beta_sh. Over windows
//            of 2^AVG_W cycles it sums the slicer decisions (the long-term
//            average of phi_e) and measures how far phi_int moved (the
//            long-term average of phi_int); when both are within
//            cfg.pa_sum_th / cfg.pa_int_th it enters dithering.
//   DITHER : sigma-delta dithering on (locked). After DITHER_WAIT cycles,
//            and while cfg.rss_en is set, it enters RSS.
//   RSS    : Spur_En = 1, the DCO is updated from RM_ref. Clearing
//            cfg.rss_en returns to DITHER.
// From PA, DITHER or RSS, |phi_e| > UNLOCK_TH restarts at FA.
// The four modes, their order and the gain switching follow the source
// design; the exact transition conditions and thresholds are this design's
// own.
//
// Timing: all outputs are decoded from the mode register, which changes on
// CK_ref rising edges.
`timescale 1ps / 1fs
module adpll_ctrl
  import adpll_pkg::*;
#(
  parameter int ERR_W       = 10,
  parameter int FA_LOCK_N   = 64,
  parameter int AVG_W       = 5,
  parameter int DITHER_WAIT = 32,
  parameter int UNLOCK_TH   = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ERR_W-1:0] phi_e,
  input  logic [CODE_W-1:0]       phi_int,
  input  adpll_cfg_t              cfg,
  output mode_e                   mode,
  output logic                    use_slicer,
  output logic [3:0]              alpha_sh,
  output logic [3:0]              beta_sh,
  output logic                    sdm_en,
  output logic                    spur_en,
  output logic                    locked
);

  mode_e               mode_q;
  logic [15:0]         cnt_q;
  logic [AVG_W-1:0]    win_q;
  logic signed [AVG_W+1:0] sum_q;
  logic [CODE_W-1:0]   int0_q;

  logic                    small_err, lost;
  logic signed [AVG_W+1:0] sum_n, sum_abs;
  logic signed [CODE_W:0]  dint, dint_abs;

  always_comb begin
    small_err = (phi_e <= ERR_W'(1)) && (phi_e >= -ERR_W'(1));
    lost      = (phi_e >  ERR_W'(UNLOCK_TH)) || (phi_e < -ERR_W'(UNLOCK_TH));
    sum_n     = sum_q + ((phi_e > 0) ? (AVG_W+2)'(1) : -(AVG_W+2)'(1));
    sum_abs   = (sum_n < 0) ? -sum_n : sum_n;
    dint      = $signed({1'b0, phi_int}) - $signed({1'b0, int0_q});
    dint_abs  = (dint < 0) ? -dint : dint;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q <= MODE_FA;
      cnt_q  <= '0;
      win_q  <= '0;
      sum_q  <= '0;
      int0_q <= '0;
    end else begin
      unique case (mode_q)
        MODE_FA: begin
          if (!small_err) cnt_q <= '0;
          else if (cnt_q == 16'(FA_LOCK_N - 1)) begin
            mode_q <= MODE_PA;
            cnt_q  <= '0;
            win_q  <= '0;
            sum_q  <= '0;
            int0_q <= phi_int;
          end else cnt_q <= cnt_q + 1'b1;
        end
        MODE_PA: begin
          if (lost) begin
            mode_q <= MODE_FA;
            cnt_q  <= '0;
          end else if (win_q == '1) begin
            win_q  <= '0;
            sum_q  <= '0;
            int0_q <= phi_int;
            if (int'(sum_abs) <= int'(cfg.pa_sum_th) &&
                int'(dint_abs) <= int'(cfg.pa_int_th)) begin
              mode_q <= MODE_DITHER;
              cnt_q  <= '0;
            end
          end else begin
            win_q <= win_q + 1'b1;
            sum_q <= sum_n;
          end
        end
        MODE_DITHER: begin
          if (lost) begin
            mode_q <= MODE_FA;
            cnt_q  <= '0;
          end else if (cfg.rss_en && cnt_q >= 16'(DITHER_WAIT - 1)) begin
            mode_q <= MODE_RSS;
          end else if (cnt_q != '1) cnt_q <= cnt_q + 1'b1;
        end
        MODE_RSS: begin
          if (lost) begin
            mode_q <= MODE_FA;
            cnt_q  <= '0;
          end else if (!cfg.rss_en) begin
            mode_q <= MODE_DITHER;
            cnt_q  <= '0;
          end
        end
        default: mode_q <= MODE_FA;
      endcase
    end
  end

  always_comb begin
    mode       = mode_q;
    use_slicer = (mode_q != MODE_FA);
    alpha_sh   = (mode_q == MODE_FA) ? cfg.fa_alpha_sh : cfg.alpha_sh;
    beta_sh    = (mode_q == MODE_FA) ? cfg.fa_beta_sh  : cfg.beta_sh;
    sdm_en     = (mode_q == MODE_DITHER) || (mode_q == MODE_RSS);
    spur_en    = (mode_q == MODE_RSS);
    locked     = sdm_en;
  end

endmodule
