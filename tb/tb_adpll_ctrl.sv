// tb_adpll_ctrl: walks the controller through every mode and transition
// and checks the cycle at which each happens and the decoded outputs:
// FA -> PA after 64 consecutive cycles with |phi_e| <= 1 (a large error
// restarts the count); PA stays while slicer decisions are one-sided or the
// integral drifts, and enters DITHER at the end of a balanced 32-cycle
// window; DITHER -> RSS after 32 cycles with rss_en; RSS -> DITHER when
// rss_en clears; any locked mode -> FA when |phi_e| > 8.
`timescale 1ps / 1fs
module tb_adpll_ctrl;
  import adpll_pkg::*;
  logic clk = 0, rst_n = 0;
  logic signed [9:0] phi_e = '0;
  logic [13:0] phi_int = 14'd8192;
  adpll_cfg_t cfg;
  mode_e mode;
  logic use_slicer, sdm_en, spur_en, locked;
  logic [3:0] alpha_sh, beta_sh;
  int checks = 0, failures = 0;

  adpll_ctrl dut (.clk, .rst_n, .phi_e, .phi_int, .cfg, .mode, .use_slicer,
                  .alpha_sh, .beta_sh, .sdm_en, .spur_en, .locked);

  always #50000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (mode %s)", what, mode.name()); end
  endtask

  task automatic cyc(input int e, input int n = 1);
    repeat (n) begin phi_e = 10'(e); @(negedge clk); end
  endtask

  initial begin
    #(2_000_000_000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = CFG_DEFAULT;
    cfg.rss_en = 0;
    @(negedge clk) rst_n = 1;
    check(mode == MODE_FA && !use_slicer && alpha_sh == 6 && beta_sh == 10 && !sdm_en && !spur_en && !locked,
          "FA outputs");
    cyc(5, 10);
    check(mode == MODE_FA, "large error stays FA");
    for (int i = 0; i < 30; i++) cyc((i % 3) - 1);
    cyc(2);                                         // breaks the run
    for (int i = 0; i < 63; i++) cyc((i % 3) - 1);
    check(mode == MODE_FA, "63 small cycles still FA");
    cyc(0);
    check(mode == MODE_PA, "PA after 64");
    check(use_slicer && alpha_sh == 0 && beta_sh == 3 && !sdm_en, "PA outputs");
    cyc(1, 32);                                     // one-sided window
    check(mode == MODE_PA, "one-sided window stays PA");
    for (int i = 0; i < 32; i++) begin             // balanced but drifting integral
      phi_int = 14'(8192 + 4 * i);
      cyc(i % 2);
    end
    check(mode == MODE_PA, "drifting integral stays PA");
    for (int i = 0; i < 31; i++) cyc(i % 2);
    check(mode == MODE_PA, "window not finished");
    cyc(0);
    check(mode == MODE_DITHER && sdm_en && locked && !spur_en, "DITHER after balanced window");
    cyc(0, 40);
    check(mode == MODE_DITHER, "no RSS without rss_en");
    cfg.rss_en = 1;
    cyc(1);
    check(mode == MODE_RSS && spur_en && sdm_en && alpha_sh == 0 && beta_sh == 3, "RSS");
    cfg.rss_en = 0;
    cyc(0);
    check(mode == MODE_DITHER && !spur_en, "back to DITHER");
    cfg.rss_en = 1;
    cyc(0, 31);
    check(mode == MODE_DITHER, "DITHER_WAIT not over");
    cyc(0);
    check(mode == MODE_RSS, "RSS after 32 cycles");
    cyc(8, 3);
    check(mode == MODE_RSS, "|phi_e| = 8 keeps lock");
    cyc(-9);
    check(mode == MODE_FA && !spur_en && !locked, "loss of lock -> FA");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
