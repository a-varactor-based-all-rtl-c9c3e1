// tb_adpll_top: end-to-end test of the complete ADPLL at its default
// parameters (P = 8) with the chip's configuration: 10 MHz reference,
// N = 10 (100 MHz), alpha/beta = 1/64 and 1/8.
//   1. From reset the loop must pass FA, PA, DITHER and RSS in order.
//   2. Locked with dithering: 1000 +- 2 DCO cycles in 100 reference periods,
//      and the dithering units must change.
//   3. In RSS mode: RM_clk rises once per reference period, at a varying
//      delay after the reference edge, with consecutive updates 0.3..1.7
//      reference periods apart (Eqs. (3)-(4) for P = 8, N = 10), while the
//      loop stays locked (3000 +- 2 DCO cycles in 300 periods).
//   4. Clearing the RSS enable returns to DITHER with RM_clk = CK_ref.
//   5. Changing N to 12 loses lock, restarts at FA and relocks at 120 MHz.
// Each mechanism is counted; one that never happened is a failure.
`timescale 1ps / 1fs
module tb_adpll_top;
  import adpll_pkg::*;
  logic ck_ref = 0, rst_n = 0;
  adpll_cfg_t cfg;
  logic [7:0] dco_phase;
  mode_e mode;
  logic locked, spur_en, rm_clk;
  logic [13:0] code;
  logic [2:0] rm_n;
  logic signed [9:0] phi_e;
  int checks = 0, failures = 0;

  adpll_top dut (.ck_ref, .rst_n, .cfg, .dco_phase, .mode, .locked, .spur_en,
                 .code, .rm_clk, .rm_n, .phi_e);

  always #50000 ck_ref = ~ck_ref;

  longint ndco = 0;
  always @(posedge dco_phase[0]) ndco++;

  // mechanism counters
  int n_fa = 0, n_pa = 0, n_dither = 0, n_rss = 0, n_rss_exit = 0, n_unlock = 0;
  int n_dith_change = 0, n_rm_updates = 0, n_rm_offsets = 0;
  mode_e prev_mode = MODE_FA;
  always @(negedge ck_ref) begin
    if (mode != prev_mode) begin
      case (mode)
        MODE_FA:     begin n_fa++; n_unlock++; end
        MODE_PA:     n_pa++;
        MODE_DITHER: begin n_dither++; if (prev_mode == MODE_RSS) n_rss_exit++; end
        MODE_RSS:    n_rss++;
        default: ;
      endcase
      $display("%0d ns: mode %s", $time / 1000, mode.name());
    end
    prev_mode = mode;
  end
  logic [2:0] dith_prev = '0;
  always @(posedge rm_clk) begin
    #1 if (dut.dith_q != dith_prev && mode != MODE_FA && mode != MODE_PA) n_dith_change++;
    dith_prev = dut.dith_q;
  end

  longint ref_t = 0;
  always @(posedge ck_ref) ref_t = $time;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wait_mode(input mode_e m, input int max_periods);
    int n = 0;
    while (mode != m && n < max_periods) begin @(negedge ck_ref); n++; end
    check(mode == m, $sformatf("reached %s within %0d periods", m.name(), max_periods));
  endtask

  initial begin
    #(12000 * 100000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint n0, last_rm, t_rm;
    int rm_count, bad_spacing;
    int offsets[longint];
    cfg = CFG_DEFAULT;
    cfg.rss_en = 0;
    #120000 rst_n = 1;               // reset spans the first reference edge
    n_fa = 1;                        // FA is the reset mode

    // 1-2: lock with dithering
    wait_mode(MODE_DITHER, 3000);
    repeat (20) @(posedge ck_ref);
    n0 = ndco;
    repeat (100) @(posedge ck_ref);
    check(ndco - n0 >= 998 && ndco - n0 <= 1002, $sformatf("locked: %0d DCO cycles in 100 periods", ndco - n0));
    check(rm_clk == ck_ref, "RM_clk is CK_ref without RSS");

    // 3: spur suppression
    cfg.rss_en = 1;
    wait_mode(MODE_RSS, 100);
    repeat (5) @(posedge ck_ref);
    n0 = ndco; rm_count = 0; bad_spacing = 0; last_rm = 0;
    fork
      begin repeat (300) @(posedge ck_ref); end
      forever begin
        @(posedge rm_clk);
        t_rm = $time;
        rm_count++;
        offsets[t_rm - ref_t] = 1;
        if (last_rm != 0 && (t_rm - last_rm < 30000 - 12000 || t_rm - last_rm > 170000 + 12000)) bad_spacing++;
        last_rm = t_rm;
      end
    join_any
    disable fork;
    n_rm_updates = rm_count;
    n_rm_offsets = offsets.num();
    check(rm_count >= 299 && rm_count <= 301, $sformatf("%0d RM_clk updates in 300 periods", rm_count));
    check(bad_spacing == 0, $sformatf("%0d update spacings outside 0.3..1.7 Tref", bad_spacing));
    check(offsets.num() >= 8, $sformatf("%0d distinct update delays", offsets.num()));
    check(ndco - n0 >= 2998 && ndco - n0 <= 3002, $sformatf("RSS locked: %0d DCO cycles in 300 periods", ndco - n0));
    check(mode == MODE_RSS, "still in RSS");

    // 4: leave RSS
    cfg.rss_en = 0;
    wait_mode(MODE_DITHER, 5);
    @(negedge ck_ref);
    check(rm_clk == ck_ref && !spur_en, "RM_clk back to CK_ref");

    // 5: new division ratio, relock
    cfg.n_div = 8'd12;
    wait_mode(MODE_FA, 50);
    wait_mode(MODE_DITHER, 4000);
    repeat (20) @(posedge ck_ref);
    n0 = ndco;
    repeat (100) @(posedge ck_ref);
    check(ndco - n0 >= 1198 && ndco - n0 <= 1202, $sformatf("relocked at N=12: %0d DCO cycles", ndco - n0));

    $display("mechanisms: FA=%0d PA=%0d DITHER=%0d RSS=%0d RSS-exit=%0d unlock=%0d dither-changes=%0d RM-updates=%0d RM-delays=%0d",
             n_fa, n_pa, n_dither, n_rss, n_rss_exit, n_unlock - 0, n_dith_change, n_rm_updates, n_rm_offsets);
    check(n_pa > 0, "PA mode happened");
    check(n_dither > 0, "DITHER mode happened");
    check(n_rss > 0, "RSS mode happened");
    check(n_rss_exit > 0, "RSS exit happened");
    check(n_unlock > 0, "loss of lock happened");
    check(n_dith_change > 0, "dithering happened");
    check(n_rm_updates > 0 && n_rm_offsets > 1, "random sampling happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
