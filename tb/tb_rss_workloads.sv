// tb_rss_workloads: the spur suppression configurations studied for a
// 100 MHz output: P = 8 / N = 8 and P = 2 / N = 8 with a 12.5 MHz reference,
// and P = 2 / N = 10 with a 10 MHz reference (the P = 8 / N = 10 chip
// configuration is covered by tb_adpll_top). Each ADPLL instance must lock,
// enter RSS, keep exactly N DCO cycles per reference period on average, and
// space its DCO updates by N + m DCO periods with |m| <= P-1, using more than
// one value of m and |m| <= P (P-1 from the phase choice, one more from
// sampling the reference with the DCO), and delay every update by exactly
// 1..P DCO periods after the sampled reference edge, using all P values.
`timescale 1ps / 1fs
module tb_rss_workloads;
  import adpll_pkg::*;
  localparam int NI = 3;
  localparam int PS[NI] = '{8, 2, 2};
  localparam int NS[NI] = '{8, 8, 10};
  int checks = 0, failures = 0;
  logic rst_n = 0;
  logic ck80 = 0, ck100 = 0;                // 12.5 MHz and 10 MHz references
  always #40000 ck80 = ~ck80;
  always #50000 ck100 = ~ck100;

  adpll_cfg_t cfg [NI];
  logic       ck   [NI];
  logic [7:0] ph   [NI];
  mode_e      mode [NI];
  logic       rm_clk [NI];
  longint     ndco [NI];

  assign ck[0] = ck80;
  assign ck[1] = ck80;
  assign ck[2] = ck100;

  for (genvar i = 0; i < NI; i++) begin : g
    logic locked, spur_en;
    logic [13:0] code;
    logic [2:0] rm_n;
    logic signed [9:0] phi_e;
    adpll_top #(.P(PS[i])) dut (
      .ck_ref(ck[i]), .rst_n, .cfg(cfg[i]), .dco_phase(ph[i]), .mode(mode[i]),
      .locked, .spur_en, .code, .rm_clk(rm_clk[i]), .rm_n, .phi_e
    );
    rss_probe #(.P(PS[i]), .N(NS[i])) probe (
      .rm_clk(rm_clk[i]), .dco_clk(ph[i][0]), .tap0(dut.u_rss.ck_ph[0]), .active(mode[i] == MODE_RSS)
    );
    always @(posedge ph[i][0]) ndco[i]++;
    initial begin
      cfg[i] = CFG_DEFAULT;
      cfg[i].n_div = 8'(NS[i]);
      ndco[i] = 0;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #(6000 * 100000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint n0 [NI];
    #120000 rst_n = 1;
    wait (mode[0] == MODE_RSS && mode[1] == MODE_RSS && mode[2] == MODE_RSS);
    #(10 * 100000);
    for (int i = 0; i < NI; i++) n0[i] = ndco[i];
    #(400 * 100000);                               // 40 us: 500 or 400 periods
    for (int i = 0; i < NI; i++) begin
      automatic longint expect_v = (i < 2) ? 500 * NS[i] : 400 * NS[i];
      check(mode[i] == MODE_RSS, $sformatf("instance %0d still in RSS", i));
      check(ndco[i] - n0[i] >= expect_v - 2 && ndco[i] - n0[i] <= expect_v + 2,
            $sformatf("instance %0d: %0d DCO cycles, expected %0d", i, ndco[i] - n0[i], expect_v));
    end
    g[0].probe.report("P=8 N=8");
    g[1].probe.report("P=2 N=8");
    g[2].probe.report("P=2 N=10");
    check(g[0].probe.out_of_range == 0 && g[0].probe.hist.num() > 1, "P=8 N=8 spacing set");
    check(g[0].probe.dly_bad == 0 && g[0].probe.dly_hist.num() == 8, "P=8 N=8 update delays");
    check(g[1].probe.out_of_range == 0 && g[1].probe.hist.num() > 1, "P=2 N=8 spacing set");
    check(g[1].probe.dly_bad == 0 && g[1].probe.dly_hist.num() == 2, "P=2 N=8 update delays");
    check(g[2].probe.out_of_range == 0 && g[2].probe.hist.num() > 1, "P=2 N=10 spacing set");
    check(g[2].probe.dly_bad == 0 && g[2].probe.dly_hist.num() == 2, "P=2 N=10 update delays");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
