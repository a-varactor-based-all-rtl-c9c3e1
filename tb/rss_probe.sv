// rss_probe: testbench helper that watches one ADPLL instance in spur
// suppression mode. At every RM_clk rising edge it measures the time since
// the previous one, rounds it to whole DCO periods and records
// m = (spacing in DCO periods) - N. By Eqs. (3)-(4) m must lie in
// [-(P-1), P-1], i.e. at most 2P-1 discrete update frequencies exist;
// sampling CK_ref with DCO_OUT can move the sampled reference edge by one
// DCO period when the two edges are close, which widens this to |m| <= P.
// It also records the delay of every update after the sampled reference
// edge (tap 0 of the multi-phase generator), in DCO periods: it must take
// the P values 1..P.
`timescale 1ps / 1fs
module rss_probe #(
  parameter int P = 8,
  parameter int N = 10
) (
  input logic rm_clk,
  input logic dco_clk,
  input logic tap0,
  input logic active
);
  int dly_hist[int];
  int dly_bad = 0;
  realtime last_tap0 = 0;
  // recorded 1 ps late so that an update falling on the next sampled edge
  // (P = N, last phase) is still measured from its own period
  always @(posedge tap0) begin
    automatic realtime t = $realtime;
    #1 last_tap0 = t;
  end
  int hist[int];
  int n_updates = 0;
  int out_of_range = 0;
  realtime last_rm = 0, last_dco = 0, t_dco = 1;

  always @(posedge dco_clk) begin
    if (last_dco > 0) t_dco = $realtime - last_dco;
    last_dco = $realtime;
  end

  always @(posedge rm_clk) begin
    if (active && last_rm > 0) begin
      automatic int m = int'(($realtime - last_rm) / t_dco) - N;
      hist[m] = hist.exists(m) ? hist[m] + 1 : 1;
      n_updates++;
      if (m < -P || m > P) out_of_range++;
    end
    if (active && last_tap0 > 0) begin
      automatic int d = int'(($realtime - last_tap0) / t_dco);
      dly_hist[d] = dly_hist.exists(d) ? dly_hist[d] + 1 : 1;
      if (d < 1 || d > P) dly_bad++;
    end
    last_rm = active ? $realtime : 0;
  end

  function automatic void report(input string name);
    string s = "";
    foreach (hist[m]) s = {s, $sformatf(" %0d:%0d", m, hist[m])};
    $display("%s: %0d updates, spacing - N (DCO periods): count =%s", name, n_updates, s);
    s = "";
    foreach (dly_hist[d]) s = {s, $sformatf(" %0d:%0d", d, dly_hist[d])};
    $display("%s: delay after sampled reference edge (DCO periods): count =%s", name, s);
  endfunction
endmodule
