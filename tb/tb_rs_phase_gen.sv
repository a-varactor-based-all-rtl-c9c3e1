// tb_rs_phase_gen: drives the random-sampling phase generator with an ideal
// 9-tap phase chain (DCO period 10 ns, reference 100 ns, N = 10, P = 8) and
// random RM_N. Checks: exactly one RM_ref pulse, one DCO period wide, per
// reference period; the pulse comes sel+1 DCO edges after tap 0 rises, sel
// being RM_N when the previous period's last phase rose; the spacing of
// consecutive pulses takes the 2P-1 = 15 values (1 + m/N) Tref,
// |m| <= P-1 (Eqs. (3) and (4)); and no pulse while en = 0.
`timescale 1ps / 1fs
module tb_rs_phase_gen;
  localparam int P = 8, N = 10;
  logic dco_clk = 0, rst_n = 0, en = 0;
  logic [P:0] ck_ph = '0;
  logic [2:0] rm_n = '0;
  logic rm_ref;
  int checks = 0, failures = 0;

  rs_phase_gen #(.P(P)) dut (.dco_clk, .rst_n, .en, .ck_ph, .rm_n, .rm_ref);

  always #5000 dco_clk = ~dco_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #(200_000_000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ideal phase chain: tap 0 high for 5 of every 10 DCO cycles
  int cyc = 0;
  always @(posedge dco_clk) begin
    ck_ph <= {ck_ph[P-1:0], (cyc % N) < N/2};
    cyc   <= cyc + 1;
  end
  // new RM_N a little after tap 0 rises (as the reference edge would)
  always @(posedge dco_clk) if (cyc % N == 1) rm_n <= 3'($urandom);

  int pulse_cyc[$];
  int pulse_len = 0;
  int sel_hist[$];
  always @(posedge dco_clk) begin
    if (ck_ph[P-1] && !ck_ph[P]) sel_hist.push_back(rm_n);
  end
  always @(negedge dco_clk) begin
    if (rm_ref) begin
      if (pulse_len == 0) pulse_cyc.push_back(cyc);
      pulse_len++;
    end else begin
      if (pulse_len != 0) check(pulse_len == 1, "pulse width");
      pulse_len = 0;
    end
  end

  initial begin
    int spacing_seen[int];
    #1000 rst_n = 1;
    repeat (50) @(posedge dco_clk);
    check(pulse_cyc.size() == 0, "no pulse when disabled");
    @(negedge dco_clk);
    while (cyc % N != 5) @(negedge dco_clk);
    en = 1;
    repeat (N * 400) @(negedge dco_clk);
    en = 0;
    repeat (2 * N) @(negedge dco_clk);
    begin
      automatic int n = pulse_cyc.size();
      check(n >= 398 && n <= 401, $sformatf("one pulse per period (%0d)", n));
      // every pulse: offset from the period start equals sel + 1 + 1
      // (tap0 rises at cyc%N == 1 as seen here; pulse one edge after rise[sel])
      for (int i = 0; i < n; i++) begin
        automatic int period = (pulse_cyc[i] - 1) / N;
        automatic int off = pulse_cyc[i] - (period * N + 1);
        check(period >= 1 && off == sel_hist[period - 1] + 1,
              $sformatf("pulse %0d offset %0d", i, off));
      end
      for (int i = 1; i < n; i++) spacing_seen[pulse_cyc[i] - pulse_cyc[i-1]] = 1;
      check(spacing_seen.num() == 2 * P - 1, $sformatf("%0d distinct spacings", spacing_seen.num()));
      foreach (spacing_seen[s]) check(s >= N - (P - 1) && s <= N + (P - 1), "spacing range");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
