// tb_rss_engine: reference 100 ns, DCO 10 ns (N = 10, P = 8). With Spur_En
// low there must be no RM_ref pulse. With Spur_En high there must be exactly
// one pulse per reference period, placed (RM_N % 8 + 1) DCO periods plus
// the sampling delay after the reference edge, RM_N being the PRBS value of
// the previous period; consecutive pulses must lie between
// (1 - 7/10) and (1 + 7/10) reference periods apart (Eqs. (3) and (4)).
`timescale 1ps / 1fs
module tb_rss_engine;
  logic ck_ref = 0, dco_clk = 0, rst_n = 0, spur_en = 0;
  logic rm_ref;
  logic [2:0] rm_n;
  int checks = 0, failures = 0;

  rss_engine dut (.ck_ref, .dco_clk, .rst_n, .spur_en, .rm_ref, .rm_n);

  always #5000 dco_clk = ~dco_clk;
  initial begin #3000; forever #50000 ck_ref = ~ck_ref; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #(2_000_000_000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rmn_hist[$];
  longint edge_t[$];
  longint pulse_t[$];
  always @(posedge ck_ref) begin
    #1;
    rmn_hist.push_back(rm_n);
    edge_t.push_back($time);
  end
  always @(posedge rm_ref) pulse_t.push_back($time);

  initial begin
    int spacing_seen[longint];
    #60000 rst_n = 1;   // reset held over the first clock edges
    repeat (20) @(posedge ck_ref);
    check(pulse_t.size() == 0, "no pulse while Spur_En is low");
    @(negedge ck_ref) spur_en = 1;
    repeat (300) @(posedge ck_ref);
    #60000 spur_en = 0;
    repeat (3) @(posedge ck_ref);
    check(pulse_t.size() >= 298 && pulse_t.size() <= 302, $sformatf("%0d pulses", pulse_t.size()));
    foreach (pulse_t[i]) begin
      automatic int k = (pulse_t[i] - 53000) / 100000;   // period holding the pulse
      automatic longint off = pulse_t[i] - (53000 + 100000 * k);
      check(k >= 1 && off == 2000 + 10000 * (rmn_hist[k-1] % 8 + 1),
            $sformatf("pulse %0d offset %0d rm_n %0d", i, off, rmn_hist[k-1]));
      if (i > 0) begin
        automatic longint d = pulse_t[i] - pulse_t[i-1];
        check(d >= 30000 && d <= 170000, $sformatf("spacing %0d", d));
        spacing_seen[d] = 1;
      end
    end
    $display("distinct update spacings with the PRBS: %0d of %0d", spacing_seen.num(), 15);
    check(spacing_seen.num() >= 8, "spread of update instants");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
