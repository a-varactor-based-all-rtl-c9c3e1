// tb_multiphase_gen: clocks the generator with a 10 ns DCO clock and a
// 100 ns reference (N = 10) and checks that tap k equals the reference as
// sampled k+1 DCO edges earlier, and that taps 0..7 each rise once per
// reference period, one DCO period apart.
`timescale 1ps / 1fs
module tb_multiphase_gen;
  localparam int P = 8;
  logic dco_clk = 0, ck_ref = 0, rst_n = 1;
  logic [P:0] ck_ph;
  int checks = 0, failures = 0;

  multiphase_gen #(.P(P)) dut (.dco_clk, .rst_n, .ck_ref, .ck_ph);

  always #5000 dco_clk = ~dco_clk;
  initial begin #3000; forever #50000 ck_ref = ~ck_ref; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #(100_000_000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit hist[$];
  int rise_t[P][$];
  logic [P:0] prev;

  initial begin
    #100 rst_n = 0;
    #900 rst_n = 1;
    for (int c = 0; c < 400; c++) begin
      @(posedge dco_clk);
      hist.push_front(ck_ref);
      prev = ck_ph;
      #1;
      for (int k = 0; k <= P; k++)
        if (hist.size() > k) check(ck_ph[k] == hist[k], $sformatf("tap %0d cycle %0d", k, c));
      for (int k = 0; k < P; k++) if (ck_ph[k] && !prev[k]) rise_t[k].push_back(c);
    end
    for (int k = 1; k < P; k++) begin
      check(rise_t[k].size() == rise_t[0].size() || rise_t[k].size() == rise_t[0].size() - 1,
            "one rise per period");
      for (int i = 0; i < rise_t[k].size(); i++)
        check(rise_t[k][i] == rise_t[0][i] + k, $sformatf("tap %0d spacing", k));
    end
    for (int i = 1; i < rise_t[0].size(); i++) check(rise_t[0][i] - rise_t[0][i-1] == 10, "period N");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
