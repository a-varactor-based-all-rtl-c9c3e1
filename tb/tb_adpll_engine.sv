// tb_adpll_engine: closes the loop of the ADPLL engine around a simple
// oscillator model in the testbench (period 7435 ps + 14 ps per integer
// code step plus one dithering unit) with a 10 MHz reference and N = 10.
// Checks that the engine passes FA, PA, DITHER and RSS in that order, that
// once locked the oscillator gives exactly N cycles per reference period on
// average (2000 +- 2 cycles in 200 periods), and that |phi_e| stays within
// the lock threshold.
`timescale 1ps / 1fs
module tb_adpll_engine;
  import adpll_pkg::*;
  logic ck_ref = 0, dco_clk = 0, rst_n = 0;
  adpll_cfg_t cfg;
  logic [13:0] code;
  mode_e mode;
  logic sdm_en, spur_en, locked;
  logic signed [9:0] phi_e;
  int checks = 0, failures = 0;

  adpll_engine dut (.ck_ref, .dco_clk, .rst_n, .cfg, .code, .mode, .sdm_en,
                    .spur_en, .locked, .phi_e);

  always #50000 ck_ref = ~ck_ref;
  initial forever #((7435.0 + 14.0 * (code[13:6] + 1)) / 2.0) dco_clk = ~dco_clk;

  longint ndco = 0;
  always @(posedge dco_clk) ndco++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #(5000 * 100000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode_e seq[$];
    longint n0;
    int maxe;
    cfg = CFG_DEFAULT;
    #120000 rst_n = 1;
    seq.push_back(mode);
    while (mode != MODE_RSS) begin
      @(negedge ck_ref);
      if (mode != seq[$]) seq.push_back(mode);
    end
    check(seq.size() == 4 && seq[0] == MODE_FA && seq[1] == MODE_PA && seq[2] == MODE_DITHER && seq[3] == MODE_RSS,
          $sformatf("mode order (%0d modes)", seq.size()));
    @(posedge ck_ref) n0 = ndco;
    maxe = 0;
    repeat (200) begin
      @(posedge ck_ref);
      #1 if (phi_e > maxe) maxe = phi_e; else if (-phi_e > maxe) maxe = -phi_e;
    end
    check(ndco - n0 >= 1998 && ndco - n0 <= 2002, $sformatf("%0d DCO cycles in 200 periods", ndco - n0));
    check(maxe <= 8 && mode == MODE_RSS, $sformatf("max |phi_e| %0d", maxe));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
