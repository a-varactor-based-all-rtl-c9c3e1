// tb_dco_engine: for random 14-bit codes, the number of enabled varactor
// units must equal the integer part, the units must be the lowest ones, and
// with dithering on the three dithering units must average 1 + frac/64 over
// 64 cycles; with dithering off they hold one unit.
`timescale 1ps / 1fs
module tb_dco_engine;
  logic clk = 0, rst_n = 0, sdm_en = 0;
  logic [13:0] code = '0;
  logic [255:0] unit_en;
  logic [2:0] dith;
  int checks = 0, failures = 0;

  dco_engine dut (.clk, .rst_n, .code, .sdm_en, .unit_en, .dith);

  always #50000 clk = ~clk;

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

  initial begin
    int sum;
    #70000 rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      code = (t == 0) ? 14'd0 : (t == 1) ? 14'h3FFF : 14'($urandom);
      sdm_en = 0;
      @(negedge clk);
      check(unit_en == (256'd1 << code[13:6]) - 256'd1, $sformatf("units for %0d", code[13:6]));
      check(dith == 3'b001, "dither off");
      sdm_en = 1;
      sum = 0;
      repeat (64) begin @(negedge clk); sum += $countones(dith); end
      check(sum >= 64 + code[5:0] - 1 && sum <= 64 + code[5:0] + 1, $sformatf("dither mean frac %0d sum %0d", code[5:0], sum));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
