// tb_sdm: compares the modulator with an independent second-order MASH 1-1
// model for random fractional inputs; checks the thermometer form of the
// output, that the mean unit count over 64*k cycles is 1 + frac/64 within
// one unit-sum, and that with en = 0 the output is one unit.
`timescale 1ps / 1fs
module tb_sdm;
  logic clk = 0, rst_n = 0, en = 0;
  logic [5:0] frac = '0;
  logic [2:0] dith;
  int checks = 0, failures = 0;

  sdm dut (.clk, .rst_n, .en, .frac, .dith);

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
    int a1, a2, c2p, y, sum;
    #70000 rst_n = 1;
    check(dith == 3'b001, "reset");
    repeat (3) @(negedge clk);
    check(dith == 3'b001, "disabled");
    for (int t = 0; t < 20; t++) begin
      frac = (t == 0) ? 6'd0 : (t == 1) ? 6'd63 : (t == 2) ? 6'd1 : 6'($urandom);
      en = 0;
      @(negedge clk);
      check(dith == 3'b001, "disabled between runs");
      en = 1;
      a1 = 0; a2 = 0; c2p = 0; sum = 0;
      for (int n = 0; n < 64 * 8; n++) begin
        int c1, c2;
        a1 += frac;  c1 = a1 / 64; a1 %= 64;
        a2 += a1;    c2 = a2 / 64; a2 %= 64;
        y = c1 + c2 - c2p + 1;
        c2p = c2;
        @(negedge clk);
        check(dith == 3'((1 << y) - 1), $sformatf("frac %0d step %0d dith %b model %0d", frac, n, dith, y));
        sum += $countones(dith);
      end
      check(sum >= 64 * 8 + 8 * frac - 1 && sum <= 64 * 8 + 8 * frac + 1,
            $sformatf("mean for frac %0d: %0d", frac, sum));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
