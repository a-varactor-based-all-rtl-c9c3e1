// tb_dco: sets several unit counts on the behavioural DCO and measures the
// output: period = 7435 ps + 14 ps per enabled unit (134.5 MHz empty,
// 90.4 MHz with all 259 units), 50 % duty cycle, and phase k rising
// k/8 of a period after phase 0.
`timescale 1ps / 1fs
module tb_dco;
  logic [255:0] unit_en = '0;
  logic [2:0] dith = '0;
  logic [7:0] phase;
  int checks = 0, failures = 0;

  dco dut (.unit_en, .dith, .phase);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #(1_000_000_000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, t1, tf, tk;
    real expect_p;
    int n_units;
    for (int t = 0; t < 8; t++) begin
      n_units = (t == 0) ? 0 : (t == 1) ? 256 : $urandom_range(0, 256);
      unit_en = (n_units == 256) ? '1 : (256'd1 << n_units) - 256'd1;
      dith = (t == 1) ? 3'b111 : 3'($urandom);
      expect_p = 7435.0 + 14.0 * (n_units + $countones(dith));
      repeat (2) @(posedge phase[0]);             // let the new setting take effect
      t0 = $realtime;
      @(negedge phase[0]); tf = $realtime;
      @(posedge phase[0]); t1 = $realtime;
      check((t1 - t0) > expect_p - 0.01 && (t1 - t0) < expect_p + 0.01,
            $sformatf("period %f expected %f", t1 - t0, expect_p));
      check((tf - t0) > expect_p / 2 - 0.01 && (tf - t0) < expect_p / 2 + 0.01, "duty cycle");
      for (int k = 1; k < 8; k++) begin
        @(posedge phase[k]); tk = $realtime;
        check((tk - t1) > k * expect_p / 8 - 0.01 && (tk - t1) < k * expect_p / 8 + 0.01,
              $sformatf("phase %0d offset %f", k, tk - t1));
      end
    end
    // lowest frequency: all 259 units, 7435 + 259*14 ps = 11061 ps (90.4 MHz)
    unit_en = '1; dith = 3'b111;
    repeat (2) @(posedge phase[0]);
    t0 = $realtime; @(posedge phase[0]); t1 = $realtime;
    check(1.0e6 / (t1 - t0) > 90.3 && 1.0e6 / (t1 - t0) < 90.5, "minimum frequency");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
