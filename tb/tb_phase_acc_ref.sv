// tb_phase_acc_ref: checks that PA1 adds N on every reference edge, for
// several N, including wrap-around of the 16-bit accumulator.
`timescale 1ps / 1fs
module tb_phase_acc_ref;
  logic clk = 0, rst_n = 1;
  logic [7:0] n_div = 8'd10;
  logic [15:0] phase;
  int checks = 0, failures = 0;

  phase_acc_ref dut (.clk, .rst_n, .n_div, .phase);

  always #50000 clk = ~clk;

  initial begin
    #(2_000_000_000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic longint expect_v = 0;
    #1000 rst_n = 0;
    #19000;
    checks++; if (phase != 0) failures++;
    rst_n = 1;
    for (int i = 0; i < 9000; i++) begin
      @(negedge clk);
      expect_v = (expect_v + longint'(n_div)) % 65536;
      checks++;
      if (phase != 16'(expect_v)) begin
        failures++; $display("FAIL cycle %0d phase %0d expected %0d", i, phase, expect_v);
      end
      if (i % 1000 == 999) n_div = 8'($urandom_range(8, 255));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
