// tb_phase_acc_dco: runs PA2 with a DCO clock of 9.73 ns and a 100 ns
// reference; at every reference edge the sampled phase must equal the number
// of DCO rising edges counted by the testbench, through more than one wrap
// of the 16-bit counter.
`timescale 1ps / 1fs
module tb_phase_acc_dco;
  logic dco_clk = 0, ck_ref = 0, rst_n = 0;
  logic [15:0] phase;
  int checks = 0, failures = 0;
  longint ndco = 0;

  phase_acc_dco dut (.dco_clk, .ck_ref, .rst_n, .phase);

  initial begin #777; forever #4865 dco_clk = ~dco_clk; end
  always #50000 ck_ref = ~ck_ref;
  always @(posedge dco_clk) if (rst_n) ndco++;

  initial begin
    #(2_000_000_000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint cnt_at_edge;
    #20000 rst_n = 1;
    repeat (7000) begin
      @(posedge ck_ref);
      cnt_at_edge = ndco;
      @(negedge ck_ref);
      checks++;
      if (phase != 16'(cnt_at_edge)) begin
        failures++; $display("FAIL phase %0d expected %0d", phase, 16'(cnt_at_edge));
      end
    end
    checks++; if (ndco < 65536) failures++;   // wrapped at least once
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
