// tb_pfd: random and corner-case accumulator values; phi_e must equal the
// wrapped difference PA2 - PA1 clamped to [-512, 511].
`timescale 1ps / 1fs
module tb_pfd;
  logic [15:0] pa_ref, pa_dco;
  logic signed [9:0] phi_e;
  int checks = 0, failures = 0;

  pfd dut (.pa_ref, .pa_dco, .phi_e);

  task automatic one(input int r, input int d);
    int diff;
    int expect_v;
    pa_ref = 16'(r);
    pa_dco = 16'(d);
    #1;
    diff = (d - r) & 16'hFFFF;
    if (diff >= 32768) diff -= 65536;
    expect_v = diff > 511 ? 511 : diff < -512 ? -512 : diff;
    checks++;
    if (int'(phi_e) != expect_v) begin
      failures++; $display("FAIL r=%0d d=%0d phi_e=%0d expected %0d", r, d, phi_e, expect_v);
    end
  endtask

  initial begin
    #(1_000_000_000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    one(0, 0); one(10, 11); one(11, 10); one(65535, 0); one(0, 65535);
    one(100, 611); one(100, 612); one(612, 100); one(613, 100);
    one(0, 32768); one(40000, 1000);
    for (int i = 0; i < 3000; i++) begin
      automatic int r = $urandom_range(0, 65535);
      automatic int d = (i % 2) ? $urandom_range(0, 65535) : (r + $urandom_range(0, 1200) - 600) & 16'hFFFF;
      one(r, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
