// tb_dlf: drives random phase errors, slicer on/off and gain shifts, and
// compares phi_int and code every cycle with an integer model:
//   u = use_slicer ? (phi_e > 0 ? +1 : -1) : phi_e
//   phi_int' = sat(phi_int + u * 2^alpha_sh)
//   code'    = sat(phi_int' + u * 2^beta_sh),  sat() to [0, 16383].
// Also checks the mid-scale reset value and the chip's alpha/beta of
// 1/64 and 1/8 code LSB (one and eight fractional LSBs per Up/Down).
`timescale 1ps / 1fs
module tb_dlf;
  logic clk = 0, rst_n = 0;
  logic signed [9:0] phi_e = '0;
  logic use_slicer = 0;
  logic [3:0] alpha_sh = 0, beta_sh = 3;
  logic [13:0] phi_int, code;
  int checks = 0, failures = 0;

  dlf dut (.clk, .rst_n, .phi_e, .use_slicer, .alpha_sh, .beta_sh, .phi_int, .code);

  always #50000 clk = ~clk;

  function automatic longint sat(input longint v);
    return v < 0 ? 0 : v > 16383 ? 16383 : v;
  endfunction

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
    longint mi, mc, u;
    #70000;   // one clock edge in reset
    check(phi_int == 14'd8192 && code == 14'd8192, "reset value");
    rst_n = 1;
    mi = 8192;
    // chip gains: one Up then one Down
    @(negedge clk) begin use_slicer = 1; phi_e = 3; alpha_sh = 0; beta_sh = 3; end
    @(negedge clk) check(phi_int == 8193 && code == 8201, "Up: +1/64 and +1/8 LSB");
    phi_e = 0;
    @(negedge clk) check(phi_int == 8192 && code == 8184, "Down");
    mi = 8192;
    for (int i = 0; i < 6000; i++) begin
      use_slicer = (i / 500) % 2;
      if (i % 37 == 0) begin alpha_sh = 4'($urandom_range(0, 10)); beta_sh = 4'($urandom_range(0, 12)); end
      phi_e = (i % 11 == 0) ? 10'($urandom) : 10'($urandom_range(0, 16) - 8);
      if (i > 3000 && i < 3300) phi_e = 10'sd200;        // drive into saturation
      if (i > 3300 && i < 3700) phi_e = -10'sd200;
      u = use_slicer ? (phi_e > 0 ? 1 : -1) : longint'(phi_e);
      mi = sat(mi + u * (longint'(1) << alpha_sh));
      mc = sat(mi + u * (longint'(1) << beta_sh));
      @(negedge clk);
      check(phi_int == 14'(mi) && code == 14'(mc),
            $sformatf("cycle %0d int %0d/%0d code %0d/%0d", i, phi_int, mi, code, mc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
