// tb_dco_sync_regs: with Spur_En = 0 the registers must load on CK_ref
// rising edges only, with Spur_En = 1 on RM_ref rising edges only; RM_clk
// must follow the selected source, and reset must clear the outputs.
`timescale 1ps / 1fs
module tb_dco_sync_regs;
  logic ck_ref = 0, rm_ref = 0, spur_en = 0, rst_n = 1;
  logic [255:0] unit_en_d = '0, unit_en_q;
  logic [2:0] dith_d = '0, dith_q;
  logic rm_clk;
  int checks = 0, failures = 0;

  dco_sync_regs dut (.ck_ref, .rm_ref, .spur_en, .rst_n, .unit_en_d, .dith_d,
                     .unit_en_q, .dith_q, .rm_clk);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pulse_ref(); ck_ref = 1; #5000; ck_ref = 0; #5000; endtask
  task automatic pulse_rm();  rm_ref = 1; #5000; rm_ref = 0; #5000; endtask

  initial begin
    #(1_000_000_000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] v;
    #1000 rst_n = 0;
    #1000;
    check(unit_en_q == '0 && dith_q == '0, "reset");
    rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      v = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      unit_en_d = v; dith_d = 3'($urandom);
      spur_en = 1'(i % 2);
      #1000;
      check(rm_clk == (spur_en ? rm_ref : ck_ref), "rm_clk select");
      if (spur_en) pulse_ref(); else pulse_rm();       // wrong source: no load
      check(unit_en_q != v || i == 0 && v == '0, $sformatf("no load from other clock %0d", i));
      if (spur_en) pulse_rm(); else pulse_ref();       // selected source: load
      check(unit_en_q == v && dith_q == dith_d, $sformatf("load %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
