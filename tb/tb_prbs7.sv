// tb_prbs7: checks the 7-bit PRBS against a bit-serial model of the
// recurrence b[n] = b[n-7] xor b[n-6], its reset seed, its period of 127
// cycles, that all eight 3-bit indices occur, and that en = 0 holds it.
`timescale 1ps / 1fs
module tb_prbs7;
  logic clk = 0, rst_n = 0, en = 0;
  logic [2:0] rm_n;
  int checks = 0, failures = 0;

  prbs7 dut (.clk, .rst_n, .en, .rm_n);

  always #5000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #(200_000_000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seq[$];
    bit [7:0] seen = '0;
    logic [2:0] first;
    for (int i = 0; i < 7; i++) seq.push_back(1'b1);   // seed: all ones
    #12000 rst_n = 1;
    check(rm_n == 3'b111, "seed");
    @(negedge clk) en = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      seq.push_back(seq[seq.size()-7] ^ seq[seq.size()-6]);
      // rm_n[0] is the newest bit, rm_n[2] the oldest of the three
      check(rm_n == {seq[seq.size()-3], seq[seq.size()-2], seq[seq.size()-1]},
            $sformatf("step %0d rm_n=%0d", n, rm_n));
      seen[rm_n] = 1'b1;
    end
    check(seen == 8'hFF, "all indices");
    // period: the bit sequence repeats after 127 and not after any divisor
    for (int k = 130; k < seq.size(); k++) check(seq[k] == seq[k-127], "period 127");
    begin
      bit same = 1;
      for (int k = 20; k < 120; k++) if (seq[k] != seq[k-63]) same = 0;
      check(!same, "not shorter");
    end
    first = rm_n;
    en = 0;
    repeat (5) @(negedge clk);
    check(rm_n == first, "hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
