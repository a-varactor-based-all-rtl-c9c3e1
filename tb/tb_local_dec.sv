// tb_local_dec: feeds the row/column thermometer pattern of every code
// 0..255 and checks that exactly the lowest `code` units are enabled, so the
// count equals the code and each step enables exactly one more unit.
`timescale 1ps / 1fs
module tb_local_dec;
  logic [15:0] row, col;
  logic [255:0] unit_en, prev;
  int checks = 0, failures = 0;

  local_dec dut (.row, .col, .unit_en);

  initial begin
    #(1_000_000_000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev = '0;
    for (int c = 0; c < 256; c++) begin
      row = 16'((32'd1 << (c / 16 + 1)) - 1);
      col = 16'((32'd1 << (c % 16)) - 1);
      #10;
      checks++;
      if (unit_en != (256'd1 << c) - 256'd1) begin
        failures++; $display("FAIL code %0d ones %0d", c, $countones(unit_en));
      end
      checks++;
      if ((unit_en & prev) != prev || $countones(unit_en ^ prev) != (c == 0 ? 0 : 1)) begin
        failures++; $display("FAIL monotonic step at %0d", c);
      end
      prev = unit_en;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
