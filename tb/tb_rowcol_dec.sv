// tb_rowcol_dec: all 256 codes; the row thermometer must hold code/16 + 1
// ones from the bottom and the column thermometer code%16 ones.
`timescale 1ps / 1fs
module tb_rowcol_dec;
  logic [7:0] code;
  logic [15:0] row, col;
  int checks = 0, failures = 0;

  rowcol_dec dut (.code, .row, .col);

  initial begin
    #(1_000_000_000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 256; c++) begin
      code = 8'(c);
      #10;
      checks++;
      if (row != 16'((32'd1 << (c / 16 + 1)) - 1) || col != 16'((32'd1 << (c % 16)) - 1)) begin
        failures++; $display("FAIL code %0d row %b col %b", c, row, col);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
