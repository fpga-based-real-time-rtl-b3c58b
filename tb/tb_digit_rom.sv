// tb_digit_rom: checks every row of every digit glyph against the text
// shapes of glyph_ref_pkg, and that codes 10-15 are blank.
module tb_digit_rom;
  import glyph_ref_pkg::*;

  logic [3:0] digit;
  logic [2:0] row;
  logic [7:0] bits;
  int checks = 0, failures = 0;

  digit_rom dut (.digit, .row, .bits);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++) begin
      for (int r = 0; r < 8; r++) begin
        digit = 4'(d);
        row   = 3'(r);
        #1;
        for (int c = 0; c < 8; c++) begin
          checks++;
          if (bits[7 - c] !== glyph_px(d, c, r)) begin
            failures++;
            $display("FAIL digit %0d row %0d col %0d: got %b", d, r, c, bits[7 - c]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
