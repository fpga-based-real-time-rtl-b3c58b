// digit_rom: 8x8 one-bit glyphs for the decimal digits 0-9.
//
// A combinational lookup: for a digit (0-9) and a glyph row (0-7, top
// first) it returns 8 pixels, bit 7 being the leftmost column. Codes 10-15
// return an empty row. The 8x8 one-bit format and the digit range follow
// the design description; the glyph shapes are this design's own.
//
// Interface: digit[3:0], row[2:0] in; bits[7:0] out. Timing: purely
// combinational (maps onto LUTs).
module digit_rom (
  input  logic [3:0] digit,
  input  logic [2:0] row,
  output logic [7:0] bits
);

  always_comb begin
    unique case ({digit, row})
      // 0
      7'h00: bits = 8'b00111100;  7'h01: bits = 8'b01100110;
      7'h02: bits = 8'b01101110;  7'h03: bits = 8'b01110110;
      7'h04: bits = 8'b01100110;  7'h05: bits = 8'b01100110;
      7'h06: bits = 8'b00111100;  7'h07: bits = 8'b00000000;
      // 1
      7'h08: bits = 8'b00011000;  7'h09: bits = 8'b00111000;
      7'h0A: bits = 8'b00011000;  7'h0B: bits = 8'b00011000;
      7'h0C: bits = 8'b00011000;  7'h0D: bits = 8'b00011000;
      7'h0E: bits = 8'b01111110;  7'h0F: bits = 8'b00000000;
      // 2
      7'h10: bits = 8'b00111100;  7'h11: bits = 8'b01100110;
      7'h12: bits = 8'b00000110;  7'h13: bits = 8'b00001100;
      7'h14: bits = 8'b00110000;  7'h15: bits = 8'b01100000;
      7'h16: bits = 8'b01111110;  7'h17: bits = 8'b00000000;
      // 3
      7'h18: bits = 8'b00111100;  7'h19: bits = 8'b01100110;
      7'h1A: bits = 8'b00000110;  7'h1B: bits = 8'b00011100;
      7'h1C: bits = 8'b00000110;  7'h1D: bits = 8'b01100110;
      7'h1E: bits = 8'b00111100;  7'h1F: bits = 8'b00000000;
      // 4
      7'h20: bits = 8'b00001100;  7'h21: bits = 8'b00011100;
      7'h22: bits = 8'b00101100;  7'h23: bits = 8'b01001100;
      7'h24: bits = 8'b01111110;  7'h25: bits = 8'b00001100;
      7'h26: bits = 8'b00001100;  7'h27: bits = 8'b00000000;
      // 5
      7'h28: bits = 8'b01111110;  7'h29: bits = 8'b01100000;
      7'h2A: bits = 8'b01111100;  7'h2B: bits = 8'b00000110;
      7'h2C: bits = 8'b00000110;  7'h2D: bits = 8'b01100110;
      7'h2E: bits = 8'b00111100;  7'h2F: bits = 8'b00000000;
      // 6
      7'h30: bits = 8'b00111100;  7'h31: bits = 8'b01100000;
      7'h32: bits = 8'b01111100;  7'h33: bits = 8'b01100110;
      7'h34: bits = 8'b01100110;  7'h35: bits = 8'b01100110;
      7'h36: bits = 8'b00111100;  7'h37: bits = 8'b00000000;
      // 7
      7'h38: bits = 8'b01111110;  7'h39: bits = 8'b00000110;
      7'h3A: bits = 8'b00001100;  7'h3B: bits = 8'b00011000;
      7'h3C: bits = 8'b00110000;  7'h3D: bits = 8'b00110000;
      7'h3E: bits = 8'b00110000;  7'h3F: bits = 8'b00000000;
      // 8
      7'h40: bits = 8'b00111100;  7'h41: bits = 8'b01100110;
      7'h42: bits = 8'b01100110;  7'h43: bits = 8'b00111100;
      7'h44: bits = 8'b01100110;  7'h45: bits = 8'b01100110;
      7'h46: bits = 8'b00111100;  7'h47: bits = 8'b00000000;
      // 9
      7'h48: bits = 8'b00111100;  7'h49: bits = 8'b01100110;
      7'h4A: bits = 8'b01100110;  7'h4B: bits = 8'b00111110;
      7'h4C: bits = 8'b00000110;  7'h4D: bits = 8'b00001100;
      7'h4E: bits = 8'b00111000;  7'h4F: bits = 8'b00000000;
      default: bits = 8'b00000000;
    endcase
  end

endmodule
