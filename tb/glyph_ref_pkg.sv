// glyph_ref_pkg: reference data for the display testbenches.
//
// Holds the expected 8x8 digit shapes written as text ('#' = lit pixel),
// an independent transcription of the glyphs the digit ROM should hold,
// and a reference pixel-colour function for the task display.
package glyph_ref_pkg;

  typedef string glyph_t [8];

  function automatic glyph_t glyph(input int d);
    case (d)
      0: return '{"..####..", ".##..##.", ".##.###.", ".###.##.", ".##..##.", ".##..##.", "..####..", "........"};
      1: return '{"...##...", "..###...", "...##...", "...##...", "...##...", "...##...", ".######.", "........"};
      2: return '{"..####..", ".##..##.", ".....##.", "....##..", "..##....", ".##.....", ".######.", "........"};
      3: return '{"..####..", ".##..##.", ".....##.", "...###..", ".....##.", ".##..##.", "..####..", "........"};
      4: return '{"....##..", "...###..", "..#.##..", ".#..##..", ".######.", "....##..", "....##..", "........"};
      5: return '{".######.", ".##.....", ".#####..", ".....##.", ".....##.", ".##..##.", "..####..", "........"};
      6: return '{"..####..", ".##.....", ".#####..", ".##..##.", ".##..##.", ".##..##.", "..####..", "........"};
      7: return '{".######.", ".....##.", "....##..", "...##...", "..##....", "..##....", "..##....", "........"};
      8: return '{"..####..", ".##..##.", ".##..##.", "..####..", ".##..##.", ".##..##.", "..####..", "........"};
      9: return '{"..####..", ".##..##.", ".##..##.", "..#####.", ".....##.", "....##..", "..###...", "........"};
      default: return '{"........", "........", "........", "........", "........", "........", "........", "........"};
    endcase
  endfunction

  // 1 if glyph d has a lit pixel at (col, row), col 0 = leftmost.
  function automatic bit glyph_px(input int d, input int col, input int row);
    glyph_t g = glyph(d);
    return g[row][col] == "#";
  endfunction

  // Expected {r,g,b} of pixel (x, y) of the 640x480 display.
  function automatic logic [23:0] ref_pixel(input int x, input int y, input bit visible,
                                            input int hc, input int task_id, input bit missed);
    if (!visible) return 24'h000000;
    if (missed) return ((hc / 128) % 2 == 0) ? 24'hFF0000 : 24'h600000;
    if (task_id < 10 && x >= 256 && x < 384 && y >= 176 && y < 304 &&
        glyph_px(task_id, (x - 256) / 16, (y - 176) / 16))
      return 24'hFFFFFF;
    case (task_id)
      0: return 24'h202020;
      1: return 24'h2040C0;
      2: return 24'h20A040;
      3: return 24'hE08020;
      default: return 24'h8020C0;
    endcase
  endfunction

endpackage
