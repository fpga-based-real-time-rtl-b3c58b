// tb_top_color_logic: compares the colour of every pixel of the digit box
// and of random pixels of the whole 800x525 raster with the reference
// colour function, for task ids 0-12 and 255, with and without the
// deadline-miss override, and with blanking.
module tb_top_color_logic;
  import profiler_pkg::*;
  import glyph_ref_pkg::*;

  logic [9:0]  px, py;
  logic [10:0] hcount;
  logic        blank_n, deadline_missed;
  task_id_t    current_task_id;
  rgb_t        rgb;
  int checks = 0, failures = 0;
  int n_white = 0, n_red_hi = 0, n_red_lo = 0, n_black = 0;

  top_color_logic dut (.px, .py, .hcount, .blank_n, .current_task_id, .deadline_missed, .rgb);

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic probe(input int x, input int y, input int id, input bit miss);
    logic [23:0] exp;
    bit vis = (x < 640) && (y < 480);
    int hc = 2 * x + $urandom_range(0, 1);
    px = 10'(x); py = 10'(y); hcount = 11'(hc); blank_n = vis;
    current_task_id = 8'(id); deadline_missed = miss;
    #1;
    exp = ref_pixel(x, y, vis, hc, id, miss);
    checks++;
    if (rgb !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL (%0d,%0d) id %0d miss %0d: got %06h exp %06h", x, y, id, miss, rgb, exp);
    end
    if (exp == 24'hFFFFFF) n_white++;
    if (exp == 24'hFF0000) n_red_hi++;
    if (exp == 24'h600000) n_red_lo++;
    if (exp == 24'h000000) n_black++;
  endtask

  initial begin
    int ids [14] = '{0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 255};
    foreach (ids[k]) begin
      for (int y = 170; y < 310; y++)
        for (int x = 250; x < 390; x++)
          probe(x, y, ids[k], 0);
      for (int i = 0; i < 5000; i++)
        probe($urandom_range(0, 799), $urandom_range(0, 524), ids[k], 0);
      for (int i = 0; i < 2000; i++)
        probe($urandom_range(0, 799), $urandom_range(0, 524), ids[k], 1);
    end
    checks++;
    if (n_white == 0 || n_red_hi == 0 || n_red_lo == 0 || n_black == 0) begin
      failures++; $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
