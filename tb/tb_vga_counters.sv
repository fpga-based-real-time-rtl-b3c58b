// tb_vga_counters: runs two frames at the default 640x480@60Hz timing and
// measures, in 50 MHz cycles: line period 1600, hsync low 192, frame
// period 840,000, vsync low 3,200, visible cycles per frame 614,400, the
// position of the first hsync edge (cycle 1312 of the line) and the pixel
// clock (toggling every cycle). Also checks px == hcount/2.
module tb_vga_counters;
  logic clk = 0, reset = 1;
  logic [10:0] hcount;
  logic [9:0]  vcount, px, py;
  logic hsync_n, vsync_n, blank_n, vga_clk;
  int checks = 0, failures = 0;

  vga_counters dut (.clk, .reset, .hcount, .vcount, .px, .py, .hsync_n, .vsync_n,
                    .blank_n, .vga_clk);

  always #10 clk = ~clk;

  initial begin
    #40ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  longint cyc = 0, last_hs_fall = -1, last_vs_fall = -1, hs_low = 0, vs_low = 0;
  longint vis = 0, hs_fall_n = 0, vs_fall_n = 0, first_hs_fall = -1;
  logic prev_hs = 1, prev_vs = 1, prev_clk = 0;
  int clk_err = 0, px_err = 0;

  initial begin
    repeat (2) @(posedge clk); #1;
    reset = 0;
    for (int i = 0; i < 2 * 840000 + 10; i++) begin
      @(posedge clk); #1;
      cyc++;
      if (vga_clk == prev_clk) clk_err++;
      if (px != hcount[10:1] || py != vcount) px_err++;
      if (!blank_n == 0) vis++;
      if (!hsync_n) hs_low++;
      if (!vsync_n) vs_low++;
      if (prev_hs && !hsync_n) begin
        if (first_hs_fall < 0) first_hs_fall = cyc;
        if (last_hs_fall >= 0) check("line period", cyc - last_hs_fall, 1600);
        last_hs_fall = cyc;
        hs_fall_n++;
      end
      if (prev_vs && !vsync_n) begin
        if (last_vs_fall >= 0) check("frame period", cyc - last_vs_fall, 840000);
        last_vs_fall = cyc;
        vs_fall_n++;
      end
      prev_hs = hsync_n; prev_vs = vsync_n; prev_clk = vga_clk;
    end
    // Counted over 2 frames (+10 cycles inside line 0 blanking-free region).
    check("hsync falls", hs_fall_n, 1050);
    check("vsync falls", vs_fall_n, 2);
    check("hsync low cycles", hs_low, 1050 * 192);
    check("vsync low cycles", vs_low, 2 * 3200);
    check("visible cycles", vis, 2 * 614400 + 10);
    check("first hsync fall", first_hs_fall, 1312);
    check("pixel clock", clk_err, 0);
    check("px/py", px_err, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
