// tb_task_visualizer: runs the renderer for three full frames and checks
// every pixel of every cycle against the reference colour, computed from a
// raster position the bench counts itself, plus HS/VS/BLANK_N. The task id
// and deadline flag change in the middle of a frame and must show on the
// very next clock cycle.
module tb_task_visualizer;
  import profiler_pkg::*;
  import glyph_ref_pkg::*;

  logic clk = 0, reset = 1;
  task_id_t current_task_id = 0;
  logic deadline_missed = 0;
  logic [7:0] VGA_R, VGA_G, VGA_B;
  logic VGA_HS, VGA_VS, VGA_BLANK_N, VGA_SYNC_N, VGA_CLK;
  int checks = 0, failures = 0;

  task_visualizer dut (.clk, .reset, .current_task_id, .deadline_missed,
                       .VGA_R, .VGA_G, .VGA_B, .VGA_HS, .VGA_VS, .VGA_BLANK_N,
                       .VGA_SYNC_N, .VGA_CLK);

  always #10 clk = ~clk;

  initial begin
    #80ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int errs = 0;
  int n_digit = 0, n_flash = 0;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h exp %0h", what, got, exp);
    end
  endtask

  initial begin
    longint cyc = 0;
    repeat (2) @(posedge clk); #1;
    reset = 0;
    for (int f = 0; f < 3; f++) begin
      for (int i = 0; i < 840000; i++) begin
        int hc, line, x;
        bit vis;
        logic [23:0] exp;
        // Mid-frame changes, applied right after an edge: the colour must
        // follow at once.
        if (i == 300000) current_task_id = 8'(f + 1);
        if (f == 2 && i == 500000) deadline_missed = 1;
        if (f == 2 && i == 700000) deadline_missed = 0;
        @(posedge clk); #1;
        cyc++;
        hc   = int'(cyc % 1600);
        line = int'((cyc / 1600) % 525);
        x    = hc / 2;
        vis  = (x < 640) && (line < 480);
        exp  = ref_pixel(x, line, vis, hc, current_task_id, deadline_missed);
        checks += 5;
        if ({VGA_R, VGA_G, VGA_B} !== exp) begin
          errs++;
          if (errs < 10) $display("FAIL pixel (%0d,%0d): got %06h exp %06h", x, line, {VGA_R, VGA_G, VGA_B}, exp);
        end
        if (VGA_BLANK_N !== vis) errs++;
        if (VGA_HS !== !(x >= 656 && x < 752)) errs++;
        if (VGA_VS !== !(line >= 490 && line < 492)) errs++;
        if (VGA_CLK !== hc[0]) errs++;
        if (exp == 24'hFFFFFF) n_digit++;
        if (deadline_missed && vis) n_flash++;
      end
      current_task_id = 0;
    end
    failures += errs;
    if (errs != 0) $display("FAIL %0d pixel/sync mismatches", errs);
    check("sync on green off", VGA_SYNC_N, 0);
    checks++;
    if (n_digit == 0 || n_flash == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
