// task_visualizer: frame-buffer-free VGA display of the profiler state.
//
// Drives a 640x480 at 60 Hz monitor directly from two conduit signals of
// the event logger: the task id of the last TASK_START and the sticky
// deadline-miss flag. The raster counters (vga_counters) give the pixel
// position; top_color_logic, with its digit ROM, turns position, task id
// and flag into a colour. Nothing is stored per pixel, so only these
// synthesised patterns can be shown. The structure (counters, digit ROM,
// colour logic, no frame buffer) follows the design description. The
// output pins match a board with 8-bit R/G/B and separate sync, blank,
// sync-on-green and pixel-clock pins (the DE1-SoC VGA connector);
// VGA_SYNC_N is tied low (no sync on green) as this design's choice.
//
// Interface: clk (50 MHz), reset; current_task_id, deadline_missed in;
// VGA_R/G/B, VGA_HS, VGA_VS, VGA_BLANK_N, VGA_SYNC_N, VGA_CLK out.
// Timing: colour is combinational from the counter registers and the
// conduit registers, so a new task id shows from the next clock cycle.
module task_visualizer
  import profiler_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  task_id_t   current_task_id,
  input  logic       deadline_missed,
  output logic [7:0] VGA_R,
  output logic [7:0] VGA_G,
  output logic [7:0] VGA_B,
  output logic       VGA_HS,
  output logic       VGA_VS,
  output logic       VGA_BLANK_N,
  output logic       VGA_SYNC_N,
  output logic       VGA_CLK
);

  logic [10:0] hcount;
  logic [9:0]  px, py;
  logic        blank_n;
  rgb_t        rgb;

  vga_counters u_counters (
    .clk, .reset,
    .hcount, .vcount(), .px, .py,
    .hsync_n(VGA_HS), .vsync_n(VGA_VS),
    .blank_n, .vga_clk(VGA_CLK)
  );

  top_color_logic #(.HW(11), .VW(10)) u_color (
    .px, .py, .hcount, .blank_n,
    .current_task_id, .deadline_missed,
    .rgb
  );

  assign VGA_R       = rgb.r;
  assign VGA_G       = rgb.g;
  assign VGA_B       = rgb.b;
  assign VGA_BLANK_N = blank_n;
  assign VGA_SYNC_N  = 1'b0;

endmodule
