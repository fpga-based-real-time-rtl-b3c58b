// vga_counters: raster timing for 640x480 at 60 Hz from the 50 MHz clock.
//
// hcount runs at the 50 MHz system clock, two counts per pixel, over
// 2*H_TOTAL counts per line; the pixel column is px = hcount[HW-1:1] and
// VGA_CLK = hcount[0] gives the 25 MHz pixel clock with its rising edge in
// the middle of each pixel. vcount counts lines 0..V_TOTAL-1 and advances
// at the end of each line. Sync pulses are active low. The 640x480@60Hz
// mode, the 50 MHz source clock and the name hcount follow the design
// description; the two-counts-per-pixel scheme and the porch and sync
// widths (the standard VESA 640x480 industry timing: 800 x 525 total,
// 16/96/48 horizontal and 10/2/33 vertical) are this design's choice.
//
// Interface: clk, reset; hcount, vcount, px (column), py (= vcount),
// hsync_n, vsync_n, blank_n (high inside the 640x480 visible area),
// vga_clk. Timing: all outputs are registered counters or decoded from
// them; a frame is 2*H_TOTAL*V_TOTAL = 840,000 clock cycles (16.8 ms).
module vga_counters #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FRONT  = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BACK   = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FRONT  = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BACK   = 33,
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FRONT + H_SYNC + H_BACK,
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FRONT + V_SYNC + V_BACK,
  localparam int unsigned HW      = $clog2(2 * H_TOTAL),
  localparam int unsigned VW      = $clog2(V_TOTAL)
) (
  input  logic          clk,
  input  logic          reset,
  output logic [HW-1:0] hcount,
  output logic [VW-1:0] vcount,
  output logic [HW-2:0] px,
  output logic [VW-1:0] py,
  output logic          hsync_n,
  output logic          vsync_n,
  output logic          blank_n,
  output logic          vga_clk
);

  logic end_of_line, end_of_frame;
  assign end_of_line  = (hcount == HW'(2 * H_TOTAL - 1));
  assign end_of_frame = (vcount == VW'(V_TOTAL - 1));

  always_ff @(posedge clk) begin
    if (reset) begin
      hcount <= '0;
      vcount <= '0;
    end else if (end_of_line) begin
      hcount <= '0;
      vcount <= end_of_frame ? '0 : vcount + 1'b1;
    end else begin
      hcount <= hcount + 1'b1;
    end
  end

  assign px      = hcount[HW-1:1];
  assign py      = vcount;
  assign vga_clk = hcount[0];
  assign hsync_n = !((px >= (HW-1)'(H_ACTIVE + H_FRONT)) &&
                     (px <  (HW-1)'(H_ACTIVE + H_FRONT + H_SYNC)));
  assign vsync_n = !((vcount >= VW'(V_ACTIVE + V_FRONT)) &&
                     (vcount <  VW'(V_ACTIVE + V_FRONT + V_SYNC)));
  assign blank_n = (px < (HW-1)'(H_ACTIVE)) && (vcount < VW'(V_ACTIVE));

endmodule
