// top_color_logic: combinational pixel colour of the task display.
//
// For the pixel at (px, py) it picks, in order of priority:
//   1. outside the visible area (blank_n low): black;
//   2. deadline_missed high: red over the whole screen, bright where
//      hcount[7] is 0 and dark where it is 1, so the screen shows vertical
//      red bands;
//   3. inside the 128x128 box centred at (CENTER_X, CENTER_Y) where the
//      glyph of current_task_id has a set bit: white. Each glyph pixel of the
//      8x8 digit ROM covers SCALE x SCALE screen pixels;
//   4. otherwise the background colour of current_task_id:
//      0 grey 20/20/20, 1 blue 20/40/C0, 2 green 20/A0/40,
//      3 orange E0/80/20, 4 and above purple 80/20/C0 (hex R/G/B).
// The colour table, the 16x scaling to a 128x128 digit centred at
// (320, 240), the red override and its toggling on hcount[7] follow the
// design description. This design's own choices: white is FF/FF/FF, bright
// and dark red are FF/00/00 and 60/00/00, only task ids 0-9 draw a digit
// (ids 10 and above show the background alone), and blanked pixels are
// black.
//
// Interface: px, py, hcount, blank_n from the raster counters;
// current_task_id and deadline_missed from the event logger; rgb out.
// Timing: purely combinational, so a change of task id or flag shows on the
// very next pixel.
module top_color_logic
  import profiler_pkg::*;
#(
  parameter int unsigned HW       = 11,
  parameter int unsigned VW       = 10,
  parameter int unsigned SCALE    = 16,
  parameter int unsigned CENTER_X = 320,
  parameter int unsigned CENTER_Y = 240,
  localparam int unsigned GLYPH   = 8,
  localparam int unsigned BOX     = GLYPH * SCALE,
  localparam int unsigned X0      = CENTER_X - BOX / 2,
  localparam int unsigned Y0      = CENTER_Y - BOX / 2,
  localparam int unsigned SH      = $clog2(SCALE)
) (
  input  logic [HW-2:0] px,
  input  logic [VW-1:0] py,
  input  logic [HW-1:0] hcount,
  input  logic          blank_n,
  input  task_id_t      current_task_id,
  input  logic          deadline_missed,
  output rgb_t          rgb
);

  localparam rgb_t C_GREY   = '{r: 8'h20, g: 8'h20, b: 8'h20};
  localparam rgb_t C_BLUE   = '{r: 8'h20, g: 8'h40, b: 8'hC0};
  localparam rgb_t C_GREEN  = '{r: 8'h20, g: 8'hA0, b: 8'h40};
  localparam rgb_t C_ORANGE = '{r: 8'hE0, g: 8'h80, b: 8'h20};
  localparam rgb_t C_PURPLE = '{r: 8'h80, g: 8'h20, b: 8'hC0};
  localparam rgb_t C_WHITE  = '{r: 8'hFF, g: 8'hFF, b: 8'hFF};
  localparam rgb_t C_RED_HI = '{r: 8'hFF, g: 8'h00, b: 8'h00};
  localparam rgb_t C_RED_LO = '{r: 8'h60, g: 8'h00, b: 8'h00};
  localparam rgb_t C_BLACK  = '{r: 8'h00, g: 8'h00, b: 8'h00};

  // Position relative to the digit box; wraps to large values left of /
  // above the box, so a single unsigned compare tests both edges.
  logic [HW-2:0] dx;
  logic [VW-1:0] dy;
  logic          in_box, has_digit, glyph_on;
  logic [2:0]    gcol, grow;
  logic [7:0]    glyph_row;

  assign dx     = px - (HW-1)'(X0);
  assign dy     = py - VW'(Y0);
  assign in_box = (dx < (HW-1)'(BOX)) && (dy < VW'(BOX));
  assign gcol   = 3'(dx >> SH);
  assign grow   = 3'(dy >> SH);
  assign has_digit = (current_task_id < 8'd10);

  digit_rom u_rom (
    .digit(current_task_id[3:0]),
    .row  (grow),
    .bits (glyph_row)
  );

  assign glyph_on = in_box && has_digit && glyph_row[3'd7 - gcol];

  rgb_t background;
  always_comb begin
    unique case (current_task_id)
      8'd0:    background = C_GREY;
      8'd1:    background = C_BLUE;
      8'd2:    background = C_GREEN;
      8'd3:    background = C_ORANGE;
      default: background = C_PURPLE;
    endcase
  end

  always_comb begin
    if (!blank_n)             rgb = C_BLACK;
    else if (deadline_missed) rgb = hcount[7] ? C_RED_LO : C_RED_HI;
    else if (glyph_on)        rgb = C_WHITE;
    else                      rgb = background;
  end

endmodule
