// test_pattern: monitor-tuning test image for a 640x480 display.
//
// Used when bringing up a new monitor, whose porch and sync timing must be
// tuned by hand. The image, computed from the beam position alone:
//   * each corner: a 60x60 block of nine 20x20 cells, white and a corner
//     colour (red, green, blue, yellow) in a checkerboard, to judge framing,
//     edge behaviour, colour skew and sub-pixel appearance;
//   * lines 60-179: the 8 bar colours (white, yellow, cyan, green, magenta,
//     red, blue, black) in bands 80, then 40, then 20 pixels wide, 40 lines each;
//   * lines 180-299: separate red, green and blue ramps, 40 lines each;
//   * lines 300-359: a ramp over the full 16-bit colour code range;
//   * lines 360-419: four grey levels in bars 10, 20 and 40 pixels wide.
// The kinds of content follow the original pattern; its exact layout is this
// design's own. Outside 640x480 the output is don't-care (vga_out blanks it).
//
// Purely combinational.
module test_pattern
  import zg_pkg::*;
(
  input  logic [9:0] h,
  input  logic [9:0] v,
  output rgb565_t    rgb
);

  function automatic rgb565_t bar_colour(input logic [2:0] idx);
    logic [2:0] c;
    c = 3'd7 - idx;          // idx 0 = white ... 7 = black
    return '{r: {5{c[1]}}, g: {6{c[2]}}, b: {5{c[0]}}};
  endfunction

  logic [9:0] lx, ly, hx;
  logic [1:0] cx, cy, corner, grey_idx;
  logic       in_corner;
  rgb565_t    corner_col;
  logic [15:0] ramp;
  logic [4:0]  grey;

  always_comb begin
    in_corner = (h < 10'd60 || (h >= 10'd580 && h < 10'd640)) &&
                (v < 10'd60 || (v >= 10'd420 && v < 10'd480));
    lx     = (h < 10'd60) ? h : h - 10'd580;
    ly     = (v < 10'd60) ? v : v - 10'd420;
    cx     = 2'(lx / 10'd20);
    cy     = 2'(ly / 10'd20);
    corner = {v >= 10'd420, h >= 10'd580};
    unique case (corner)
      2'd0:    corner_col = '{r: 5'd31, g: 6'd0,  b: 5'd0};
      2'd1:    corner_col = '{r: 5'd0,  g: 6'd63, b: 5'd0};
      2'd2:    corner_col = '{r: 5'd0,  g: 6'd0,  b: 5'd31};
      default: corner_col = '{r: 5'd31, g: 6'd63, b: 5'd0};
    endcase
    ramp = 16'(h * 10'd102);
    hx   = (h < 10'd160) ? h / 10'd10 : ((h < 10'd320) ? h / 10'd20 : h / 10'd40);
    grey_idx = hx[1:0];
    grey = 5'd8 + 5'(grey_idx) * 5'd7;     // 8, 15, 22, 29

    rgb = RGB_BLACK;
    if (in_corner)
      rgb = (cx[0] ^ cy[0]) ? corner_col : RGB_WHITE;
    else if (v >= 10'd60  && v < 10'd100) rgb = bar_colour(3'(h / 10'd80));
    else if (v >= 10'd100 && v < 10'd140) rgb = bar_colour(3'(h / 10'd40));
    else if (v >= 10'd140 && v < 10'd180) rgb = bar_colour(3'(h / 10'd20));
    else if (v >= 10'd180 && v < 10'd220) rgb = '{r: 5'(h / 10'd20), g: 6'd0, b: 5'd0};
    else if (v >= 10'd220 && v < 10'd260) rgb = '{r: 5'd0, g: 6'(h / 10'd10), b: 5'd0};
    else if (v >= 10'd260 && v < 10'd300) rgb = '{r: 5'd0, g: 6'd0, b: 5'(h / 10'd20)};
    else if (v >= 10'd300 && v < 10'd360) rgb = ramp;
    else if (v >= 10'd360 && v < 10'd420) rgb = '{r: grey, g: {grey, grey[4]}, b: grey};
  end

endmodule
