// color_invert: photo-negative of one RGB565 pixel.
//
// Each field is subtracted from its largest value (31 for red and blue, 63 for
// green), so white becomes black and every colour its complement. With en low
// the pixel passes unchanged. Follows the original description.
//
// Purely combinational.
module color_invert
  import zg_pkg::*;
(
  input  logic    en,
  input  rgb565_t rgb_i,
  output rgb565_t rgb_o
);

  always_comb begin
    rgb_o = rgb_i;
    if (en) begin
      rgb_o.r = 5'd31 - rgb_i.r;
      rgb_o.g = 6'd63 - rgb_i.g;
      rgb_o.b = 5'd31 - rgb_i.b;
    end
  end

endmodule
