// yuv2rgb: colour-space conversion from YUV to RGB 5-6-5.
//
// Implements the shift-and-add approximations of the usual YUV equations:
//   R = Y + 1.5*V,  G = Y - 0.5*U - 0.5*V,  B = Y + 2*U
// (the exact coefficients 1.398, 0.395/0.561 and 2.032 are replaced by
// powers of two so no multiplier is needed). U and V arrive offset binary and
// are centred by subtracting 128; half-terms use arithmetic shifts. Each result
// is saturated to 0..255 and its top 5/6/5 bits form the RGB565 pixel.
// The equations follow the original design; centring, rounding by truncation
// and saturation are this design's choices.
//
// Purely combinational.
module yuv2rgb
  import zg_pkg::*;
(
  input  yuv_t    yuv,
  output rgb565_t rgb
);

  function automatic logic [7:0] sat8(input logic signed [11:0] a);
    if (a < 0)        return 8'd0;
    else if (a > 255) return 8'd255;
    else              return a[7:0];
  endfunction

  logic signed [11:0] y, u, v, r_s, g_s, b_s;

  always_comb begin
    y   = 12'(signed'({4'b0, yuv.y}));
    u   = 12'(signed'({4'b0, yuv.u})) - 12'sd128;
    v   = 12'(signed'({4'b0, yuv.v})) - 12'sd128;
    r_s = y + v + (v >>> 1);
    g_s = y - (u >>> 1) - (v >>> 1);
    b_s = y + (u <<< 1);
    rgb.r = sat8(r_s)[7:3];
    rgb.g = sat8(g_s)[7:2];
    rgb.b = sat8(b_s)[7:3];
  end

endmodule
