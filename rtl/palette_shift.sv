// palette_shift: designer colour correction of one RGB565 pixel.
//
// Adds a signed offset to each colour field and saturates the result to the
// field's range. It is not a user function: the offsets are fixed when the
// design is built, to trim colour casts seen on a given camera and display.
// With all offsets zero the pixel passes unchanged. The function (a quick
// colour shift for appearance) is from the original design; the
// offset-and-saturate form is this design's choice.
//
// Purely combinational.
module palette_shift
  import zg_pkg::*;
(
  input  logic signed [5:0] r_off,
  input  logic signed [6:0] g_off,
  input  logic signed [5:0] b_off,
  input  rgb565_t           rgb_i,
  output rgb565_t           rgb_o
);

  function automatic logic [5:0] sat_add(input logic [5:0] a,
                                         input logic signed [7:0] off,
                                         input int unsigned maxv);
    logic signed [8:0] s;
    s = signed'({3'b0, a}) + 9'(off);
    if (s < 0)                  return 6'd0;
    else if (int'(s) > int'(maxv)) return 6'(maxv);
    else                        return s[5:0];
  endfunction

  always_comb begin
    rgb_o.r = 5'(sat_add({1'b0, rgb_i.r}, 8'(r_off), 31));
    rgb_o.g = sat_add(rgb_i.g, 8'(g_off), 63);
    rgb_o.b = 5'(sat_add({1'b0, rgb_i.b}, 8'(b_off), 31));
  end

endmodule
