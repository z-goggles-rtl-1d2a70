// blur3x3: even-weighted 3x3 blur of an RGB565 window.
//
// For each colour field the nine samples are summed and the sum is divided by
// nine without a divider: sum*57/512 (57/512 = 1/8.98) is formed from three
// shifted copies of the sum, (sum<<6) - (sum<<3) + sum, followed by a right
// shift of 9. A flat area keeps its value exactly (31 stays 31, 63 stays 63).
// Equal weights with an adder and parallel shifters follow the original
// description; the 57/512 constant is this design's choice.
//
// Purely combinational.
module blur3x3
  import zg_pkg::*;
(
  input  win3_t   win,
  output rgb565_t rgb
);

  function automatic logic [5:0] div9(input logic [9:0] s);
    return 6'(((16'(s) << 6) - (16'(s) << 3) + 16'(s)) >> 9);
  endfunction

  logic [9:0] sr, sg, sb;

  always_comb begin
    sr = '0; sg = '0; sb = '0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        sr += 10'(win[r][c].r);
        sg += 10'(win[r][c].g);
        sb += 10'(win[r][c].b);
      end
    rgb.r = 5'(div9(sr));
    rgb.g = div9(sg);
    rgb.b = 5'(div9(sb));
  end

endmodule
