// sobel_edge: Sobel edge detector on a 3x3 RGB565 window.
//
// Each window pixel is reduced to a luminance L = 2R + G + 2B over its 5-6-5
// fields (R and B doubled to the green field's 6-bit scale), so L spans
// 0..187. The horizontal and vertical
// gradients use the Sobel masks, built from adds, subtracts and a shift by
// one for the weight 2:
//   Gx = (p02 + 2p12 + p22) - (p00 + 2p10 + p20)
//   Gy = (p20 + 2p21 + p22) - (p00 + 2p01 + p02)
// |Gx| + |Gy| is compared with TH; above it the output is white, else black.
// The Sobel masks, summing and thresholding follow the original description;
// the luminance formula and TH are this design's choices.
//
// Purely combinational.
module sobel_edge
  import zg_pkg::*;
#(
  parameter int TH = 24
) (
  input  win3_t   win,
  output rgb565_t rgb,
  output logic    edge_det
);

  logic [7:0] l [3][3];
  logic signed [11:0] gx, gy;
  logic [11:0] mag;

  always_comb begin
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        l[r][c] = {2'b0, win[r][c].r, 1'b0} + {2'b0, win[r][c].g} + {2'b0, win[r][c].b, 1'b0};
    gx = 12'(l[0][2]) + (12'(l[1][2]) << 1) + 12'(l[2][2])
       - 12'(l[0][0]) - (12'(l[1][0]) << 1) - 12'(l[2][0]);
    gy = 12'(l[2][0]) + (12'(l[2][1]) << 1) + 12'(l[2][2])
       - 12'(l[0][0]) - (12'(l[0][1]) << 1) - 12'(l[0][2]);
    mag      = (gx < 0 ? 12'(-gx) : 12'(gx)) + (gy < 0 ? 12'(-gy) : 12'(gy));
    edge_det = int'(mag) > TH;
    rgb      = edge_det ? RGB_WHITE : RGB_BLACK;
  end

endmodule
