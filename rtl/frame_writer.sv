// frame_writer: turns a converted camera pixel into a frame-store write request.
//
// The pixel's column and line are used directly as the address (see
// zg_pkg::pix_addr): x in the low 9 bits, y in the 9 bits above it, and the
// MSB of y also choosing one of the two SRAM chips. With the vertical flip enabled the
// pixel is stored at the mirrored position, so the top-left camera pixel lands
// bottom-right (x' = IMG_W-1-x, y' = IMG_H-1-y) and the picture is read out
// upside down with no change on the read side. Pixels outside IMG_W x IMG_H
// are not written.
//
// Interface: runs on the camera clock. A request is announced by toggling
// wr_tog while wr_addr/wr_data are updated on the same edge and then held until
// the next request (at least two camera clocks later), so the memory controller
// can detect the toggle through a synchronizer and sample the held values.
// The flip input may come from any clock: it is synchronized here and adopted
// only at frame_start, a choice of this design so that no frame is half flipped.
module frame_writer
  import zg_pkg::*;
#(
  parameter int IMG_W = 320,
  parameter int IMG_H = 480
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               frame_start,
  input  logic               flip,
  input  logic               pix_valid,
  input  logic [X_BITS-1:0]  pix_x,
  input  logic [Y_BITS-1:0]  pix_y,
  input  rgb565_t            pix_rgb,
  output logic               wr_tog,
  output maddr_t             wr_addr,
  output rgb565_t            wr_data,
  output logic               flip_active
);

  logic flip_s1, flip_s2;
  logic [X_BITS-1:0] ax;
  logic [Y_BITS-1:0] ay;
  logic in_range;

  always_comb begin
    in_range = (int'(pix_x) < IMG_W) && (int'(pix_y) < IMG_H);
    ax = flip_active ? X_BITS'(IMG_W - 1 - int'(pix_x)) : pix_x;
    ay = flip_active ? Y_BITS'(IMG_H - 1 - int'(pix_y)) : pix_y;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      flip_s1     <= 1'b0;
      flip_s2     <= 1'b0;
      flip_active <= 1'b0;
      wr_tog      <= 1'b0;
      wr_addr     <= '0;
      wr_data     <= '0;
    end else begin
      flip_s1 <= flip;
      flip_s2 <= flip_s1;
      if (frame_start) flip_active <= flip_s2;
      if (pix_valid && in_range) begin
        wr_tog  <= ~wr_tog;
        wr_addr <= pix_addr(ax, ay);
        wr_data <= pix_rgb;
      end
    end
  end

endmodule
