// cam_framer: frames the camera's video stream into pixel coordinates.
//
// The camera drives VSYNC, HSYNC (HREF) and a 16-bit data bus on its own
// 27 MHz pixel clock; this module runs on that clock. Data is taken only in the
// active region (VSYNC low, HSYNC high). A VSYNC high resets all counters, a
// falling HSYNC advances to the next line, and each clock while HSYNC is high
// carries half a pixel: first a {Y,U} word, then a {Y,V} word (Y in the upper
// byte). The second half completes the pixel, which is presented for one clock
// with its column and line. The pixel's luma is the mean of the two Y samples,
// a choice of this design; the tracking rules follow the original description.
//
// Timing: pix_valid is a registered one-clock pulse, one clock after the {Y,V}
// word. frame_start pulses one clock after VSYNC rises. Counters saturate.
module cam_framer
  import zg_pkg::*;
#(
  parameter int XB = X_BITS,
  parameter int YB = Y_BITS
) (
  input  logic          clk,       // camera pixel clock
  input  logic          rst,       // synchronous, active high
  input  logic          vsync,
  input  logic          href,
  input  logic [15:0]   data,
  output logic          pix_valid,
  output logic [XB-1:0] pix_x,
  output logic [YB-1:0] pix_y,
  output yuv_t          pix_yuv,
  output logic          frame_start
);

  logic          href_q, vsync_q;
  logic          half;              // 1: {Y,U} word held, waiting for {Y,V}
  logic [7:0]    y0, u0;
  logic [XB-1:0] xcnt;
  logic [YB-1:0] ycnt;
  logic [7:0]    ymean;

  assign ymean = 8'((9'(y0) + 9'(data[15:8])) >> 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      href_q      <= 1'b0;
      vsync_q     <= 1'b0;
      half        <= 1'b0;
      y0          <= '0;
      u0          <= '0;
      xcnt        <= '0;
      ycnt        <= '0;
      pix_valid   <= 1'b0;
      pix_x       <= '0;
      pix_y       <= '0;
      pix_yuv     <= '0;
      frame_start <= 1'b0;
    end else begin
      href_q      <= href;
      vsync_q     <= vsync;
      pix_valid   <= 1'b0;
      frame_start <= vsync && !vsync_q;
      if (vsync) begin
        half <= 1'b0;
        xcnt <= '0;
        ycnt <= '0;
      end else if (href) begin
        if (!half) begin
          y0   <= data[15:8];
          u0   <= data[7:0];
          half <= 1'b1;
        end else begin
          pix_valid <= 1'b1;
          pix_x     <= xcnt;
          pix_y     <= ycnt;
          pix_yuv   <= '{y: ymean, u: u0, v: data[7:0]};
          half      <= 1'b0;
          if (xcnt != '1) xcnt <= xcnt + 1'b1;
        end
      end else begin
        half <= 1'b0;
        if (href_q) begin
          xcnt <= '0;
          if (ycnt != '1) ycnt <= ycnt + 1'b1;
        end
      end
    end
  end

endmodule
