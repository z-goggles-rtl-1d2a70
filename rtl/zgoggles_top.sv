// zgoggles_top: the Z-Goggles FPGA video processor.
//
// A head-mounted camera streams YUV video on its own 27 MHz clock. The
// processor stores each frame in two external 256k x 16 SRAM chips and reads
// it back at the 25 MHz VGA pixel rate for a 640x480 display, changing the
// picture on the way according to the functions the wearer selects:
//
//   camera clock:  cam_framer -> yuv2rgb -> frame_writer (vertical flip)
//                                                  |  write toggle
//   system clock:  mem_ctrl <-> SRAM (reads first, writes aborted/buffered)
//                  vga_timing -> pix_fetch (3x3 cache) -> sobel_edge | blur3x3
//                  | centre -> color_invert -> palette_shift -> vga_out
//                  ui_ctrl (switches, invalid-combination LED)
//
// Clocks: clk is the 100 MHz system clock (memory controller and display;
// the pixel rate is an enable every 4th cycle and dac_clk is that pixel
// clock); cam_pclk is the camera's unrelated clock. rst and cam_rst are
// synchronous active-high resets in the two domains. The SRAM data bus is
// split into out/enable/in. test_mode shows the monitor test pattern. The
// palette offsets are build-time parameters (zero: no correction).
// The structure follows the original design; single 100 MHz system clock,
// stored-image size (320x480 shown 2x wide) and all widths not given are
// this design's choices, described in the modules.
module zgoggles_top
  import zg_pkg::*;
#(
  parameter int IMG_W      = 320,
  parameter int IMG_H      = 480,
  parameter int WBUF_DEPTH = 2,
  parameter int EDGE_TH    = 24,
  parameter int DEBOUNCE   = 200000,
  parameter logic signed [5:0] PAL_R = 6'sd0,
  parameter logic signed [6:0] PAL_G = 7'sd0,
  parameter logic signed [5:0] PAL_B = 6'sd0
) (
  input  logic               clk,
  input  logic               rst,
  // camera
  input  logic               cam_pclk,
  input  logic               cam_rst,
  input  logic               cam_vsync,
  input  logic               cam_href,
  input  logic [15:0]        cam_data,
  // user interface
  input  logic [3:0]         sw,          // {edge, blur, invert, flip}
  input  logic               test_mode,
  output logic               led_invalid,
  output mode_t              mode,
  // SRAM chips
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [1:0]         sram_ce_n,
  output logic               sram_we_n,
  output logic               sram_oe_n,
  output logic [15:0]        sram_dq_o,
  output logic               sram_dq_oe,
  input  logic [15:0]        sram_dq_i,
  // VGA DAC and monitor
  output logic               dac_clk,
  output logic               dac_blank_n,
  output logic [7:0]         dac_r,
  output logic [7:0]         dac_g,
  output logic [7:0]         dac_b,
  output logic               vga_hsync,
  output logic               vga_vsync,
  output logic               vga_de,
  // memory controller events (for monitoring)
  output logic               ev_buffered,
  output logic               ev_abort,
  output logic               ev_drop,
  output logic               flip_active,  // camera domain: frame being stored flipped
  output logic               frame_end,    // last pixel enable of a display frame
  output logic               edge_pix      // edge detector verdict for the pixel under the beam
);

  localparam int H_TOTAL = 800;
  localparam int V_TOTAL = 525;

  // ---------------- camera clock domain ----------------
  logic              pix_valid, frame_start;
  logic [X_BITS-1:0] pix_x;
  logic [Y_BITS-1:0] pix_y;
  yuv_t              pix_yuv;
  rgb565_t           pix_rgb, wr_data;
  logic              wr_tog;
  maddr_t            wr_addr;

  cam_framer u_framer (
    .clk(cam_pclk), .rst(cam_rst), .vsync(cam_vsync), .href(cam_href), .data(cam_data),
    .pix_valid, .pix_x, .pix_y, .pix_yuv, .frame_start
  );

  yuv2rgb u_yuv2rgb (.yuv(pix_yuv), .rgb(pix_rgb));

  frame_writer #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_writer (
    .clk(cam_pclk), .rst(cam_rst), .frame_start, .flip(mode.flip),
    .pix_valid, .pix_x, .pix_y, .pix_rgb,
    .wr_tog, .wr_addr, .wr_data, .flip_active
  );

  // ---------------- system clock domain ----------------
  logic        rd_req, rd_valid;
  maddr_t      rd_addr;
  logic [15:0] rd_data;

  mem_ctrl #(.WBUF_DEPTH(WBUF_DEPTH)) u_mem (
    .clk, .rst,
    .wr_tog, .wr_addr, .wr_data,
    .rd_req, .rd_addr, .rd_valid, .rd_data,
    .sram_addr, .sram_ce_n, .sram_we_n, .sram_oe_n, .sram_dq_o, .sram_dq_oe, .sram_dq_i,
    .ev_buffered, .ev_abort, .ev_drop
  );

  ui_ctrl #(.DEBOUNCE(DEBOUNCE)) u_ui (.clk, .rst, .sw, .mode, .led_invalid);

  logic       ce, hsync, vsync, active;
  logic [9:0] h, v;

  vga_timing u_timing (
    .clk, .rst, .ce, .pclk(dac_clk), .h, .v, .hsync, .vsync, .active, .frame_end
  );

  win3_t win;

  pix_fetch #(.IMG_W(IMG_W), .IMG_H(IMG_H), .H_TOTAL(H_TOTAL), .V_TOTAL(V_TOTAL)) u_fetch (
    .clk, .rst, .ce, .h, .v, .win_mode(mode.blur || mode.edge_det),
    .rd_req, .rd_addr, .rd_valid, .rd_data, .win
  );

  rgb565_t blur_rgb, edge_rgb, sel_rgb, inv_rgb, pal_rgb, tp_rgb;

  blur3x3 u_blur (.win, .rgb(blur_rgb));
  sobel_edge #(.TH(EDGE_TH)) u_edge (.win, .rgb(edge_rgb), .edge_det(edge_pix));

  always_comb begin
    if (mode.edge_det)  sel_rgb = edge_rgb;
    else if (mode.blur) sel_rgb = blur_rgb;
    else                sel_rgb = win[1][1];
  end

  color_invert  u_inv (.en(mode.invert), .rgb_i(sel_rgb), .rgb_o(inv_rgb));
  palette_shift u_pal (.r_off(PAL_R), .g_off(PAL_G), .b_off(PAL_B), .rgb_i(inv_rgb), .rgb_o(pal_rgb));
  test_pattern  u_tp  (.h, .v, .rgb(tp_rgb));

  vga_out u_out (
    .clk, .rst, .ce, .test_mode, .pix(pal_rgb), .tp(tp_rgb),
    .active, .hsync, .vsync,
    .dac_r, .dac_g, .dac_b, .dac_blank_n, .vga_hsync, .vga_vsync, .vga_de
  );

endmodule
