// zg_pkg: types, constants and the frame-store address map shared by the
// Z-Goggles video processor.
//
// A stored pixel is one 16-bit RGB 5-6-5 word. The frame store is two
// 256k x 16 SRAM chips on one address bus. A pixel at column x, line y lives at
// word {y[8:0], x[8:0]} of chip y[8]: the coordinates are used directly as the
// address, with no multiplication, for lowest latency, and the MSB of y picks
// the chip, so lines 0-255 sit in chip 0 and lines 256-511 in chip 1. Only half
// of each chip is used.
package zg_pkg;

  localparam int X_BITS    = 9;                 // column bits in the address
  localparam int Y_BITS    = 9;                 // line bits; MSB also selects the chip
  localparam int SRAM_AW   = X_BITS + Y_BITS;   // 18 address pins per chip
  localparam int ADDR_BITS = SRAM_AW + 1;       // 19: chip select + 18-bit word

  typedef logic [ADDR_BITS-1:0] maddr_t;

  typedef struct packed {
    logic [4:0] r;
    logic [5:0] g;
    logic [4:0] b;
  } rgb565_t;

  typedef struct packed {
    logic [7:0] y;
    logic [7:0] u;   // offset binary, 128 = 0
    logic [7:0] v;   // offset binary, 128 = 0
  } yuv_t;

  // Functions chosen by the user interface.
  typedef struct packed {
    logic edge_det;
    logic blur;
    logic invert;
    logic flip;
  } mode_t;

  // 3x3 neighbourhood, win[row][col]; row 0 is the line above, col 0 the
  // column to the left, win[1][1] the pixel being displayed.
  typedef rgb565_t [2:0][2:0] win3_t;

  localparam rgb565_t RGB_BLACK = '{r: 5'd0,  g: 6'd0,  b: 5'd0};
  localparam rgb565_t RGB_WHITE = '{r: 5'd31, g: 6'd63, b: 5'd31};

  // Frame-store address of stored pixel (x, y).
  function automatic maddr_t pix_addr(input logic [X_BITS-1:0] x,
                                      input logic [Y_BITS-1:0] y);
    return {y[Y_BITS-1], y, x};
  endfunction

endpackage
