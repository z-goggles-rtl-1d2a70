// vga_out: output pixel buffer and DAC interface.
//
// On each pixel enable the buffer register takes the processed pixel (or the
// test pattern pixel when test_mode is set) together with the sync and
// active flags of the same beam position, so colour and syncs leave aligned,
// one pixel period after the beam position was presented. Outside the visible
// area the colour is forced to black, because the DAC's own blanking input is
// held inactive (dac_blank_n = 1) and its sync generation is unused: HSYNC
// and VSYNC go straight to the monitor. The 5-6-5 fields are widened to 8 bits
// per channel by repeating their top bits. The direct syncs and the
// non-blanking DAC follow the original design; widening and black blanking
// are this design's choices.
module vga_out
  import zg_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic       test_mode,
  input  rgb565_t    pix,
  input  rgb565_t    tp,
  input  logic       active,
  input  logic       hsync,
  input  logic       vsync,
  output logic [7:0] dac_r,
  output logic [7:0] dac_g,
  output logic [7:0] dac_b,
  output logic       dac_blank_n,
  output logic       vga_hsync,
  output logic       vga_vsync,
  output logic       vga_de      // visible pixel on the outputs (for test)
);

  rgb565_t q;

  always_ff @(posedge clk) begin
    if (rst) begin
      q         <= RGB_BLACK;
      vga_hsync <= 1'b1;
      vga_vsync <= 1'b1;
      vga_de    <= 1'b0;
    end else if (ce) begin
      q         <= !active ? RGB_BLACK : (test_mode ? tp : pix);
      vga_hsync <= hsync;
      vga_vsync <= vsync;
      vga_de    <= active;
    end
  end

  always_comb begin
    dac_r       = {q.r, q.r[4:2]};
    dac_g       = {q.g, q.g[5:4]};
    dac_b       = {q.b, q.b[4:2]};
    dac_blank_n = 1'b1;
  end

endmodule
