// vga_timing: pixel clock enable, beam counters and sync signals for VGA.
//
// The system clock is divided by CLK_DIV (100 MHz / 4 = 25 MHz pixel rate) into
// a one-cycle enable ce; pclk is the matching 50%-duty pixel clock for the DAC,
// rising in the middle of each pixel period so the DAC samples stable data.
// h counts 0..H_TOTAL-1 and v 0..V_TOTAL-1; both advance on ce. hsync and vsync
// are active low and, like active, describe the pixel at (h, v).
// The document tunes the porch and sync widths by hand for each monitor and
// does not give them; the defaults are the standard 640x480 at 60 Hz values.
module vga_timing #(
  parameter int CLK_DIV  = 4,
  parameter int H_ACTIVE = 640,
  parameter int H_FP     = 16,
  parameter int H_SYNC   = 96,
  parameter int H_BP     = 48,
  parameter int V_ACTIVE = 480,
  parameter int V_FP     = 10,
  parameter int V_SYNC   = 2,
  parameter int V_BP     = 33,
  localparam int H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP,
  localparam int V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP
) (
  input  logic       clk,
  input  logic       rst,
  output logic       ce,
  output logic       pclk,
  output logic [9:0] h,
  output logic [9:0] v,
  output logic       hsync,
  output logic       vsync,
  output logic       active,
  output logic       frame_end   // ce of the last pixel of a frame
);

  localparam int DW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;
  logic [DW-1:0] div;

  always_ff @(posedge clk) begin
    if (rst) begin
      div <= '0;
      h   <= '0;
      v   <= '0;
    end else begin
      div <= (int'(div) == CLK_DIV - 1) ? '0 : div + 1'b1;
      if (ce) begin
        if (int'(h) == H_TOTAL - 1) begin
          h <= '0;
          v <= (int'(v) == V_TOTAL - 1) ? '0 : v + 1'b1;
        end else begin
          h <= h + 1'b1;
        end
      end
    end
  end

  always_comb begin
    ce        = (int'(div) == CLK_DIV - 1);
    pclk      = (int'(div) >= CLK_DIV / 2);
    hsync     = !((int'(h) >= H_ACTIVE + H_FP) && (int'(h) < H_ACTIVE + H_FP + H_SYNC));
    vsync     = !((int'(v) >= V_ACTIVE + V_FP) && (int'(v) < V_ACTIVE + V_FP + V_SYNC));
    active    = (int'(h) < H_ACTIVE) && (int'(v) < V_ACTIVE);
    frame_end = ce && (int'(h) == H_TOTAL - 1) && (int'(v) == V_TOTAL - 1);
  end

endmodule
