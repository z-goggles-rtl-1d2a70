// tb_frame_writer: feeds pixels of small images and checks the write request
// (one toggle per in-range pixel, address from the coordinate map, data
// unchanged), the mirrored addresses when the flip is on, that the flip only
// takes effect at a frame start, and that out-of-range pixels are not written.
module tb_frame_writer;
  import zg_pkg::*;
  localparam int IW = 6, IH = 4;
  logic clk = 0, rst = 1, frame_start = 0, flip = 0, pix_valid = 0;
  logic [X_BITS-1:0] pix_x = '0; logic [Y_BITS-1:0] pix_y = '0;
  rgb565_t pix_rgb = '0;
  logic wr_tog, flip_active, tog_q;
  maddr_t wr_addr; rgb565_t wr_data;
  int checks = 0, failures = 0, nflip = 0;

  frame_writer #(.IMG_W(IW), .IMG_H(IH)) dut (.clk, .rst, .frame_start, .flip, .pix_valid,
    .pix_x, .pix_y, .pix_rgb, .wr_tog, .wr_addr, .wr_data, .flip_active);

  always #18.5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic send(input int x, input int y, input logic exp_flip);
    int ex, ey; logic in_r;
    @(negedge clk);
    pix_valid = 1; pix_x = 9'(x); pix_y = 10'(y); pix_rgb = 16'($urandom);
    tog_q = wr_tog;
    @(negedge clk);
    pix_valid = 0;
    in_r = (x < IW) && (y < IH);
    ex = exp_flip ? IW - 1 - x : x; ey = exp_flip ? IH - 1 - y : y;
    checks++;
    if (in_r) begin
      if (wr_tog == tog_q || wr_addr != maddr_t'({1'(ey >> 8), 9'(ey), 9'(ex)}) || wr_data != pix_rgb) begin
        failures++;
        $display("FAIL (%0d,%0d) flip=%0d tog %0d->%0d addr %h exp %h", x, y, exp_flip, tog_q, wr_tog, wr_addr, {1'(ey >> 8), 9'(ey), 9'(ex)});
      end
      if (exp_flip) nflip++;
    end else if (wr_tog != tog_q) begin
      failures++; $display("FAIL out-of-range (%0d,%0d) written", x, y);
    end
    @(negedge clk);
  endtask

  task automatic start_frame();
    @(negedge clk) frame_start = 1;
    @(negedge clk) frame_start = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    start_frame();
    for (int y = 0; y < IH; y++) for (int x = 0; x < IW; x++) send(x, y, 0);
    send(IW, 0, 0); send(0, IH, 0); send(511, 511, 0);
    flip = 1;                              // flip requested mid-frame
    repeat (4) @(negedge clk);
    send(1, 1, 0);                         // still this frame: not flipped
    start_frame();
    for (int y = 0; y < IH; y++) for (int x = 0; x < IW; x++) send(x, y, 1);
    checks++;
    if (!flip_active) begin failures++; $display("FAIL flip_active"); end
    flip = 0; repeat (4) @(negedge clk);
    start_frame();
    send(2, 3, 0);
    checks++;
    if (nflip != IW * IH) begin failures++; $display("FAIL flipped writes %0d", nflip); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
