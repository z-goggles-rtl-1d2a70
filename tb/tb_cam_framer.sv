// tb_cam_framer: drives the camera sync/data protocol for two small frames
// (VSYNC pulse, lines with HSYNC high carrying {Y,U},{Y,V} word pairs, gaps
// between lines) and checks every emitted pixel's coordinates and YUV values,
// the pixel count, the one-clock latency and the frame_start pulse.
module tb_cam_framer;
  import zg_pkg::*;
  localparam int W = 7, H = 5;
  logic clk = 0, rst = 1, vsync = 0, href = 0;
  logic [15:0] data = '0;
  logic pix_valid, frame_start;
  logic [X_BITS-1:0] pix_x; logic [Y_BITS-1:0] pix_y; yuv_t pix_yuv;
  int checks = 0, failures = 0, npix = 0, nfs = 0;
  typedef struct { int x; int y; yuv_t yuv; int cyc; } exp_t;
  exp_t q[$];
  int cyc = 0;

  cam_framer dut (.clk, .rst, .vsync, .href, .data, .pix_valid, .pix_x, .pix_y, .pix_yuv, .frame_start);

  always #18.5 clk = ~clk;

  function automatic logic [7:0] fy(input int f, input int x, input int y, input int k);
    return 8'(f * 31 + x * 13 + y * 7 + k * 5);
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // checker: each pixel must appear exactly one clock after its second word
  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (frame_start) nfs++;
      if (pix_valid) begin
        checks++;
        if (q.size() == 0) begin
          failures++; $display("FAIL unexpected pixel (%0d,%0d)", pix_x, pix_y);
        end else begin
          exp_t e; e = q.pop_front();
          if (int'(pix_x) != e.x || int'(pix_y) != e.y || pix_yuv != e.yuv || cyc != e.cyc + 1) begin
            failures++;
            $display("FAIL pixel (%0d,%0d) got (%0d,%0d) %h exp %h cyc %0d exp %0d", e.x, e.y, pix_x, pix_y, pix_yuv, e.yuv, cyc, e.cyc + 1);
          end
          npix++;
        end
      end
    end
  end

  task automatic frame(input int f);
    logic [7:0] y0, y1, u, v;
    @(negedge clk) vsync = 1;
    repeat (3) @(negedge clk);
    vsync = 0;
    repeat (4) @(negedge clk);
    for (int y = 0; y < H; y++) begin
      href = 1;
      for (int x = 0; x < W; x++) begin
        y0 = fy(f, x, y, 0); y1 = fy(f, x, y, 1); u = fy(f, x, y, 2); v = fy(f, x, y, 3);
        data = {y0, u};
        @(negedge clk);
        data = {y1, v};
        q.push_back('{x: x, y: y, yuv: '{y: 8'((int'(y0) + int'(y1)) / 2), u: u, v: v}, cyc: cyc + 1});
        @(negedge clk);
      end
      href = 0;
      data = 16'hdead;
      repeat (5) @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    frame(0);
    frame(1);
    repeat (5) @(negedge clk);
    checks++;
    if (npix != 2 * W * H) begin failures++; $display("FAIL pixel count %0d", npix); end
    checks++;
    if (nfs != 2) begin failures++; $display("FAIL frame_start count %0d", nfs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
