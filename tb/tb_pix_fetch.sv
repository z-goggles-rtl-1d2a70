// tb_pix_fetch: the fetch unit driven by the real VGA timing, with a memory
// responder that answers reads two cycles later (as mem_ctrl does) with a
// value computed from the address. For every visible pixel the 3x3 cache is
// compared with the stored pixels around (h/2, v), black outside the stored
// image; in single-line mode only the centre row may be filled. One frame
// runs in each mode and the read counts per frame are checked.
module tb_pix_fetch;
  import zg_pkg::*;
  localparam int IW = 320, IH = 480;
  logic clk = 0, rst = 1, win_mode = 0;
  logic ce, pclk, hsync, vsync, active, frame_end;
  logic [9:0] h, v;
  logic rd_req, rd_valid; maddr_t rd_addr; logic [15:0] rd_data;
  logic [1:0] vpipe; maddr_t apipe [2];
  win3_t win;
  int checks = 0, failures = 0, nreads = 0;
  logic armed = 0;

  vga_timing tim (.clk, .rst, .ce, .pclk, .h, .v, .hsync, .vsync, .active, .frame_end);
  pix_fetch #(.IMG_W(IW), .IMG_H(IH)) dut (.clk, .rst, .ce, .h, .v, .win_mode, .rd_req, .rd_addr,
    .rd_valid, .rd_data, .win);

  always #5 clk = ~clk;

  function automatic logic [15:0] content(input int x, input int y);
    return 16'((x * 37) ^ (y * 1111) ^ 16'h5a5a);
  endfunction

  // memory responder: fixed 2-cycle latency
  always @(posedge clk) begin
    vpipe <= {vpipe[0], rd_req};
    apipe[0] <= rd_addr; apipe[1] <= apipe[0];
    if (rd_req) nreads++;
  end
  assign rd_valid = vpipe[1];
  assign rd_data  = content(int'(apipe[1][8:0]), int'(apipe[1][17:9]));

  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    if (!rst && armed && ce && active) begin
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) begin
        int x, y; logic [15:0] e;
        x = int'(h) / 2 + c - 1; y = int'(v) + r - 1;
        e = (x >= 0 && x < IW && y >= 0 && y < IH && (win_mode || r == 1)) ? content(x, y) : 16'h0;
        checks++;
        if (win[r][c] != e) begin
          failures++;
          if (failures < 10) $display("FAIL mode=%0d h=%0d v=%0d win[%0d][%0d]=%h exp %h", win_mode, h, v, r, c, win[r][c], e);
        end
      end
    end
  end

  initial begin
    int n0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(posedge frame_end);                 // the first frame starts without a prefetch
    @(negedge clk); armed = 1;
    @(negedge clk); nreads = 0;
    @(posedge frame_end); @(negedge clk);
    n0 = nreads;
    checks++;
    // one read per stored pixel; plus the first columns of line 0 fetched at
    // the end of the previous frame are counted in the previous frame
    if (n0 != IW * IH) begin failures++; $display("FAIL single-line reads %0d", n0); end
    win_mode = 1; armed = 0;              // the frame after a mode change is exact
    @(posedge frame_end); @(negedge clk); nreads = 0; armed = 1;
    @(posedge frame_end); @(negedge clk);
    checks++;
    if (nreads != 3 * IW * IH - 2 * IW) begin failures++; $display("FAIL window reads %0d", nreads); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
