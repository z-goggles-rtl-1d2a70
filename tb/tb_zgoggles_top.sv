// tb_zgoggles_top: end-to-end test of the whole video processor at its
// default (full) size: 640x480 camera lines of {Y,U},{Y,V} words on a 27 MHz
// camera clock, two 256k x 16 SRAM chips (sram_model), a 100 MHz system clock
// and the 640x480 VGA output.
//
// The camera model sends the same test scene every frame. For each function
// the switches are pressed (with full debounce time), the design is given
// time to store and show a settled frame, and then every visible pixel of one
// display frame is compared with a reference computed here from the scene:
// colour conversion, 2x horizontal scaling, vertical flip, invert, 3x3 blur and
// Sobel edges, each written independently of the RTL. The test pattern is
// spot-checked and the invalid blur+edge combination must light the LED.
// The memory controller must buffer and abort writes while this runs; every
// mechanism is counted and one that never happened is a failure.
module tb_zgoggles_top;
  import zg_pkg::*;
  localparam int IW = 320, IH = 480, CAM_WORDS = 640, CAM_HBLANK = 144;

  logic clk = 0, rst = 1, cam_pclk = 0, cam_rst = 1;
  logic cam_vsync = 0, cam_href = 0; logic [15:0] cam_data = '0;
  logic [3:0] sw = '0; logic test_mode = 0;
  logic led_invalid; mode_t mode;
  logic [SRAM_AW-1:0] sram_addr; logic [1:0] sram_ce_n; logic sram_we_n, sram_oe_n, sram_dq_oe;
  logic [15:0] sram_dq_o, sram_dq_i;
  logic dac_clk, dac_blank_n, vga_hsync, vga_vsync, vga_de;
  logic [7:0] dac_r, dac_g, dac_b;
  logic ev_buffered, ev_abort, ev_drop, flip_active, frame_end, edge_pix;

  zgoggles_top dut (.clk, .rst, .cam_pclk, .cam_rst, .cam_vsync, .cam_href, .cam_data,
    .sw, .test_mode, .led_invalid, .mode,
    .sram_addr, .sram_ce_n, .sram_we_n, .sram_oe_n, .sram_dq_o, .sram_dq_oe, .sram_dq_i,
    .dac_clk, .dac_blank_n, .dac_r, .dac_g, .dac_b, .vga_hsync, .vga_vsync, .vga_de,
    .ev_buffered, .ev_abort, .ev_drop, .flip_active, .frame_end, .edge_pix);

  sram_model mem (.clk, .addr(sram_addr), .ce_n(sram_ce_n), .we_n(sram_we_n), .oe_n(sram_oe_n),
    .dq_o(sram_dq_o), .dq_oe(sram_dq_oe), .dq_i(sram_dq_i));

  always #5 clk = ~clk;            // 100 MHz
  always #18.5 cam_pclk = ~cam_pclk;  // 27 MHz

  int checks = 0, failures = 0;
  // mechanism counters
  int n_buffered = 0, n_abort = 0, n_drop = 0, n_flip_frames = 0, n_plain = 0, n_invert = 0;
  int n_blur = 0, n_edge_on = 0, n_edge_off = 0, n_tp = 0, n_invalid = 0, n_cam_frames = 0;

  // ---------------- scene and reference model ----------------
  function automatic logic [7:0] scene_y(input int x, input int y);
    return 8'(((((x / 16) + (y / 16)) % 2) != 0 ? 190 : 50) + ((x + y) % 16));
  endfunction
  function automatic logic [7:0] scene_u(input int x, input int y);
    return 8'(96 + ((x * 3) % 64));
  endfunction
  function automatic logic [7:0] scene_v(input int x, input int y);
    return 8'(96 + ((y * 5) % 64));
  endfunction

  function automatic int clamp(input real a);
    int i; i = int'($floor(a));
    if (i < 0) return 0; if (i > 255) return 255; return i;
  endfunction

  logic [15:0] stored [IW][IH];    // stored pixel, unflipped

  function automatic logic [15:0] conv(input int yy, input int u, input int v);
    real uu, vv; int r, g, b;
    uu = real'(u) - 128.0; vv = real'(v) - 128.0;
    r = clamp(real'(yy) + 1.5 * vv);
    g = clamp(real'(yy) - $floor(uu / 2.0) - $floor(vv / 2.0));
    b = clamp(real'(yy) + 2.0 * uu);
    return {5'(r >> 3), 6'(g >> 2), 5'(b >> 3)};
  endfunction

  // pixel in memory at stored position (x, y), given the flip state
  function automatic logic [15:0] mem_pix(input int x, input int y, input bit flip);
    if (x < 0 || x >= IW || y < 0 || y >= IH) return 16'h0;
    return flip ? stored[IW - 1 - x][IH - 1 - y] : stored[x][y];
  endfunction

  int kx[3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
  int ky[3][3] = '{'{-1, -2, -1}, '{0, 0, 0}, '{1, 2, 1}};

  function automatic logic [15:0] expect_pix(input int col, input int row, input mode_t m);
    logic [15:0] p, w; int x, sr, sg, sb, gx, gy, l;
    x = col / 2;
    if (m.edge_det) begin
      gx = 0; gy = 0;
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) begin
        w = mem_pix(x + c - 1, row + r - 1, m.flip);
        l = 2 * int'(w[15:11]) + int'(w[10:5]) + 2 * int'(w[4:0]);
        gx += kx[r][c] * l; gy += ky[r][c] * l;
      end
      p = ((gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy) > 24) ? 16'hffff : 16'h0000;
    end else if (m.blur) begin
      sr = 0; sg = 0; sb = 0;
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) begin
        w = mem_pix(x + c - 1, row + r - 1, m.flip);
        sr += int'(w[15:11]); sg += int'(w[10:5]); sb += int'(w[4:0]);
      end
      p = {5'(sr * 57 / 512), 6'(sg * 57 / 512), 5'(sb * 57 / 512)};
    end else begin
      p = mem_pix(x, row, m.flip);
    end
    if (m.invert) p = {5'd31 - p[15:11], 6'd63 - p[10:5], 5'd31 - p[4:0]};
    return p;
  endfunction

  // ---------------- camera model ----------------
  initial begin
    for (int x = 0; x < IW; x++) for (int y = 0; y < IH; y++)
      stored[x][y] = conv((int'(scene_y(x, y)) + int'(scene_y(x, y)) + 2) / 2, scene_u(x, y), scene_v(x, y));
    @(negedge cam_pclk);
    wait (!cam_rst);
    forever begin
      @(negedge cam_pclk) cam_vsync = 1;
      repeat (3 * (CAM_WORDS + CAM_HBLANK)) @(negedge cam_pclk);
      cam_vsync = 0;
      repeat (CAM_HBLANK) @(negedge cam_pclk);
      for (int y = 0; y < IH; y++) begin
        cam_href = 1;
        for (int x = 0; x < IW; x++) begin
          cam_data = {scene_y(x, y), scene_u(x, y)};
          @(negedge cam_pclk);
          cam_data = {8'(scene_y(x, y) + 8'd2), scene_v(x, y)};
          @(negedge cam_pclk);
        end
        cam_href = 0; cam_data = '0;
        repeat (CAM_HBLANK) @(negedge cam_pclk);
      end
      n_cam_frames++;
    end
  end

  // ---------------- display checker ----------------
  logic chk = 0, chk_tp = 0, de_q = 0;
  mode_t chk_mode;
  int col = 0, row = 0, nchk = 0, n_edge_px = 0;

  always @(posedge dac_clk) begin
    if (vga_de) begin
      if (chk) begin
        logic [15:0] got, e;
        got = {dac_r[7:3], dac_g[7:2], dac_b[7:3]};
        e = expect_pix(col, row, chk_mode);
        checks++; nchk++;
        if (got != e) begin
          failures++;
          if (failures < 10) $display("FAIL mode=%b (%0d,%0d) got %h exp %h", chk_mode, col, row, got, e);
        end
        if (chk_mode.edge_det && e == 16'hffff) n_edge_px++;
        // bit repetition of the DAC data
        checks++;
        if (dac_r[2:0] != dac_r[7:5] || dac_g[1:0] != dac_g[7:6] || dac_b[2:0] != dac_b[7:5]) failures++;
      end
      if (chk_tp) begin
        logic [15:0] got; got = {dac_r[7:3], dac_g[7:2], dac_b[7:3]};
        if ((col == 0 && row == 0) || (col == 25 && row == 5) || (col == 100 && row == 70) ||
            (col == 639 && row == 200) || (col == 320 && row == 250)) begin
          logic [15:0] e;
          e = (col == 0) ? 16'hffff : (col == 25) ? 16'hf800 : (col == 100) ? 16'hffe0 :
              (col == 639) ? 16'hf800 : 16'h0400;   // (320,250): green ramp, 320/10 = 32
          checks++; nchk++;
          if (got != e) begin failures++; $display("FAIL test pattern (%0d,%0d) got %h exp %h", col, row, got, e); end
        end
      end
      col++;
    end
    if (de_q && !vga_de) begin row++; col = 0; end
    de_q <= vga_de;
  end

  // one whole display frame, lines 0..479
  task automatic check_frame(input mode_t m, input bit tp);
    @(negedge vga_vsync);
    @(negedge vga_vsync);
    row = 0; col = 0; nchk = 0; chk_mode = m;
    if (tp) chk_tp = 1; else chk = 1;
    @(negedge vga_vsync);
    chk = 0; chk_tp = 0;
    checks++;
    if (!tp && nchk != 640 * 480) begin failures++; $display("FAIL checked %0d pixels", nchk); end
  endtask

  task automatic press(input int i);
    @(negedge clk) sw[i] = 1;
    repeat (200000 + 100) @(negedge clk);
    sw[i] = 0;
    repeat (200000 + 100) @(negedge clk);
  endtask

  // wait until the frame store holds whole frames of the current flip state
  task automatic settle_store();
    int f; f = n_cam_frames;
    wait (n_cam_frames >= f + 2);
  endtask

  int n_wr_chip0 = 0, n_wr_chip1 = 0;
  always @(posedge clk) if (!rst) begin
    n_buffered += int'(ev_buffered); n_abort += int'(ev_abort); n_drop += int'(ev_drop);
    if (!sram_we_n && !sram_ce_n[0]) n_wr_chip0++;
    if (!sram_we_n && !sram_ce_n[1]) n_wr_chip1++;
  end

  initial begin
    #600000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_mode(input logic [3:0] m, input logic led);
    checks++;
    if (mode != m || led_invalid != led) begin failures++; $display("FAIL mode %b led %0d exp %b %0d", mode, led_invalid, m, led); end
  endtask

  initial begin
    repeat (10) @(negedge clk);
    rst = 0; cam_rst = 0;
    settle_store();
    check_frame(4'b0000, 0); n_plain++;
    // vertical flip
    press(0); expect_mode(4'b0001, 0);
    settle_store();
    checks++; if (!flip_active) failures++; else n_flip_frames++;
    check_frame(4'b0001, 0);
    // invert on a flipped picture
    press(1); expect_mode(4'b0011, 0);
    check_frame(4'b0011, 0); n_invert++;
    // flip off, invert off, blur on
    press(0); press(1); press(2); expect_mode(4'b0100, 0);
    settle_store();
    check_frame(4'b0100, 0); n_blur++;
    // edge while blur is on: refused
    press(3); expect_mode(4'b0100, 1);
    if (led_invalid) n_invalid++;
    press(2); press(3); expect_mode(4'b1000, 0);
    n_edge_px = 0;
    check_frame(4'b1000, 0);
    if (n_edge_px > 0) n_edge_on++;
    if (n_edge_px < 640 * 480) n_edge_off++;
    press(3); expect_mode(4'b0000, 0);
    // test pattern
    test_mode = 1;
    check_frame(4'b0000, 1); n_tp++;
    test_mode = 0;

    $display("COUNT cam_frames=%0d buffered=%0d aborted=%0d dropped=%0d plain=%0d flip=%0d invert=%0d blur=%0d edge_on=%0d edge_off=%0d test_pattern=%0d invalid=%0d",
             n_cam_frames, n_buffered, n_abort, n_drop, n_plain, n_flip_frames, n_invert, n_blur, n_edge_on, n_edge_off, n_tp, n_invalid);
    $display("COUNT writes chip0=%0d chip1=%0d", n_wr_chip0, n_wr_chip1);
    checks++; if (n_wr_chip0 == 0 || n_wr_chip1 == 0) begin failures++; $display("FAIL a frame-store chip was never written"); end
    checks++; if (n_buffered == 0) begin failures++; $display("FAIL no buffered write"); end
    checks++; if (n_abort == 0) begin failures++; $display("FAIL no aborted write"); end
    checks++; if (n_flip_frames == 0 || n_plain == 0 || n_invert == 0 || n_blur == 0) begin failures++; $display("FAIL function not exercised"); end
    checks++; if (n_edge_on == 0 || n_edge_off == 0) begin failures++; $display("FAIL edge not exercised"); end
    checks++; if (n_tp == 0 || n_invalid == 0) begin failures++; $display("FAIL test pattern / invalid not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
