// tb_vga_timing: runs one and a bit frames at the default 640x480 timing and
// checks the pixel enable rate (one in 4 clocks), the pixel clock phase, line
// and frame lengths, sync pulse positions and widths, and the visible count.
module tb_vga_timing;
  logic clk = 0, rst = 1;
  logic ce, pclk, hsync, vsync, active, frame_end;
  logic [9:0] h, v;
  int checks = 0, failures = 0;
  int n_ce = 0, n_active = 0, n_hs = 0, n_vs_lines = 0, n_fe = 0, cyc = 0, last_ce = -1;

  vga_timing dut (.clk, .rst, .ce, .pclk, .h, .v, .hsync, .vsync, .active, .frame_end);

  always #5 clk = ~clk;

  task automatic expect_(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s h=%0d v=%0d", msg, h, v); end
  endtask

  initial begin
    #30000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // one full frame: 800 x 525 pixel enables
    while (n_fe == 0) begin
      @(posedge clk); cyc++;
      if (ce) begin
        if (last_ce >= 0) expect_(cyc - last_ce == 4, "ce spacing");
        last_ce = cyc;
        expect_(pclk == 1'b1, "pclk high at ce");
        n_ce++;
        n_active += int'(active);
        expect_(active == (h < 640 && v < 480), "active");
        expect_(hsync == !(h >= 656 && h < 752), "hsync position");
        expect_(vsync == !(v >= 490 && v < 492), "vsync position");
        if (h == 0 && !vsync) n_vs_lines++;
        if (h == 656 && v == 0) n_hs++;
        if (frame_end) n_fe++;
      end else begin
        expect_(frame_end == 0, "frame_end only with ce");
      end
    end
    expect_(n_ce == 800 * 525, "pixels per frame");
    expect_(n_active == 640 * 480, "visible pixels");
    expect_(n_vs_lines == 2, "vsync lines");
    expect_(n_hs == 1, "hsync start");
    @(posedge clk); @(posedge clk);
    expect_(h == 0 && v == 0, "wrap to origin");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
