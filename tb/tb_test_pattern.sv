// tb_test_pattern: spot checks of the monitor test pattern at region
// boundaries: corner cells, the three colour band widths, the red, green and
// blue ramps, the full-range ramp and the grey bars.
module tb_test_pattern;
  import zg_pkg::*;
  logic [9:0] h, v; rgb565_t rgb;
  int checks = 0, failures = 0;
  // white, yellow, cyan, green, magenta, red, blue, black
  logic [15:0] bars [8] = '{16'hffff, 16'hffe0, 16'h07ff, 16'h07e0, 16'hf81f, 16'hf800, 16'h001f, 16'h0000};

  test_pattern dut (.h, .v, .rgb);

  task automatic at(input int hh, input int vv, input logic [15:0] e);
    h = 10'(hh); v = 10'(vv); #1;
    checks++;
    if (rgb != e) begin failures++; $display("FAIL (%0d,%0d) got %h exp %h", hh, vv, rgb, e); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    at(0, 0, 16'hffff);        // top-left corner, cell (0,0) white
    at(20, 0, 16'hf800);       // cell (1,0) red
    at(59, 59, 16'hffff);      // cell (2,2) white
    at(60, 0, 16'h0000);       // between corners: black
    at(600, 10, 16'h07e0);     // top-right cell (1,0): green
    at(10, 445, 16'h001f);     // bottom-left cell (0,1) blue
    at(630, 470, 16'hffff);    // bottom-right cell (2,2) white
    at(630, 450, 16'hffe0);    // bottom-right cell (2,1) yellow
    at(0, 60, 16'hffff);       // bands 80 wide: white
    at(80, 60, 16'hffe0);      // yellow
    at(160, 99, 16'h07ff);     // cyan
    at(560, 70, 16'h0000);     // black
    at(40, 100, 16'hffe0);     // bands 40 wide: second is yellow
    at(360, 100, 16'hffe0);    // ninth band wraps to yellow
    at(140, 140, 16'h0000);    // bands 20 wide: 140/20 = 7 -> black
    at(639, 180, 16'hf800);    // red ramp top
    at(0, 180, 16'h0000);
    at(639, 220, 16'h07e0);    // green ramp top
    at(639, 260, 16'h001f);    // blue ramp top
    at(100, 300, 16'(100 * 102));
    at(5, 360, {5'd8, 6'd16, 5'd8});
    at(15, 360, {5'd15, 6'd30, 5'd15});
    at(165, 400, {5'd8, 6'd16, 5'd8});     // 165/20 = 8, 8 mod 4 = 0: darkest grey
    at(330, 400, {5'd8, 6'd16, 5'd8});     // 330/40 = 8: darkest grey
    at(370, 400, {5'd15, 6'd30, 5'd15});
    // whole rows of the band and ramp regions against closed-form values
    for (int hh = 60; hh < 580; hh++) begin
      int b80, b40, b20;
      b80 = hh / 80; b40 = (hh / 40) % 8; b20 = (hh / 20) % 8;
      at(hh, 61,  bars[b80]);
      at(hh, 120, bars[b40]);
      at(hh, 150, bars[b20]);
      at(hh, 200, {5'(hh * 32 / 640), 11'd0});
      at(hh, 240, {5'd0, 6'(hh * 64 / 640), 5'd0});
      at(hh, 280, {11'd0, 5'(hh * 32 / 640)});
      at(hh, 30, 16'h0000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
