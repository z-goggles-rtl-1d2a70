// tb_yuv2rgb: checks the YUV to RGB565 conversion against a reference written
// with real arithmetic (floor of the scaled chroma terms, clamp, truncate),
// over fixed corner cases and random pixels.
module tb_yuv2rgb;
  import zg_pkg::*;
  yuv_t yuv; rgb565_t rgb;
  int checks = 0, failures = 0;

  yuv2rgb dut (.yuv, .rgb);

  function automatic int clamp(input real a);
    int i; i = int'($floor(a));
    if (i < 0) return 0; if (i > 255) return 255; return i;
  endfunction

  task automatic check(input int y, input int u, input int v);
    real uu, vv; int r, g, b;
    yuv = '{y: 8'(y), u: 8'(u), v: 8'(v)};
    #1;
    uu = real'(u) - 128.0; vv = real'(v) - 128.0;
    r = clamp(real'(y) + 1.5 * vv);
    g = clamp(real'(y) - $floor(uu / 2.0) - $floor(vv / 2.0));
    b = clamp(real'(y) + 2.0 * uu);
    checks++;
    if (rgb.r != 5'(r >> 3) || rgb.g != 6'(g >> 2) || rgb.b != 5'(b >> 3)) begin
      failures++;
      $display("FAIL yuv=%0d,%0d,%0d got %0d,%0d,%0d exp %0d,%0d,%0d", y, u, v,
               rgb.r, rgb.g, rgb.b, r >> 3, g >> 2, b >> 3);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(128, 128, 128);   // mid grey
    check(0, 128, 128);     // black
    check(255, 128, 128);   // white
    check(100, 128, 200);   // red-ish
    check(100, 200, 128);   // blue-ish
    check(100, 40, 40);     // green-ish, negative chroma
    check(10, 0, 0);
    check(250, 255, 255);
    check(77, 129, 127);
    for (int i = 0; i < 2000; i++) check($urandom_range(255), $urandom_range(255), $urandom_range(255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
