// tb_blur3x3: checks the 3x3 mean against an independent computation: the
// exact product sum*57/512, and within one step of the true mean sum/9.
// Flat windows must keep their value.
module tb_blur3x3;
  import zg_pkg::*;
  win3_t win; rgb565_t rgb;
  int checks = 0, failures = 0;

  blur3x3 dut (.win, .rgb);

  task automatic check_win();
    int s[3]; int q[3]; int got[3]; real m;
    s = '{0, 0, 0};
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) begin
      s[0] += win[r][c].r; s[1] += win[r][c].g; s[2] += win[r][c].b;
    end
    #1;
    got = '{int'(rgb.r), int'(rgb.g), int'(rgb.b)};
    for (int k = 0; k < 3; k++) begin
      q[k] = (s[k] * 57) / 512;
      m = real'(s[k]) / 9.0;
      checks++;
      if (got[k] != q[k] || real'(got[k]) < m - 1.0 || real'(got[k]) > m + 1.0) begin
        failures++;
        $display("FAIL ch%0d sum=%0d got %0d exp %0d", k, s[k], got[k], q[k]);
      end
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // flat white, flat black, flat mid
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) win[r][c] = RGB_WHITE;
    check_win();
    checks++; if (rgb != RGB_WHITE) begin failures++; $display("FAIL flat white %h", rgb); end
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) win[r][c] = '{r: 5'd17, g: 6'd40, b: 5'd3};
    check_win();
    checks++; if (rgb != 16'({5'd17, 6'd40, 5'd3})) begin failures++; $display("FAIL flat %h", rgb); end
    // single bright pixel
    win = '0; win[1][1] = RGB_WHITE; check_win();
    for (int i = 0; i < 2000; i++) begin
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) win[r][c] = 16'($urandom);
      check_win();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
