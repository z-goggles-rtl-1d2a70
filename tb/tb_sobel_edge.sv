// tb_sobel_edge: checks the Sobel edge detector against a reference that
// applies the two 3x3 Sobel kernels as integer arrays to the luminance of the
// window and compares |Gx|+|Gy| with the threshold.
module tb_sobel_edge;
  import zg_pkg::*;
  localparam int TH = 24;
  win3_t win; rgb565_t rgb; logic edge_det;
  int checks = 0, failures = 0, n_edge = 0;
  int kx[3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
  int ky[3][3] = '{'{-1, -2, -1}, '{0, 0, 0}, '{1, 2, 1}};

  sobel_edge #(.TH(TH)) dut (.win, .rgb, .edge_det);

  task automatic check_win();
    int gx, gy, l, m; logic e;
    gx = 0; gy = 0;
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) begin
      l = 2 * win[r][c].r + win[r][c].g + 2 * win[r][c].b;
      gx += kx[r][c] * l; gy += ky[r][c] * l;
    end
    m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    e = m > TH;
    #1;
    checks++;
    if (edge_det != e || rgb != (e ? RGB_WHITE : RGB_BLACK)) begin
      failures++;
      $display("FAIL mag=%0d exp edge=%0d got %0d rgb=%h", m, e, edge_det, rgb);
    end
    if (e) n_edge++;
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // flat: no edge
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) win[r][c] = '{r: 5'd9, g: 6'd30, b: 5'd20};
    check_win();
    // vertical step: edge
    for (int r = 0; r < 3; r++) begin win[r][0] = RGB_BLACK; win[r][1] = RGB_BLACK; win[r][2] = RGB_WHITE; end
    check_win();
    // horizontal step, right at a small amplitude
    for (int c = 0; c < 3; c++) begin win[0][c] = '{r: 5'd0, g: 6'd0, b: 5'd0}; win[1][c] = win[0][c]; win[2][c] = '{r: 5'd0, g: 6'd6, b: 5'd0}; end
    check_win();   // |Gy| = 24: not above threshold
    for (int c = 0; c < 3; c++) win[2][c] = '{r: 5'd0, g: 6'd7, b: 5'd0};
    check_win();   // |Gy| = 28: edge
    for (int i = 0; i < 3000; i++) begin
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++)
        win[r][c] = (i % 2) ? 16'($urandom) : 16'({5'd10, 6'(20 + $urandom_range(4)), 5'd10});
      check_win();
    end
    checks++;
    if (n_edge == 0 || n_edge == checks - 1) begin failures++; $display("FAIL edge coverage %0d", n_edge); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
