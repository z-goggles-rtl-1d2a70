// tb_palette_shift: checks saturating per-field colour offsets, including
// zero offsets (pass through) and offsets that clip at both ends.
module tb_palette_shift;
  import zg_pkg::*;
  logic signed [5:0] r_off, b_off; logic signed [6:0] g_off;
  rgb565_t rgb_i, rgb_o;
  int checks = 0, failures = 0;

  palette_shift dut (.r_off, .g_off, .b_off, .rgb_i, .rgb_o);

  function automatic int lim(input int a, input int m);
    return a < 0 ? 0 : (a > m ? m : a);
  endfunction

  task automatic check(input int ro, input int go, input int bo, input int r, input int g, input int b);
    r_off = 6'(ro); g_off = 7'(go); b_off = 6'(bo);
    rgb_i = '{r: 5'(r), g: 6'(g), b: 5'(b)}; #1;
    checks++;
    if (int'(rgb_o.r) != lim(r + ro, 31) || int'(rgb_o.g) != lim(g + go, 63) || int'(rgb_o.b) != lim(b + bo, 31)) begin
      failures++;
      $display("FAIL off=%0d,%0d,%0d in=%0d,%0d,%0d out=%0d,%0d,%0d", ro, go, bo, r, g, b, rgb_o.r, rgb_o.g, rgb_o.b);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    check(0, 0, 0, 12, 40, 3);
    check(31, 63, 31, 20, 20, 20);     // clip high
    check(-32, -64, -32, 20, 20, 20);  // clip low
    check(3, -5, 1, 10, 10, 10);
    for (int i = 0; i < 1000; i++)
      check(int'($urandom_range(63)) - 32, int'($urandom_range(127)) - 64, int'($urandom_range(63)) - 32,
            $urandom_range(31), $urandom_range(63), $urandom_range(31));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
