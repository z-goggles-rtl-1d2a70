// tb_color_invert: checks the photo-negative on fixed and random pixels, with
// the function enabled and disabled.
module tb_color_invert;
  import zg_pkg::*;
  logic en; rgb565_t rgb_i, rgb_o;
  int checks = 0, failures = 0;

  color_invert dut (.en, .rgb_i, .rgb_o);

  task automatic check(input logic e, input int r, input int g, input int b);
    int er, eg, eb;
    en = e; rgb_i = '{r: 5'(r), g: 6'(g), b: 5'(b)}; #1;
    er = e ? 31 - r : r; eg = e ? 63 - g : g; eb = e ? 31 - b : b;
    checks++;
    if (int'(rgb_o.r) != er || int'(rgb_o.g) != eg || int'(rgb_o.b) != eb) begin
      failures++;
      $display("FAIL en=%0d in=%0d,%0d,%0d out=%0d,%0d,%0d", e, r, g, b, rgb_o.r, rgb_o.g, rgb_o.b);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    check(1, 31, 63, 31);   // white -> black
    check(1, 0, 0, 0);      // black -> white
    check(0, 5, 17, 9);
    for (int i = 0; i < 500; i++)
      check(1'($urandom_range(1)), $urandom_range(31), $urandom_range(63), $urandom_range(31));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
