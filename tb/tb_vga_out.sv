// tb_vga_out: checks the output buffer: values are taken only on the pixel
// enable, syncs and colour stay aligned, the test pattern input is selected by
// test_mode, blanking forces black, fields are widened by bit repetition and
// the DAC blanking input stays inactive.
module tb_vga_out;
  import zg_pkg::*;
  logic clk = 0, rst = 1, ce = 0, test_mode = 0, active = 0, hsync = 1, vsync = 1;
  rgb565_t pix = '0, tp = '0;
  logic [7:0] dac_r, dac_g, dac_b; logic dac_blank_n, vga_hsync, vga_vsync, vga_de;
  int checks = 0, failures = 0;

  vga_out dut (.clk, .rst, .ce, .test_mode, .pix, .tp, .active, .hsync, .vsync,
    .dac_r, .dac_g, .dac_b, .dac_blank_n, .vga_hsync, .vga_vsync, .vga_de);

  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] src; logic [7:0] er, eg, eb; logic [15:0] old_r;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      ce = 1; test_mode = 1'($urandom); active = ($urandom_range(3) != 0);
      hsync = 1'($urandom); vsync = 1'($urandom);
      pix = 16'($urandom); tp = 16'($urandom);
      src = !active ? 16'h0 : (test_mode ? tp : pix);
      er = {src[15:11], src[15:13]}; eg = {src[10:5], src[10:9]}; eb = {src[4:0], src[4:2]};
      @(negedge clk);
      ce = 0;
      checks++;
      if (dac_r != er || dac_g != eg || dac_b != eb || vga_hsync != hsync || vga_vsync != vsync
          || vga_de != active || dac_blank_n != 1'b1) begin
        failures++;
        $display("FAIL i=%0d got %h %h %h exp %h %h %h", i, dac_r, dac_g, dac_b, er, eg, eb);
      end
      // no change without a pixel enable
      old_r = {dac_r, dac_g};
      pix = ~pix; tp = ~tp; hsync = ~hsync;
      @(negedge clk);
      checks++;
      if ({dac_r, dac_g} != old_r || vga_hsync == hsync) begin failures++; $display("FAIL changed without ce"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
