// tb_ui_ctrl: presses the function switches with contact bounce and checks
// debouncing (bounces and short glitches are ignored, one toggle per press),
// toggle-per-press, refusal of the blur+edge combination with the LED lit,
// and that the LED clears on the next valid change.
module tb_ui_ctrl;
  import zg_pkg::*;
  localparam int DB = 16;
  logic clk = 0, rst = 1; logic [3:0] sw = '0;
  mode_t mode; logic led_invalid;
  int checks = 0, failures = 0;

  ui_ctrl #(.DEBOUNCE(DB)) dut (.clk, .rst, .sw, .mode, .led_invalid);

  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic press(input int i);
    // bouncy contact: short pulses, then stable on, then release with bounce
    for (int k = 0; k < 4; k++) begin
      @(negedge clk) sw[i] = 1; repeat ($urandom_range(1, DB / 3)) @(negedge clk);
      sw[i] = 0; repeat ($urandom_range(1, 3)) @(negedge clk);
    end
    sw[i] = 1; repeat (3 * DB) @(negedge clk);
    for (int k = 0; k < 3; k++) begin
      sw[i] = 0; repeat ($urandom_range(1, DB / 3)) @(negedge clk);
      sw[i] = 1; repeat ($urandom_range(1, 3)) @(negedge clk);
    end
    sw[i] = 0; repeat (3 * DB) @(negedge clk);
  endtask

  task automatic expect_(input logic [3:0] m, input logic led);
    checks++;
    if (mode != m || led_invalid != led) begin
      failures++; $display("FAIL mode %b led %0d exp %b %0d", mode, led_invalid, m, led);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    expect_(4'b0000, 0);
    press(0); expect_(4'b0001, 0);     // flip on
    press(1); expect_(4'b0011, 0);     // invert on
    press(0); expect_(4'b0010, 0);     // flip off
    press(2); expect_(4'b0110, 0);     // blur on
    press(3); expect_(4'b0110, 1);     // edge refused: LED
    press(2); expect_(4'b0010, 0);     // blur off, LED clears
    press(3); expect_(4'b1010, 0);     // edge on
    press(2); expect_(4'b1010, 1);     // blur refused
    press(3); expect_(4'b0010, 0);
    press(1); expect_(4'b0000, 0);
    // a glitch shorter than the debounce time does nothing
    @(negedge clk) sw[1] = 1; repeat (DB / 2) @(negedge clk); sw[1] = 0;
    repeat (3 * DB) @(negedge clk);
    expect_(4'b0000, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
