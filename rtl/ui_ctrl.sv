// ui_ctrl: user-interface logic for the function switches.
//
// One momentary switch per function (flip, invert, blur, edge detection).
// Each switch is synchronized and debounced: its level is accepted once it has
// been stable for DEBOUNCE clocks. There is no fixed switch position: every
// accepted press toggles its function. Before a change is passed on, the new
// combination is checked; an invalid one is refused, the functions stay as
// they were, and led_invalid lights until the next valid change. Blur together
// with edge detection is the one invalid combination, since both would claim
// the single 3x3 window output. Toggle-per-press, the validity check and the
// LED follow the original design (done there by a microcontroller); the
// debounce time and the invalid set are this design's choices.
//
// sw bit order matches zg_pkg::mode_t: {edge_det, blur, invert, flip}.
// mode changes one clock after the debounced press is seen.
module ui_ctrl
  import zg_pkg::*;
#(
  parameter int DEBOUNCE = 200000      // 2 ms at 100 MHz
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] sw,
  output mode_t      mode,
  output logic       led_invalid
);

  localparam int DBW = $clog2(DEBOUNCE + 1);

  logic [3:0]     s1, s2, stable, press;
  logic [DBW-1:0] cnt [4];
  mode_t          cand;
  logic           any_press;

  function automatic logic valid_mode(input mode_t m);
    return !(m.blur && m.edge_det);
  endfunction

  always_comb begin
    cand      = mode;
    any_press = 1'b0;
    for (int i = 0; i < 4; i++)
      if (press[i]) begin
        cand[i]   = ~mode[i];
        any_press = 1'b1;
      end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s1          <= '0;
      s2          <= '0;
      stable      <= '0;
      press       <= '0;
      mode        <= '0;
      led_invalid <= 1'b0;
      for (int i = 0; i < 4; i++) cnt[i] <= '0;
    end else begin
      s1    <= sw;
      s2    <= s1;
      press <= '0;
      for (int i = 0; i < 4; i++) begin
        if (s2[i] == stable[i]) begin
          cnt[i] <= '0;
        end else if (int'(cnt[i]) >= DEBOUNCE - 1) begin
          cnt[i]    <= '0;
          stable[i] <= s2[i];
          press[i]  <= s2[i];
        end else begin
          cnt[i] <= cnt[i] + 1'b1;
        end
      end
      if (any_press) begin
        if (valid_mode(cand)) begin
          mode        <= cand;
          led_invalid <= 1'b0;
        end else begin
          led_invalid <= 1'b1;
        end
      end
    end
  end

endmodule
