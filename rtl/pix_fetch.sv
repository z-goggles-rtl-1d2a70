// pix_fetch: reads the frame store ahead of the display beam and keeps the
// 3x3 input cache used by the neighbourhood functions.
//
// Each stored pixel is shown on two display columns (320 stored columns fill
// 640), lines map one to one. The cache holds three stored columns of three
// lines; its centre win[1][1] is the stored pixel under the beam. On every
// odd-column pixel enable the cache shifts one column left and takes in the
// column fetched during the previous two pixel periods, and the fetch of the
// next column starts: one read of the centre line, or, when win_mode is set,
// three reads (line above, centre, line below) on consecutive cycles. Reads
// return in order from mem_ctrl and fill the column buffer. Positions outside
// the stored image are black and cost no read. Near the end of a line the
// fetch already serves the first columns of the next line, so the cache is
// full when the visible area starts.
//
// Timing: with a pixel enable every 4 clocks a fetch has 8 clocks; it needs at
// most 3 read slots plus the 2-cycle read latency. h/v are the beam position
// of the current pixel enable (vga_timing). The window scheme follows the
// original description; the 2x horizontal scale and black borders are this
// design's choices.
module pix_fetch
  import zg_pkg::*;
#(
  parameter int IMG_W   = 320,
  parameter int IMG_H   = 480,
  parameter int H_TOTAL = 800,
  parameter int V_TOTAL = 525
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  logic [9:0]  h,
  input  logic [9:0]  v,
  input  logic        win_mode,
  output logic        rd_req,
  output maddr_t      rd_addr,
  input  logic        rd_valid,
  input  logic [15:0] rd_data,
  output win3_t       win
);

  logic signed [11:0] hh, fcol, frow, row_i;
  logic        shift;
  rgb565_t     colbuf [3];
  logic [2:0]  to_issue, awaiting;
  logic [X_BITS-1:0] cur_col;
  logic [Y_BITS-1:0] cur_row [3];
  logic [2:0]  need;
  logic [1:0]  issue_idx, ret_idx;

  always_comb begin
    // position relative to the next line start near the end of a line
    hh    = (int'(h) >= H_TOTAL - 16) ? 12'(int'(h) - H_TOTAL) : 12'(h);
    shift = ce && h[0];
    fcol  = ((hh + 12'sd1) >>> 1) + 12'sd2;
    frow  = (hh < 0) ? ((int'(v) == V_TOTAL - 1) ? 12'sd0 : 12'(v) + 12'sd1) : 12'(v);
    need  = '0;
    for (int r = 0; r < 3; r++) begin
      row_i = frow + 12'(r) - 12'sd1;
      if ((win_mode || r == 1) && frow < 12'(IMG_H) && fcol >= 0 && fcol < 12'(IMG_W) && row_i >= 0 && row_i < 12'(IMG_H))
        need[r] = 1'b1;
    end
    // lowest pending read
    issue_idx = to_issue[0] ? 2'd0 : (to_issue[1] ? 2'd1 : 2'd2);
    ret_idx   = awaiting[0] ? 2'd0 : (awaiting[1] ? 2'd1 : 2'd2);
    rd_req    = (to_issue != '0) && !shift;
    rd_addr   = pix_addr(cur_col, cur_row[issue_idx]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      to_issue <= '0;
      awaiting <= '0;
      cur_col  <= '0;
      win      <= '0;
      for (int r = 0; r < 3; r++) begin
        colbuf[r]  <= RGB_BLACK;
        cur_row[r] <= '0;
      end
    end else begin
      if (rd_req) begin
        to_issue[issue_idx] <= 1'b0;
        awaiting[issue_idx] <= 1'b1;
      end
      if (rd_valid && awaiting != '0) begin
        colbuf[ret_idx]   <= rd_data;
        awaiting[ret_idx] <= 1'b0;
      end
      if (shift) begin
        for (int r = 0; r < 3; r++) begin
          win[r][0] <= win[r][1];
          win[r][1] <= win[r][2];
          win[r][2] <= colbuf[r];
          colbuf[r] <= RGB_BLACK;
          cur_row[r] <= Y_BITS'(frow + 12'(r) - 12'sd1);
        end
        cur_col  <= X_BITS'(fcol);
        to_issue <= need;
        awaiting <= '0;
      end
    end
  end

  // a new column must never start while reads of the previous one are open
  a_fetch_done: assert property (@(posedge clk) disable iff (rst)
                                 shift |-> (to_issue == '0 && awaiting == '0));

endmodule
