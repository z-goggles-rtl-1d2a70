// mem_ctrl: frame-store controller for two SRAM chips on a shared bus.
//
// Two request streams meet here. Writes come from the camera clock domain;
// reads come from the display side in this module's own clock domain. The
// camera and display clocks are unrelated, so without arbitration the two
// streams would fight over the shared address and data buses and corrupt
// pixels in a drifting diagonal band. The rules are:
//   * a read always goes first and takes one cycle (10 ns SRAM access);
//   * a read arriving while a write is under way aborts that write, which is
//     kept and restarted from its first cycle after the read;
//   * a write arriving while a read or write is under way, or while older
//     writes wait, is queued in a small internal write buffer;
//   * when no read is requested and no write is running, the oldest waiting
//     write is started.
// A write takes WR_CYCLES cycles: address and data first, write-enable low in
// the last cycle. If the buffer is full an incoming write is dropped and
// ev_drop pulses; at the design rates this does not occur. The priorities
// follow the original description; cycle counts, buffer depth and the drop
// policy are this design's choices.
//
// Write request interface: wr_tog toggles once per request, wr_addr/wr_data
// are held by the requester; the toggle passes a two-flop synchronizer and the
// held values are sampled when its edge is seen. Read interface: rd_req is a
// one-cycle strobe with rd_addr; rd_valid/rd_data follow exactly two cycles
// later. Address bit 18 selects the chip (sram_ce_n[1] for 1).
module mem_ctrl
  import zg_pkg::*;
#(
  parameter int WBUF_DEPTH = 2,
  parameter int WR_CYCLES  = 2
) (
  input  logic               clk,
  input  logic               rst,
  // write requests (camera domain, held)
  input  logic               wr_tog,
  input  maddr_t             wr_addr,
  input  logic [15:0]        wr_data,
  // read requests (local domain)
  input  logic               rd_req,
  input  maddr_t             rd_addr,
  output logic               rd_valid,
  output logic [15:0]        rd_data,
  // SRAM pins
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [1:0]         sram_ce_n,
  output logic               sram_we_n,
  output logic               sram_oe_n,
  output logic [15:0]        sram_dq_o,
  output logic               sram_dq_oe,
  input  logic [15:0]        sram_dq_i,
  // events, one-cycle pulses
  output logic               ev_buffered,
  output logic               ev_abort,
  output logic               ev_drop
);

  typedef enum logic [1:0] {OP_IDLE, OP_READ, OP_WRITE} op_e;
  typedef struct packed {
    maddr_t      addr;
    logic [15:0] data;
  } wreq_t;

  localparam int CW = (WR_CYCLES > 1) ? $clog2(WR_CYCLES) : 1;
  localparam int PW = (WBUF_DEPTH > 1) ? $clog2(WBUF_DEPTH) : 1;

  // write toggle synchronizer
  logic  tog_s1, tog_s2, tog_s3, wr_ev;
  wreq_t wr_in;

  // operation in progress
  op_e     op;
  logic [CW-1:0] wcnt;
  maddr_t  rd_addr_q;
  logic    cw_valid;      // current (running or aborted) write
  wreq_t   cw;

  // write buffer
  wreq_t         buf_mem [WBUF_DEPTH];
  logic [PW-1:0] buf_rd, buf_wr;
  logic [PW:0]   buf_cnt;
  logic          buf_push, buf_pop, buf_full, buf_empty;

  op_e   nxt_op;
  logic  wr_done, direct, load_cw;
  wreq_t load_val;

  assign wr_ev     = tog_s2 ^ tog_s3;
  assign wr_in     = '{addr: wr_addr, data: wr_data};
  assign buf_full  = (buf_cnt == (PW+1)'(WBUF_DEPTH));
  assign buf_empty = (buf_cnt == '0);
  assign wr_done   = (op == OP_WRITE) && (wcnt == CW'(WR_CYCLES - 1));

  always_comb begin
    nxt_op   = OP_IDLE;
    ev_abort = 1'b0;
    direct   = 1'b0;
    load_cw  = 1'b0;
    buf_pop  = 1'b0;
    load_val = buf_mem[buf_rd];
    if (rd_req) begin
      nxt_op   = OP_READ;
      ev_abort = (op == OP_WRITE) && !wr_done;
    end else if (cw_valid && !wr_done) begin
      nxt_op = OP_WRITE;                     // continue, or restart after abort
    end else if (!buf_empty) begin
      nxt_op  = OP_WRITE;
      load_cw = 1'b1;
      buf_pop = 1'b1;
    end else if (wr_ev) begin
      nxt_op   = OP_WRITE;
      load_cw  = 1'b1;
      direct   = 1'b1;
      load_val = wr_in;
    end
    buf_push    = wr_ev && !direct && !buf_full;
    ev_buffered = wr_ev && !direct;
    ev_drop     = wr_ev && !direct && buf_full && !buf_pop;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      tog_s1    <= 1'b0;
      tog_s2    <= 1'b0;
      tog_s3    <= 1'b0;
      op        <= OP_IDLE;
      wcnt      <= '0;
      rd_addr_q <= '0;
      cw_valid  <= 1'b0;
      cw        <= '0;
      buf_rd    <= '0;
      buf_wr    <= '0;
      buf_cnt   <= '0;
      rd_valid  <= 1'b0;
      rd_data   <= '0;
    end else begin
      tog_s1 <= wr_tog;
      tog_s2 <= tog_s1;
      tog_s3 <= tog_s2;

      // read data is sampled at the end of the read cycle
      rd_valid <= (op == OP_READ);
      if (op == OP_READ) rd_data <= sram_dq_i;

      if (wr_done) cw_valid <= 1'b0;
      if (load_cw) begin
        cw       <= load_val;
        cw_valid <= 1'b1;
      end

      op <= nxt_op;
      if (nxt_op == OP_READ) rd_addr_q <= rd_addr;
      if (nxt_op == OP_WRITE && op == OP_WRITE && !wr_done) wcnt <= wcnt + 1'b1;
      else wcnt <= '0;

      if (buf_push) begin
        buf_mem[buf_wr] <= wr_in;
        buf_wr <= (int'(buf_wr) == WBUF_DEPTH - 1) ? '0 : buf_wr + 1'b1;
      end
      if (buf_pop) buf_rd <= (int'(buf_rd) == WBUF_DEPTH - 1) ? '0 : buf_rd + 1'b1;
      buf_cnt <= buf_cnt + (PW+1)'(buf_push) - (PW+1)'(buf_pop);
    end
  end

  // SRAM pins, decoded from registered state
  always_comb begin
    sram_addr  = cw.addr[SRAM_AW-1:0];
    sram_ce_n  = 2'b11;
    sram_oe_n  = 1'b1;
    sram_we_n  = 1'b1;
    sram_dq_oe = 1'b0;
    sram_dq_o  = cw.data;
    unique case (op)
      OP_READ: begin
        sram_addr = rd_addr_q[SRAM_AW-1:0];
        sram_ce_n[rd_addr_q[SRAM_AW]] = 1'b0;
        sram_oe_n = 1'b0;
      end
      OP_WRITE: begin
        sram_ce_n[cw.addr[SRAM_AW]] = 1'b0;
        sram_dq_oe = 1'b1;
        sram_we_n  = (wcnt != CW'(WR_CYCLES - 1));
      end
      default: ;
    endcase
  end

  // bus rules
  a_one_chip:  assert property (@(posedge clk) disable iff (rst) sram_ce_n != 2'b00);
  a_no_fight:  assert property (@(posedge clk) disable iff (rst) !(sram_dq_oe && !sram_oe_n));
  a_we_in_wr:  assert property (@(posedge clk) disable iff (rst) !sram_we_n |-> op == OP_WRITE);

endmodule
