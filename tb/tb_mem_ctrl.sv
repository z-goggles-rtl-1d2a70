// tb_mem_ctrl: memory controller against the SRAM model.
// Phase 1: a writer on an unrelated 27 MHz clock stores random data at random
// addresses in both chips while the read side issues reads in bursts of three
// (the display pattern) and also single reads. Every read of an address
// that has no write in flight is checked against a reference copy, and read
// latency must be exactly two cycles. Afterwards every written address is
// read back. Reads aborting writes and writes being buffered must both occur.
// Phase 2: reads on every cycle starve the writer; the buffer fills, later
// writes are dropped (ev_drop), and read-back shows exactly the buffered ones.
module tb_mem_ctrl;
  import zg_pkg::*;
  localparam int DEPTH = 2;
  logic clk = 0, wclk = 0, rst = 1;
  logic wr_tog = 0; maddr_t wr_addr = '0; logic [15:0] wr_data = '0;
  logic rd_req = 0; maddr_t rd_addr = '0; logic rd_valid; logic [15:0] rd_data;
  logic [SRAM_AW-1:0] sram_addr; logic [1:0] sram_ce_n; logic sram_we_n, sram_oe_n, sram_dq_oe;
  logic [15:0] sram_dq_o, sram_dq_i;
  logic ev_buffered, ev_abort, ev_drop;
  int checks = 0, failures = 0, n_buf = 0, n_abort = 0, n_drop = 0;
  logic [15:0] ref_mem [maddr_t];
  int inflight [maddr_t];
  maddr_t addrs [$];
  // read checking pipeline
  maddr_t rq [$]; int rq_cyc [$]; int cyc = 0;

  mem_ctrl #(.WBUF_DEPTH(DEPTH)) dut (.clk, .rst, .wr_tog, .wr_addr, .wr_data, .rd_req, .rd_addr,
    .rd_valid, .rd_data, .sram_addr, .sram_ce_n, .sram_we_n, .sram_oe_n, .sram_dq_o, .sram_dq_oe,
    .sram_dq_i, .ev_buffered, .ev_abort, .ev_drop);
  sram_model mem (.clk, .addr(sram_addr), .ce_n(sram_ce_n), .we_n(sram_we_n), .oe_n(sram_oe_n),
    .dq_o(sram_dq_o), .dq_oe(sram_dq_oe), .dq_i(sram_dq_i));

  always #5 clk = ~clk;
  always #18.5 wclk = ~wclk;

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      n_buf += int'(ev_buffered); n_abort += int'(ev_abort); n_drop += int'(ev_drop);
      if (rd_req) begin rq.push_back(rd_addr); rq_cyc.push_back(cyc); end
      if (rd_valid) begin
        maddr_t a; int c;
        a = rq.pop_front(); c = rq_cyc.pop_front();
        checks++;
        if (cyc != c + 2) begin failures++; $display("FAIL read latency %0d", cyc - c); end
        if (!inflight.exists(a) || inflight[a] == 0) begin
          logic [15:0] e;
          e = ref_mem.exists(a) ? ref_mem[a] : 16'h0000;
          checks++;
          if (rd_data != e) begin failures++; $display("FAIL read %h got %h exp %h", a, rd_data, e); end
        end
      end
    end
  end

  // writer: one request every two camera clocks, like one pixel
  task automatic write(input maddr_t a, input logic [15:0] d, input logic track);
    @(posedge wclk);
    wr_addr <= a; wr_data <= d; wr_tog <= ~wr_tog;
    if (track) begin
      if (!inflight.exists(a)) inflight[a] = 0;
      inflight[a]++;
      ref_mem[a] = d;
      fork begin
        automatic maddr_t aa = a;
        repeat (60) @(posedge clk);
        inflight[aa]--;
      end join_none
    end
    @(posedge wclk);
  endtask

  task automatic read(input maddr_t a);
    @(negedge clk) rd_req = 1; rd_addr = a;
    @(negedge clk) rd_req = 0;
  endtask

  task automatic drain();
    repeat (100) @(negedge clk);
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst = 0;
    fork
      begin
        for (int i = 0; i < 600; i++) begin
          maddr_t a; a = maddr_t'($urandom) & 19'h7fc3f;   // small address set, both chips
          addrs.push_back(a);
          write(a, 16'($urandom), 1);
        end
      end
      begin
        for (int i = 0; i < 1500; i++) begin
          if (i % 2) begin
            read(addrs.size() > 0 ? addrs[$urandom_range(addrs.size() - 1)] : '0);
          end else begin
            @(negedge clk) rd_req = 1; rd_addr = addrs.size() > 0 ? addrs[$urandom_range(addrs.size() - 1)] : '0;
            @(negedge clk) rd_addr = rd_addr ^ 19'h00200;
            @(negedge clk) rd_addr = rd_addr ^ 19'h00400;
            @(negedge clk) rd_req = 0;
          end
          repeat ($urandom_range(6)) @(negedge clk);
        end
      end
    join
    drain();
    // read everything back
    foreach (ref_mem[a]) read(a);
    drain();
    checks++; if (n_abort == 0) begin failures++; $display("FAIL no write was aborted"); end
    checks++; if (n_buf == 0)   begin failures++; $display("FAIL no write was buffered"); end
    checks++; if (n_drop != 0)  begin failures++; $display("FAIL %0d writes dropped in phase 1", n_drop); end
    // phase 2: starve the writer
    @(negedge clk) rd_req = 1; rd_addr = 19'h7ffff;
    for (int i = 0; i < 6; i++) write(maddr_t'(19'h10000 + i), 16'(16'h5a00 + i), 0);
    repeat (40) @(posedge clk);
    @(negedge clk) rd_req = 0;
    drain();
    for (int i = 0; i < 6; i++) begin
      ref_mem[maddr_t'(19'h10000 + i)] = (i < DEPTH) ? 16'(16'h5a00 + i) : 16'h0000;
      read(maddr_t'(19'h10000 + i));
    end
    drain();
    checks++; if (n_drop != 6 - DEPTH) begin failures++; $display("FAIL drops %0d", n_drop); end
    $display("COUNT aborts=%0d buffered=%0d drops=%0d", n_abort, n_buf, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
