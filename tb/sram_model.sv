// sram_model: behavioural model of the frame-store memory, two 256k x 16
// asynchronous SRAM chips sharing one address bus and one data bus, each with
// its own active-low chip enable. Simulation only.
// Reads are combinational: while OE and a chip enable are low the enabled
// chip's word appears on dq_i. A write happens at the clock edge that ends a
// cycle with CE and WE low (the controller holds WE low for whole cycles).
// Chip c holds array words c*2^AW .. c*2^AW + 2^AW - 1.
module sram_model #(
  parameter int AW = 18
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [1:0]    ce_n,
  input  logic          we_n,
  input  logic          oe_n,
  input  logic [15:0]   dq_o,
  input  logic          dq_oe,
  output logic [15:0]   dq_i
);
  logic [15:0] mem [2**(AW+1)];

  initial for (int i = 0; i < 2**(AW+1); i++) mem[i] = 16'h0000;

  always_comb begin
    dq_i = 16'h0000;
    if (!oe_n && !ce_n[0]) dq_i = mem[{1'b0, addr}];
    if (!oe_n && !ce_n[1]) dq_i = mem[{1'b1, addr}];
  end

  always_ff @(posedge clk) begin
    if (!we_n && dq_oe) begin
      if (!ce_n[0]) mem[{1'b0, addr}] <= dq_o;
      if (!ce_n[1]) mem[{1'b1, addr}] <= dq_o;
    end
  end
endmodule
