// sram: static RAM holding the two sample buffers.
//
// 2^AW words of DW bits (4K x 8: two buffers of 2K) with the pins of an
// asynchronous SRAM chip, all active low. A write happens at the clock edge
// while /CS and /WE are low; the stored word appears on dout while /CS and
// /OE are low and /WE is high, and dout is 0 otherwise. Reads are
// combinational. The clocked write is this design's synchronous stand-in for
// the chip's write pulse.
module sram #(
  parameter int unsigned AW = 12,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          cs_n,
  input  logic          we_n,
  input  logic          oe_n,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (!cs_n && !we_n) mem[addr] <= din;
  end

  assign dout = (!cs_n && !oe_n && we_n) ? mem[addr] : '0;

endmodule
