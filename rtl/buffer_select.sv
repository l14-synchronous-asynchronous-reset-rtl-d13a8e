// buffer_select: chooses which half of the SRAM is addressed.
//
// A toggle flip-flop, flipped by each SwapBuff pulse, names the buffer being
// written (buf_q). The SRAM address MSB is buf_q XOR ShiftCount: when the
// address multiplexer selects the sampling counter (ShiftCount = 0) the write
// buffer is addressed, when it selects the shifting counter the other one.
// This is the lab's circuit; the reset to buffer 0 is this design's addition.
module buffer_select (
  input  logic clk,
  input  logic rst,          // synchronous, active high
  input  logic swap,         // SwapBuff
  input  logic shift_count,  // ShiftCount
  output logic buf_q,
  output logic addr_msb
);

  always_ff @(posedge clk) begin
    if (rst)       buf_q <= 1'b0;
    else if (swap) buf_q <= !buf_q;
  end

  assign addr_msb = buf_q ^ shift_count;

endmodule
