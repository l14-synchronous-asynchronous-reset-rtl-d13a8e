// pitch_counter: the pitch multiplier counter.
//
// A W-bit up/down counter stepped by one-clock pulses from the PITCHUP and
// PITCHDOWN buttons. Its value is the amount the shifting counter advances
// per output sample, in units of 1/64 buffer location: 64 reads the buffer at
// the rate it was written (no shift), less lowers the pitch, more raises it.
// Reset loads RESET_VALUE (64, "pitch shift cleared"). The count saturates at
// 1 and at 2^W-1 instead of wrapping; both the reset value's meaning and the
// saturation are this design's reading. Up and down together cancel.
module pitch_counter #(
  parameter int unsigned     W           = 8,
  parameter logic [W-1:0]    RESET_VALUE = W'(64)
) (
  input  logic         clk,
  input  logic         rst,    // synchronous, active high
  input  logic         up,
  input  logic         down,
  output logic [W-1:0] pitch
);

  always_ff @(posedge clk) begin
    if (rst)                               pitch <= RESET_VALUE;
    else if (up && !down && pitch != '1)   pitch <= pitch + 1'b1;
    else if (down && !up && pitch > W'(1)) pitch <= pitch - 1'b1;
  end

endmodule
