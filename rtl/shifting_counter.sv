// shifting_counter: read address phase accumulator of the storage unit.
//
// A W-bit register fed by an adder whose other input is the STEP_W-bit pitch
// value (17 and 8 bits, as in the lab). The top 11 bits are the buffer read
// address, the low 6 bits a fraction, so a step of 64 advances one location.
// On a clock edge, clr loads 0, otherwise inc adds step (modulo 2^W); clear
// wins. Both are MCU control pulses (ClrShift, IncShift).
module shifting_counter #(
  parameter int unsigned W      = 17,
  parameter int unsigned STEP_W = 8
) (
  input  logic              clk,
  input  logic              clr,
  input  logic              inc,
  input  logic [STEP_W-1:0] step,
  output logic [W-1:0]      count
);

  always_ff @(posedge clk) begin
    if (clr)      count <= '0;
    else if (inc) count <= count + W'(step);
  end

endmodule
