// sampling_counter: write address counter of the storage unit.
//
// A W-bit register fed by an adder with constant 1 (11 bits, 2K locations,
// as in the lab). On a clock edge, clr loads 0, otherwise inc adds one;
// clear wins. Both are control pulses from the MCU (ClrSamp, IncSamp).
module sampling_counter #(
  parameter int unsigned W = 11
) (
  input  logic         clk,
  input  logic         clr,
  input  logic         inc,
  output logic [W-1:0] count
);

  always_ff @(posedge clk) begin
    if (clr)      count <= '0;
    else if (inc) count <= count + 1'b1;
  end

endmodule
