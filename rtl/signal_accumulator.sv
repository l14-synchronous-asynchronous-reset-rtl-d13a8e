// signal_accumulator: builds the output sample.
//
// A W-bit clearable register fed by a W-bit adder (two 4-bit adders in the
// lab). clr loads 0; add loads register + operand, where the operand is the
// data bus value, or half of it (shifted right by one) when half is high.
// Clearing and adding the shifted sample, the original sample or both gives
// the three output choices; halving both operands is this design's way to
// mix two full-scale samples without overflow. carry is the adder's carry
// out for the current operand. clr wins over add.
module signal_accumulator #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         clr,
  input  logic         add,
  input  logic         half,
  input  logic [W-1:0] bus_in,
  output logic [W-1:0] acc,
  output logic         carry
);

  logic [W-1:0] operand;
  logic [W:0]   sum;

  assign operand = half ? (bus_in >> 1) : bus_in;
  assign sum     = {1'b0, acc} + {1'b0, operand};
  assign carry   = sum[W];

  always_ff @(posedge clk) begin
    if (clr)      acc <= '0;
    else if (add) acc <= sum[W-1:0];
  end

endmodule
