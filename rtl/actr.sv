// actr: 4-bit counter with asynchronous reset and enable.
//
// Reset high clears the count at once, without waiting for a clock edge, and
// holds it at 0. While reset is low, each rising clock edge adds 1 when enb is
// high and otherwise loads the constant 2. This is the lecture's asynchronous
// reset example (reset in the sensitivity list, tested before the clock edge);
// the lecture's rejected variant, which ties the "load 2" branch to the clock
// test itself, describes no flip-flop and is not built.
module actr #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         reset,   // active high, asynchronous
  input  logic         enb,
  output logic [W-1:0] count
);

  always_ff @(posedge clk or posedge reset) begin
    if (reset)    count <= '0;
    else if (enb) count <= count + 1'b1;
    else          count <= W'(2);
  end

endmodule
