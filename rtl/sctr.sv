// sctr: 4-bit counter with synchronous reset and enable.
//
// On every rising clock edge: reset high loads 0; otherwise enb high adds 1;
// otherwise the counter loads the constant 2. The reset is sampled only at the
// clock edge, so it must be held across one. This is the lecture's synchronous
// reset example, including its "otherwise load 2" branch, which makes the
// effect of the enable visible in simulation. Count is registered, so it
// changes one clock after its inputs.
module sctr #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         reset,   // active high, synchronous
  input  logic         enb,
  output logic [W-1:0] count
);

  always_ff @(posedge clk) begin
    if (reset)    count <= '0;
    else if (enb) count <= count + 1'b1;
    else          count <= W'(2);
  end

endmodule
