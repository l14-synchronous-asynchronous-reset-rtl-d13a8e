// synchronizer: a chain of flip-flops per bit for inputs that change
// independently of the clock (pushbuttons, switches, the A/D status line).
//
// Each bit of d passes through STAGES flip-flops; q is d delayed by STAGES
// clocks, and the first stage absorbs metastability. The lab asks that all
// asynchronous inputs be synchronized; the depth of two is this design's
// choice. The flip-flops have no reset: they hold valid values STAGES clocks
// after power-up.
module synchronizer #(
  parameter int unsigned WIDTH  = 9,
  parameter int unsigned STAGES = 2
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] chain [STAGES];

  always_ff @(posedge clk) begin
    chain[0] <= d;
    for (int unsigned i = 1; i < STAGES; i++) chain[i] <= chain[i-1];
  end

  assign q = chain[STAGES-1];

endmodule
