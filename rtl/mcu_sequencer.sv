// mcu_sequencer: the microprogram counter.
//
// An AW-bit synchronous counter, built in the lab from two 4-bit 74LS163
// counters. On a clock edge with en high: clr (the /RESET line) loads 0;
// otherwise load (the selected condition is true) loads the jump address d;
// otherwise the counter adds 1. As on the 74LS163, clear is synchronous and
// beats load. pc is registered and addresses the microprogram ROM directly.
module mcu_sequencer #(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          en,    // MCU clock enable
  input  logic          clr,   // synchronous clear
  input  logic          load,  // take the jump
  input  logic [AW-1:0] d,     // jump address
  output logic [AW-1:0] pc
);

  always_ff @(posedge clk) begin
    if (en) begin
      if (clr)       pc <= '0;
      else if (load) pc <= d;
      else           pc <= pc + 1'b1;
    end
  end

endmodule
