// data_bus: the shared 8-bit data bus.
//
// Three sources can drive the bus: the A/D converter, the SRAM and the signal
// accumulator; the SRAM, the accumulator and the D/A read it. The lab's
// tri-state bus is built here as an AND-OR multiplexer on the output enables;
// with no enable the bus reads 0. At most one enable may be high at a time,
// which an assertion checks. Purely combinational.
module data_bus #(
  parameter int unsigned W = 8
) (
  input  logic         clk,      // for the bus assertion only
  input  logic         adc_oe,
  input  logic [W-1:0] adc_d,
  input  logic         sram_oe,
  input  logic [W-1:0] sram_d,
  input  logic         acc_oe,
  input  logic [W-1:0] acc_d,
  output logic [W-1:0] bus
);

  assign bus = ({W{adc_oe}} & adc_d) | ({W{sram_oe}} & sram_d) | ({W{acc_oe}} & acc_d);

  a_one_driver : assert property (@(posedge clk) $onehot0({adc_oe, sram_oe, acc_oe}))
    else $error("data_bus: more than one driver enabled");

endmodule
