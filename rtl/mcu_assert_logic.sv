// mcu_assert_logic: instruction decoder for the control signals.
//
// The lab builds this from PALs between the microprogram PROMs and the rest
// of the system. An ASSERT word (I15 = 1) raises each control signal whose
// bit is set in I14..I0; a CJMP or JMP word raises none. The outputs are also
// gated by the MCU clock enable, so every control signal is a pulse of exactly
// one clock per executed instruction, also when the MCU is stepped slowly in
// test mode. Purely combinational.
module mcu_assert_logic
  import ps_pkg::*;
(
  input  logic [UI_W-1:0] instr,
  input  logic            en,
  output ctrl_t           ctrl
);

  assign ctrl = (instr[UI_W-1] && en) ? ctrl_t'(instr[NCTRL-1:0]) : '0;

endmodule
