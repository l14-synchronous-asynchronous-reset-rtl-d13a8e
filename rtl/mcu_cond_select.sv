// mcu_cond_select: condition multiplexer of the control unit.
//
// An 8-to-1 multiplexer in the manner of a 74LS151: inputs 0..6 are the seven
// status lines and input 7 is tied true, so condition code 7 makes a CJMP an
// unconditional JMP. sel is instruction bits I14..I12. strobe_n is I15: when
// it is 1 the word is an ASSERT and the output is forced false, so the
// sequencer just counts. Purely combinational.
module mcu_cond_select
  import ps_pkg::*;
(
  input  logic [NSTAT-1:0] status,
  input  logic [2:0]       sel,
  input  logic             strobe_n,
  output logic             cond
);

  logic [7:0] inputs;

  assign inputs = {1'b1, status};
  assign cond   = !strobe_n && inputs[sel];

endmodule
