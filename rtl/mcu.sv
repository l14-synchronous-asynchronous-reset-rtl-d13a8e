// mcu: microprogrammed control unit of the pitch shifting system.
//
// Structure as in the lab's suggested implementation: a microprogram
// sequencer (mcu_sequencer) addresses the microprogram ROM (mcu_ucode_rom,
// two 8-bit PROMs); the ROM's I15..I12 drive an 8-to-1 condition select
// (mcu_cond_select) whose output makes the sequencer load I7..I0; the
// assertion logic (mcu_assert_logic) turns ASSERT words into control pulses.
// The seven status lines pass through a register, updated on each MCU clock,
// before the condition select; this register is this design's addition and
// means a CJMP tests the status left by the previous instruction.
// Everything advances only when en (the MCU clock enable) is high. rst is
// the synchronized /RESET and restarts the program at address 0.
// lights shows the ASSERT field of the current word and holds it while the
// MCU waits for its next clock, for a lamp display in test mode.
module mcu
  import ps_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [NSTAT-1:0] status,
  output ctrl_t            ctrl,
  output logic [NCTRL-1:0] lights,
  output logic [UPC_W-1:0] pc
);

  logic [UI_W-1:0]  instr;
  logic [NSTAT-1:0] status_q;
  logic             cond;

  always_ff @(posedge clk) begin
    if (rst)     status_q <= '0;
    else if (en) status_q <= status;
  end

  mcu_sequencer #(.AW(UPC_W)) u_seq (
    .clk  (clk),
    .en   (en || rst),
    .clr  (rst),
    .load (cond),
    .d    (instr[UPC_W-1:0]),
    .pc   (pc)
  );

  mcu_ucode_rom u_rom (
    .addr (pc),
    .data (instr)
  );

  mcu_cond_select u_cond (
    .status   (status_q),
    .sel      (instr[UI_W-2 -: 3]),
    .strobe_n (instr[UI_W-1]),
    .cond     (cond)
  );

  mcu_assert_logic u_assert (
    .instr (instr),
    .en    (en && !rst),
    .ctrl  (ctrl)
  );

  assign lights = instr[UI_W-1] ? instr[NCTRL-1:0] : '0;

endmodule
