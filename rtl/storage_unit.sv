// storage_unit: the two sample buffers and their address logic.
//
// One SRAM holds two buffers. The sampling counter (step 1) gives the write
// address, the shifting counter (step = pitch, 6 fractional bits) gives the
// read address through its top 11 bits. ShiftCount selects which counter
// drives the SRAM address (0: sampling, 1: shifting), and buffer_select sets
// the address MSB so that writes go to one buffer and reads to the other;
// SwapBuff exchanges the roles at each chunk end. The full detector watches
// the multiplexed address against the buffer size switches. The pitch
// multiplier counter, stepped by the pushbutton pulses, feeds the shifting
// counter. All of this follows the lab's storage unit diagram.
// Control inputs are MCU pulses of one clock; the SRAM writes bus_in at the
// clock edge and its read data is combinational.
module storage_unit
  import ps_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  ctrl_t              ctrl,
  input  logic               pitch_up,
  input  logic               pitch_down,
  input  logic [SIZE_W-1:0]  size_sel,
  input  logic [DATA_W-1:0]  bus_in,
  output logic [DATA_W-1:0]  sram_dout,
  output logic               full,
  output logic [PITCH_W-1:0] pitch,
  output logic [SAMP_W-1:0]  samp_addr,
  output logic [SHIFT_W-1:0] shift_phase,
  output logic               buf_q
);

  logic [SAMP_W-1:0] mux_addr;
  logic              addr_msb;

  pitch_counter #(.W(PITCH_W), .RESET_VALUE(PITCH_UNITY)) u_pitch (
    .clk (clk), .rst (rst), .up (pitch_up), .down (pitch_down), .pitch (pitch)
  );

  sampling_counter #(.W(SAMP_W)) u_samp (
    .clk (clk), .clr (ctrl.clr_samp || rst), .inc (ctrl.inc_samp), .count (samp_addr)
  );

  shifting_counter #(.W(SHIFT_W), .STEP_W(PITCH_W)) u_shift (
    .clk (clk), .clr (ctrl.clr_shift || rst), .inc (ctrl.inc_shift), .step (pitch),
    .count (shift_phase)
  );

  assign mux_addr = ctrl.shift_count ? shift_phase[SHIFT_W-1 -: SAMP_W] : samp_addr;

  buffer_select u_buf (
    .clk (clk), .rst (rst), .swap (ctrl.swap_buff), .shift_count (ctrl.shift_count),
    .buf_q (buf_q), .addr_msb (addr_msb)
  );

  full_detector #(.AW(SAMP_W)) u_full (
    .addr (mux_addr), .size_sel (size_sel), .full (full)
  );

  sram #(.AW(SRAM_AW), .DW(DATA_W)) u_sram (
    .clk  (clk),
    .cs_n (!(ctrl.sram_wr || ctrl.sram_rd)),
    .we_n (!ctrl.sram_wr),
    .oe_n (!ctrl.sram_rd),
    .addr ({addr_msb, mux_addr}),
    .din  (bus_in),
    .dout (sram_dout)
  );

endmodule
