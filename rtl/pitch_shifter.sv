// pitch_shifter: the complete pitch shifting system.
//
// Audio is digitized by an external 8-bit A/D converter at a fixed sampling
// rate (9.6 or 19.2 kHz), and the D/A receives one output sample per
// sampling period. Time is cut into chunks of one buffer length. While one
// SRAM buffer is filled with the current chunk, the previous chunk is read
// from the other buffer with a fractional address step (the pitch value,
// 64 = one location per sample). A step below 64 stretches the chunk and
// never reaches its end: lower pitch, the tail is dropped. A step above 64
// squeezes it and reaches the end early: higher pitch, the read address then
// restarts at the chunk start and part of the chunk is played twice. At each
// chunk end the buffers swap. The output is the shifted signal, the original,
// or both mixed at half amplitude each, as set by the SHIFT? and PASSORIG?
// switches.
//
// Blocks: synchronizers for all external inputs, auto-repeat pulsers for
// the two pitch buttons, the timing unit (sample request, MCU clock enable),
// the microprogrammed control unit, the storage unit, the signal
// accumulator and the data bus. The partitioning and the storage unit
// circuit follow the lab; the master clock of 1.8432 MHz, the microprogram
// and the control and status assignments are this design's.
//
// Converter interfaces (active low selects): the A/D starts a conversion on a
// clock with adc_rw low and adc_cs_n/adc_ce_n low, reports adc_status high
// while converting, and is read with adc_rw high and the selects low. The
// D/A takes dac_db while dac_cs_n/dac_ce_n are low. One sample period takes
// about 30 clocks plus the A/D conversion time, well inside the 96 clocks of
// a 19.2 kHz period at the default clock.
module pitch_shifter
  import ps_pkg::*;
#(
  parameter int unsigned CLK_HZ        = 1843200,
  parameter int unsigned FS_LO_HZ      = 9600,
  parameter int unsigned FS_HI_HZ      = 19200,
  parameter int unsigned TEST_HZ       = 15,
  parameter int unsigned HOLD_CYCLES   = 921600,
  parameter int unsigned REPEAT_CYCLES = 368640
) (
  input  logic               clk,
  input  logic               reset_n,       // /RESET pushbutton
  input  logic               pitch_up,      // PITCHUP pushbutton
  input  logic               pitch_down,    // PITCHDOWN pushbutton
  input  logic               shift_en,      // SHIFT? switch
  input  logic               pass_orig,     // PASSORIG? switch
  input  logic               fs_sel,        // 0: 9.6 kHz, 1: 19.2 kHz
  input  logic [SIZE_W-1:0]  buf_size_sel,  // buffer size (sel+1)*128
  input  logic               test_mode,     // MCU test: slow clock, lamp test
  // A/D converter
  input  logic [DATA_W-1:0]  adc_db,
  input  logic               adc_status,
  output logic               adc_cs_n,
  output logic               adc_ce_n,
  output logic               adc_rw,
  // D/A converter
  output logic [DATA_W-1:0]  dac_db,
  output logic               dac_cs_n,
  output logic               dac_ce_n,
  // display
  output logic [NCTRL-1:0]   lights,
  output logic [PITCH_W-1:0] pitch
);

  // ---------------------------------------------------------------- inputs
  logic reset_n_s, up_s, down_s, shift_s, pass_s, fs_s, test_s, adc_busy_s;
  logic [SIZE_W-1:0] size_s;
  logic rst;

  synchronizer #(.WIDTH(8)) u_sync (
    .clk (clk),
    .d   ({reset_n, pitch_up, pitch_down, shift_en, pass_orig, fs_sel, test_mode, adc_status}),
    .q   ({reset_n_s, up_s, down_s, shift_s, pass_s, fs_s, test_s, adc_busy_s})
  );

  synchronizer #(.WIDTH(SIZE_W)) u_sync_size (
    .clk (clk), .d (buf_size_sel), .q (size_s)
  );

  assign rst = !reset_n_s;

  logic up_pulse, down_pulse;

  button_pulser #(.HOLD_CYCLES(HOLD_CYCLES), .REPEAT_CYCLES(REPEAT_CYCLES)) u_up (
    .clk (clk), .rst (rst), .btn (up_s), .pulse (up_pulse)
  );

  button_pulser #(.HOLD_CYCLES(HOLD_CYCLES), .REPEAT_CYCLES(REPEAT_CYCLES)) u_down (
    .clk (clk), .rst (rst), .btn (down_s), .pulse (down_pulse)
  );

  // ---------------------------------------------------------------- timing
  ctrl_t ctrl;
  logic  sample_req, mcu_en;

  timing_unit #(.CLK_HZ(CLK_HZ), .FS_LO_HZ(FS_LO_HZ), .FS_HI_HZ(FS_HI_HZ), .TEST_HZ(TEST_HZ)) u_timing (
    .clk        (clk),
    .rst        (rst),
    .fs_sel     (fs_s),
    .test_mode  (test_s),
    .sample_ack (ctrl.adc_start),
    .sample_req (sample_req),
    .mcu_en     (mcu_en)
  );

  // ---------------------------------------------------------------- control
  logic [DATA_W-1:0] bus, sram_dout, acc;
  logic              full, acc_carry;
  logic [NSTAT-1:0]  status;

  always_comb begin
    status               = '0;
    status[C_SAMPLE_REQ] = sample_req;
    status[C_ADC_BUSY]   = adc_busy_s;
    status[C_FULL]       = full;
    status[C_SHIFT]      = shift_s;
    status[C_PASSORIG]   = pass_s;
    status[C_ACC_CARRY]  = acc_carry;
    status[C_TEST]       = test_s;
  end

  mcu u_mcu (
    .clk    (clk),
    .rst    (rst),
    .en     (mcu_en),
    .status (status),
    .ctrl   (ctrl),
    .lights (lights),
    .pc     ()
  );

  // ---------------------------------------------------------------- datapath
  storage_unit u_store (
    .clk         (clk),
    .rst         (rst),
    .ctrl        (ctrl),
    .pitch_up    (up_pulse),
    .pitch_down  (down_pulse),
    .size_sel    (size_s),
    .bus_in      (bus),
    .sram_dout   (sram_dout),
    .full        (full),
    .pitch       (pitch),
    .samp_addr   (),
    .shift_phase (),
    .buf_q       ()
  );

  signal_accumulator #(.W(DATA_W)) u_acc (
    .clk    (clk),
    .clr    (ctrl.acc_clr),
    .add    (ctrl.acc_add),
    .half   (ctrl.acc_half),
    .bus_in (bus),
    .acc    (acc),
    .carry  (acc_carry)
  );

  data_bus #(.W(DATA_W)) u_bus (
    .clk     (clk),
    .adc_oe  (ctrl.adc_read),
    .adc_d   (adc_db),
    .sram_oe (ctrl.sram_rd),
    .sram_d  (sram_dout),
    .acc_oe  (ctrl.acc_out),
    .acc_d   (acc),
    .bus     (bus)
  );

  // ---------------------------------------------------------------- converters
  assign adc_cs_n = !(ctrl.adc_start || ctrl.adc_read);
  assign adc_ce_n = !(ctrl.adc_start || ctrl.adc_read);
  assign adc_rw   = !ctrl.adc_start;
  assign dac_db   = bus;
  assign dac_cs_n = !ctrl.dac_load;
  assign dac_ce_n = !ctrl.dac_load;

endmodule
