// ps_pkg: types and constants shared by the pitch shifting system.
//
// The control unit is microprogrammed with a 16-bit instruction word in three
// formats:
//   CJMP    I15=0, I14..I12 = condition select C, I11..I8 unused, I7..I0 = address
//   JMP     CJMP with C = 3'b111 (the constant-true condition input)
//   ASSERT  I15=1, I14..I0 = fifteen control signals, one per bit
// These formats follow the lab's instruction table. How the fifteen ASSERT bits
// and the seven status lines are assigned is this design's own choice and is
// fixed here, in ctrl_t and status_e.
package ps_pkg;

  localparam int unsigned DATA_W  = 8;   // audio sample and data bus width
  localparam int unsigned SAMP_W  = 11;  // sampling counter: 2K locations per buffer
  localparam int unsigned SHIFT_W = 17;  // shifting counter: 64 x 2K
  localparam int unsigned FRAC_W  = SHIFT_W - SAMP_W;  // 6 fractional address bits
  localparam int unsigned PITCH_W = 8;   // pitch multiplier counter
  localparam int unsigned SIZE_W  = 4;   // buffer size select switches
  localparam int unsigned SRAM_AW = SAMP_W + 1;  // buffer bit + 11-bit address
  localparam int unsigned UPC_W   = 8;   // microprogram address (2 x 4-bit counters)
  localparam int unsigned UI_W    = 16;  // microinstruction width (2 x 8-bit PROMs)
  localparam int unsigned NCTRL   = 15;  // assert signals in an ASSERT word
  localparam int unsigned NSTAT   = 7;   // status lines into the condition select

  // Pitch value for "no shift": one buffer location per output sample.
  localparam logic [PITCH_W-1:0] PITCH_UNITY = PITCH_W'(1 << FRAC_W);

  // Assert signals; bit 0 (last member) is instruction bit I0.
  typedef struct packed {
    logic dac_load;     // S14 latch the data bus into the D/A
    logic acc_out;      // S13 accumulator drives the data bus
    logic acc_half;     // S12 accumulator adds half of the bus value
    logic acc_add;      // S11 accumulator <= accumulator + operand
    logic acc_clr;      // S10 accumulator <= 0
    logic swap_buff;    // S9  toggle the buffer flip-flop
    logic clr_shift;    // S8  shifting counter <= 0
    logic clr_samp;     // S7  sampling counter <= 0
    logic inc_shift;    // S6  shifting counter += pitch
    logic inc_samp;     // S5  sampling counter += 1
    logic shift_count;  // S4  address multiplexer selects the shifting counter
    logic sram_rd;      // S3  SRAM drives the data bus
    logic sram_wr;      // S2  SRAM writes the data bus
    logic adc_read;     // S1  A/D drives the data bus
    logic adc_start;    // S0  start an A/D conversion, take the sample request
  } ctrl_t;

  // Condition select codes (instruction bits I14..I12).
  typedef enum logic [2:0] {
    C_SAMPLE_REQ = 3'd0,  // a sample period has started and is not yet served
    C_ADC_BUSY   = 3'd1,  // the A/D is converting
    C_FULL       = 3'd2,  // multiplexed address is at or past the buffer end
    C_SHIFT      = 3'd3,  // SHIFT? switch
    C_PASSORIG   = 3'd4,  // PASSORIG? switch
    C_ACC_CARRY  = 3'd5,  // carry out of the accumulator adder
    C_TEST       = 3'd6,  // MCU test mode switch
    C_TRUE       = 3'd7   // constant true: turns CJMP into JMP
  } status_e;

  // Instruction builders, used to write the microprogram readably.
  function automatic logic [UI_W-1:0] u_cjmp(status_e c, logic [UPC_W-1:0] a);
    return {1'b0, c, 4'b0000, a};
  endfunction

  function automatic logic [UI_W-1:0] u_jmp(logic [UPC_W-1:0] a);
    return {1'b0, C_TRUE, 4'b0000, a};
  endfunction

  function automatic logic [UI_W-1:0] u_assert(ctrl_t s);
    return {1'b1, s};
  endfunction

  // Size of one buffer for a setting of the size switches: (sel+1) * 128.
  function automatic logic [SAMP_W:0] buf_size(logic [SIZE_W-1:0] sel);
    return (SAMP_W+1)'({1'b0, sel} + 5'd1) << (SAMP_W - SIZE_W);
  endfunction

endpackage
