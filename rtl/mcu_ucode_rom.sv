// mcu_ucode_rom: microprogram store of the control unit.
//
// 256 words of 16 bits, read combinationally like the lab's pair of 8-bit
// flash PROMs (one holds I15..I8, the other I7..I0). Unused words hold
// "JMP 0". The program is this design's own (the lab supplies only a test
// program, not reproduced here). Once per sample period it does:
//
//   WAIT    loop until the timing unit's sample request (or enter test mode)
//   GO      start the A/D conversion and clear the accumulator; while the A/D
//           converts, read the pitch-shifted sample from the read buffer at
//           the shifting counter's address into the accumulator if SHIFT? is
//           on (halved when PASSORIG? is on too, for mixing)
//   BUSY    wait for the A/D; then put its result on the bus, write it into
//           the write buffer at the sampling counter's address, and add it
//           to the accumulator if PASSORIG? is on (halved when mixing)
//   OUT     drive the accumulator to the D/A
//   then    if the read address is at the buffer end, restart the shifting
//           counter at 0 (repeat the chunk start), else add the pitch step;
//           if the write address is at the buffer end, swap the buffers and
//           clear both counters, else step the sampling counter.
//
// Status lines are registered before the condition select, so a CJMP sees
// the status of the previous instruction; the program inserts an idle word
// or a ShiftCount word where a status must settle first. In test mode the
// program shows a walking light over the fifteen control lines.
module mcu_ucode_rom
  import ps_pkg::*;
(
  input  logic [UPC_W-1:0] addr,
  output logic [UI_W-1:0]  data
);

  // Labels
  localparam logic [UPC_W-1:0] L_WAIT   = 8'd1;
  localparam logic [UPC_W-1:0] L_GO     = 8'd4;
  localparam logic [UPC_W-1:0] L_SHFULL = 8'd8;
  localparam logic [UPC_W-1:0] L_MIX    = 8'd10;
  localparam logic [UPC_W-1:0] L_SHHALF = 8'd12;
  localparam logic [UPC_W-1:0] L_CONV   = 8'd13;
  localparam logic [UPC_W-1:0] L_BUSY   = 8'd14;
  localparam logic [UPC_W-1:0] L_P1     = 8'd18;
  localparam logic [UPC_W-1:0] L_P2     = 8'd21;
  localparam logic [UPC_W-1:0] L_OUT    = 8'd22;
  localparam logic [UPC_W-1:0] L_SHWRAP = 8'd27;
  localparam logic [UPC_W-1:0] L_SAMPCK = 8'd28;
  localparam logic [UPC_W-1:0] L_SWAP   = 8'd31;
  localparam logic [UPC_W-1:0] L_TEST   = 8'd40;

  ctrl_t none;
  assign none = '0;

  always_comb begin
    data = u_jmp('0);
    unique case (addr)
      8'd0:  data = u_assert('{clr_samp: 1'b1, clr_shift: 1'b1, acc_clr: 1'b1, default: 1'b0});
      8'd1:  data = u_cjmp(C_TEST, L_TEST);
      8'd2:  data = u_cjmp(C_SAMPLE_REQ, L_GO);
      8'd3:  data = u_jmp(L_WAIT);
      // GO: start conversion; meanwhile fetch the shifted sample
      8'd4:  data = u_assert('{adc_start: 1'b1, acc_clr: 1'b1, default: 1'b0});
      8'd5:  data = u_cjmp(C_PASSORIG, L_MIX);
      8'd6:  data = u_cjmp(C_SHIFT, L_SHFULL);
      8'd7:  data = u_jmp(L_CONV);
      8'd8:  data = u_assert('{shift_count: 1'b1, sram_rd: 1'b1, acc_add: 1'b1, default: 1'b0});
      8'd9:  data = u_jmp(L_CONV);
      8'd10: data = u_cjmp(C_SHIFT, L_SHHALF);
      8'd11: data = u_jmp(L_CONV);
      8'd12: data = u_assert('{shift_count: 1'b1, sram_rd: 1'b1, acc_add: 1'b1, acc_half: 1'b1, default: 1'b0});
      // CONV: let the A/D busy line reach the status register, then wait
      8'd13: data = u_assert(none);
      8'd14: data = u_cjmp(C_ADC_BUSY, L_BUSY);
      8'd15: data = u_cjmp(C_PASSORIG, L_P1);
      8'd16: data = u_assert('{adc_read: 1'b1, sram_wr: 1'b1, default: 1'b0});
      8'd17: data = u_jmp(L_OUT);
      8'd18: data = u_cjmp(C_SHIFT, L_P2);
      8'd19: data = u_assert('{adc_read: 1'b1, sram_wr: 1'b1, acc_add: 1'b1, default: 1'b0});
      8'd20: data = u_jmp(L_OUT);
      8'd21: data = u_assert('{adc_read: 1'b1, sram_wr: 1'b1, acc_add: 1'b1, acc_half: 1'b1, default: 1'b0});
      // OUT: result to the D/A, then advance the address counters
      8'd22: data = u_assert('{acc_out: 1'b1, dac_load: 1'b1, default: 1'b0});
      8'd23: data = u_assert('{shift_count: 1'b1, default: 1'b0});
      8'd24: data = u_cjmp(C_FULL, L_SHWRAP);
      8'd25: data = u_assert('{inc_shift: 1'b1, default: 1'b0});
      8'd26: data = u_jmp(L_SAMPCK);
      8'd27: data = u_assert('{clr_shift: 1'b1, default: 1'b0});
      8'd28: data = u_cjmp(C_FULL, L_SWAP);
      8'd29: data = u_assert('{inc_samp: 1'b1, default: 1'b0});
      8'd30: data = u_jmp(L_WAIT);
      8'd31: data = u_assert('{swap_buff: 1'b1, clr_samp: 1'b1, clr_shift: 1'b1, default: 1'b0});
      8'd32: data = u_jmp(L_WAIT);
      default: begin
        // Test mode: words L_TEST .. L_TEST+14 each raise one control line.
        if (addr >= L_TEST && addr < L_TEST + UPC_W'(NCTRL))
          data = u_assert(ctrl_t'(NCTRL'(1) << (addr - L_TEST)));
        else if (addr == L_TEST + UPC_W'(NCTRL))
          data = u_jmp(L_WAIT);
        else
          data = u_jmp('0);
      end
    endcase
  end

endmodule
