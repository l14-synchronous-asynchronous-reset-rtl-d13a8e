// timing_unit: sampling clock, MCU clock and MCU test clock.
//
// The design runs from one master clock of CLK_HZ. A divider raises a sample
// request every CLK_HZ/FS_HI_HZ clocks when fs_sel is 1, or every
// CLK_HZ/FS_LO_HZ clocks when it is 0 (19.2 and 9.6 kHz at the default
// 1.8432 MHz). The request stays up until the MCU acknowledges it, so a
// sample period is never lost while the MCU is busy. mcu_en is the MCU clock
// enable: high every clock in normal operation, and high for one clock at
// TEST_HZ (10-20 Hz in the lab, 15 Hz here) in test mode, so the MCU's
// lights can be followed by eye. The rates follow the lab; the master clock,
// the request flag and the use of clock enables instead of derived clocks
// are this design's choices.
module timing_unit #(
  parameter int unsigned CLK_HZ   = 1843200,
  parameter int unsigned FS_LO_HZ = 9600,
  parameter int unsigned FS_HI_HZ = 19200,
  parameter int unsigned TEST_HZ  = 15
) (
  input  logic clk,
  input  logic rst,         // synchronous, active high
  input  logic fs_sel,      // 0: FS_LO_HZ, 1: FS_HI_HZ
  input  logic test_mode,   // slow MCU clock
  input  logic sample_ack,  // MCU takes the pending request
  output logic sample_req,
  output logic mcu_en
);

  localparam int unsigned DIV_LO   = CLK_HZ / FS_LO_HZ;
  localparam int unsigned DIV_HI   = CLK_HZ / FS_HI_HZ;
  localparam int unsigned DIV_TEST = CLK_HZ / TEST_HZ;
  localparam int unsigned SW       = $clog2(DIV_LO > DIV_HI ? DIV_LO : DIV_HI);
  localparam int unsigned TW       = $clog2(DIV_TEST);

  logic [SW-1:0] samp_div;
  logic [TW-1:0] test_div;
  logic          tick;

  assign tick = (samp_div == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      samp_div   <= SW'(DIV_LO - 1);
      test_div   <= '0;
      sample_req <= 1'b0;
    end else begin
      samp_div <= tick ? SW'((fs_sel ? DIV_HI : DIV_LO) - 1) : samp_div - 1'b1;
      test_div <= (test_div == TW'(DIV_TEST - 1)) ? '0 : test_div + 1'b1;
      if (tick)            sample_req <= 1'b1;
      else if (sample_ack) sample_req <= 1'b0;
    end
  end

  assign mcu_en = !test_mode || (test_div == TW'(DIV_TEST - 1));

endmodule
