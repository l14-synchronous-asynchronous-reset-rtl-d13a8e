// ad670_model: behavioural model of an AD670-style 8-bit A/D converter
// (not synthesizable logic: the real part is analog).
//
// A clock edge with cs_n, ce_n and rw low starts a conversion: status goes
// high for CONV_CYCLES clocks, then the next test value is held:
// adc_sample(n), or a triangle tone when TRI_PERIOD is set. While cs_n and
// ce_n are low with rw high, db shows the held value, otherwise 0.
// conversions counts the finished conversions.
module ad670_model
  import tb_ps_pkg::*;
#(
  parameter int unsigned CONV_CYCLES = 18,  // about 10 us at 1.8432 MHz
  parameter int unsigned TRI_PERIOD  = 0    // 0: scrambled test sequence, else triangle period in samples
) (
  input  logic       clk,
  input  logic       cs_n,
  input  logic       ce_n,
  input  logic       rw,
  output logic [7:0] db,
  output logic       status,
  output int unsigned conversions
);
  logic [7:0]  held = 8'h00;
  int unsigned left = 0;

  initial begin
    status      = 1'b0;
    conversions = 0;
  end

  always @(posedge clk) begin
    if (!cs_n && !ce_n && !rw) begin
      status <= 1'b1;
      left   <= CONV_CYCLES;
    end else if (status) begin
      if (left <= 1) begin
        status      <= 1'b0;
        held        <= (TRI_PERIOD == 0) ? adc_sample(conversions) : tri_sample(conversions, TRI_PERIOD);
        conversions <= conversions + 1;
      end
      left <= left - 1;
    end
  end

  assign db = (!cs_n && !ce_n && rw) ? held : 8'h00;
endmodule
