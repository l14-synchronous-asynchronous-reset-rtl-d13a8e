// l14_top: the lecture's designs side by side.
//
// Holds the pitch shifting system (pitch_shifter, ports prefixed ps_) and the
// two counter examples: sctr, a 4-bit counter with synchronous reset and
// enable, and actr, the same counter with asynchronous reset. The three are
// independent; they share only the clock pin. See each module for its
// timing.
module l14_top
  import ps_pkg::*;
(
  input  logic               clk,
  // pitch shifting system
  input  logic               ps_reset_n,
  input  logic               ps_pitch_up,
  input  logic               ps_pitch_down,
  input  logic               ps_shift_en,
  input  logic               ps_pass_orig,
  input  logic               ps_fs_sel,
  input  logic [SIZE_W-1:0]  ps_buf_size_sel,
  input  logic               ps_test_mode,
  input  logic [DATA_W-1:0]  ps_adc_db,
  input  logic               ps_adc_status,
  output logic               ps_adc_cs_n,
  output logic               ps_adc_ce_n,
  output logic               ps_adc_rw,
  output logic [DATA_W-1:0]  ps_dac_db,
  output logic               ps_dac_cs_n,
  output logic               ps_dac_ce_n,
  output logic [NCTRL-1:0]   ps_lights,
  output logic [PITCH_W-1:0] ps_pitch,
  // synchronous-reset counter
  input  logic               sctr_reset,
  input  logic               sctr_enb,
  output logic [3:0]         sctr_count,
  // asynchronous-reset counter
  input  logic               actr_reset,
  input  logic               actr_enb,
  output logic [3:0]         actr_count
);

  pitch_shifter u_ps (
    .clk          (clk),
    .reset_n      (ps_reset_n),
    .pitch_up     (ps_pitch_up),
    .pitch_down   (ps_pitch_down),
    .shift_en     (ps_shift_en),
    .pass_orig    (ps_pass_orig),
    .fs_sel       (ps_fs_sel),
    .buf_size_sel (ps_buf_size_sel),
    .test_mode    (ps_test_mode),
    .adc_db       (ps_adc_db),
    .adc_status   (ps_adc_status),
    .adc_cs_n     (ps_adc_cs_n),
    .adc_ce_n     (ps_adc_ce_n),
    .adc_rw       (ps_adc_rw),
    .dac_db       (ps_dac_db),
    .dac_cs_n     (ps_dac_cs_n),
    .dac_ce_n     (ps_dac_ce_n),
    .lights       (ps_lights),
    .pitch        (ps_pitch)
  );

  sctr u_sctr (.clk (clk), .reset (sctr_reset), .enb (sctr_enb), .count (sctr_count));
  actr u_actr (.clk (clk), .reset (actr_reset), .enb (actr_enb), .count (actr_count));

endmodule
