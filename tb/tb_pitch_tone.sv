// tb_pitch_tone: the pitch shifter with a triangle test tone.
//
// A triangle of 64 samples per period enters at 19.2 kHz (300 Hz) with the
// largest buffer (2048 samples). For pitch values 64, 128 and 32 the test
// counts the rising crossings of mid-scale in the shifted output over four
// chunks and expects the input's count scaled by pitch/64 (unchanged, an
// octave up, an octave down), within a few crossings lost or gained at the
// chunk boundaries. It also checks that the output stays 0 with SHIFT? and
// PASSORIG? both off, and that the original passes unchanged in frequency.
// Only the button hold and repeat times are shortened.
module tb_pitch_tone;
  import ps_pkg::*;

  localparam int unsigned PERIOD = 64;
  localparam int unsigned CHUNK  = 2048;

  logic clk = 1'b0;
  always #5 clk = !clk;

  logic       reset_n = 1'b0, pitch_up = 1'b0, pitch_down = 1'b0;
  logic       shift_en = 1'b1, pass_orig = 1'b0, fs_sel = 1'b1, test_mode = 1'b0;
  logic [3:0] size_sel = 4'd15;
  logic [7:0] adc_db, dac_db, pitch, dac_code;
  logic       adc_status, adc_cs_n, adc_ce_n, adc_rw, dac_cs_n, dac_ce_n;
  logic [14:0] lights;
  int unsigned conversions;
  real         vout;

  pitch_shifter #(.HOLD_CYCLES(1000), .REPEAT_CYCLES(200)) dut (
    .clk (clk), .reset_n (reset_n), .pitch_up (pitch_up), .pitch_down (pitch_down),
    .shift_en (shift_en), .pass_orig (pass_orig), .fs_sel (fs_sel), .buf_size_sel (size_sel),
    .test_mode (test_mode), .adc_db (adc_db), .adc_status (adc_status), .adc_cs_n (adc_cs_n),
    .adc_ce_n (adc_ce_n), .adc_rw (adc_rw), .dac_db (dac_db), .dac_cs_n (dac_cs_n),
    .dac_ce_n (dac_ce_n), .lights (lights), .pitch (pitch)
  );

  ad670_model #(.TRI_PERIOD(PERIOD)) u_adc (
    .clk (clk), .cs_n (adc_cs_n), .ce_n (adc_ce_n), .rw (adc_rw),
    .db (adc_db), .status (adc_status), .conversions (conversions));
  ad558_model u_dac (.cs_n (dac_cs_n), .ce_n (dac_ce_n), .db (dac_db), .code (dac_code), .vout (vout));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // count rising crossings of mid-scale over k output samples
  task automatic crossings(int k, output int n, output int nonzero);
    logic [7:0] prev;
    n = 0; nonzero = 0;
    @(posedge clk iff (!dac_cs_n && !dac_ce_n));
    prev = dac_db;
    for (int i = 1; i < k; i++) begin
      @(posedge clk iff (!dac_cs_n && !dac_ce_n));
      if (prev < 8'd128 && dac_db >= 8'd128) n++;
      if (dac_db != 0) nonzero++;
      prev = dac_db;
    end
  endtask

  task automatic set_pitch(int target);
    while (pitch != 8'(target)) begin
      @(posedge clk iff (!dac_cs_n && !dac_ce_n));
      repeat (20) @(posedge clk);
      if (pitch < 8'(target)) pitch_up = 1'b1; else pitch_down = 1'b1;
      repeat (4) @(posedge clk);
      pitch_up = 1'b0; pitch_down = 1'b0;
      repeat (10) @(posedge clk);
    end
  endtask

  // the chunk being played is always the previous one: flush two chunks
  task automatic measure(int p);
    int n, nz, expect_n, tol;
    set_pitch(p);
    crossings(2 * CHUNK, n, nz);
    crossings(4 * CHUNK, n, nz);
    expect_n = (4 * CHUNK / PERIOD) * p / 64;
    tol = 8;
    check(n >= expect_n - tol && n <= expect_n + tol,
          $sformatf("pitch %0d: %0d crossings in 4 chunks, expected about %0d", p, n, expect_n));
    $display("pitch %0d: %0d output crossings in %0d samples (input %0d)", p, n, 4 * CHUNK, 4 * CHUNK / PERIOD);
  endtask

  initial begin
    int n, nz;
    repeat (20) @(posedge clk);
    reset_n = 1'b1;
    measure(64);
    measure(128);
    measure(32);
    // original only: the input frequency, whatever the pitch
    @(posedge clk iff (!dac_cs_n && !dac_ce_n)); repeat (20) @(posedge clk);
    shift_en = 1'b0; pass_orig = 1'b1;
    crossings(CHUNK, n, nz);
    check(n >= CHUNK / PERIOD - 1 && n <= CHUNK / PERIOD + 1, $sformatf("original: %0d crossings", n));
    // both off: silence (mid-scale would need an offset; the design outputs code 0)
    @(posedge clk iff (!dac_cs_n && !dac_ce_n)); repeat (20) @(posedge clk);
    pass_orig = 1'b0;
    crossings(CHUNK / 4, n, nz);
    check(nz == 0, "output is 0 with both switches off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12_000_000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
