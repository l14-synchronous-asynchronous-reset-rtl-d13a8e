// tb_pitch_shifter: end-to-end test of the pitch shifting system.
//
// The design runs with an A/D model feeding a scrambled test sequence and a
// scoreboard that replays the two-buffer algorithm and checks every D/A
// sample. The master clock and sample rates are the defaults; only the
// pushbutton hold/repeat times and the test-mode MCU rate are shortened.
// Covered: unity, raised and lowered pitch (chunk repeat and chunk tail
// drop), the four output modes, both sample rates (clocks per sample
// checked), three buffer sizes, auto-repeat and saturation of the pitch
// buttons, /RESET clearing the pitch, and the MCU test mode walking light.
module tb_pitch_shifter;
  import ps_pkg::*;

  localparam int unsigned CLK_HZ = 1843200;
  localparam int unsigned HOLD   = 300;
  localparam int unsigned REP    = 60;
  localparam int unsigned TESTHZ = CLK_HZ / 40;

  logic clk = 1'b0;
  always #5 clk = !clk;

  logic       reset_n = 1'b0, pitch_up = 1'b0, pitch_down = 1'b0;
  logic       shift_en = 1'b1, pass_orig = 1'b0, fs_sel = 1'b1, test_mode = 1'b0;
  logic [3:0] size_sel = 4'd0;
  logic [7:0] adc_db, dac_db, pitch, dac_code;
  logic       adc_status, adc_cs_n, adc_ce_n, adc_rw, dac_cs_n, dac_ce_n;
  logic [14:0] lights;
  int unsigned conversions;
  real         vout;
  logic        sb_rst = 1'b1, check_en = 1'b1;

  pitch_shifter #(.HOLD_CYCLES(HOLD), .REPEAT_CYCLES(REP), .TEST_HZ(TESTHZ)) dut (
    .clk (clk), .reset_n (reset_n), .pitch_up (pitch_up), .pitch_down (pitch_down),
    .shift_en (shift_en), .pass_orig (pass_orig), .fs_sel (fs_sel), .buf_size_sel (size_sel),
    .test_mode (test_mode), .adc_db (adc_db), .adc_status (adc_status), .adc_cs_n (adc_cs_n),
    .adc_ce_n (adc_ce_n), .adc_rw (adc_rw), .dac_db (dac_db), .dac_cs_n (dac_cs_n),
    .dac_ce_n (dac_ce_n), .lights (lights), .pitch (pitch)
  );

  ad670_model u_adc (.clk (clk), .cs_n (adc_cs_n), .ce_n (adc_ce_n), .rw (adc_rw),
                     .db (adc_db), .status (adc_status), .conversions (conversions));
  ad558_model u_dac (.cs_n (dac_cs_n), .ce_n (dac_ce_n), .db (dac_db), .code (dac_code), .vout (vout));

  ps_scoreboard sb (.clk (clk), .rst (sb_rst), .dac_cs_n (dac_cs_n), .dac_ce_n (dac_ce_n),
                    .dac_db (dac_db), .pitch (pitch), .shift_en (shift_en), .pass_orig (pass_orig),
                    .size_sel (size_sel), .check_en (check_en), .adc_conversions (conversions));

  int checks = 0, failures = 0;
  int n_rate = 0, n_autorep = 0, n_sat = 0, n_test = 0, n_resetclr = 0, n_sizes = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Wait for a D/A strobe, then until the microprogram is back in its wait loop.
  task automatic safe_point();
    @(posedge clk iff (!dac_cs_n && !dac_ce_n));
    repeat (20) @(posedge clk);
  endtask

  task automatic wait_samples(int k);
    int target;
    target = sb.n_out + k;
    while (sb.n_out < target) @(posedge clk);
  endtask

  task automatic press(ref logic btn, input int times);
    for (int i = 0; i < times; i++) begin
      safe_point();
      btn = 1'b1;
      repeat (4) @(posedge clk);
      btn = 1'b0;
      repeat (4) @(posedge clk);
    end
  endtask

  // Clocks per sample over k samples: the program's start point may move by a
  // loop length (3 clocks) at either end.
  task automatic check_rate(int div, int k);
    int c0, d;
    safe_point();
    @(posedge clk iff (!dac_cs_n && !dac_ce_n));
    c0 = sb.cyc;
    for (int i = 0; i < k; i++) @(posedge clk iff (!dac_cs_n && !dac_ce_n));
    d = sb.cyc - c0 - k * div;
    check(d >= -3 && d <= 3, $sformatf("rate: %0d clocks for %0d samples, expected %0d", sb.cyc - c0, k, k * div));
    n_rate++;
  endtask

  task automatic do_reset();
    sb_rst   = 1'b1;
    reset_n  = 1'b0;
    repeat (20) @(posedge clk);
    reset_n  = 1'b1;
    repeat (2) @(posedge clk);
    sb_rst   = 1'b0;
  endtask

  initial begin
    logic [7:0] p0;
    int swaps0, wraps0, drops0, len;
    logic [14:0] seen [$];

    do_reset();
    repeat (10) @(posedge clk);
    check(pitch == 8'd64, "pitch after reset is 64");

    // unity pitch, shifted output only, 128-sample chunks, 19.2 kHz
    wait_samples(3 * 128);
    check(sb.n_swap >= 2, "buffers swapped at unity pitch");
    check_rate(96, 50);

    // raise the pitch: the read reaches the chunk end early and repeats
    press(pitch_up, 16);
    repeat (20) @(posedge clk);
    check(pitch == 8'd80, $sformatf("pitch after 16 up presses: %0d", pitch));
    wraps0 = sb.n_wrap;
    wait_samples(3 * 128);
    check(sb.n_wrap > wraps0, "read wrapped to chunk start at raised pitch");

    // lower the pitch: the chunk tail is never read
    press(pitch_down, 32);
    repeat (20) @(posedge clk);
    check(pitch == 8'd48, $sformatf("pitch after 32 down presses: %0d", pitch));
    drops0 = sb.n_drop;
    wait_samples(3 * 128);
    check(sb.n_drop > drops0, "chunk tail dropped at lowered pitch");

    // output modes
    safe_point(); pass_orig = 1'b1;                 wait_samples(100);
    safe_point(); shift_en  = 1'b0;                 wait_samples(100);
    safe_point(); pass_orig = 1'b0;                 wait_samples(100);
    safe_point(); shift_en  = 1'b1;                 wait_samples(50);
    for (int m = 0; m < 4; m++) check(sb.n_mode[m] > 0, $sformatf("output mode %0d used", m));

    // 9.6 kHz
    safe_point(); fs_sel = 1'b0;
    wait_samples(4);
    check_rate(192, 50);
    safe_point(); fs_sel = 1'b1;

    // other buffer sizes
    swaps0 = sb.n_swap;
    safe_point(); size_sel = 4'd3;
    wait_samples(3 * 512);
    check(sb.n_swap >= swaps0 + 2, "512-sample chunks");
    n_sizes++;
    swaps0 = sb.n_swap;
    safe_point(); size_sel = 4'd15;
    wait_samples(2 * 2048 + 10);
    check(sb.n_swap >= swaps0 + 2, "2048-sample chunks");
    n_sizes++;
    safe_point(); size_sel = 4'd1;

    // auto-repeat: a long hold gives one pulse, then one per repeat period
    p0 = pitch;
    safe_point();
    pitch_up = 1'b1;
    repeat (HOLD + 4 * REP + 10) @(posedge clk);
    pitch_up = 1'b0;
    repeat (10) @(posedge clk);
    check(pitch == p0 + 8'd6, $sformatf("auto-repeat: pitch %0d -> %0d, expected +6", p0, pitch));
    n_autorep++;
    wait_samples(300);

    // saturation at the top and bottom
    safe_point(); pitch_up = 1'b1;
    repeat (HOLD + 260 * REP) @(posedge clk);
    pitch_up = 1'b0;
    repeat (10) @(posedge clk);
    check(pitch == 8'd255, $sformatf("pitch saturates at 255: %0d", pitch));
    wait_samples(300);
    safe_point(); pitch_down = 1'b1;
    repeat (HOLD + 260 * REP) @(posedge clk);
    pitch_down = 1'b0;
    repeat (10) @(posedge clk);
    check(pitch == 8'd1, $sformatf("pitch saturates at 1: %0d", pitch));
    n_sat++;
    wait_samples(300);

    // /RESET clears the pitch shift
    do_reset();
    repeat (5) @(posedge clk);
    check(pitch == 8'd64, "reset clears pitch to 64");
    n_resetclr++;
    wait_samples(260);

    // MCU test mode: slow clock, walking light over the assert lines
    sb_rst = 1'b1;
    test_mode = 1'b1;
    len = 0;
    repeat (40 * 60) begin
      @(posedge clk);
      if (lights != 0 && (seen.size() == 0 || seen[$] != lights)) seen.push_back(lights);
    end
    test_mode = 1'b0;
    for (int i = 0; i + 14 < seen.size(); i++) begin
      bit walk;
      walk = 1'b1;
      for (int k = 0; k < 15; k++) if (seen[i + k] != 15'(1 << k)) walk = 1'b0;
      if (walk) n_test++;
    end
    if (n_test == 0) foreach (seen[i]) $display("lights %0d: %h", i, seen[i]);
    check(n_test > 0, "test mode shows a walking light");
    do_reset();
    wait_samples(200);

    check(sb.n_swap > 0 && sb.n_wrap > 0 && sb.n_drop > 0, "buffer swap, repeat and drop all seen");
    check(sb.checks > 5000, $sformatf("scoreboard compared %0d samples", sb.checks));
    check(conversions > 0, "A/D converted");
    $display("mechanisms: swaps=%0d wraps=%0d drops=%0d modes=%0d/%0d/%0d/%0d rate=%0d sizes=%0d autorepeat=%0d saturate=%0d reset=%0d test=%0d skipped=%0d",
             sb.n_swap, sb.n_wrap, sb.n_drop, sb.n_mode[0], sb.n_mode[1], sb.n_mode[2], sb.n_mode[3],
             n_rate, n_sizes, n_autorep, n_sat, n_resetclr, n_test, sb.skipped);
    checks   += sb.checks;
    failures += sb.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks + sb.checks, failures + sb.failures + 1);
    $finish;
  end
endmodule
