// tb_button_pulser: one pulse per short push; while held, a pulse at press, at HOLD and every REPEAT clocks after.
module tb_button_pulser;
  import ps_pkg::*;
  logic clk = 1'b0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    failures++;
    finish();
  end
  localparam int HOLD = 50, REP = 20;
  logic rst = 1'b1, btn = 1'b0, pulse;
  int pulses = 0, t = 0;
  int times [$];
  button_pulser #(.HOLD_CYCLES(HOLD), .REPEAT_CYCLES(REP)) dut (.clk (clk), .rst (rst), .btn (btn), .pulse (pulse));
  always @(posedge clk) begin
    t++;
    if (pulse) begin pulses++; times.push_back(t); end
  end
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // short pushes
    for (int k = 0; k < 5; k++) begin
      @(negedge clk) btn = 1'b1;
      repeat (10) @(negedge clk);
      btn = 1'b0;
      repeat (10) @(negedge clk);
    end
    check(pulses == 5, $sformatf("5 short pushes gave %0d pulses", pulses));
    // long hold: press, then HOLD, then every REP
    times.delete();
    pulses = 0;
    @(negedge clk) btn = 1'b1;
    repeat (HOLD + 3 * REP + 5) @(negedge clk);
    btn = 1'b0;
    repeat (5) @(negedge clk);
    check(pulses == 5, $sformatf("long hold gave %0d pulses, expected 5", pulses));
    if (times.size() == 5) begin
      check(times[1] - times[0] == HOLD, $sformatf("first repeat after %0d clocks", times[1] - times[0]));
      for (int i = 2; i < 5; i++)
        check(times[i] - times[i-1] == REP, $sformatf("repeat period %0d", times[i] - times[i-1]));
    end
    finish();
  end
endmodule
