// tb_mcu: runs the control unit against a scripted status environment and compares the control words of whole sample periods with hand-derived lists, for each output mode, a busy A/D, and full buffers; also the clock enable.
module tb_mcu;
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
  logic rst = 1'b1, en = 1'b1;
  logic [6:0] status;
  ctrl_t ctrl;
  logic [14:0] lights;
  logic [7:0] pc;
  logic req = 1'b0, shift = 1'b0, pass = 1'b0, full = 1'b0, test = 1'b0;
  int busy_left = 0;
  logic [14:0] seq [$];
  mcu dut (.clk (clk), .rst (rst), .en (en), .status (status), .ctrl (ctrl), .lights (lights), .pc (pc));

  assign status = {test, 1'b0, pass, shift, full, busy_left > 0, req};

  always @(posedge clk) begin
    if (ctrl.adc_start) begin busy_left <= 12; req <= 1'b0; end
    else if (busy_left > 0) busy_left <= busy_left - 1;
    if (ctrl != '0) seq.push_back(15'(ctrl));
  end

  // collect the control words of one sample period (adc_start .. next WAIT)
  task automatic one_sample(logic s, logic p, logic f, input logic [14:0] exp [$], string name);
    shift = s; pass = p; full = f;
    @(negedge clk);
    seq.delete();
    req = 1'b1;
    repeat (60) @(negedge clk);
    check(seq.size() == exp.size(), $sformatf("%s: %0d control words, expected %0d", name, seq.size(), exp.size()));
    foreach (exp[i]) if (i < seq.size())
      check(seq[i] == exp[i], $sformatf("%s word %0d: %h expected %h", name, i, seq[i], exp[i]));
  endtask

  initial begin
    int adc_start_t, adc_read_t, t;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(posedge clk); #1;
    check(pc == 8'd1, "after reset the program leaves word 0");
    repeat (10) @(negedge clk);
    // shift only: start, read shifted, A/D read+write, out, present shift, inc shift, inc samp
    one_sample(1, 0, 0, '{15'h0401, 15'h0818, 15'h0006, 15'h6000, 15'h0010, 15'h0040, 15'h0020}, "shift");
    // original only
    one_sample(0, 1, 0, '{15'h0401, 15'h0806, 15'h6000, 15'h0010, 15'h0040, 15'h0020}, "orig");
    // mix: both halved
    one_sample(1, 1, 0, '{15'h0401, 15'h1818, 15'h1806, 15'h6000, 15'h0010, 15'h0040, 15'h0020}, "mix");
    // neither: still stores the sample, outputs 0
    one_sample(0, 0, 0, '{15'h0401, 15'h0006, 15'h6000, 15'h0010, 15'h0040, 15'h0020}, "none");
    // full: shift restarts, buffers swap
    one_sample(1, 0, 1, '{15'h0401, 15'h0818, 15'h0006, 15'h6000, 15'h0010, 15'h0100, 15'h0380}, "full");
    // the A/D is read only after busy has fallen
    shift = 0; pass = 0; full = 0;
    @(negedge clk); req = 1'b1;
    t = 0; adc_start_t = -1; adc_read_t = -1;
    repeat (60) begin
      @(negedge clk); t++;
      if (ctrl.adc_start) adc_start_t = t;
      if (ctrl.adc_read && adc_read_t < 0) adc_read_t = t;
    end
    check(adc_start_t >= 0 && adc_read_t - adc_start_t > 12, $sformatf("A/D read %0d clocks after start", adc_read_t - adc_start_t));
    // nothing happens without a sample request
    seq.delete();
    repeat (100) @(negedge clk);
    check(seq.size() == 0, "idle without a sample request");
    // clock enable low freezes the program
    req = 1'b1; en = 1'b0;
    repeat (20) @(negedge clk);
    check(seq.size() == 0 && ctrl == '0, "no control words while the MCU clock is stopped");
    en = 1'b1;
    repeat (40) @(negedge clk);
    check(seq.size() > 0, "runs when enabled again");
    // test mode walking light on the lights output
    test = 1'b1;
    seq.delete();
    repeat (40) @(negedge clk);
    check(seq.size() >= 15, "test mode asserts");
    for (int k = 0; k < 15 && k < seq.size(); k++) check(seq[k] == 15'(1 << k), $sformatf("lamp %0d", k));
    finish();
  end
endmodule
