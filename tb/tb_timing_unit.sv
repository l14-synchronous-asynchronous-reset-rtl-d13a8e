// tb_timing_unit: default clock: sample request every 96/192 clocks, held until acknowledged; MCU enable every clock, or once per 122880 clocks in test mode.
module tb_timing_unit;
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
    repeat (1000000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    failures++;
    finish();
  end
  logic rst = 1'b1, fs_sel = 1'b1, test_mode = 1'b0, ack = 1'b0, req, mcu_en;
  timing_unit dut (.clk (clk), .rst (rst), .fs_sel (fs_sel), .test_mode (test_mode),
                   .sample_ack (ack), .sample_req (req), .mcu_en (mcu_en));
  task automatic measure(int expected);
    int t0, t;
    // acknowledge each request at once and time the next
    @(negedge clk iff req); ack = 1'b1; @(negedge clk); ack = 1'b0;
    for (int k = 0; k < 5; k++) begin
      t = 0;
      while (!req) begin @(negedge clk); t++; end
      check(t + 1 == expected, $sformatf("sample period %0d, expected %0d", t + 1, expected));
      ack = 1'b1; @(negedge clk); ack = 1'b0;
    end
  endtask
  initial begin
    int en_count;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    measure(96);
    fs_sel = 1'b0;
    @(negedge clk iff req); ack = 1'b1; @(negedge clk); ack = 1'b0;  // let the divider reload
    measure(192);
    // request is held while not acknowledged
    @(negedge clk iff req);
    repeat (500) @(negedge clk);
    check(req, "request held until acknowledged");
    en_count = 0;
    repeat (100) begin @(negedge clk); en_count += mcu_en; end
    check(en_count == 100, "MCU enabled every clock in normal mode");
    test_mode = 1'b1;
    en_count = 0;
    repeat (3 * 122880) begin @(negedge clk); en_count += mcu_en; end
    check(en_count == 3, $sformatf("test mode: %0d MCU clocks in 3/15 s, expected 3", en_count));
    finish();
  end
endmodule
