// tb_buffer_select: toggle on SwapBuff; address MSB is the flip-flop XOR ShiftCount.
module tb_buffer_select;
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
    repeat (5000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    failures++;
    finish();
  end
  logic rst = 1'b1, swap = 1'b0, sc = 1'b0, q, msb;
  logic exp;
  buffer_select dut (.clk (clk), .rst (rst), .swap (swap), .shift_count (sc), .buf_q (q), .addr_msb (msb));
  initial begin
    @(negedge clk); rst = 1'b0; exp = 0;
    check(q == 0, "reset to buffer 0");
    for (int i = 0; i < 1000; i++) begin
      swap = ($urandom_range(0, 3) == 0);
      sc = 1'($urandom);
      #1 check(msb == (exp ^ sc), "address MSB");
      @(posedge clk); #1;
      if (swap) exp = !exp;
      check(q == exp, "toggle");
      @(negedge clk);
    end
    finish();
  end
endmodule
