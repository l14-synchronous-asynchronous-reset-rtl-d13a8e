// tb_sctr: random reset and enable against a reference model; checks 0 on reset, +1 on enable, 2 otherwise.
module tb_sctr;
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
  logic reset = 1'b1, enb = 1'b0;
  logic [3:0] count, exp;
  sctr dut (.clk (clk), .reset (reset), .enb (enb), .count (count));
  initial begin
    @(posedge clk); #1;
    check(count == 0, "reset gives 0");
    exp = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      reset = ($urandom_range(0, 15) == 0);
      enb   = ($urandom_range(0, 4) != 0);
      @(posedge clk); #1;
      exp = reset ? 4'd0 : enb ? exp + 4'd1 : 4'd2;
      check(count == exp, $sformatf("count %0d exp %0d", count, exp));
    end
    // a reset pulse between edges must not act until the next edge
    @(negedge clk); reset = 1'b0; enb = 1'b1;
    @(posedge clk); #1 exp = count;
    #2 reset = 1'b1; #1 reset = 1'b0;
    #1 check(count == exp, "reset between edges is ignored");
    finish();
  end
endmodule
