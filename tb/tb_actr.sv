// tb_actr: random enable, asynchronous reset between clock edges; checks the count clears at once and counts/loads 2 on edges.
module tb_actr;
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
  logic reset = 1'b0, enb = 1'b0;
  logic [3:0] count, exp;
  actr dut (.clk (clk), .reset (reset), .enb (enb), .count (count));
  initial begin
    #1 reset = 1'b1;
    #1 check(count == 0, "asynchronous reset before any edge");
    @(negedge clk); reset = 1'b0;
    exp = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      enb = ($urandom_range(0, 4) != 0);
      if ($urandom_range(0, 15) == 0) begin
        #1 reset = 1'b1;
        #1 check(count == 0, "count clears without a clock edge");
        exp = 0;
        @(posedge clk); #1 check(count == 0, "held at 0 during reset");
        #1 reset = 1'b0;
      end else begin
        @(posedge clk); #1;
        exp = enb ? exp + 4'd1 : 4'd2;
        check(count == exp, $sformatf("count %0d exp %0d", count, exp));
      end
    end
    finish();
  end
endmodule
