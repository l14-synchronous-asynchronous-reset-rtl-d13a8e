// tb_sampling_counter: random clear/increment against a model, including the 2047 -> 0 wrap.
module tb_sampling_counter;
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
  logic clr = 1'b1, inc = 1'b0;
  logic [10:0] count, exp;
  int wraps = 0;
  sampling_counter dut (.clk (clk), .clr (clr), .inc (inc), .count (count));
  initial begin
    @(negedge clk); exp = 0;
    for (int i = 0; i < 6000; i++) begin
      clr = ($urandom_range(0, 3000) == 0);
      inc = ($urandom_range(0, 5) != 0);
      @(posedge clk); #1;
      if (clr) exp = 0; else if (inc) begin if (exp == 11'h7FF) wraps++; exp = exp + 1; end
      check(count == exp, $sformatf("count %0d exp %0d", count, exp));
      @(negedge clk);
    end
    check(wraps > 0, "wrap seen");
    finish();
  end
endmodule
