// tb_shifting_counter: random steps, clear and increment against a modulo-2^17 model.
module tb_shifting_counter;
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
  logic [7:0] step = 0;
  logic [16:0] count;
  int unsigned exp;
  int wraps = 0;
  shifting_counter dut (.clk (clk), .clr (clr), .inc (inc), .step (step), .count (count));
  initial begin
    @(negedge clk); exp = 0;
    for (int i = 0; i < 5000; i++) begin
      clr  = ($urandom_range(0, 4000) == 0);
      inc  = ($urandom_range(0, 3) != 0);
      step = 8'($urandom);
      @(posedge clk); #1;
      if (clr) exp = 0;
      else if (inc) begin
        if (exp + step >= (1 << 17)) wraps++;
        exp = (exp + step) % (1 << 17);
      end
      check(count == 17'(exp), $sformatf("count %0d exp %0d", count, exp));
      check(count[16:6] == 11'(exp >> 6), "address part");
      @(negedge clk);
    end
    check(wraps > 0, "wrap seen");
    finish();
  end
endmodule
