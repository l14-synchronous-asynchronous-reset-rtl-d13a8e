// tb_full_detector: exhaustive over address and size select against (sel+1)*128-1.
module tb_full_detector;
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
    repeat (10000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    failures++;
    finish();
  end
  logic [10:0] addr;
  logic [3:0] sel;
  logic full;
  full_detector dut (.addr (addr), .size_sel (sel), .full (full));
  initial begin
    for (int s = 0; s < 16; s++)
      for (int a = 0; a < 2048; a++) begin
        sel = 4'(s); addr = 11'(a);
        #1 check(full == (a >= (s + 1) * 128 - 1), $sformatf("addr %0d sel %0d full %0d", a, s, full));
      end
    finish();
  end
endmodule
