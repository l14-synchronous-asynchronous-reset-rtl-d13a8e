// tb_mcu_cond_select: exhaustive over status, select and strobe.
module tb_mcu_cond_select;
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
    repeat (1000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    failures++;
    finish();
  end
  logic [6:0] status;
  logic [2:0] sel;
  logic strobe_n, cond;
  mcu_cond_select dut (.status (status), .sel (sel), .strobe_n (strobe_n), .cond (cond));
  initial begin
    bit exp;
    for (int s = 0; s < 128; s++)
      for (int c = 0; c < 8; c++)
        for (int g = 0; g < 2; g++) begin
          status = 7'(s); sel = 3'(c); strobe_n = g[0];
          #1;
          exp = (g == 0) && (c == 7 || ((s >> c) & 1) == 1);
          check(cond == exp, $sformatf("status %h sel %0d strobe_n %0d -> %0d", s, c, g, cond));
        end
    finish();
  end
endmodule
