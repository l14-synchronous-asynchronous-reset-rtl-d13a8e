// tb_synchronizer: random inputs; q must equal d delayed by exactly two clocks.
module tb_synchronizer;
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
  logic [8:0] d = '0, q;
  logic [8:0] hist [3];
  synchronizer #(.WIDTH(9)) dut (.clk (clk), .d (d), .q (q));
  initial begin
    repeat (3) begin @(negedge clk); d = 9'($urandom); end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = d;
      if (i >= 2) check(q == hist[1], $sformatf("q %h exp %h", q, hist[1]));
      d = 9'($urandom);
    end
    finish();
  end
endmodule
