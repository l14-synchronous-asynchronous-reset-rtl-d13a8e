// tb_mcu_sequencer: random clear/load/enable against a model of two cascaded 4-bit synchronous counters.
module tb_mcu_sequencer;
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
  logic en = 1'b0, clr = 1'b1, load = 1'b0;
  logic [7:0] d = '0, pc, exp;
  int n_carry = 0;
  mcu_sequencer dut (.clk (clk), .en (en), .clr (clr), .load (load), .d (d), .pc (pc));
  initial begin
    en = 1'b1;
    @(posedge clk); #1 check(pc == 0, "clear");
    exp = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en   = ($urandom_range(0, 5) != 0);
      clr  = ($urandom_range(0, 50) == 0);
      load = ($urandom_range(0, 20) == 0);
      d    = 8'($urandom);
      @(posedge clk); #1;
      if (en) begin
        if (clr) exp = 0;
        else if (load) exp = d;
        else begin
          if (exp[3:0] == 4'hF) n_carry++;
          exp = {exp[7:4] + (exp[3:0] == 4'hF ? 4'd1 : 4'd0), exp[3:0] + 4'd1};
        end
      end
      check(pc == exp, $sformatf("pc %h exp %h", pc, exp));
    end
    check(n_carry > 0, "carry between the two counters seen");
    finish();
  end
endmodule
