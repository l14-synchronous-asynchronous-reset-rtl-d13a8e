// tb_mcu_assert_logic: ASSERT words raise exactly their S bits while enabled; jump words raise none.
module tb_mcu_assert_logic;
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
  logic [15:0] instr;
  logic en;
  ctrl_t ctrl;
  mcu_assert_logic dut (.instr (instr), .en (en), .ctrl (ctrl));
  initial begin
    for (int i = 0; i < 3000; i++) begin
      instr = 16'($urandom);
      en = ($urandom_range(0, 3) != 0);
      #1;
      check(15'(ctrl) == ((instr[15] && en) ? instr[14:0] : 15'h0),
            $sformatf("instr %h en %0d ctrl %h", instr, en, 15'(ctrl)));
    end
    instr = 16'h8000 | 16'(1 << 14); en = 1'b1; #1;
    check(ctrl.dac_load && 15'(ctrl) == 15'h4000, "S14 is the D/A load");
    instr = 16'h8001; #1;
    check(ctrl.adc_start && 15'(ctrl) == 15'h0001, "S0 is the A/D start");
    finish();
  end
endmodule
