// tb_data_bus: each single driver reaches the bus; idle bus is 0.
module tb_data_bus;
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
  logic a_oe = 0, s_oe = 0, c_oe = 0;
  logic [7:0] a, s, c, bus;
  data_bus dut (.clk (clk), .adc_oe (a_oe), .adc_d (a), .sram_oe (s_oe), .sram_d (s), .acc_oe (c_oe), .acc_d (c), .bus (bus));
  initial begin
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      a = 8'($urandom); s = 8'($urandom); c = 8'($urandom);
      {a_oe, s_oe, c_oe} = 3'b000;
      case (i % 4)
        0: a_oe = 1;
        1: s_oe = 1;
        2: c_oe = 1;
        default: ;
      endcase
      #1 check(bus == (a_oe ? a : s_oe ? s : c_oe ? c : 8'h00), $sformatf("bus %h", bus));
    end
    finish();
  end
endmodule
