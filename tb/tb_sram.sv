// tb_sram: random writes and reads against a model array; output enable and chip select gating.
module tb_sram;
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
    repeat (50000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    failures++;
    finish();
  end
  logic cs_n = 1'b1, we_n = 1'b1, oe_n = 1'b1;
  logic [11:0] addr = 0;
  logic [7:0] din = 0, dout;
  logic [7:0] model [4096];
  bit written [4096];
  sram dut (.clk (clk), .cs_n (cs_n), .we_n (we_n), .oe_n (oe_n), .addr (addr), .din (din), .dout (dout));
  initial begin
    for (int i = 0; i < 8000; i++) begin
      @(negedge clk);
      addr = 12'($urandom_range(0, 4095));
      din  = 8'($urandom);
      cs_n = ($urandom_range(0, 9) == 0);
      if ($urandom_range(0, 1)) begin
        we_n = 1'b0; oe_n = 1'b1;
        @(posedge clk);
        if (!cs_n) begin model[addr] = din; written[addr] = 1; end
      end else begin
        we_n = 1'b1; oe_n = ($urandom_range(0, 9) == 0);
        #1;
        if (!cs_n && !oe_n && written[addr]) check(dout == model[addr], $sformatf("read %h: %h exp %h", addr, dout, model[addr]));
        else if (cs_n || oe_n) check(dout == 8'h00, "output off");
      end
    end
    finish();
  end
endmodule
