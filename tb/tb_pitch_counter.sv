// tb_pitch_counter: up/down pulses against a model, reset to 64, saturation at 1 and 255.
module tb_pitch_counter;
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
  logic rst = 1'b1, up = 1'b0, down = 1'b0;
  logic [7:0] pitch;
  int exp;
  pitch_counter dut (.clk (clk), .rst (rst), .up (up), .down (down), .pitch (pitch));
  initial begin
    @(negedge clk); rst = 1'b0;
    check(pitch == 8'd64, "reset value 64");
    exp = 64;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // long runs in one direction reach both ends
      up   = ((i / 500) % 2 == 0) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 7) == 0);
      down = ((i / 500) % 2 == 1) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 7) == 0);
      @(posedge clk); #1;
      if (up && !down && exp < 255) exp++;
      else if (down && !up && exp > 1) exp--;
      check(pitch == 8'(exp), $sformatf("pitch %0d exp %0d", pitch, exp));
    end
    @(negedge clk); up = 0; down = 0; rst = 1'b1;
    @(negedge clk); check(pitch == 8'd64, "reset clears pitch shift");
    finish();
  end
endmodule
