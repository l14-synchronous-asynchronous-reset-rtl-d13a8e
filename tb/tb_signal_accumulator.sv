// tb_signal_accumulator: clear, add and half-add sequences against a model, including carry out.
module tb_signal_accumulator;
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
  logic clr = 1'b1, add = 1'b0, half = 1'b0, carry;
  logic [7:0] bus = 0, acc;
  int exp, n_carry = 0;
  signal_accumulator dut (.clk (clk), .clr (clr), .add (add), .half (half), .bus_in (bus), .acc (acc), .carry (carry));
  initial begin
    @(negedge clk); exp = 0;
    for (int i = 0; i < 4000; i++) begin
      clr = ($urandom_range(0, 3) == 0);
      add = 1'($urandom);
      half = 1'($urandom);
      bus = 8'($urandom);
      #1;
      begin
        int op;
        op = half ? (bus >> 1) : bus;
        check(carry == ((exp + op) > 255), "carry");
        if (carry) n_carry++;
        @(posedge clk); #1;
        if (clr) exp = 0; else if (add) exp = (exp + op) & 255;
      end
      check(acc == 8'(exp), $sformatf("acc %0d exp %0d", acc, exp));
      @(negedge clk);
    end
    // the mix sequence: clear, add half of each
    clr = 1; add = 0; @(negedge clk);
    clr = 0; add = 1; half = 1; bus = 8'd201; @(negedge clk);
    bus = 8'd99; @(negedge clk);
    add = 0; #1 check(acc == 8'(201 / 2 + 99 / 2), "mix of two samples");
    check(n_carry > 0, "carry seen");
    finish();
  end
endmodule
