// tb_mcu_ucode_rom: key words of the microprogram against hand-assembled values, the instruction formats, every jump target and the lamp test region.
module tb_mcu_ucode_rom;
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
  logic [7:0]  addr;
  logic [15:0] data;
  mcu_ucode_rom dut (.addr (addr), .data (data));
  logic [15:0] rom [256];
  function automatic logic [15:0] rd(int a);
    return rom[a];
  endfunction
  initial begin
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a);
      #1 rom[a] = data;
    end
    // hand-assembled: 0 CCC 0000 AAAAAAAA / 1 SSS...
    check(rd(0) == 16'h8580, "0: clear counters and accumulator");
    check(rd(1)  == 16'h6028, "1: CJMP TEST, 40");
    check(rd(2)  == 16'h0004, "2: CJMP SAMPLE_REQ, 4");
    check(rd(3)  == 16'h7001, "3: JMP 1");
    check(rd(4)  == 16'h8401, "4: ASSERT adc_start acc_clr");
    check(rd(14) == 16'h100E, "14: CJMP ADC_BUSY, 14");
    check(rd(16) == 16'h8006, "16: ASSERT adc_read sram_wr");
    check(rd(22) == 16'hE000, "22: ASSERT acc_out dac_load");
    check(rd(24) == 16'h201B, "24: CJMP FULL, 27");
    check(rd(28) == 16'h201F, "28: CJMP FULL, 31");
    check(rd(31) == 16'h8380, "31: ASSERT swap clr_samp clr_shift");
    for (int k = 0; k < 15; k++) check(rd(40 + k) == (16'h8000 | 16'(1 << k)), $sformatf("lamp test word %0d", k));
    check(rd(55) == 16'h7001, "lamp test returns to WAIT");
    for (int a = 56; a < 256; a++) check(rd(a) == 16'h7000, $sformatf("unused word %0d is JMP 0", a));
    // every jump in the program lands on a used word
    for (int a = 0; a < 56; a++) begin
      logic [15:0] w;
      w = rd(a);
      if (!w[15]) check(w[7:0] <= 8'd55 && w[11:8] == 4'h0, $sformatf("word %0d jump target", a));
    end
    finish();
  end
endmodule
