// tb_storage_unit: fills a 128-sample chunk through the sampling counter,
// swaps the buffers, and reads it back through the shifting counter at
// several pitch steps, checking read data (location floor(phase/64) of the
// other buffer), the full flag for both counters, and the pitch buttons.
module tb_storage_unit;
  import ps_pkg::*;
  logic clk = 1'b0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  logic rst = 1'b1, up = 1'b0, down = 1'b0, full;
  ctrl_t ctrl = '0;
  logic [3:0] size_sel = 4'd0;
  logic [7:0] bus = 0, dout, pitch;
  logic [10:0] samp_addr;
  logic [16:0] phase;
  logic buf_q;
  logic [7:0] chunk [2][128];

  storage_unit dut (.clk (clk), .rst (rst), .ctrl (ctrl), .pitch_up (up), .pitch_down (down),
                    .size_sel (size_sel), .bus_in (bus), .sram_dout (dout), .full (full), .pitch (pitch),
                    .samp_addr (samp_addr), .shift_phase (phase), .buf_q (buf_q));

  task automatic pulse(ctrl_t c);
    @(negedge clk); ctrl = c; @(negedge clk); ctrl = '0;
  endtask

  // write one chunk into the write buffer, ending with a swap
  task automatic fill(int b);
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      bus = 8'($urandom); chunk[b][i] = bus;
      ctrl = '{sram_wr: 1'b1, default: 1'b0};
      #1 check(full == (i == 127), $sformatf("sampling full at %0d", i));
      @(negedge clk);
      if (i == 127) ctrl = '{swap_buff: 1'b1, clr_samp: 1'b1, clr_shift: 1'b1, default: 1'b0};
      else          ctrl = '{inc_samp: 1'b1, default: 1'b0};
    end
    @(negedge clk); ctrl = '0;
  endtask

  initial begin
    int unsigned ph;
    int n_wrap;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    check(pitch == 8'd64 && buf_q == 1'b0, "reset state");
    fill(0);
    check(buf_q == 1'b1, "swapped after the chunk");
    for (int p = 0; p < 3; p++) begin
      int unsigned step;
      // set the pitch with the buttons: 64, 64+20, 64-30
      if (p == 1) repeat (20) begin @(negedge clk); up = 1; @(negedge clk); up = 0; end
      if (p == 2) repeat (50) begin @(negedge clk); down = 1; @(negedge clk); down = 0; end
      step = (p == 0) ? 64 : (p == 1) ? 84 : 34;
      check(pitch == 8'(step), $sformatf("pitch %0d exp %0d", pitch, step));
      pulse('{clr_shift: 1'b1, default: 1'b0});
      ph = 0; n_wrap = 0;
      for (int i = 0; i < 128; i++) begin
        @(negedge clk);
        ctrl = '{shift_count: 1'b1, sram_rd: 1'b1, default: 1'b0};
        #1 check(dout == chunk[0][ph >> 6], $sformatf("step %0d read %0d: %h exp %h", step, ph >> 6, dout, chunk[0][ph >> 6]));
        check(full == ((ph >> 6) >= 127), "shifting full");
        @(negedge clk);
        if ((ph >> 6) >= 127) begin ctrl = '{clr_shift: 1'b1, default: 1'b0}; ph = 0; n_wrap++; end
        else begin ctrl = '{inc_shift: 1'b1, default: 1'b0}; ph += step; end
      end
      @(negedge clk); ctrl = '0;
      if (step > 64) check(n_wrap > 0, "read wrapped at raised pitch");
      else check(n_wrap <= 1, "no early wrap");
    end
    // writes went to the other buffer while reading: fill buffer 1 and read it back at unity
    repeat (30) begin @(negedge clk); up = 1; @(negedge clk); up = 0; end
    fill(1);
    pulse('{clr_shift: 1'b1, default: 1'b0});
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); ctrl = '{shift_count: 1'b1, sram_rd: 1'b1, default: 1'b0};
      #1 check(dout == chunk[1][i], "second buffer read");
      @(negedge clk); ctrl = '{inc_shift: 1'b1, default: 1'b0};
    end
    // a larger size moves the full point
    @(negedge clk); ctrl = '0; size_sel = 4'd2;
    pulse('{clr_samp: 1'b1, default: 1'b0});
    for (int i = 0; i < 383; i++) pulse('{inc_samp: 1'b1, default: 1'b0});
    #1 check(samp_addr == 11'd383 && full, "full at 384-1 for size 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
