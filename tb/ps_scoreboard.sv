// ps_scoreboard: reference model and checker for the pitch shifter output.
//
// Watches the D/A latch strobe. For each output sample n it replays, in
// plain procedural code, the chunked two-buffer algorithm: write input n at
// the write address of the write buffer, read the other buffer at
// floor(phase/64), restart the read phase at 0 when the address just read
// is at or past size-1, else add the pitch; at the end of a chunk swap the
// buffers and restart both addresses. The expected output is the shifted
// value, the input, their half-sum or 0 by the SHIFT?/PASSORIG? settings
// (given by the testbench, which changes them only between samples). The
// input value is the A/D model's latest conversion. The
// pitch is taken from the pitch display port 3 clocks after the strobe,
// when the design uses it. Reads of locations never written are not checked.
// Also counts the mechanisms seen and the clocks between strobes.
module ps_scoreboard
  import tb_ps_pkg::*;
(
  input  logic       clk,
  input  logic       rst,          // testbench holds /RESET
  input  logic       dac_cs_n,
  input  logic       dac_ce_n,
  input  logic [7:0] dac_db,
  input  logic [7:0] pitch,
  input  logic       shift_en,
  input  logic       pass_orig,
  input  logic [3:0] size_sel,
  input  logic       check_en,
  input  int unsigned adc_conversions  // A/D model's count of finished conversions
);
  int checks = 0, failures = 0, skipped = 0;
  int n_out = 0, n_swap = 0, n_wrap = 0, n_drop = 0;
  int n_mode[4] = '{0, 0, 0, 0};       // index {shift, pass}
  int last_strobe = 0, cyc = 0, last_interval = 0;

  logic [7:0] mem   [2][2048];
  bit         valid [2][2048];
  int unsigned wb, waddr, phase, nsamp, pending;

  task automatic model_reset();
    wb = 0; waddr = 0; phase = 0; nsamp = 0; pending = 0;
    foreach (valid[b, a]) valid[b][a] = 1'b0;
  endtask

  initial model_reset();

  always @(posedge clk) begin
    cyc++;
    if (rst) begin
      model_reset();
      n_out = 0;
    end else begin
      if (pending != 0) begin
        pending--;
        if (pending == 0) advance();
      end
      if (!dac_cs_n && !dac_ce_n) strobe();
    end
  end

  int unsigned size_now, raddr_now;
  logic [7:0]  x_now;

  task automatic strobe();
    logic [7:0] y, exp;
    bit         ok_y;
    size_now  = (int'(size_sel) + 1) * 128;
    x_now     = adc_sample(adc_conversions - 1);  // the value the design just read
    raddr_now = (phase >> 6) % 2048;
    ok_y      = valid[wb ^ 1][raddr_now];
    y         = mem[wb ^ 1][raddr_now];
    case ({shift_en, pass_orig})
      2'b00: exp = 8'h00;
      2'b01: exp = x_now;
      2'b10: exp = y;
      default: exp = (y >> 1) + (x_now >> 1);
    endcase
    n_mode[{shift_en, pass_orig}]++;
    if (n_out > 0) last_interval = cyc - last_strobe;
    last_strobe = cyc;
    n_out++;
    if (check_en && (ok_y || !shift_en)) begin
      checks++;
      if (dac_db !== exp) begin
        failures++;
        if (failures < 10)
          $display("SCOREBOARD FAIL: sample %0d out=%02h exp=%02h (x=%02h y=%02h raddr=%0d wb=%0d)",
                   nsamp, dac_db, exp, x_now, y, raddr_now, wb);
      end
    end else begin
      skipped++;
    end
    pending = 3;
  endtask

  task automatic advance();
    mem[wb][waddr]   = x_now;
    valid[wb][waddr] = 1'b1;
    if (raddr_now >= size_now - 1) begin
      phase = 0;
      n_wrap++;
    end else begin
      phase = (phase + int'(pitch)) % (1 << 17);
    end
    if (waddr >= size_now - 1) begin
      if ((phase >> 6) < size_now - 1 && raddr_now < size_now - 1) n_drop++;
      wb ^= 1; waddr = 0; phase = 0;
      n_swap++;
    end else begin
      waddr++;
    end
    nsamp++;
  endtask
endmodule
