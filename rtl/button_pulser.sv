// button_pulser: pushbutton to step pulses, with auto-repeat.
//
// A press (btn rising) gives one pulse of one clock at once. If the button is
// still held HOLD_CYCLES clocks after the press, a further pulse follows, and
// then one every REPEAT_CYCLES clocks until release. This gives the lab's
// "one per push, or slow periodic pulses if held" behaviour; the hold and
// repeat times (0.5 s and 0.2 s at 1.8432 MHz) are this design's choice.
// btn must already be synchronized. No debouncing is done.
module button_pulser #(
  parameter int unsigned HOLD_CYCLES   = 921600,
  parameter int unsigned REPEAT_CYCLES = 368640
) (
  input  logic clk,
  input  logic rst,     // synchronous, active high
  input  logic btn,     // synchronized, active high
  output logic pulse
);

  localparam int unsigned CW = $clog2((HOLD_CYCLES > REPEAT_CYCLES ? HOLD_CYCLES : REPEAT_CYCLES) + 1);

  logic          btn_q;
  logic [CW-1:0] timer;   // clocks left until the next repeat pulse

  always_ff @(posedge clk) begin
    if (rst) begin
      btn_q <= 1'b0;
      timer <= '0;
      pulse <= 1'b0;
    end else begin
      btn_q <= btn;
      pulse <= 1'b0;
      if (btn && !btn_q) begin
        pulse <= 1'b1;
        timer <= CW'(HOLD_CYCLES - 1);
      end else if (btn) begin
        if (timer == '0) begin
          pulse <= 1'b1;
          timer <= CW'(REPEAT_CYCLES - 1);
        end else begin
          timer <= timer - 1'b1;
        end
      end
    end
  end

endmodule
