# Chunk-based pitch shifter, with two reset-style counter examples

This is SystemVerilog RTL for a simple real-time audio pitch shifter, in the
style of a microprogrammed lab system. The input is sampled at a fixed rate and
the output is produced at that same rate, so the pitch cannot be changed by
changing the clock. Instead, time is cut into **chunks** of one buffer length.
While one buffer is filled with the current chunk, the previous chunk is played
back from a second buffer with a **fractional read step**:

* A step below 1 stretches the chunk. The read address never reaches the end
  of the chunk, so the tail is dropped and the pitch goes down.
* A step above 1 squeezes the chunk. The read address reaches the end early,
  starts again at the beginning, and part of the chunk is played twice. The
  pitch goes up.

At every chunk end the two buffers swap roles. The result is crude: there is a
discontinuity at each chunk boundary. It is also very cheap: two counters, one
adder, one SRAM and a small control unit.

The same sources also hold two small textbook examples: a 4-bit counter with
**synchronous** reset and enable (`sctr`), and the same counter with
**asynchronous** reset (`actr`). They have nothing to do with the pitch shifter
and sit beside it in the top level `l14_top`.

## The read step: stretching and squeezing a chunk

Two address counters share the SRAM:

| counter | width | step per sample | meaning |
|---|---|---|---|
| sampling counter | 11 bits | 1 | write address in the write buffer |
| shifting counter | 17 bits | pitch value `p` (8 bits) | top 11 bits are the read address in the read buffer; the low 6 bits are a fraction |

A pitch value of `p = 64` advances the read address one location per sample:
the chunk plays back unchanged, one chunk late. `p = 32` plays the first half
of each chunk at half speed, an octave down. `p = 128` plays the chunk twice in
one chunk time, an octave up. The pitch counter covers 1 to 255, which is 1/64
to about 4 times the input rate.

For each sample period, with `N` the buffer size and `A = phase[16:6]`:

1. The output is taken from the read buffer at `A`.
2. The new input sample is written to the write buffer at the sampling address.
3. If `A >= N-1`, the phase is cleared: the next read starts again at the
   beginning of the chunk. Otherwise `p` is added to the phase.
4. If the sampling address is `N-1`, the chunk is complete: the buffers swap
   and both counters are cleared. Otherwise the sampling address steps by one.

So at `p <= 64` every read lies inside the chunk. At `p > 64` the end test
comes after the read, and the address can move by up to 3 locations per step.
The last reads before a restart can therefore land up to 3 locations past the
chunk end. At the largest buffer size the 17-bit counter simply wraps to the
beginning.

**Buffer sizes.** Four switches select one of 16 sizes, `N = (sel+1) * 128`,
from 128 to 2048 samples (6.7 to 107 ms at 19.2 kHz). The full detector flags
`address >= N-1`. It watches whichever address the address multiplexer is
currently showing, so the same comparator serves both counters. Moving the
switch to a smaller size ends the current chunk at once.

## Storage unit

One 4K x 8 SRAM holds both buffers. The address is 12 bits: a buffer bit
followed by 11 bits from the address multiplexer. The multiplexer is controlled
by `ShiftCount`: 0 selects the sampling counter, 1 selects the top 11 bits of
the shifting counter.

The buffer bit is `ShiftBuf XOR ShiftCount`. `ShiftBuf` is a toggle flip-flop
flipped by each `SwapBuff` pulse. Writes (`ShiftCount = 0`) therefore go to
buffer `ShiftBuf`, and reads (`ShiftCount = 1`) go to the other buffer. Swapping
is a single flip-flop toggle, and no data is copied.

The pitch multiplier counter is in this unit too. Its reset value is 64 (no
shift). It saturates at 1 and 255 rather than wrapping, because a wrap would
jump from the highest pitch to the lowest.

## The microprogrammed control unit

The controller is a small horizontal microprogram machine:

* **Sequencer.** An 8-bit program counter with synchronous clear, load and
  count, in the manner of two cascaded 74LS163 counters.
* **Microprogram ROM.** 256 x 16 bits, read combinationally, in the manner of
  two 8-bit PROMs.
* **Condition select.** An 8-to-1 multiplexer, in the manner of a 74LS151.
* **Assertion logic.** Turns the ASSERT field into control pulses.

There are three instruction formats:

```
        I15 I14..I12 I11..I8  I7..I0
CJMP     0    CCC     ----   AAAAAAAA   jump to A if status line C is 1
JMP      0    111     ----   AAAAAAAA   C = 7 is tied true
ASSERT   1    SSS SSSS SSSS SSSS        raise each control line whose bit is 1
```

An ASSERT word never jumps: I15 disables the condition multiplexer. A CJMP or
JMP word raises no control line. Each executed ASSERT gives control pulses that
are exactly one clock long.

Control lines, ASSERT bits 0 to 14 (see `ctrl_t` in `rtl/ps_pkg.sv`):

| bit | name | bit | name | bit | name |
|---|---|---|---|---|---|
| 0 | A/D start + take sample request | 5 | IncSamp | 10 | AccClr |
| 1 | A/D read onto bus | 6 | IncShift | 11 | AccAdd |
| 2 | SRAM write from bus | 7 | ClrSamp | 12 | AccHalf |
| 3 | SRAM read onto bus | 8 | ClrShift | 13 | accumulator onto bus |
| 4 | ShiftCount | 9 | SwapBuff | 14 | D/A load |

Status lines, condition codes 0 to 6 (see `status_e`):

| code | status line |
|---|---|
| 0 | sample request pending |
| 1 | A/D busy |
| 2 | full (buffer end) |
| 3 | SHIFT? switch |
| 4 | PASSORIG? switch |
| 5 | accumulator carry |
| 6 | test mode |
| 7 | constant true |

**Status latency.** The status lines pass through a register that is updated
on every MCU clock, so a CJMP tests the status left by the *previous*
instruction. This matters for the full test. A CJMP raises no control lines, so
while it executes the address multiplexer shows the sampling counter. To test
the read address, the program first executes `ASSERT ShiftCount` and then
`CJMP FULL`. The same latency is why the program has one idle word between
starting the A/D and polling its busy line.

**The program** (`rtl/mcu_ucode_rom.sv`, listed in its header comment) runs
once per sample:

* Wait for the sample request.
* Start the A/D. While it converts, read the shifted sample into the
  accumulator.
* Poll busy. Then write the new sample to the SRAM and, if PASSORIG? is on,
  add it to the accumulator.
* Send the accumulator to the D/A.
* Advance the two counters as described above.

The longest path is about 40 clocks, including the A/D conversion. A 19.2 kHz
sample period at the 1.8432 MHz default clock is 96 clocks.

**Test mode.** The MCU then steps at 15 Hz, and the program runs a walking
light over the fifteen control lines. The `lights` output shows the ASSERT
field of the current word and holds it while the MCU waits for its next clock,
so it can drive LEDs directly.

## Timing unit, inputs and buttons

Everything runs from one master clock (`CLK_HZ`, default 1.8432 MHz). The
timing unit derives clock *enables* from it, not extra clocks:

* It raises a sample request every 96 clocks (19.2 kHz) or every 192 clocks
  (9.6 kHz). The request is held until the MCU takes it, so a period is never
  lost.
* It gives the MCU clock enable: every clock in normal operation, or 15 Hz in
  test mode.

All external inputs pass through two-flip-flop synchronizers: /RESET,
PITCHUP, PITCHDOWN, SHIFT?, PASSORIG?, rate select, size switches, test mode
and the A/D status line.

The two pitch buttons go through auto-repeat pulsers. A press gives one step
at once. If the button is held 0.5 s, a second step follows, then one every
0.2 s until release. There is no debouncing. /RESET restarts the program, sets
the pitch back to 64 and selects buffer 0.

## Output selection

The signal accumulator is an 8-bit register fed by an 8-bit adder. Each sample
period the program clears it, then adds the shifted sample if SHIFT? is on, and
the original if PASSORIG? is on. When both are on, each operand enters halved
(`AccHalf`), so the mix is `(shifted>>1) + (original>>1)` and cannot overflow.
With both off the output is 0. The register reaches the D/A over the 8-bit
data bus.

The data bus is built as an AND-OR multiplexer over three sources: A/D, SRAM
and accumulator. An assertion in `data_bus` checks that at most one source is
enabled at a time.

## Converter interfaces

The A/D and D/A converters are outside this RTL. Their pins are top-level
ports.

* **A/D.** A clock with `adc_rw = 0` and `adc_cs_n = adc_ce_n = 0` starts a
  conversion. `adc_status` is 1 while the converter is busy. The result is read
  with `adc_rw = 1` and both selects low.
* **D/A.** `dac_db` carries the data. `dac_cs_n` and `dac_ce_n` are low for the
  one clock in which the data is valid. A converter with a transparent input
  latch holds that value.

These pin functions follow the usual AD670 and AD558 conventions. The
testbenches contain behavioural models of both: `tb/ad670_model.sv`, with an
18-clock (10 us) conversion, and `tb/ad558_model.sv`.

## The counter examples

`sctr` and `actr` are 4-bit counters. Reset gives 0, and `enb` high counts up
by 1. When `enb` is low the counter *loads 2*. That odd branch is kept because
it makes the enable visible in a waveform.

* In `sctr` the reset acts only at a clock edge.
* In `actr` the reset is in the sensitivity list and clears the count at once.

A tempting variant attaches the "load 2" branch to the clock-edge test itself.
That variant describes no flip-flop: synthesis rejects it. It is not included.

## Parameters

| module | parameter | default | notes |
|---|---|---|---|
| pitch_shifter, timing_unit | `CLK_HZ` | 1843200 | chosen so both sample rates divide exactly |
| pitch_shifter, timing_unit | `FS_LO_HZ` / `FS_HI_HZ` | 9600 / 19200 | the two selectable rates |
| pitch_shifter, timing_unit | `TEST_HZ` | 15 | MCU rate in test mode |
| pitch_shifter, button_pulser | `HOLD_CYCLES` / `REPEAT_CYCLES` | 921600 / 368640 | 0.5 s and 0.2 s |
| ps_pkg | `SAMP_W`, `SHIFT_W`, `PITCH_W`, `SIZE_W` | 11, 17, 8, 4 | counter widths |
| ps_pkg | `DATA_W`, `SRAM_AW` | 8, 12 | sample width; 2 x 2K buffers |
| ps_pkg | `UPC_W`, `UI_W` | 8, 16 | microprogram address and word |

The microprogram and the control and status assignments belong together. If
you change `ctrl_t` or `status_e`, re-check the program in `mcu_ucode_rom`.

## How far it follows the lab description, and where it departs

The following come from the lab description:

* the block partitioning (synchronizer, timing unit, MCU, storage unit, signal
  accumulator, converters, 8-bit data bus);
* the storage unit circuit: 11-bit sampling counter, 17-bit shifting counter
  stepped by an 8-bit pitch counter, address multiplexer on `ShiftCount`,
  toggle flip-flop XOR `ShiftCount` for the buffer bit, and a full detector on
  the size switches;
* the MCU structure and its three instruction formats;
* the two sample rates, the 16 buffer sizes, the 10-20 Hz test clock;
* the button behaviour (one step per push, slow repeat when held).

The following are this design's own choices:

* the master clock, and the use of clock enables instead of derived clocks;
* the whole microprogram, and the assignment of control and status lines;
* the status register in front of the condition select;
* the size steps `(sel+1)*128`, and the `>= N-1` full rule;
* halving for the mix, and pitch saturation;
* the multiplexed (not tri-state) bus, and the clocked SRAM write.

The lab's own MCU test program is not reproduced. The walking light is a
stand-in for it.

Known limitations:

* At `p > 64` up to three reads per chunk restart can fall just past the chunk
  end (see above).
* There is no debouncing on the buttons.
* The first chunk after reset plays whatever the read buffer held before.

## Verification

Every module has a self-checking testbench in `tb/` that compares against
independently computed values. Each ends with a `TB_RESULT checks=N
failures=M` line.

**Unit tests.** `tb_full_detector` and `tb_mcu_cond_select` are exhaustive.
`tb_mcu` checks the whole control-word sequence of a sample period for each
output mode, for a busy A/D and for full buffers. `tb_timing_unit` checks 96
and 192 clocks per sample and the 15 Hz test clock at the default parameters.

**End-to-end tests.** `tb_pitch_shifter` and `tb_l14_top` drive the system
with an A/D model that produces a scrambled sequence, so a wrong address shows
as a wrong value. A scoreboard (`tb/ps_scoreboard.sv`) replays the chunk
algorithm in plain procedural code and compares every D/A sample. The tests go
through:

* unity, raised and lowered pitch (chunk repeat and tail drop);
* all four output modes and both sample rates (clocks per sample checked);
* buffer sizes 128, 512 and 2048;
* button auto-repeat and saturation;
* /RESET, and test mode.

`tb_pitch_tone` feeds a 300 Hz triangle tone into 2048-sample buffers. It
counts output periods over four chunks: 128 at `p = 64` (same as the input),
256 at `p = 128` and 64 at `p = 32`.

`tb_l14_top` runs all of this with every parameter at its default, and also
checks both counters against a model every clock. It runs in under a
minute on a desktop machine.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/ps_pkg.sv tb/tb_ps_pkg.sv tb/tb_l14_top.sv --top-module tb_l14_top
./obj_dir/Vtb_l14_top
```

Replace `tb_l14_top` with any other testbench name (for example
`tb_pitch_shifter`, `tb_mcu`, `tb_sctr`). The simulations assume two-state
logic and reset or initialise everything they read.

## Files

* `rtl/ps_pkg.sv`: shared widths, the `ctrl_t` control struct, the
  `status_e` condition codes, and instruction builders.
* `rtl/l14_top.sv`: top level, holding `pitch_shifter`, `sctr` and `actr`.
* `rtl/pitch_shifter.sv`: the system.
* Inputs and timing: `synchronizer`, `button_pulser`, `timing_unit`.
* Control unit: `mcu`, `mcu_sequencer`, `mcu_cond_select`, `mcu_ucode_rom`,
  `mcu_assert_logic`.
* Storage unit: `storage_unit`, `pitch_counter`, `sampling_counter`,
  `shifting_counter`, `buffer_select`, `full_detector`, `sram`.
* Output: `signal_accumulator`, `data_bus`.
* Counter examples: `sctr`, `actr`.
* `tb/`: one `tb_<module>.sv` per module, the tone test `tb_pitch_tone`,
  and the shared `tb_ps_pkg`, `ad670_model`, `ad558_model` and
  `ps_scoreboard`.
