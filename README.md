# Helium Breath: a microprogrammed audio pitch shifter

This is a real-time pitch shifter for 8-bit audio. It raises or lowers the pitch of its input by any factor
from 1/64 to almost 4 (0.5 to 2.0 is the intended range). It needs no
frequency-domain arithmetic: it records the input in short chunks and plays each chunk back at a different speed.

* To **lower** the pitch, the chunk is played back slower. The read pointer advances by less than one sample per
  output sample, so samples repeat: the waveform is *stretched*. The tail of the chunk is never reached
  and is dropped.
* To **raise** the pitch, the chunk is played back faster. The read pointer advances by more than one sample, so
  samples are skipped: the waveform is *squished*. When the pointer runs off the end of the chunk it jumps back to the
  start, filling the rest of the output time with a second, partial copy of the chunk.

Recording and playback overlap. The SRAM is split into two halves. One half, the **Sampling Buffer**, receives
new samples while the other, the **Shifting Buffer**, is read back. When the Sampling Buffer is full, the
two halves swap roles. The output is therefore delayed by about one chunk. The chunk length is set
by four switches (128 to 2048 samples).

The design is built the way a 1990s lab kit would build it. It has a **microprogrammed control unit**: an
8-bit microprogram counter, a 16-bit microcode PROM, an 8-to-1 condition multiplexer and registered
assertion logic. That control unit steps a small datapath (address counters in a CPLD, an 8K x 8 SRAM and a
mixing accumulator) through one sample per sampling period. The external converters are an AD670-style A2D and an
AD558-style D2A. They stay outside the RTL and appear as top-level pins.

The block structure and widths follow the MIT 6.111 laboratory design "Helium Breath" (spring 2000). That
includes the instruction format, the 11-bit sampling counter, the 17-bit shifting counter with 6
fraction bits, the 8-bit pitch multiplier, the two 2048-byte buffers, and the 921.6 kHz clock with
9600/19200 Hz sampling. The lab leaves the microprogram, the buffer-size table and many interface details
to the builder. Those parts are this design's own and are marked as such below.

## The fractional read pointer

Everything that changes the pitch happens in one adder. The **shifting counter** is 17 bits wide:

```
 16            6 5      0
+---------------+--------+
| sample index  |fraction|     index = 0..2047 within the Shifting Buffer
+---------------+--------+
```

Each sample period it adds the 8-bit **pitch multiplier** `p`. This is fixed point with 6 fraction bits, so
`p = 0x40` steps exactly one sample per output sample (pitch unchanged). `p = 0x41` steps 1.016 samples (slightly
higher pitch) and `p = 0x3F` steps 0.984 (slightly lower). `0x20` is one octave down and `0x80` one octave up.
After `n` output samples the read index is `floor(n*p/64)`. The pitch multiplier resets to `0x40`. Each
press of PitchUp or PitchDown moves it by one step (1/64, about 1.6 %). Holding a button repeats the step 15 times a
second. The counter stops at 0x00 and 0xFF instead of wrapping.

The **sampling counter** is an ordinary 11-bit counter. Both counters advance on the same `Count` control, once
per sample. A 2:1 multiplexer driven by `ShiftCount` decides which of them addresses the SRAM. The twelfth address bit
selects the half: it is `BufSel XOR ShiftBuf`, where `BufSel` is a T flip-flop toggled by `SwapBuf`. Setting
`ShiftBuf` always reaches the half that is *not* being recorded.

The **full detector** compares the multiplexed 11-bit address with the last index of the selected buffer
size, `128*(sel+1) - 1`. Because it looks at the *multiplexed* address, one comparator serves both
counters. Which counter it checks depends on which one the control unit has selected in that clock cycle (see
below).

## Control unit and microcode

### Instruction word

```
conditional branch     0 ccc xxxx aaaaaaaa    branch to a if condition c is 1
unconditional branch   0 111 xxxx aaaaaaaa    (condition 7 is wired to 1)
assertion              1 sssssss ssssssss     assert the controls whose bits are 1, then fall through
```

The microprogram counter (`mcu_sequencer`, two LS163 counters) loads `a` when the condition multiplexer's
inverted output is low. Otherwise it counts up. The multiplexer (`cond_mux`, an LS151) is disabled by bit 15, so
assertion instructions never branch. `/RESET` clears the counter synchronously, so execution restarts at address 0.
Unused PROM words hold `0x7000` (JMP 0).

Condition inputs (this design's assignment):

| c | condition | c | condition |
|---|-----------|---|-----------|
| 0 | SAMPLING (sampling-rate square wave) | 4 | PassOrig? switch |
| 1 | A2D STATUS (converting), synchronized | 5 | accumulator carry (unused by the program) |
| 2 | Full | 6 | SAMPLING inverted |
| 3 | Shift? switch | 7 | constant 1 |

The multiplexer can only branch on a *high* input. Input 6 therefore carries the inverse of SAMPLING, which
lets "wait while SAMPLING is low" be a one-instruction loop. A two-instruction loop would sample the edge
only every other clock and jitter the sample instant by one clock.

Assertion bits (this design's assignment, `ps_pkg::ctrl_t`):

| bit | control | bit | control |
|-----|---------|-----|---------|
| 0 | A2D conversion start (/W and /CS low) | 7 | SwapBuf |
| 1 | A2D read (/CS low, drives the bus) | 8 | ShiftCount (SRAM address from the shifting counter) |
| 2 | SRAM write (/CS, /WE low) | 9 | ShiftBuf (address the Shifting Buffer) |
| 3 | SRAM read (/CS, /OE low, drives the bus) | 10 | accumulator load (acc += bus) |
| 4 | Count (advance both counters) | 11 | accumulator clear |
| 5 | ClearSamp | 12 | D2A latch open (/CS low) |
| 6 | ClearShift | 13 | test programs: low SRAM address bits drive the bus |
| | | 14 | unused |

### The one-cycle rule

The assertion logic **registers** its outputs, so that strobes to the SRAM, the A2D and the D2A latch are free of
glitches. As a result, a control asserted by the instruction at clock *t* is active during clock *t+1*, and only
then. The microprogram relies on this in one important way. A `CJMP Full` placed directly after an instruction that
asserts `ShiftCount` tests the **shifting** address. The same branch placed after any other instruction tests the
**sampling** address.

### The program (`ps_pkg::microprogram`)

```
 0        ASSERT ClearSamp, ClearShift, AccClear         ; after reset
 1 WHI:   CJMP SAMPLING    WHI                           ; wait while high
 2 WLO:   CJMP SAMPLING_N  WLO                           ; wait while low -> rising edge
 3        ASSERT -
 4        ASSERT A2DStart, AccClear                      ; start conversion, clear mixer
 5-7      ASSERT -                                       ; STATUS needs 3 clocks to reach the mux
 8 CONV:  CJMP A2D_BUSY CONV                             ; wait for end of conversion
 9        CJMP PASSORIG 12
10        ASSERT A2DRead, SramWrite                      ; store sample (sampling buffer)
11        JMP 13
12        ASSERT A2DRead, SramWrite, AccLoad             ; store sample and mix it in
13        CJMP SHIFT 15
14        JMP 18
15        ASSERT ShiftCount, ShiftBuf, SramRead, AccLoad ; read shifted sample, mix it in
16        CJMP FULL 23                                   ; shifting index at end of chunk?
17        JMP 18
18 OUT:   ASSERT D2ALatch                                ; output the accumulator
19        CJMP FULL 28                                   ; sampling index at end of chunk?
20        JMP 21
21        ASSERT Count                                   ; advance both counters
22        JMP WHI
23 WRAP:  ASSERT -                                       ; keeps the output instant the same
24        ASSERT D2ALatch
25        CJMP FULL 28
26        ASSERT Count, ClearShift                       ; restart the read pointer (clear wins)
27        JMP WHI
28 SWAP:  ASSERT SwapBuf, ClearSamp, ClearShift          ; buffers change roles
29        JMP WHI
```

The output mode is chosen by the two switches. With PassOrig? only, the output is the sample just taken. With
Shift? only, it is the shifted sample. With both, it is their sum. The sum wraps modulo 256 like the 8-bit adder it
models, so mixing two loud signals overflows.

### Cycle budget

One sample takes about 30 clocks: 3 to 5 to see the edge, 4 to start, about 12 waiting on a 10 us conversion
(10 clocks plus a 2-clock synchronizer), and 10 to store, read, output and update. A 19.2 kHz period has 48
clocks and a 9600 Hz period has 96. Within one setting of the switches, every path through the program takes the
same number of clocks, so the D2A is updated at exactly the sampling rate. Idle instruction 23 exists for
this reason.

### Test programs: converter loopback, storage ramp and adder

The microcode store holds four 256-word programs. The two `prog_sel` switches drive the address bits above the
sequencer's eight, and so choose between them. Program 0 is the pitch shifter above. Programs 1 to 3 are
bring-up tests.

* Program 1 tests the converters. Each sampling period it starts a conversion, waits for STATUS, reads the A2D
  into the cleared accumulator and opens the D2A latch, so the output should equal the input. It leaves the
  storage unit alone.
* Program 2 tests the storage unit and the control unit without the A2D. Assertion bit 13 opens a buffer that
  puts the low 8 bits of the SRAM address on the bus. Each sampling period the program stores that value at
  the sampling index, so the Sampling Buffer fills with a ramp. It then plays the Shifting Buffer back exactly
  like the pitch shifter's shift-only path. At pitch 1.0 the D2A shows a sawtooth whose period is the buffer
  size; the pitch buttons change its slope.
* Program 3 tests the adder on its own. Each sampling period the same address-bit buffer drives the bus and
  the accumulator adds it, without ever being cleared, so the D2A shows the running sum of 0, 1, 2, ... 127,
  0, 1, ... modulo 256. Neither the A2D nor the SRAM is used.

Change `prog_sel` only while `/RESET` is held; otherwise execution continues at the same address in the
other program.

## Modules

| module | role |
|--------|------|
| `pitch_shifter` | top level; converter pins are ports |
| `ps_pkg` | control/pin structs, instruction encoders, status numbers, the microprogram |
| `synchronizer` | 2-flop synchronizers for switches, buttons, /RESET and A2D STATUS; press/auto-repeat pulses |
| `timing_unit` | 921.6 kHz -> SAMPLING square wave, 9600 or 19200 Hz |
| `freq_divider` | SAMPLING / 640 (15 Hz at 9600 Hz): auto-repeat tick for the pitch buttons |
| `mcu` | control unit: `mcu_sequencer`, `microcode_rom`, `cond_mux`, `assertion_logic` |
| `storage_unit` | `storage_cpld` (counters, mux, BufSel, full detector) + `sram_6264` |
| `storage_cpld` | `sampling_counter`, `shifting_counter`, `pitch_mult_counter`, `buf_sel`, `full_detector` |
| `data_bus` | 8-bit bus as a multiplexer (A2D, SRAM or ramp-test buffer drives; 0 when idle) |
| `signal_accumulator` | 8-bit accumulator with `adder8` (two 4-bit adder stages) |

All logic is clocked on the rising edge of one clock, with an active-high synchronous reset that comes from
the synchronized `/RESET` pin.

## Connecting the converters

* **A2D** (`a2d_w_n`, `a2d_cs_n`, `a2d_status`, `a2d_data`). A conversion starts on the clock in which both `/W`
  and `/CS` are low (one clock). `STATUS` must be high while converting. Data is taken from `a2d_data` in the
  clock in which `/CS` is low and `/W` is high. `STATUS` is synchronized inside the design, so it may be
  asynchronous.
* **D2A** (`d2a_cs_n`, `d2a_data`). `d2a_cs_n` is low for one clock per sample and comes straight from a flip-flop.
  `d2a_data` is the accumulator and is stable during that clock, so a transparent latch may be used.
* `prog_sel[1:0]` selects the microprogram (0: pitch shifter, 1: converter loopback, 2: storage ramp test,
  3: adder test). It is synchronized like the other switches.
* `pitch` and `upc` are debug outputs: the current multiplier and the microprogram address.

## Choices made here, and departures from the original

These points are this design's own, because the original leaves them open or they had to be adapted to RTL:

* The microprogram, the assertion-bit and status-input assignments, and the use of the spare status input
  for inverted SAMPLING.
* Buffer sizes `128*(sel+1)`. Full means "index >= last index of the chunk".
* The read pointer restarts at 0 when it reaches the end of the chunk while the sampling buffer is still
  filling. When the pointer steps by more than one, it can read up to one sample past the chunk end first
  (stale data from an earlier, longer chunk).
* Pitch multiplier reset value 0x40 ("no shift"). It saturates instead of wrapping.
* Auto-repeat of the pitch buttons: one step on the press, then one per 15 Hz tick. The tick comes from the
  SAMPLING/640 divider, so it doubles to 30 Hz at the high sampling rate.
* The SRAM is a synchronous-write array with separate data in/out ports (the 6264 is asynchronous and has a
  bidirectional port). Address bit 12 is tied to 0.
* The tri-state data bus is a multiplexer. An assertion in `pitch_shifter` checks that at most one of the A2D, the
  SRAM and the ramp-test buffer drives it at a time. `assertion_logic` checks that an SRAM read and write are
  never asserted together.
* The three test programs and the address-bit bus driver on assertion bit 13. Two program-select bits are modelled.
* Clock buffering and the converters' analog side are not modelled.
* The accumulator carry is wired to a status input but the program does not use it.

## Simulating

Each testbench in `tb/` is self-checking and ends with a line `TB_RESULT checks=N failures=M`. For example,
to run the end-to-end test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -I. -y rtl -y tb rtl/ps_pkg.sv tb/tb_pitch_shifter.sv \
          --top-module tb_pitch_shifter -o sim
./obj_dir/sim
```

Run it from the directory that holds `rtl/` and `tb/`; testbenches include `tb/tb_util.svh`. Any other
testbench builds the same way with its own name.

`tb_pitch_shifter` runs the top at its default parameters (about 17,000 samples, under a second of CPU). A
behavioural A2D model (`tb/ad670_model.sv`, 10-clock conversion) feeds a test waveform, and a D2A latch model
(`tb/ad558_model.sv`) receives the output. It first runs the loopback program, then the ramp test program (with
one pitch step), then the adder test program, then resets into the pitch shifter program. A sample-level
reference model of the algorithm predicts every output word. The test covers pass-through, shift-only, mixing
(including sums that overflow), pitch raised by holding PitchUp and lowered by holding PitchDown, both sampling
rates, and 128- and 2048-sample buffers. It also checks the output period (96 or 48 clocks) and the auto-repeat
period (640 sampling periods). It counts buffer swaps, read-pointer restarts, pitch steps, waits on A2D STATUS
and the other mechanisms, and fails if any of them never happened.

The block testbenches (`tb_<module>`) check each module against independently computed values:

* exhaustive sweeps for `cond_mux` and `full_detector`;
* random stimulus against a reference model for the counters, `storage_cpld`, `sram_6264` and the accumulator;
* measured periods for `timing_unit` and `freq_divider`;
* an instruction-by-instruction walk through the microprogram and parts of all three test programs for `mcu`.

## Changing it

* Sampling rates and clock: the `CLK_HZ`, `FS_LOW_HZ` and `FS_HIGH_HZ` parameters of `pitch_shifter`.
  `CLK_HZ/FS_HIGH_HZ` clocks per sample must stay above about 32.
* Auto-repeat rate: `REPEAT_DIV`.
* Buffer size table: `full_detector` (`UNIT`). Larger buffers need wider counters in `storage_cpld` and a larger SRAM.
* Program: edit `microprogram()` (or a test program) in `ps_pkg`, using `u_assert`, `u_cjmp` and `u_jmp`. Keep
  the one-cycle rule in mind, and update `tb_microcode_rom` and `tb_mcu`, which check the program word by word
  and step by step.
