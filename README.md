# DCU — Digital Correction Unit: correction and compaction of detector samples

The DCU sits between the ADC that digitises a particle detector's analog
memories and the board processor that reads the data. It does two jobs on
every sample, at up to 1.33 million samples per second:

1. **Correction.** Each analog memory cell has its own transfer curve. The
   DCU corrects each sample with a piece-wise linear version of that curve.
   The two end points of the segment the sample falls in (C1, C2) come from an
   external table.
2. **Compaction.** It throws away what carries no information. This is done
   one of two ways, chosen by a register bit:
   * **WSM personality**, for drift-chamber waveforms. Zero suppression keeps
     each pulse with its full rising and falling edge and drops the noise
     between pulses.
   * **CDM personality**, for calorimeter channels. Each channel arrives as
     four samples: two amplifier gains, each with a baseline. The DCU picks
     the better gain and can subtract its baseline, so four words become one.

What comes out goes through a 16-word FIFO onto an output bus.

```
             input bus (bidirectional: samples, constants, registers)
                 |
   +-------------v--------------------------------+
   | dcu_timing   16-clock data cycle, bus slots  |
   | dcu_regs     control/threshold registers     |
   | dcu_corrector                                |
   |   ADC reg --shift(n-1)--+                    |
   |   C2 reg --+            x (serial, dcu_alu)--+--> corrected stream
   |   C1 reg --+-(C2-C1)----+         + C1       |      |           |
   +----------------------------------------------+      |           |
                     dcu_wps (history FIFO + control) <--+           |
                     dcu_cps (gain select, baseline)  <--------------+
                          \            /
                        personality select mux
                                 |
                          dcu_outbuf (16 words) --> output bus
```

Everything is in SystemVerilog-2017. It is synthesizable, uses one clock and
an asynchronous active-low reset, and has no parameters on the top that need
changing.

## The data cycle

The chip's fastest clock (21.3 MHz) is 16 times its fastest sample rate
(1.33 MHz). So every sample owns a **data cycle of 16 clocks**, and the
sequencer `dcu_timing` splits the shared input bus in time:

| phase | bus carries | strobe |
|---|---|---|
| 0 | sample from the external input data buffer (`adc_oe`) | ADC register load |
| 1 | C1 from the external constant memory (`cmem_oe`, `cmem_sel`=0) | C1 register load |
| 2 | C2 from the constant memory (`cmem_sel`=1) | C2 register load |
| 3 | free | ALU start |
| 4–15 | free: host register reads/writes (`bus_free`) | — |

The constant memory address is **not** generated by the DCU. The sample's
upper bits (the segment number) address it directly, outside the chip. The DCU
only supplies the output enable and which of the two words to drive.

A cycle begins on the clock after `start` is seen while `ready` is high.
`ready` is high when idle and in phase 15. This means holding `start` high
runs samples back to back at exactly one per 16 clocks. The corrected word
leaves the ALU 16 clocks after the ALU start, which is 20 clocks after the
edge that took `start`. So the arithmetic of sample *k* overlaps the bus
phases of sample *k+1*.

## Piece-wise linear correction

A 15-bit unsigned sample is split in two fields. The upper `n-1` bits are the
segment number (1 to 128 segments). The lower `16-n` bits are the offset `x`
inside the segment. `n` is programmable from 1 to 8. The corrector computes

```
y = 2^(n-16) * x * (C2 - C1) + C1
```

In hardware, the offset is shifted left by `n-1` places. The segment bits
drop off the top, and the offset's MSB lands on the multiplicand's MSB. That
makes the 15-bit multiplicand a fraction with weight 2^-15, and fully uses
the multiplier's precision whatever the segment size.

* The subtractor forms `C2 - C1` as a 16-bit two's complement number
  (15 bits plus sign).
* `dcu_alu` multiplies the unsigned 15-bit multiplicand by it one bit per
  clock (shift-and-add into a 31-bit accumulator). It keeps the top 15 bits
  plus sign of the product (arithmetic shift right by 15, i.e. truncation
  toward minus infinity) and adds C1.
* The result is 16 bits, limited to ±32767.

`y` lies between C1 and C2, so the limit only matters for tables whose
constants are at the ends of the range. Keep `|C2 - C1| < 2^15`, because the
difference wraps in 16 bits.

**Diagnostic loading.** Two control bits (`ld_adc`, `ld_const`) decide whether
the ADC register and the constant registers load in each data cycle. To
freeze a correction, load constants once and then clear `ld_const`. With
`n = 2`, `C1 = 0`, `C2 = 0x4000`, 14-bit samples pass through unchanged. With
16-bit constants, 15-bit samples cannot pass exactly: the steepest slope
available is 0x7FFF/0x8000, which loses one LSB on most samples.

## WSM compaction (waveform zero suppression)

This is the most involved part of the chip. A drift-chamber pulse should be
recorded whole, from its first rise to its tail. Noise between pulses should
be dropped. A high trigger threshold rejects noise well but fires late on
the rising edge. The DCU solves this with a **history FIFO**: the corrected
stream runs through a delay line of programmable depth `n` (0–64,
`dcu_wsm_history`). The output side is therefore always `n` samples behind
the input side.

* **Trigger (input side).** A live word strictly above the trigger threshold
  marks the next `n+1` delayed words (the `n` before the trigger and the
  trigger itself) as belonging to a record. A countdown (`pend`) does this
  without any look-ahead.
* **Record start.** When a record begins, the section writes three words:
  1. the **tag** 0x8000;
  2. the **address** of the first recorded word;
  3. the word itself.

  Further recorded words follow one per sample. Corrected data never takes
  the value 0x8000, because the ALU limits results to ±32767. That keeps the
  tag unique.
* **Record end (output side).** Once the trigger word has left the FIFO, each
  recorded word strictly below the trailing threshold increments a trail
  counter, and any other word clears it. The record ends with the word that
  brings the counter to the programmed trail count. A trail count of 0 acts
  as 1.
* **Double pulses.** If the signal dips below the trailing threshold and rises
  again before the count runs out, the count restarts. The second pulse then
  stays in the same record.
* **Wire boundaries.** When many wires are multiplexed into one DCU, the
  address counter's low 9 or 10 bits are the bucket within a wire (512 or
  1024 buckets). With `wb_en` set, the first word of every wire is recorded
  and opens a new record, with its own tag and address, even in the middle
  of one. The trail rule then ends it as usual.
* **Pass-through** (`wsm_pass`) records every word: one tag and address, then
  the whole stream.

The address is a 16-bit count of samples since the last clear command.
Words that would precede the first sample after a clear are never output.
A sample yields at most three words, sent on consecutive clocks, so the
section never falls behind at 16 clocks per sample.

## CDM compaction (gain selection)

Each calorimeter channel arrives as **base0, data0, base1, data1**. These are
the baseline and signal through a gain-1 amplifier, then through a gain-2
amplifier. `dcu_cps` compares the **uncorrected** value of data0 (taken from
the ADC register, before correction) with a 15-bit threshold:

* `sense = 1`: data0 is the better signal when it is above the threshold.
* `sense = 0`: data0 is the better signal when it is below the threshold.

Both comparisons are strict. After data1 arrives, one word goes out. Its
bit 15 is 0 for data0 and 1 for data1. Bits 14:0 hold the chosen corrected
value, minus its own corrected baseline when `cdm_bsub` is set, clamped to
0..32767.

In **override** mode (`cdm_override`) there is no decision. Each group
element whose bit is set in the 4-bit mask (bit 0 = base0 … bit 3 = data1)
goes out as its full 16-bit corrected word. Use this for calibration.

Both personality sections see every corrected word. The personality select
bit only chooses which one writes into the output buffer.

## Output buffer and output bus

`dcu_outbuf` is a 16-word FIFO with first-word-fall-through reads:

* `out_data` shows the oldest word whenever `out_empty` is low.
* `out_rd` takes that word.
* A word that arrives while the FIFO is full is dropped, and the sticky
  `out_overflow` flag is set (also readable as status bit 5).
* The clear command empties the FIFO and resets the flag.

## Registers

Registers are accessed with `reg_cs`, `reg_wr` and `reg_addr`. Write data
comes from `bus_in`. Read data goes to `bus_out`, with `bus_oe` asking the
pads to drive the bus. Accesses belong in clocks where `bus_free` is high;
an assertion flags a violation.

| addr | name | contents |
|---|---|---|
| 0 | CTRL | [0] personality (1 = CDM), [1] ld_adc, [2] ld_const, [6:3] shift n, [7] WSM pass-through, [8] wire boundaries on, [9] 1024 (else 512) buckets, [10] CDM sense, [11] CDM baseline subtraction, [12] CDM override |
| 1 | WSM_TRIG | trigger threshold, signed |
| 2 | WSM_TRAIL | trailing threshold, signed |
| 3 | WSM_DEPTH | history depth 0–64 (larger writes become 64) |
| 4 | WSM_TCNT | trail count 1–255 |
| 5 | CDM_THR | threshold on uncorrected data0 |
| 6 | CDM_MASK | override element mask |
| 7 | COMMAND | write bit 0 = clear: address counter, CDM group position, WSM state, output FIFO, overflow flag |
| 8 | STATUS | [4:0] FIFO words, [5] overflow, [6] data cycle busy, [7] FIFO empty |
| 9–12 | ADC, C1, C2, ADDR | read-only views of the ADC, C1, C2 registers and the address counter |

Reset values:

* CTRL = 0x000E: loads enabled, n = 1, WSM personality.
* Trigger threshold 1000, trailing threshold 100.
* History depth 8, trail count 4.
* CDM threshold 16384, mask 0xF.

## How far this follows the original design

**Taken from the original description of the chip:**

* the block structure;
* the correction formula and its word widths;
* the shift range;
* the history depth of 64 and the WSM record rules (trigger, pre-trigger
  history, tag plus address, trail count, double pulses, wire boundaries of
  512 or 1024, pass-through);
* the CDM group order, the threshold with programmable sense, the selection
  bit in the MSB, the baseline subtraction and the override;
* the 16-word output FIFO;
* the clock and sample rates.

**Choices made here, where the description is silent:**

* the 16-clock cycle layout and the serial multiplier;
* saturation to ±32767 and the tag value 0x8000;
* the address format;
* strict comparisons, and a trail count that counts consecutive words;
* how forced recording at a wire boundary ends;
* the CDM value clamp and the override mask;
* the register map, reset values and clear command;
* the handshakes on all three interfaces;
* the output FIFO overflow policy;
* 16-bit constants and output words.

**Not in the RTL:**

* the correction constant memory and the input data buffers: external to the
  chip;
* the analog memories, amplifiers and ADC;
* the pads and package;
* the tristate bus drivers: the bidirectional bus appears as
  `bus_in`/`bus_out`/`bus_oe`.

The `events` output (one-clock pulses for trigger, record start, record end,
wire boundary, CDM data0/data1 choice and override element) is an addition
for monitoring.

## Files

| file | contents |
|---|---|
| `rtl/dcu_pkg.sv` | widths, register address enum, control struct, configuration struct, saturation function |
| `rtl/dcu_timing.sv` | data-cycle sequencer |
| `rtl/dcu_regs.sv` | registers |
| `rtl/dcu_alu.sv` | serial multiplier and adder |
| `rtl/dcu_corrector.sv` | input registers, shifter, subtractor, ALU |
| `rtl/dcu_wsm_history.sv` | WSM history FIFO |
| `rtl/dcu_wps.sv` | WSM personality section |
| `rtl/dcu_cps.sv` | CDM personality section |
| `rtl/dcu_outbuf.sv` | output FIFO |
| `rtl/dcu_top.sv` | top level |
| `tb/dcu_ref_pkg.sv` | reference models: correction formula, WSM record stream (found by look-ahead, independent of the RTL's countdown), CDM word |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends it with a failure if it hangs. Packages must come first on the
command line. For example, the whole chip:

```
verilator --binary --timing --assert -Wno-fatal -y rtl --top-module tb_dcu_top \
  rtl/dcu_pkg.sv tb/dcu_ref_pkg.sv tb/tb_dcu_top.sv
./obj_dir/Vtb_dcu_top
```

`-y rtl` lets Verilator find each module in the file of its name.
`-Wno-fatal` keeps width warnings from stopping the build. For a unit test,
substitute `tb_<module>` (the unit tests of the corrector, ALU and
personality sections also need `tb/dcu_ref_pkg.sv`).

`tb_dcu_top` runs the chip at its real sizes. It models the input buffer and
a constant memory whose entries are f(segment start) and f(segment end) with
f(v) = 3v/4 + v²/2¹⁷ − 200. It then runs:

1. WSM compaction (depth 8, n = 4);
2. WSM with 512-bucket wire boundaries at the maximum depth of 64;
3. CDM selection with baseline subtraction (n = 6);
4. CDM override;
5. frozen constants seen through WSM pass-through;
6. an output overflow with the reader paused;
7. WSM with 128 correction segments (n = 8), 1024-bucket wire boundaries and
   depth 64;
8. CDM selection with the opposite sense and no baseline subtraction (n = 3).

Every output word is compared with the reference models. It also checks that
samples run at one per 16 clocks, and that every mechanism occurred: trigger,
record end, double pulse, wire boundary, both CDM choices, override,
overflow, pass-through and personality switch. It takes well under a second.
