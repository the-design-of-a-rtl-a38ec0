# Eight channel alarm clock: a timing pulse generator for a 360 Hz linear collider

This is synthesizable SystemVerilog for a small timing chip of the SLC (SLAC
Linear Collider) control system. Each machine pulse is announced by a
*fiducial*, 360 times a second. After each fiducial the chip raises eight
output pulses. Each one is delayed by its own programmed number of clock
periods. The clock runs at 119 MHz, so the delay is set in steps of 8.4 ns
anywhere across the 2.78 ms between fiducials. Every output pulse is eight clock
periods (67.2 ns) long.

The obvious design gives each channel its own presettable down counter, which
fires at terminal count. This chip shares one counter among all eight channels
instead. The counter holds the time since the fiducial. The eight programmed
times sit in a small content addressable memory (CAM), and every word of it
compares itself with the counter on every clock. A counter needs a lot of logic
around each flip-flop. A CAM word needs only a latch and an exclusive-or per
bit. So the shared design is much smaller, which mattered on the original ECL
gate array: it had 224 flip-flop equivalents.

## Block diagram

```
            data_in[19:0] ──┐
                            ├─ load_sel ─► data lines[19:0] ──┬──────────────► preload value
   elapsed_counter.count ───┘                                 │
        ▲  (fiducial, clk_en, preload)                        ▼
        │                                          cam_array (8 words x 20 latches)
        └── overflow = count[18] & count[17]        latch_en[7:0] writes words
                    │                               match_lsb[7:0], match_hi[7:0]
                    │                                         ▼
                    │                               pulse_former (8 flip-flops)
                    ▼                                         ▼ pulse[7:0]
              output_stage: pulse_p/n[7:0] and clk_out_p/n gated by out_en,
                            overflow_p/n always driven
```

| File | Contents |
|---|---|
| `rtl/alarm_clock_pkg.sv` | shared sizes: 8 channels, 20-bit times, 3 low bits, 8-clock pulse |
| `rtl/cam_array.sv` | 8 x 20 CAM made of transparent latches, with split match outputs |
| `rtl/elapsed_counter.sv` | 20-bit time-since-fiducial counter, preload, clock enable, overflow |
| `rtl/pulse_former.sv` | per-channel flip-flop that turns the two matches into an 8-clock pulse |
| `rtl/output_stage.sv` | true/complement output pairs with output enable |
| `rtl/alarm_clock_chip.sv` | top level: data line select and the four blocks |
| `tb/*_tb.sv` | one self-checking testbench per module |

## How an 8-clock pulse comes out of a CAM match

This is the part of the design that needs the most explanation.

Each word's comparison is split in two. One match covers the 3 low bits and one
covers the 17 high bits. Take a channel programmed with time T, and let the
counter run from 0:

* the **high match** is true for the eight counts that share T's upper 17
  bits. This is the eight-period "slot" that contains T.
* the **low match** is true once in every eight counts, whenever the low 3
  bits of the count equal those of T.

The low match is used as the enable of a flip-flop, and the high match is its
data input. At count T both matches are true, so the flip-flop is set. Over the
next seven counts the low match is false and the flip-flop holds. At count T+8
the low match is true again, but the count is now in the next slot. The high
match is false, so the flip-flop clears. The result is a pulse exactly eight
clocks long that starts on any clock period. Each channel needs only one
flip-flop and no counter.

This works for any T, including T = 0 and a T whose pulse crosses a slot
boundary. That is because the pulse is bounded by two low matches, not by the
slot.

**Timing.** The flip-flop samples on the rising clock edge.

* The fiducial is sampled on edge 0, and the count becomes 0.
* Edge *n* samples count *n*−1.
* So the pulse of a channel programmed with T is high after edges T+1 through
  T+8, and drops after edge T+9.

The fixed one-edge offset is the same for all channels.

A pulse whose T is within the last eight clocks before the next fiducial is cut
short by that fiducial. The fiducial clears both the counter and the pulses.

## The shared data lines

The CAM has a single set of 20 data lines. It uses them both as the write data
of its latches and as the comparison key. The `load_sel` input decides who
drives them:

* **`load_sel` = 1, loading:** the lines carry the external `data_in` pins.
  A word is written by raising its `latch_en` bit while the time is on
  `data_in`. The latches are transparent: the word follows the lines while the
  enable is high, and keeps the last value when it falls. Any number of enables
  may be high at once. With `load_sel` high, `data_in` is also the comparison
  key. Test equipment can use this to exercise the CAM directly.
* **`load_sel` = 0, running:** the lines carry the counter. Words must not be
  written in this mode, because a written word would follow the count. An
  assertion in the top level checks that `latch_en` is low whenever
  `load_sel` is low.

Keep `out_en` low while loading. With `load_sel` high, the comparison runs
against `data_in`, and the pulse flip-flops can pick up stray matches. The next
fiducial clears them.

## Counter, test inputs and overflow

`elapsed_counter` is a plain 20-bit synchronous up counter. Its controls, in
order of priority, all act on the rising edge:

1. `fiducial` clears the count.
2. `preload` loads the count from the data lines.
3. `clk_en` low holds the count. This stands in for gating the input clock.

The pulse flip-flops hold with the counter when `clk_en` is low, just as they
would with a gated clock. `fiducial` and `preload` act even when `clk_en` is
low.

A full period at 360 Hz is 119 MHz / 360 Hz ≈ 330,556 clocks. A 20-bit count
covers 1,048,576 clocks, or 8.8 ms. The `overflow` output is
`count[18] & count[17]`:

* it rises at 3/8 and 7/8 of the counter's range;
* it falls at 1/2 and at 0.

In normal operation the count never reaches 3/8 (393,216). So a rising overflow
means a fiducial was missed. The count wraps from 2^20−1 to 0.

## Outputs

`output_stage` drives each output as a differential pair, written here as a
true and a complement logic signal:

* the eight pulses (`pulse_p/n`);
* a buffered copy of the clock (`clk_out_p/n`);
* the overflow (`overflow_p/n`).

`out_en` enables the pulse pairs and the clock pair. A disabled pair rests at
logic 0 (true low, complement high). The overflow pair is not gated by
`out_en`. The clock pair is a combinational AND of `clk` and `out_en`.

## Top-level interface (`alarm_clock_chip`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | 119 MHz clock |
| `fiducial` | in | 1 | start of period; clears counter and pulses (synchronous) |
| `clk_en` | in | 1 | low: counter and pulses hold |
| `preload` | in | 1 | load the counter from the data lines |
| `load_sel` | in | 1 | 1: data lines from `data_in`; 0: from the counter |
| `data_in` | in | 20 | times to write, preload value, test keys |
| `latch_en` | in | 8 | level-sensitive write enable per word |
| `out_en` | in | 1 | enables pulse and clock pairs |
| `pulse_p`, `pulse_n` | out | 8 each | channel pulses |
| `clk_out_p`, `clk_out_n` | out | 1 each | buffered clock |
| `overflow_p`, `overflow_n` | out | 1 each | overflow indication |

Parameters are `N_CHANNELS` = 8, `TIME_BITS` = 20 and `LSB_BITS` = 3. The
pulse length is `2**LSB_BITS` clocks.

**Typical sequence:**

1. Set `out_en` = 0 and `load_sel` = 1.
2. For each channel, put its time on `data_in` and pulse its `latch_en` bit.
3. Set `load_sel` = 0 and `out_en` = 1.
4. Raise `fiducial` for one clock at each machine pulse.

## What is taken from the original design and what is not

These parts follow the original chip:

* eight 20-bit words of transparent latches;
* per-bit exclusive-or comparison and the 3/17 split of the match;
* gating of the high match by the low match to make an 8-clock pulse;
* the 20-bit resettable counter that drives the data lines;
* the overflow as the AND of the second and third most significant bits;
* output enable on the pulse and clock outputs;
* test inputs that preload the counter and stop the clock.

These parts are this design's own choices:

* **The pulse circuit.** The original says only that the low match gates the
  high match to produce the pulse. The enabled flip-flop is the simplest
  circuit that gives that result.
* **The counter.** The original is "pseudo-synchronous", and its carry scheme
  is unknown. This one is fully synchronous.
* **The data line interface.** `load_sel`, using `data_in` as the preload value,
  and individual word enables with no address decoder or read-back.
* **Synchronous controls.** The fiducial is a synchronous input, the clock is
  stopped with an enable rather than a gated clock, and the inputs have the
  priority given above.
* **Clearing.** The fiducial clears the pulses. A disabled output pair rests
  at 0, and overflow is left ungated.
* **Signal levels.** Outputs are logic-level true/complement pairs. ECL levels
  and drive strength are not modelled.

These parts are not included:

* **Fiducial detection.** The clock delivered to the timing module has one
  missing pulse that marks the fiducial. How it is detected is not specified,
  so `fiducial` is an input here.
* **The 16-channel module around the chip.** Its bus interface and registers
  are not specified. It would presumably use two of these chips.

Size: 160 latch bits, 28 flip-flops, and about 240 word-level cells after
coarse synthesis.

## Verification

Each testbench checks its module against a model written in the testbench. It
prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `cam_array_tb` writes random words and checks both match outputs of every
  word against keys. The keys are equal to a stored word, differ from it in one
  low bit or one high bit, or are random. It also checks latch transparency and
  hold.
* `elapsed_counter_tb` drives a random mix of fiducial, preload and clock
  enable. It then runs the full 2^20 range and checks that overflow changes
  only at 3/8, 1/2, 7/8 and 0, and that the count wraps.
* `pulse_former_tb` derives the matches from its own count. It checks the pulse
  on every edge and measures every pulse at eight enabled clocks, with random
  clock gating.
* `output_stage_tb` checks all pairs against enable, in both clock phases.
* `alarm_clock_chip_tb` is end to end at full size, with no parameter changes.
  It runs:
  * short periods with exact timing checks: rise T+1 edges after the fiducial
    edge, eight edges high;
  * a period with random clock gating and output disabling;
  * preloads through the overflow points and the wrap;
  * one complete 330,556-clock interpulse period, with times spread over it and
    the last pulse ending on the last clock.

  It counts each mechanism and fails if any never happened: word write,
  fiducial, pulse, gating, disabled output, preload, overflow rise and fall,
  wrap. It runs in well under a second.

To simulate with Verilator, for example the top level:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/alarm_clock_pkg.sv tb/alarm_clock_chip_tb.sv --top-module alarm_clock_chip_tb
./obj_dir/Valarm_clock_chip_tb
```

Swap in another `tb/*_tb.sv` and its module name to run a block test. For a
lint check, use `verilator --lint-only -Wall -Irtl -y rtl rtl/alarm_clock_pkg.sv
rtl/alarm_clock_chip.sv`. The only warnings are for package constants that a
given module does not use.
