# Smart router for SPAD arrays in time-correlated single photon counting

Time-correlated single photon counting (TCSPC) measures when single
fluorescence photons arrive after each laser pulse. Good timing converters are
large and power hungry, so an imaging array cannot have one per pixel. But
photon rates must stay far below the laser rate to avoid pile-up (under 10 %
of an 80 MHz laser), so only a few of the pixels of a dense array fire in any
one excitation period. A few shared high-performance converters are enough, if
the photons that do arrive are steered to them efficiently.

This design is that steering logic. It connects a 32 x 32 array of single
photon avalanche diodes (SPADs) to five shared time-measurement channels
(F-TACs, fast time-to-amplitude converters that accept one start per laser
period). In every laser period, all pixels that saw a photon compete for the
five channels. The five with the highest priority win; the rest are dropped.
Priorities rotate every period, so every pixel wins equally often whatever
the light distribution, and a hot pixel cannot hide its neighbours. While the
competition runs, each photon's timing edge waits in a small per-pixel delay
line. It then leaves on the winning channel's line with a fixed, known delay.

No address bus leaves the array. The same shared lines used for the
competition also tell the outside which pixel won each channel.

## How a selection works

### Priorities

Each pixel has a 10-bit counter that advances once per laser period. At
start-up the counters are switched on one after another along the array: the
external enable `en_ext` starts pixel 0, and each pixel hands the enable to
the next one a period later. From then on, pixel *n* always holds pixel 0's
count minus *n* (mod 1024). All 1024 pixels therefore hold different values.

When a pixel joins a selection, it copies its count into a shift register
with the bit order reversed. The counter's least significant bit, which
toggles every period, becomes the most significant priority bit. So no pixel
keeps a high priority for two periods in a row. For the first three pixels:

| period | pixel 0 | pixel 1 | pixel 2 |
|---|---|---|---|
| 1 | 1000000000 | 0000000000 | 0000000000 |
| 2 | 0100000000 | 1000000000 | 0000000000 |
| 3 | 1100000000 | 0100000000 | 1000000000 |
| 4 | 0010000000 | 1100000000 | 0100000000 |

### Comparison lines and state registers

There is one shared comparison line per channel, L5 ... L1. On silicon, each
line is a resistor to the supply. Every pixel that requests the line switches
on a current source, so the line voltage drops one step per requesting pixel.
Comparators turn the voltage back into a count. Only five thresholds exist,
so the count saturates at five. In this RTL a line is represented by that
resolved count, its *level* (`comparison_lines`).

Each competing pixel has a 5-bit state register (MSB = channel 5). A set bit
means "this channel can still be mine". A selection starts with `11111` and
compares one priority bit per step, MSB first. In each step:

1. If the pixel's current bit is 1, it draws current from every line whose
   state bit is set.
2. It reads the level *N* of the line under its first set state bit and
   forms a thermometer code: *N* ones from the left.
3. It shifts the code right until its first bit lines up with the first set
   state bit. It then keeps `state & code` if its bit was 1, or
   `state & ~code` if it was 0.

Pixels with equal state registers form a *group* competing for the same run
of adjacent lines. Every line of a group carries the same level. Step 3
splits a group of *M* lines with *N* high bits into the first *N* lines, for
the *N* pixels with a 1, and the remaining *M - N* lines, for the pixels with
a 0. If *N >= M*, all lines go to the pixels with a 1 and the others are
dropped (state `00000`).

After ten steps, at most one pixel is left in each group, and the first line
of a group goes to its highest pixel. So the k-th highest priority always
ends on channel 6 - k: the highest on F-TAC 5, the next on F-TAC 4, and so
on. Pixels below fifth place are dropped.

The six-pixel example below has priorities A > B > C > D > E > F and shows
the state registers step by step. `tb_routing_fsm` and `tb_line_decoder`
replay it.

| pixel | start | bit 1 | bit 2 | bit 3 | bit 4 | result |
|---|---|---|---|---|---|---|
| A | 11111 | 11110 | 11100 | 10000 | 10000 | F-TAC 5 |
| B | 11111 | 11110 | 11100 | 01100 | 01000 | F-TAC 4 |
| C | 11111 | 11110 | 11100 | 01100 | 00100 | F-TAC 3 |
| D | 11111 | 11110 | 00010 | 00010 | 00010 | F-TAC 2 |
| E | 11111 | 00001 | 00001 | 00001 | 00001 | F-TAC 1 |
| F | 11111 | 00001 | 00001 | 00000 | 00000 | dropped |

### Pipelining: two sets of lines

Ten steps inside one 12.5 ns laser period would need an 800 MHz step clock.
Instead, `Clock_HF` runs at five cycles per period (400 MHz at 80 MHz), and a
selection takes two periods. To start a new selection every period anyway,
there are two sets of five comparison lines. Selections use them in
alternation, so the selection of period *p* runs on set *p* mod 2 while
period *p + 1* already uses the other set. `selection_sequencer` makes the
period strobe (`tick`, the last `Clock_HF` cycle of a period) and a 10-cycle
step window for each set. A pixel remembers which set its selection uses.

The number of sets is `ceil(PRIO_BITS / HF_PER_PERIOD)`. Set
`HF_PER_PERIOD = 10` for the unpipelined single-set arrangement.

## The delay line

A photon's edge must reach the converter with picosecond timing, long after
it arrived. Each pixel has a delay line (`delay_line_ctrl` with
`ring_oscillator`) that works as follows:

- The photon edge sets a flip-flop, which starts a gated ring of nine
  inverting stages.
- A counter clocked by the ring counts its periods.
- After `DELAY_CYCLES` periods the output goes high.
- When the ring output next falls, the flip-flop is cleared. This stops the
  ring and ends the pulse.

With a 14 ns ring period, two cycles give the 28 ns delay of the fabricated
prototype. This design uses four cycles (56 ns), because the delay must cover:

- the rest of the photon's period (up to 12.5 ns);
- the synchroniser that tells the pixel logic about the photon (up to
  3 cycles of 2.5 ns);
- the ten selection steps (25 ns).

The output pulse is half a ring period (7 ns) wide. Consecutive-period pulses
on one channel line therefore stay separate.

While the delay line is busy (photon to end of pulse, about 63 ns), the
pixel ignores further photons. Its state register is never restarted before
its own selection and output are complete. The per-pixel controller in
`pixel_cell` has four states:

- **IDLE**: waiting for a photon.
- **PENDING**: a photon was seen; waiting for the end of its period.
- **SELECT**: ten steps on the assigned set of lines.
- **ROUTED**: the delayed pulse is gated onto the won channel; the pixel
  returns to IDLE when its delay line frees itself.

The ring oscillator is a behavioural model with delays, not synthesizable
logic. It keeps the timing of the ring (one lap of nine stage delays per half
period, stage delay 28/36 ns) but not its individual stages. It also has no
jitter, mismatch or supply sensitivity. The rest of the delay line is
ordinary logic, but it is asynchronous: it is clocked by the photon and the
ring, and it clears itself.

## Finding out who won: the line decoder

Outside the array, `line_decoder` watches one set of lines and rebuilds each
winner's priority word without any address lines. It relies on three facts:

- Inside a group, lines are numbered I = 1, 2, ... from the L5 side.
- Line I belongs to the high half exactly when the group's level N >= I.
- Its comparison result (N >= I) is, at that step, the priority bit of the
  pixel that will end on that line.

One flip-flop between each pair of adjacent lines records where groups have
split, which happens when a result of 1 sits above a 0. A line's threshold is
one plus the number of lines above it in its group, so L5 needs one
comparator and L1 five, fifteen in all. The bits are shifted into one 10-bit
word per channel.

`address_recovery` turns a word into a pixel position. Pixel *n* held count
`stamp - n`, where `stamp` is pixel 0's count in that period, so

    address = stamp - bitreverse(priority)   (mod 1024)

Addresses are right only after start-up (`ready`, 1024 periods after
`en_ext`). A channel that nobody won repeats the word of the line above it.
Whether a channel was used is known from whether its line carried a pulse.

## Top level: `spad_router_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk_hf` | in | 1 | step clock, `HF_PER_PERIOD` cycles per laser period, phase-locked to the laser |
| `rst_n` | in | 1 | synchronous active-low reset; also clears the delay lines |
| `en_ext` | in | 1 | raise once and hold: starts the counter start-up chain |
| `photon` | in | `NUM_PIXELS` | SPAD pulses, asynchronous; the rising edge is the timing event |
| `ftac_start` | out | 5 | channel lines to the converters, bit 4 = F-TAC 5 |
| `ready` | out | 1 | start-up complete |
| `tick` | out | 1 | last `clk_hf` cycle of each laser period |
| `ref_count` | out | 10 | pixel 0's priority count in this period |
| `line_level` | out | sets x 5 x 3 | resolved levels of all comparison lines |
| `sel_valid` | out | 1 | one pulse per laser period's finished selection |
| `sel_addr[k]` | out | 5 x 10 | address of the pixel routed to channel k (k = 4 is F-TAC 5) |
| `sel_prio[k]` | out | 5 x 10 | its decoded priority |

Latency, counted in `clk_hf` cycles after the end of a photon's period:

- The ten steps take cycles 1 to 10.
- `sel_valid` with the addresses follows two cycles after the last step.
- The channel pulse leaves `DELAY_CYCLES` ring periods after the photon.

A photon must reach the pixel logic before its period ends. One that comes
in the last two or three `clk_hf` cycles of a period joins the next period's
selection, which the 56 ns delay still covers.

Parameters (defaults in brackets):

- `NUM_PIXELS` [1024]
- `PRIO_BITS` [10]
- `HF_PER_PERIOD` [5]
- `NUM_SETS` [derived, 2]
- `DELAY_CYCLES` [4]
- `RING_STAGES` [9]
- `STAGE_DELAY_NS` [28/36]

`NUM_CH` = 5 is fixed in `router_pkg`.

## Files

| file | contents |
|---|---|
| `rtl/router_pkg.sv` | channel count, level type, thermometer and first-one helpers |
| `rtl/priority_generator.sv` | per-pixel counter, start-up chain, reversed shift register |
| `rtl/routing_fsm.sv` | per-pixel state register and its update |
| `rtl/comparison_lines.sv` | shared lines as saturating counts |
| `rtl/ring_oscillator.sv` | behavioural gated ring |
| `rtl/delay_line_ctrl.sv` | delay-line flip-flop, counter and gates |
| `rtl/pixel_cell.sv` | one pixel: the parts above plus its controller and output gates |
| `rtl/selection_sequencer.sv` | period strobe, set rotation, step windows, stamps |
| `rtl/line_decoder.sv` | priority recovery from the lines |
| `rtl/address_recovery.sv` | priority to pixel address |
| `rtl/spad_router_top.sv` | the array and read-out |

Every `rtl/` module has a self-checking testbench `tb/tb_<module>.sv`, with
four for the top:

- `tb_spad_router_top` runs a 16-pixel array for 1100 periods, including the
  wrap of the 10-bit counter.
- `tb_spad_router_full` runs the default 32 x 32 array through its
  1024-period start-up and then 400 periods of random photons.
- `tb_prototype` runs a seven-pixel, five-channel array at a 20 MHz laser
  rate without the pipeline: `HF_PER_PERIOD = 10` gives one set of lines and
  a 200 MHz step clock, and `DELAY_CYCLES = 9` (126 ns) holds each photon
  until its route is known. No line can saturate with seven pixels.
- `tb_fairness` checks the equal read-out probability. All 16 pixels of a
  small array fire together 300 times, at random intervals of 8 to 15
  periods, so only five can win each time. Every pixel must win within 40 %
  of the mean (5/16 of the bursts). In a typical run each pixel wins 87 to 99
  times, against a mean of 93.

The first three benches use an independent model of the priorities. For each
period they:

- predict the winner of each channel and check the recovered addresses;
- check that each winner's pulse arrives on its channel exactly one
  delay-line time after the photon (56 ns, or 126 ns in the prototype
  bench), and that no other pulse appears;
- fire photons at busy pixels, which must be ignored.

They also count that every mechanism occurs: empty periods, fewer photons
than channels, exactly five, photons dropped, group splits, saturated lines
(except with seven pixels), both line sets (where there are two), and the counter wrap.

## Simulating

With Verilator 5:

    verilator --binary --timing -Irtl rtl/router_pkg.sv tb/tb_spad_router_top.sv \
        --top-module tb_spad_router_top
    ./obj_dir/Vtb_spad_router_top

Any other bench runs the same way; the tools find the modules in `rtl/`. Each
bench ends with a line `TB_RESULT checks=N failures=M`.

The full-size bench builds 1024 pixel cells and takes several minutes to
compile. Use `-j` to build in parallel.

## Departures and limits

- **Analog parts.** The comparison lines are modelled by their resolved
  counts; resistor values, current sources (300 ohm, 730 uA, about 220 mV
  per source), settling and comparator offsets are not modelled. The SPADs,
  the F-TAC converters and their ADCs are outside this RTL: photons are
  inputs and the channel lines are outputs.
- **Clocking.** One clock with a period strobe stands for the laser clock and
  the step clock, which must be phase-locked at an integer ratio. The
  ratio (5) and therefore the two line sets are choices of this design.
- **Delay length and pulse shape.** The delay is four ring cycles rather than
  the prototype's two, to cover a two-period selection. The delay line
  clears itself half a cycle after its output rises rather than a full cycle
  later, which gives a 7 ns pulse.
- **Busy pixels.** A pixel ignores photons until its delay line is free
  (about 63 ns plus synchronisation). At the pile-up-limited rates TCSPC
  works at, this costs little, but it is a dead time per pixel.
- **Photon timing reference.** The pixel logic learns of a photon through a
  two-flip-flop synchroniser. A photon in the last few nanoseconds of a
  period is therefore selected with the next period's priorities. Its pulse
  still carries its true arrival time plus the fixed delay.
- **Empty channels.** The decoder cannot tell an empty channel from the
  lines alone; use the channel pulse.
- **Address validity.** Addresses are valid only after the 1024-period
  start-up (12.8 us at 80 MHz).
- **Synthesis.** `spad_router_top` and `pixel_cell` contain the behavioural
  ring oscillator. For synthesis, the ring must be replaced by the real
  macro, with the same two ports.
