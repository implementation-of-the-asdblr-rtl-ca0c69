# DTMROC: time digitizer and Level 1 readout for 16 straw channels

The DTMROC reads out 16 straw-tube channels of a transition radiation tracker.
Each channel arrives from an 8-channel analog front end (the ASDBLR) as one
*ternary* current that encodes two discriminators, a low-threshold Track
discriminator and a high-threshold transition radiation (TR) discriminator.
The chip has four jobs:

1. Measure when the Track signal is present, to about 3 ns, in every 25 ns bunch
   crossing.
2. Hold every crossing for the 3.3 us the Level 1 trigger needs to decide.
3. Keep the three crossings around each accepted trigger.
4. Send those crossings off chip on one serial line at 40 Mbit/s.

A second serial line brings the triggers, resets, test pulse commands and
register settings.

This repository holds SystemVerilog for the digital part of that chip. It
also holds behavioural models for the two mixed-signal pieces the digital
logic cannot work without: the delay locked loop and the ternary input
receiver.

## Data path

```
 asd_i_ua[16] ─► ternary_receiver ×16 ─► track[16], tr[16]
                                                │
 bx_clk ─► dll ─► bc[7:0] (BC1..BC8) ─► frontend_latch ─► 144-bit slice / crossing
                                                │
                                         pipeline (132 × 144)
                                                │
 cmd_in ─► command_decoder ─ l1a ─► derandomizer (13 events × 3 slices)
              │   │   │                         │
              │   │   └► trigger_counters ─ hdr ┘
              │   └► register_file ─► dac_code[4], tp_amp, tp_delay
              └► testpulse_gen ─► tp_pulse[1:0]
                                                │
                                      readout_controller ─► data_out
```

Everything runs on the 40 MHz crossing clock `bx_clk`. The only exceptions are
the 128 time-bin sampling flops, which run on the DLL phase clocks.

### Ternary input

The front end's two discriminators each switch a 200 uA current source onto a
shared output, so a channel carries 0, 200 or 400 uA: no hit, Track, or Track
plus TR. Because the TR threshold is always above the Track threshold, TR never
appears without Track, so three levels are enough. `ternary_receiver` takes the
current as a 10-bit code in uA and compares it against 100 uA and 300 uA. The
real receiver is a low-impedance current-input circuit. This model keeps only
its decision.

### Time bins (dll, frontend_latch)

The DLL turns the crossing clock into eight 40 MHz clocks, BC1..BC8, spaced
one eighth of a period (3.125 ns) apart. `frontend_latch` samples all 16 Track
levels on the rising edge of each phase clock, which gives eight bins per
crossing. It samples the TR levels on the same edges and reduces them to one
bit per channel: the bit is set if TR was seen in any bin. At the next `bx_clk`
edge the 16 × (8 + 1) = 144 bits are latched as the timeslice of the crossing
that just ended.

The `dll` model is a line of delay elements. The first is half a bin long and
the rest are one bin long, so BC(k+1) rises (2k+1) × 1.5625 ns after `bx_clk`.
That places every sampling edge in the middle of its bin, and BC8 at 23.4 ns
stays clear of the next crossing's edge, where the slice is latched. A real
implementation needs a DLL with a lock loop. The model is always locked and is
not synthesizable.

Slice layout: bits `[9*ch +: 9]` belong to channel `ch`. Bit `9*ch+k` is the
Track sample at BC(k+1), and bit `9*ch+8` is the TR bit.

### Level 1 latency (pipeline)

`pipeline` is a 132-location, 144-bit circular buffer memory. Each clock it
reads the location under its pointer and then overwrites it. A slice therefore
leaves exactly 132 clocks after it entered, which at 25 ns per crossing is the
3.3 us trigger latency. The memory has no reset: its output is undefined until
it has filled once.

### Trigger and derandomizer

A Level 1 trigger makes `derandomizer` copy the pipeline output of the trigger
cycle and of the next two cycles (three consecutive crossings) into a free
event slot. It stores them together with a header taken from
`trigger_counters`:

- an 8-bit event count since the last event counter reset;
- an 8-bit bunch count since the last bunch counter reset.

Thirteen events fit. A trigger that arrives with 13 events held, or while the
previous event is still being captured, is dropped and flagged on
`derand_overflow`. The event counter still advances, so a gap shows up in the
event numbers.

End to end, for a trigger whose last command bit is sampled at clock edge E,
the event holds the crossings that began at edges E-134, E-133 and E-132. Two
of those edges are spent in the front-end latch and the pipeline write, and
132 inside the pipeline. With the 3-bit trigger code this means the trigger
must be sent 134 clocks after the crossing of interest. To target the crossing
that is 3.3 us old, move the trigger command two clocks earlier, or lower the
pipeline depth by two.

### Readout line

`readout_controller` sends the oldest complete event, one bit per clock:

| field        | bits | order           |
|--------------|------|-----------------|
| start bit    | 1    | always 1        |
| event count  | 8    | MSB first       |
| bunch count  | 8    | MSB first       |
| slice 0,1,2  | 3×144| bit 0 first     |

That is 449 bits, followed by at least one idle 0, so events leave back to back
every 450 clocks (11.25 us). The line idles at 0. The next slice is requested
from the derandomizer while the current one is shifting out, which hides the
derandomizer's one-cycle read latency. No zero suppression is done: the
"sparsification" is the Level 1 selection itself.

At the 75 kHz maximum trigger rate (533 clocks per trigger on average) the line
is about 84% busy. In the random-arrival test below, derandomizer occupancy
peaks at 11 of 13.

## Command line

`cmd_in` is sampled on every `bx_clk` edge and idles at 0. Fields are sent MSB
first:

| command                 | bits                                   | effect |
|-------------------------|----------------------------------------|--------|
| Level 1 trigger         | `1 1 0`                                | capture an event |
| soft reset              | `1 0 1 0001`                           | empty derandomizer, abort readout |
| bunch counter reset     | `1 0 1 0010`                           | bunch count = 0 on the next clock |
| event counter reset     | `1 0 1 0011`                           | event count = 0 |
| test pulse              | `1 0 1 0100`                           | fire after `tp_delay` crossings |
| register write          | `1 0 1 1000 addr[3:0] data[7:0]`       | load a register |
| reserved                | `1 0 0`, `1 1 1`                       | ignored |

The trigger has the shortest code, so triggers can arrive every three
crossings. Decoder outputs are one-cycle pulses, one clock after the last bit.

Registers (all 8 bits, reset to 0, write-only):

| addr | register |
|------|----------|
| 0, 1 | Track and TR threshold DAC codes, first front-end chip |
| 2, 3 | Track and TR threshold DAC codes, second front-end chip |
| 4    | test pulse amplitude code |
| 5    | test pulse delay, in crossings |

`testpulse_gen` raises both `tp_pulse` outputs for one crossing, `tp_delay` + 1
clocks after the clock in which the decoder's `tp_fire` pulse is high. The
pulse shaping and the amplitude setting are analog and outside this RTL.

## What is outside the RTL

The design is the digital side of a mixed-signal chip. These parts have no
logic function and are represented only by ports of `dtmroc_top`:

- The LVDS receivers for the clock and command inputs: their CMOS outputs are
  `bx_clk` and `cmd_in`.
- The LVDS output driver: its input is `data_out`.
- The four 8-bit threshold DACs: their codes are `dac_code[0..3]`.
- The band-gap reference.
- The test pulse shapers: their inputs are `tp_pulse` and `tp_amp`.

The analog front-end chip (preamplifier, shaper with ion tail cancellation,
baseline restorer, discriminators and current-sum driver) is not modelled.
Testbenches drive its output current directly.

## How far to trust it, and what was chosen here

These parts follow the chip as it is specified:

- 16 channels, two 8-channel front ends;
- 8 bins per 25 ns from eight DLL phases, plus one TR bit per channel;
- 144-bit timeslices;
- a 132-deep pipeline clocked at 40 MHz;
- three crossings per trigger, a 13-event derandomizer;
- serial readout at the 40 MHz clock rate;
- a serial command input carrying triggers, resets, test pulse and register
  loads;
- four 8-bit DAC codes;
- two test pulse outputs with programmable amplitude and delay.

These are choices of this design, because no specification of them was
available:

- all command codes and lengths;
- the register map;
- the packet format and header, and the 8-bit counters;
- the three kinds of reset and what each clears;
- the TR bit being the OR over the crossing;
- the mid-bin placement of the phase clocks;
- the receiver thresholds;
- the drop-on-full policy;
- the test pulse delay unit (whole crossings);
- reset values.

The chip's single-event-upset exposure is known to matter, but no protection
(parity, triplication) is built here. The time-bin sampling uses eight clock
domains that are resynchronised by one `bx_clk` flop stage. This is safe only
if the phase edges stay inside the crossing, which the DLL guarantees.

## Files

`rtl/` has one module or package per file:

- `dtmroc_pkg` holds the sizes, the slice and header types, the command codes
  and the register map;
- `dtmroc_top` is the chip;
- the remaining files are the blocks named above.

`dll` and `ternary_receiver` are behavioural models (see above). All the other
files are synthesizable.

`tb/` has a self-checking testbench per block (`tb_<block>`) and two full-chip
tests, both at the default sizes:

- `tb_dtmroc_top`: register writes, test pulse timing, counter resets, single
  triggers, a 16-trigger burst (13 kept, 3 dropped, back-to-back readout every
  450 clocks), and a soft reset in mid-packet. Every packet is decoded and
  compared with the recorded crossings.
- `tb_l1_rate_75khz`: 300 randomly spaced triggers at 75 kHz on average.

Every testbench ends with a line `TB_RESULT checks=N failures=M`.

## Simulating

Verilator 5 with timing support, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dtmroc_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/dtmroc_pkg.sv tb/tb_dtmroc_top.sv
./obj_dir/Vtb_dtmroc_top
```

Replace the top module and testbench file to run any other test. Lint a single
module with
`verilator --lint-only -Wall -y rtl rtl/dtmroc_pkg.sv rtl/<module>.sv`.
Unused-parameter warnings from the package are expected when linting one block
alone.

Sizes are parameters with the chip's values as defaults: `PIPE_DEPTH`,
`DERAND_EVENTS`, `SLICES_PER_EV`, `NCH` and `NBINS` in `dtmroc_pkg`, and per
module `DEPTH`, `EVENTS`, `WIDTH`, and so on. If you change the pipeline depth,
change the `134` offset used by the full-chip testbenches to match (depth + 2).
