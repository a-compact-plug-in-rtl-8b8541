# LHC-style trigger and fast-command emulator (FPGA RTL)

Front-end electronics for LHC experiments must be tested with the same fast
commands the experiment's timing system will send them. The main one is the
Level-1 trigger accept (LV1A), which arrives at random times. This design
generates those commands on a small FPGA board. Each command can follow a
programmed list of intervals. The trigger can instead follow truly random
intervals, measured from an avalanche-noise source. A rough model of which
LHC bunch slots are filled can blank triggers that fall in empty slots. The
commands leave the FPGA in three forms: a serial T1 stream, a 40.08 MHz
clock with pulses removed (CLK+T1), and a TTC-style bi-phase-mark stream for
an optical link.

The four fast commands, their priorities and their serial codes:

| Command  | Meaning                              | Priority   | T1 code (first bit first) |
|----------|--------------------------------------|------------|---------------------------|
| Resynch  | soft reset of the front-end chips    | 1 (high)   | 1 1 0 |
| BC0      | bunch crossing zero                  | 2          | 1 0 1 |
| CalPulse | generate internal injection pulses   | 3          | 1 1 1 |
| LV1A     | level-1 trigger accept               | 4 (low)    | 1 0 0 |

The leading `1` marks a command. The two bits after it are the command
number, which is also the value of `te_pkg::fast_cmd_e`.

## Block structure

```
 host bus ─► host_interface ──cfg/start/stop/RAM writes──┐
                 │                                       ▼
                 └─► pot_spi_ctrl ─► SPI to the   pattern_generator
                                    two digital     ├ 4 × (interval_ram + burst_stage)
 rng_gate_in ─► rng_interface ──random intervals──► ├ masks, automatic BC0
 (comparator)                                       └ bunch_disposition (gap blanking)
                                                         │ cmd_req[3:0]
                                                         ▼
                                                    t1_encoder ─► t1_out
                                                         │
                                          ┌──────────────┴──────────────┐
                                          ▼                             ▼
                                  clk_t1_encoder                  ttc_encoder
                               clk40_out, clk_t1_out                ttc_out
```

`trigger_emulator` is the top. `clock_phase` supplies the timing slots, and
`te_pkg` holds the shared types, constants and register numbers.

## Clocking: one clock, four slots

The only clock is `clk` at 160.32 MHz, four times the 40.08 MHz LHC bunch
clock. On the board a PLL makes it; that PLL is not part of this RTL.
`clock_phase` counts four slots per 40.08 MHz period:

| slot | use |
|------|-----|
| 0 | 40.08 MHz clock high; TTC cell A begins |
| 1 | 40.08 MHz clock high; middle of TTC cell A |
| 2 | TTC cell B begins |
| 3 | middle of TTC cell B; `ce40` is high, so all 40.08 MHz logic updates at the end of this slot |

All fast-command logic (burst stages, bunch counter, T1 encoder, random
interval counter) runs on the `ce40` enable. Its registers change at the
start of slot 0, so every 40.08 MHz value is stable for a whole period.
This is what lets the two line encoders sample T1 at any slot. Reset `rst_n`
is asynchronous and active low.

## Burst stages: how interval lists become pulses

This is the core of the design, and its timing needs care.

Each command has its own 1024 × 32-bit `interval_ram`, holding t1, t2, …,
tN in 40.08 MHz cycles. It has two ports, like an FPGA block RAM: the host
writes and reads entries on one, and the stage reads on the other. A
`burst_stage` turns the list into one-cycle pulses. Counting cycle 0 as the one in which `start` is sampled, pulse k
comes in cycle t1 + … + tk. Adjacent pulses are therefore exactly tk cycles
apart.

The stage has three parts:

* an address pointer, which rests at 0 so that t1 is already at the RAM's
  registered output;
* a down counter, loaded with the current interval;
* the terminal count, which fires the pulse, loads the next interval
  (already waiting at the RAM output) and advances the pointer.

Because every interval is at least 3 cycles, the one-cycle RAM read latency
never shows.

A burst ends in one of three ways:

* after the pulse whose next entry is **zero or below 3** (3 is the minimum
  LV1A spacing; smaller values are illegal);
* after all **1024 entries** have been used;
* on **stop**, written by the host. The pointer goes back to entry 0, so the
  next start replays the list from the beginning.

Intervals are 32 bits wide, which allows 3 to 2^32 − 1 cycles.

**Random mode** applies to the LV1A stage only, and changes where its list
comes from, not how it is played. With CONFIG[4] set, a start does two
things in turn:

1. It loads the LV1A RAM from the random source. Each interval measured by
   `rng_interface` is written to the next entry, until `NUM_RANDOM` entries
   (at most 1024) are filled. A list shorter than 1024 gets a zero end mark.
   STATUS[5] is high during the load, and host writes to the LV1A RAM are
   ignored. Once it is done, the host can read the list back, for example
   to save the random intervals it played.
2. It then starts all four stages in the same 40.08 MHz cycle, exactly as
   a normal start does.

The LV1A spacing of the burst is therefore exactly the measured intervals.
The exponential distribution of the source reaches the output unchanged,
apart from the 3-cycle minimum. The load takes about `NUM_RANDOM` times the
mean interval. A stop aborts it. With CONFIG[4] still set, every start
loads a fresh list; to replay the same random list, clear CONFIG[4] and
start again.

Why load first: feeding the stage one value at a time, as the values are
measured, would distort the distribution. Source and stage run at the same
mean rate, so the stage would often wait for a value and values would often
be overwritten. In simulation at 100 kHz such a direct feed stretched the
mean spacing by about 70 %.

## Random intervals

On the board, an avalanche-biased transistor diode feeds a two-stage
amplifier. The amplified noise rides on a DC level set by a digital
potentiometer and drives an FPGA input used as a comparator. A second
potentiometer sets the diode bias, which sets the mean rate. None of that
analog circuit is in this RTL.

`rng_interface` does the following:

* synchronises the comparator input (`rng_gate_in`);
* detects rising transitions;
* counts the 40.08 MHz cycles between accepted transitions. Each count is
  one random interval.

Transitions closer than 3 cycles to the last accepted one are ignored and
counted (`RNG_SHORT`). This keeps every value legal, but for a high mean
rate it slightly changes the short end of the distribution: at a 1 MHz mean
rate about 7 % of the transitions fall within 3 cycles. The latest value
waits in a one-entry register until the loader takes it. A value still
untaken when the next one is measured is replaced and counted (`RNG_OVR`);
outside a load this is normal and harmless.

`pot_spi_ctrl` writes the two potentiometers over SPI: mode 0, 8-bit code
MSB first, one chip select each. The host sends the wiper codes. Converting
a wanted mean rate (1 kHz to 1 MHz) into a code is left to host software,
since it depends on the analog circuit.

## Priority and T1 encoding

`t1_encoder` keeps one pending flag per command. Whenever the line is free
it takes the highest-priority pending command and shifts out its three-bit
code. A request seen in cycle k puts the start bit on the line in cycle k+1.
Codes may follow each other with no idle cycle. A request for a command that
is already pending cannot be distinguished from it: it is merged and
counted (`T1_DROPS`). For example, four simultaneous requests leave as
Resynch, BC0, CalPulse, LV1A over 12 consecutive cycles.

## Line codes

* **CLK+T1** (`clk_t1_out`): the 40.08 MHz clock with its high phase removed
  in every period whose T1 bit is 1. `clk40_out` is the same clock without
  removal and with the same alignment. Both are registered, one 160.32 MHz
  cycle after the internal slot.
* **TTC** (`ttc_out`): each period carries two 12.5 ns cells. Cell A carries
  the T1 bit and cell B the unused channel B, held at 1. The line toggles at
  the start of every cell, and also in the middle of a cell that carries 1
  (bi-phase mark at 160.32 MBaud). The code has no DC component. T1 = 1,0,0
  gives the cell sequence 1 1 0 1 0 1.

## Bunch disposition

`bunch_disposition` counts bunch slots 0…3563 on every 40.08 MHz cycle. It
looks up each slot in a fill map that a constant function builds at
elaboration. The map approximates the nominal LHC schemes:

* trains of 72 bunches;
* 8 empty slots between the trains of one injection;
* 38 empty slots between injections, which hold 3,3,4 ×3 then 3,3,3 trains;
* a 122-slot abort gap at the end of the orbit.

Proton mode fills all 2808 train slots. Ion mode fills every fourth slot,
giving 702 bunches at 100 ns spacing. All the numbers are parameters.

With the disposition enabled, an LV1A in an empty slot is dropped and
counted (`GAP_SUPP`). With automatic BC0 enabled, BC0 is requested at slot 0
of every orbit instead of from the BC0 list.

## Host register map

The host bus is a plain synchronous word bus:

* `bus_wr` with `bus_addr`/`bus_wdata` writes one word per clock;
* `bus_rdata` returns the addressed register or RAM entry one clock later.

On the board, a USB interface chip or a VME carrier drives this bus. Its
external protocol is not part of this design.

| address | name | access | contents |
|---------|------|--------|----------|
| 0x0000 | CONTROL | W | bit0 start all stages, bit1 stop all stages (acted on at the next 40.08 MHz enable) |
| 0x0001 | CONFIG | RW | [3:0] command mask (1 = suppress, bit = command number), [4] LV1A random, [5] automatic BC0, [6] bunch disposition on, [7] ion map, [8] random source on |
| 0x0002 | NUM_RANDOM | RW | intervals loaded for a random burst (at most 1024 used) |
| 0x0003 | POT_BIAS | RW | potentiometer A code (diode bias); a write starts an SPI transfer |
| 0x0004 | POT_LEVEL | RW | potentiometer B code (comparator level); a write starts an SPI transfer |
| 0x0005 | STATUS | R | [3:0] stage busy, [4] SPI busy, [5] LV1A list being loaded from the random source |
| 0x0006 | RNG_OVR | R | random values replaced before use |
| 0x0007 | T1_DROPS | R | commands merged into a pending one |
| 0x0008 | BX | R | current bunch slot |
| 0x0009 | RNG_SHORT | R | random transitions ignored as too close |
| 0x000A | GAP_SUPP | R | LV1A blanked in bunch gaps |
| 0x8000 + stage·0x1000 + entry | interval RAM | RW | interval value; stage = command number (0 LV1A, 1 BC0, 2 Resynch, 3 CalPulse) |

A typical run writes the lists, writes CONFIG, then writes 1 to CONTROL.
The stages run their lists, and STATUS[3:0] returns to 0 when they are done.

## What is specified and what is chosen here

These parts follow the published description of the emulator:

* the four command stages and their RAM / address-counter / down-counter
  structure;
* 1024 entries, intervals of 3 to 2^32 cycles, and the end of a list at a
  zero or illegal entry;
* random intervals for the trigger stage only;
* per-command masks and blanking of triggers in bunch gaps;
* the T1 codes and priorities;
* the CLK+T1 rule;
* the TTC multiplexing with channel B held at 1, and the bi-phase-mark
  code.

These are this design's own choices:

* the single-clock, four-slot timing;
* how the command priority state machine works (pending flags, merging);
* how random intervals reach the trigger stage: a load of the LV1A list
  before the start, and ignoring intervals below 3;
* the stop function and the random-burst length register;
* the SPI format;
* the whole host register map and its status counters;
* reading the interval RAMs back over the host bus (the control software
  offers to save random intervals, so it needs them);
* the LHC fill maps, which approximate the nominal schemes and are not an
  exact LHC filling pattern;
* which commands the gap blanking acts on (LV1A only), and automatic BC0.

Known limits:

* One interval value, exactly 2^32 cycles, cannot be stored.
* The USB and VME bus protocols, the potentiometer devices, the PLL, the
  optical transmitter and the analog noise source are outside this RTL. Their
  signals are ports of the top.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
one ends by printing `TB_RESULT checks=N failures=M`. The expected values
are worked out independently of the RTL:

* running sums of the lists for pulse times;
* a software priority model for the T1 stream;
* decoders for the CLK+T1 and TTC lines;
* SPI slave models;
* a fill map rebuilt from the train description.

`tb_trigger_emulator` runs the whole emulator at its default sizes through
four phases:

1. Four programmed lists. The LV1A list runs all 1024 entries; the other
   lists end on a zero and on an illegal value. Commands coincide, so
   priority conflicts and merges occur.
2. The ion fill map with gap blanking, automatic BC0 and a masked CalPulse.
3. A random burst of 300 triggers from pseudo-random comparator pulses,
   with replaced values and ignored short intervals. The decoded LV1A
   spacing must equal the 300 loaded intervals one for one.
4. A stop in mid-burst.

It checks the decoded command stream cycle by cycle against the priority
model, and checks all three outputs against each other. It also counts that
every mechanism above actually happened.

`tb_random_rate` runs the random-trigger case at full size: comparator
pulses with exponentially distributed spacing, mean 10 µs (about 100 kHz),
and a random burst of 1024 LV1A. It checks the following:

* all 1024 LV1A arrive, none closer than 3 cycles;
* the mean spacing is within 12 % of the source's 401 cycles;
* the standard deviation is close to the mean;
* about 37 % (e^−1) of the spacings lie above the mean.

## Simulating

With Verilator 5 (two-state; `--timing` for the testbench delays):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl rtl/te_pkg.sv \
    tb/tb_trigger_emulator.sv --top-module tb_trigger_emulator -o sim
./obj_dir/sim
```

Replace the testbench name to run another block's test. The full-size
end-to-end test takes well under a second. Lint the synthesizable code with
`verilator --lint-only -Wall -y rtl rtl/te_pkg.sv rtl/trigger_emulator.sv`.

To change a size, set the parameters: `DEPTH` on `trigger_emulator`; the
fill-map numbers on `bunch_disposition`; `INTERVAL_W`, `ORBIT_BX` and
similar in `te_pkg`.
