# P0 bunch-by-bunch feedback FPGA

This RTL damps the motion of single bunches in a storage ring. Each bunch's
position is sampled once per turn and filtered turn by turn. The filter
output goes back to a kicker through a D/A converter. The design follows the
P0 feedback system of the Advanced Photon Source (APS). There the ring has
1296 RF buckets and a turn takes 3.68 µs. The A/D converters run at 88 MHz,
a quarter of the RF frequency, so each clock delivers a sample of every
fourth bunch: 324 bunches per turn.

Each bunch has its own filter. It uses the same hardware as the other bunches
but keeps its own history. Two position channels run side by side. Together
they behave like 648 independent 32-tap FIR filters. That is
2 × 32 × 88 MHz ≈ 5.6·10⁹ multiply-accumulates per second, all on one clock.

A ColdFire CPU module controls and monitors the FPGA. It runs EPICS on RTEMS.
The CPU's external bus is turned into an Avalon memory-mapped bus inside the
FPGA. All the programmable parts of the design are slaves on that bus: the
coefficients, the filter settings, a four-channel scope and the APS event
receiver.

```
 A/D ch0 ─┬─► hp_filter ─► fir_bank ─► prog_delay ─► D/A ch0
          │                  ▲
 A/D ch1 ─┼─► hp_filter ─► fir_bank ─► prog_delay ─► D/A ch1
          │      ▲           │ coefs
 A/D 2,3 ─┴─► scope          │
                 ▲     bunch_sequencer ◄── P0 trigger (event receiver)
 ColdFire bus ─► coldfire_bridge ─► avalon_interconnect ─► coef_regs, ctrl_regs,
                                                            scope, event receiver port
```

## Time-sharing one filter over 324 bunches

The core idea is in `fir_bank`. A multiplier runs at 88 MHz, so one clock is
enough to filter one bunch. The filter therefore does a complete 32-tap
evaluation every clock, for whichever bunch's sample has just arrived:

    y_b[n] = Σ_{k=0..31} c[k] · x_b[n−k]

Here `x_b[n]` is bunch *b*'s sample on turn *n*. The samples in the sum are
one turn apart for the same bunch, not neighbouring samples from the
converter. So each bunch needs its own tap line. It lives in a memory with one
word per bunch. The word holds the 31 earlier samples of that bunch, 31 × 18 =
558 bits. When bunch *b*'s sample arrives:

1. Its history word is read. This is the first register stage.
2. The new sample and the history form the 32-value tap line. All 32 products
   are formed in parallel, and the tap line is written back shifted by one
   sample, dropping the oldest.
3. The 32 products are added at full precision (41 bits).
4. The sum is shifted right by the channel's `out_shift`, saturated to the
   14-bit D/A range and registered. A `sat` pulse marks clipping.

A bunch comes back only a full turn later, 324 clocks. So the read in one
clock and the write-back in the next can never collide. `hp_filter` uses the
same read-modify-write scheme for its per-bunch state. Both blocks need at
least two bunches for this to hold.

The coefficient set (`coef_regs`) is shared by both channels. The CPU can
rewrite it at any time, and a new coefficient takes effect at the next clock.
No double buffer is used, so during the 32 writes that reload a filter,
bunches are filtered with a mix of old and new taps.

### Per-bunch high-pass filter

Before the FIR, each bunch's samples go through a first-order DC blocker.
This removes the bunch's static orbit offset, which would otherwise swamp the
oscillation:

    y = x − m,     m ← m + (y >>> hpf_shift)

`m` is held per bunch with 16 fraction bits. A larger `hpf_shift` gives a
lower corner frequency. `m` is updated whether or not the filter is enabled.
The enable bit only chooses whether the FIR sees `y` or the raw sample.

### Bunch numbering and the P0 trigger

`bunch_sequencer` waits for feedback to be enabled and for a rising edge on
the P0 trigger. The first bunch's sample is then the one on the next clock.
From there it counts 0…323 and wraps. The trigger should come once per turn,
on the clock where bunch 323 is current. If it arrives at any other count, the
count restarts at 0 and the event is flagged in STATUS. Both channels use the
same bunch number.

### Output delay

`prog_delay` is a 1024-word circular buffer. It sets the delay from
computation to D/A output, so a kick can be timed for the right bunch, up to
three turns later. The delay is in clocks (0…1023) and can be changed while
running. Until enough samples have been written since reset, the output is
held invalid and at zero.

### Latency

Take an A/D sample captured by the clock edge *t*. Its D/A value is updated at
edge `t + 6 + delay`:

| block | register stages |
|---|---|
| high-pass filter | 2 |
| FIR filter | 4 |
| delay | `delay` + 1 output register |

## CPU access: ColdFire bridge and Avalon bus

`coldfire_bridge` is the only bus master. Its CPU side is a simple
asynchronous-style cycle: `cf_cs_n` goes low with `cf_rw`, `cf_addr` (a word
address) and `cf_wdata`, and the bridge ends the cycle by pulling `cf_ta_n`
low for one `cf_clk` period. The CPU must then release `cf_cs_n`. The two
clock domains are joined by a toggle handshake:

- The request toggle crosses into the 88 MHz domain through two flops.
- One Avalon read or write is issued.
- The acknowledge toggle comes back the same way.

The address, data and direction are latched before the request toggles. They
do not change until the acknowledge, so only the toggles need synchronisers.
A cycle takes about 3 periods of each clock, and one more 88 MHz clock for a
read.

The bridge also carries the interrupt requests of the Avalon components to the
CPU. These come from the scope and from the event receiver. Each one passes
through two flops in the CPU clock domain and comes out as an active-low
`cf_irq_n` line: bit 0 is the scope, bit 1 the event receiver.

`avalon_interconnect` decodes fixed address windows. It forwards the request
only to the addressed slave and returns that slave's answer. Every slave
answers a read exactly one clock later and never inserts wait states. A read
of an unmapped address still completes and returns `0xDEADBEEF`.

The Avalon bus is carried as two packed structs, `av_req_t` and `av_rsp_t`,
defined in `p0_pkg`.

### Register map (32-bit word addresses)

| address | block | contents |
|---|---|---|
| 0x000–0x01F | coef_regs | coefficient *k* at 0x000+*k*: 18-bit signed, sign-extended on read |
| 0x040 | ctrl_regs CONTROL | bit0 feedback enable, bit1 high-pass enable |
| 0x041 | STATUS | bit0 running, bit1 memories clearing, bit4 trigger out of phase (sticky), bit8+c channel c saturated (sticky); write 1 to clear a sticky bit |
| 0x042 | TURNS | turns since enable |
| 0x044 + 4c | channel c | high-pass shift (4 bits, reset 8) |
| 0x045 + 4c | channel c | output shift (6 bits, reset 17, i.e. Q1.17 coefficients) |
| 0x046 + 4c | channel c | output delay in clocks (10 bits, reset 0) |
| 0x080 | scope CTRL | bit0 run, bit1 interrupt enable, bit2 clear (acts once) |
| 0x081 | DECIM | record one sample set every DECIM+1 clocks |
| 0x082 | STATUS | [12:0] entries held, bit16 half full, bit17 overflow |
| 0x083 | DATA01 | {ch1, ch0} of the oldest entry |
| 0x084 | DATA23 | {ch3, ch2} of the oldest entry; this read removes the entry |
| 0x400–0x7FF | event receiver | brought out on `evr_req` / `evr_rsp` |

### Scope

The scope records all four A/D inputs together into a FIFO of 4096 entries:

- channels 0 and 1: the 14-bit converters that feed the filters;
- channels 2 and 3: the two 12-bit on-board converters.

Each entry holds one sample of each channel, sign-extended to 16 bits. Once
the FIFO is at least half full, the interrupt is raised (if enabled) and the
CPU drains it. A sample set that finds the FIFO full is dropped and sets the
overflow flag.

## What is outside this RTL

These parts of the system are not designed here:

- The ColdFire 5282 CPU module.
- The APS event receiver, an existing design reused unchanged. Its register
  layout is not reproduced.
- The A/D and D/A converters.

The top module brings out the signals where they connect:

- the CPU bus;
- the event receiver's Avalon window (`evr_req`, `evr_rsp`), its interrupt
  request (`evr_irq`) and its P0 trigger (`p0_trig`), which must be
  synchronous to `clk`;
- the converter sample buses.

## Choices made in this RTL

The published system gives these facts:

- the filter sizes: 32 taps, 18-bit samples and coefficients, 324 bunches,
  two channels with shared coefficients;
- the 88 MHz clock and the 14-bit and 12-bit converters;
- the order high-pass → FIR → delay → D/A;
- a scope with four channels, 4k samples each and a half-full interrupt;
- a bridge that converts the CPU bus to Avalon and crosses clock domains.

Everything else is a choice made here:

- the form of the high-pass filter;
- the output scaling and saturation;
- the depth and unit of the delay;
- the pipeline;
- the register map and status bits;
- the CPU bus signal set, the handshake and the interrupt lines;
- the fixed-latency bus fabric;
- the scope's FIFO organisation and decimation;
- the memory-clearing sweep after reset, which takes 324 clocks and shows as
  STATUS bit1.

The original system used Altera DSP blocks as pairs of 9-bit multipliers per
tap. Here each tap is written as a plain 18×18 signed product and left to
synthesis.

## Files

- `rtl/p0_pkg.sv`: sizes, Avalon structs and the address map.
- `rtl/p0_feedback_top.sv`: top level. `rtl/<block>.sv` holds one block each.
- `tb/<block>_tb.sv`: one self-checking testbench per block. Each ends with a
  `TB_RESULT checks=… failures=…` line.
- `tb/p0_feedback_top_tb.sv`: runs the whole design at full size. It includes
  a bus-functional CPU, an event receiver model and a bit-exact reference
  model that checks every D/A value on every clock. It also makes each
  mechanism above happen at least once: start on the trigger, resync, live
  coefficient and delay changes, saturation, scope interrupt and overflow,
  event receiver access and interrupt, and unmapped read. It also checks the
  rate: one D/A value per bunch per channel in every 324-clock turn.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -y rtl -y tb +libext+.sv rtl/p0_pkg.sv tb/p0_feedback_top_tb.sv \
  --top-module p0_feedback_top_tb -o sim
./obj_dir/sim
```

Replace `p0_feedback_top_tb` with any other `*_tb` to run one block. The full
design simulates in seconds.

The blocks carry SystemVerilog assertions for their operating rules:

- the same bunch must not arrive on two consecutive clocks;
- bus address windows must not overlap;
- the bridge issues one transfer at a time;
- the CPU holds chip select until acknowledge.

Build with `--assert` to enable them.

Synthesis-oriented lint is `verilator --lint-only -Wall -Irtl rtl/p0_pkg.sv rtl/<file>.sv`.
