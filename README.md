# MuTRiG digital readout in SystemVerilog

MuTRiG reads out 32 silicon photomultipliers (SiPMs) for timing detectors
that see high rates. In the fibre detector of the Mu3e experiment one
channel can fire at up to 1.3 MHz. For every hit the chip measures two
times with a TDC that has 50 ps bins:

- **time of arrival**: the rising edge of a low-threshold timing
  discriminator;
- **end of the energy pulse**: the falling edge of a higher-threshold energy
  discriminator. The time over threshold gives the energy.

The chip turns these time stamps into events, buffers them, and sends them in
CRC-protected frames over one 8b/10b-coded serial line at 1.28 Gbps. An
optional external trigger can discard every event that is not close in time
to it, which relieves the link.

This repository models everything digital in that chain as synthesizable
RTL, plus a behavioural model of the PLL/VCO time base. The analog parts sit
at the edge of the model as plain ports:

- the SPI-programmed input stage;
- the two discriminators per channel;
- the LVDS driver and receiver.

A separate small circuit, the link test chip, is included too. It sends
pseudo-random frames through the same link logic so the serial line can be
measured on its own.

## Data path

```
t_trig[i], e_trig[i] --> hit_logic --> tdc_channel --> event_gen    (32x)
                                        ^    ^
               pll_vco (16-stage ring) -+    |
               coarse_counter (15-bit LFSR) -+

event_gen x8 --> channel_arbiter --> l1_fifo (ext_trig)             (4 groups)
l1_fifo x4   --> group_arbiter --> l2_fifo --> frame_gen (crc16, prbs_gen)
             --> enc8b10b --> serializer (DDR) --> ser_data

ser_clk --> clk_divider --> sys_clk (128 MHz), byte_rd
sclk/cs_n/sdi/sdo <--> spi_slave <--> control_reg (configuration)
                                 <--  event_counter (32 x 12 bit)
```

Clocks:

| clock | frequency | what runs on it |
|---|---|---|
| `pll_ref_clk` | 640 MHz | the VCO |
| `ser_clk` | 640 MHz | the serializer, which sends one bit per edge |
| `sys_clk` | 128 MHz (`ser_clk` / 5) | all the event logic, one 10-bit symbol per cycle |
| `sclk` | up to 20 MHz | SPI |

`rst_n` is one asynchronous active-low reset for all domains.

## Time stamps

The hardest part to follow is how one analog pulse becomes one event.

**One signal per hit.** `hit_logic` merges the two discriminator outputs into
one signal, `hit = t_trig & ~e_trig`. For a normal pulse the timing
threshold is crossed first, so `hit` rises. It falls when the energy
threshold is crossed. It rises again when the energy trigger drops while the
timing trigger is still high. The two rising edges of `hit` are the two
times to measure. A pulse that never crosses the energy threshold gives a
single rising edge.

**Time base.** `pll_vco` models a 16-stage ring oscillator locked to
640 MHz. Its stage outputs run through a 32-state Johnson sequence, so each
state lasts 1/32 of a period, about 48.8 ps. The inverted last stage clocks
`coarse_counter`, a 15-bit LFSR (x^15 + x^14 + 1, seed all ones, period
32767). The LFSR steps when the ring returns to state 0. As a result,
(LFSR index x 32 + fine code) is one monotonic time that wraps every
32767 x 1.5625 ns = 51.2 us. To turn a coarse value into a count, invert the
LFSR sequence: the testbenches build a 32768-entry lookup table at start-up.

**Latching.** At each rising edge of `hit`, `tdc_channel` latches a 21-bit
stamp `{badhit, cc[14:0], fine[4:0]}`. The fine code is the position of the
stage pattern in the Johnson sequence. The latch flip-flops are clocked by
`hit` itself. There are two banks, written alternately, and a 2-bit
Gray-coded edge count. The energy stamp can follow the timing stamp by a few
nanoseconds and both are kept.

**Event building.** `event_gen` synchronises the Gray count into `sys_clk`
and reads the new stamps in order. The first stamp after idle is the time of
arrival. If a second stamp comes within `e_timeout` cycles (default 32, or
250 ns), it is the energy stamp and the event gets `e_flag = 1`. Otherwise
the event leaves with `e_flag = 0` and an energy stamp of zero. A stamp is
marked `badhit` when three unread stamps had piled up, because one bank was
then overwritten. Each channel holds one event. A hit that finds it still
waiting for the arbiter is lost.

**Event formats.** MSB first on the link:

| format | bits | layout |
|---|---|---|
| full event | 48 | `channel[4:0]`, T stamp (21), E stamp (21), `e_flag` |
| short event | 27 | `channel[4:0]`, T stamp (21), `e_flag` |

The energy time over threshold is E − T in 48.8 ps bins, modulo the 51.2 us
wrap.

## Buffering and arbitration

**Channel arbiter.** Each group of eight channels has a round-robin
`channel_arbiter`. It passes one event per `sys_clk` cycle into the group's
`l1_fifo` (128 events).

**Group arbiter.** A round-robin `group_arbiter` with a registered output
merges the four groups into `l2_fifo` (256 events, show-ahead).

**Back-pressure.** All links between blocks use valid/ready handshakes. When
the serial link cannot keep up, the buffers fill in turn:

1. L2 fills;
2. the group arbiter stops;
3. the L1 FIFOs fill;
4. the channel arbiters stop;
5. the event generators hold their event, and further hits on those channels
   are lost.

No event already in a FIFO is dropped.

## External validation (L1 FIFO)

With `ext_val_en` set, each L1 FIFO becomes a ring buffer that is always
written: the oldest event is overwritten.

- **Address table.** Every 10 `sys_clk` cycles (one tick, 78.125 ns) the
  write pointer is stored in a 64-entry address table.
- **Window.** A rising edge of `ext_trig` (synchronised with two
  flip-flops) in tick T defines a window from tick S = T − `win_offset` to
  tick E = S + `win_width`. Offset and width are clamped to 16 ticks
  (1.25 us) and 32 ticks (2.5 us).
- **Readout.** Once the write pointer of tick E has been recorded, the
  FIFO looks up the addresses of S and E. It moves the read pointer to S and
  forwards the events up to E.
- **Missed triggers.** A trigger that arrives while a window is still
  waiting or being read is ignored and reported by a one-cycle pulse on
  `trig_missed[group]`.

The window selects events by the time they were **written** into the L1
FIFO, not by their time stamps. An event without an energy edge is written
only after the `e_timeout` wait. The window offset has to allow for that
delay.

Switching `ext_val_en` either way drops what is buffered. Without validation
the L1 FIFO is an ordinary FIFO.

## Frames and the serial link

`frame_gen` sends frames back to back, one byte per `sys_clk` cycle:

```
K28.5  K28.0  frame# hi  frame# lo  mode  n  payload ...  CRC hi  CRC lo  K28.4
```

- `mode` bit 7 means short events and bit 6 means PRBS data.
- `n` is the number of events. It is the L2 fill level when the frame
  starts, capped at 255. Empty frames (`n` = 0) keep the line busy.
- The payload is the events packed bit by bit, MSB first, with the last byte
  padded with zeros. A full event takes 6 bytes, a short one 3.375.
- The CRC is CRC-16 with polynomial 0x1021 and initial value 0xFFFF. It
  covers the frame number through the last payload byte.
- In PRBS mode a frame carries 255 words of a PRBS-31 sequence
  (x^31 + x^28 + 1) instead of events. The payload bits are then the PRBS
  bit stream itself.

The mode bits and `n` are fixed when a frame starts. The configuration can be
changed at any time.

**Encoding.** `enc8b10b` is a standard 8b/10b encoder with running
disparity; code bit 0 is bit *a*.

**Serializer.** `serializer` is a double data rate design. One row of five
flip-flops holds the even bits and is clocked on the rising edge of
`ser_clk`. The other row holds the odd bits and is clocked on the falling
edge. The clock itself selects which row drives the output, so the line
changes on both edges: 1.28 Gbps from a 640 MHz clock, bit 0 first.

**Clocking.** `clk_divider` makes `sys_clk` with 50 % duty cycle. It also
makes `byte_rd`, which tells both rows to load the next code group once every
five `ser_clk` cycles.

**Link capacity.** The link carries 128 M bytes/s:

| events per frame | bytes per frame | rate |
|---|---|---|
| 255 full events | 1539 | 21.2 M events/s |
| 255 short events | 870 | 37.5 M events/s |

Both rates are below 32 channels x 1.3 MHz = 41.6 M events/s. At that peak
rate on every channel at once, the buffers fill and hits are lost as
described under back-pressure. Short events hold up to about 1.17 MHz per
channel. `tb_mutrig_rate` measures both limits on the line (21.22 and
37.53 M events/s at 1.3 MHz per channel) and shows that no hit is lost at
0.5 MHz per channel with full events or at 1.1 MHz per channel with short
events.

## Configuration and monitoring (SPI)

**SPI transfer.** The SPI is mode 0, MSB first. Every transfer is 544 bits
long: `{channel 31 word, ..., channel 0 word, global word}`.

- A channel word is `{enable, dac[14:0]}`. `dac` is passed out on
  `ch_dac[i]` for the analog front end.
- The global word is, from MSB to LSB:

  | field | bits |
  |---|---|
  | spare | 10 |
  | `e_timeout` | 8 |
  | `prbs_mode` | 1 |
  | `win_width` | 6 |
  | `win_offset` | 5 |
  | `ext_val_en` | 1 |
  | `short_mode` | 1 |

`control_reg` takes the shifted-in bits on the rising edge of `cs_n`. The
reset defaults are:

- all channels enabled;
- full events;
- no validation;
- a window of 1 tick;
- `e_timeout` 32.

**Counter readout.** In the same transfer, `sdo` shifts out the 32 12-bit
event counters (channel 31 first), then zeros. `event_counter` counts one per
event built, wraps at 4096, and holds a snapshot frozen while `cs_n` is low.
A read therefore returns the counts from the moment the transfer started.

## Link test chip

`lvds_testchip` is the mock-up circuit of the link test chip. It chains a
PRBS-31 generator or a static 48-bit pattern (`sel_prbs`), the frame
generator in PRBS mode, the 8b/10b encoder, the clock divider and the DDR
serializer. It shares no signals with the readout chip. In the top it sits
beside the readout chip on its own `tc_*` pins, so it can be clocked
differently. The testbench runs it at 750 MHz (1.5 Gbps) as well.

## Where this model departs from the chip or fills gaps

The following come from the chip description:

- the block structure;
- 32 channels in 4 groups of 8;
- the clock frequencies and the 5:1 division;
- the 16-stage VCO with 32 states;
- the 15-bit LFSR coarse counter;
- latching on rising edges;
- the 27-bit short event;
- the 16-bit CRC at the end of each frame;
- 8b/10b coding;
- the two-row DDR serializer with `byte_rd`;
- the 10-cycle address table;
- the window limits of 1.25 us and 2.5 us;
- 12-bit counters;
- SPI configuration;
- the PRBS/pattern test chip chain.

The following are this design's own choices and may differ from the real
chip:

- **Time stamps and events:**
  - the logic function of the hit combiner;
  - the LFSR polynomial;
  - the two-bank TDC latch;
  - the energy timeout;
  - the `badhit` rule;
  - the field order of both event formats.
- **Buffers and arbitration:**
  - FIFO depths (L1 128, L2 256, address table 64);
  - round-robin arbitration;
  - the direction of the window offset;
  - ignoring triggers during a window.
- **Link and configuration:**
  - the complete frame format and the choice of K characters;
  - the CRC polynomial and initial value;
  - the PRBS polynomial;
  - the SPI bit layout and defaults.
- **Behavioural time base.** `pll_vco` is behavioural. It assumes a locked
  loop with a period of 1562 ps instead of 1562.5 ps, and it restarts the
  ring on every reference edge. PLL dynamics and jitter are not modelled.
- **TDC boundary.** The fine and coarse values are latched at the same
  instant, with no correction of the boundary between them. A real TDC
  has to deal with the coarse counter changing close to the latch edge.
- **Configuration timing.** Configuration registers change on `cs_n`
  without synchronisation into `sys_clk`. They are meant to be changed while
  the readout is quiet.

## Files

- `rtl/mutrig_pkg.sv`: sizes, the stamp and event structs, the configuration
  structs, the K characters and the CRC function.
- `rtl/mutrig.sv`: the top level, with parameters `L1_DEPTH`, `L2_DEPTH`
  and `MAX_EVENTS`.
- One file per block in `rtl/`. Each starts with a comment on its function,
  interface and timing.
- `tb/tb_<block>.sv`: a self-checking testbench for every block. Each prints
  one line `TB_RESULT checks=N failures=M`.
- `tb/tb_8b10b_pkg.sv`: an independent table-driven 8b/10b decoder used by
  the link testbenches.

## Simulating

The design needs Verilator 5 with `--timing`. All delays carry explicit
units. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/mutrig_pkg.sv tb/tb_mutrig.sv --top-module tb_mutrig
obj_dir/Vtb_mutrig
```

`tb_mutrig` runs the full-size chip, with every parameter at its default, in
about 15 seconds. It configures the chip over SPI at 20 MHz and injects
pulses on `t_trig`/`e_trig`. It receives `ser_data` with its own sampler and
comma alignment, decodes and parses every frame, and checks the CRC, the
frame numbers and every event against the injected hit:

- channel;
- energy flag;
- time over threshold within ±2 bins;
- time of arrival at a constant offset within ±2 bins.

Its phases cover:

- full events;
- short events;
- external validation, with hits inside and outside the window and a
  missed trigger;
- the SPI counter readout, compared with the number of injected hits;
- PRBS frames and the line rate;
- an overload burst on all 32 channels that stalls the arbiters and fills
  255-event frames.

It counts each of these mechanisms and fails if one never happened.

`tb_mutrig_rate` is the rate workload: Poisson or periodic pulses on all
32 channels, with the event rate on the line measured over whole frames. Its
last phase runs external validation with the largest window (1.25 us offset,
2.5 us width) at 1.3 MHz per channel. It matches every received event with
its pulse, and checks that every pulse well inside a window arrives and that
no event comes from outside the windows.

To change a size, override the top parameters. The testbenches of the
individual blocks use small sizes where that keeps them quick.
