# SAMPA digital readout path in SystemVerilog

The SAMPA is a 32-channel front-end ASIC for gas detectors such as a
time projection chamber. In each channel, an analog amplifier and shaper
feed a 10-bit ADC that samples at 10 MHz. The digital part takes those
samples and:

- cuts them into **time windows**;
- throws away the samples that carry no pulse (**zero suppression**);
- packs what is left into **clusters**, each tagged with its time inside
  the window;
- buffers one **packet** per channel and window;
- sends the packets over **four serial links at 320 Mbit/s**.

This repository is synthesizable RTL for that digital path, as it was
built on an FPGA test platform, plus self-checking testbenches for every
block.

The analog front end, the ADC and the DSP filters between the ADC and
the zero suppression are not included. No logic is specified for them.
The samples go straight from the ADC input, made unsigned, into the zero
suppression unit. This is also how the FPGA research platform ran.

```
            clk10 domain (one pipeline per channel, 32x)                 clk32            clk320
 adc[c] -> presamples -> zsu -> dfu -> ring_buffer (write) | (read) -> link_arbiter -> serial_out -> sout[l]
 test   ->     ^           ^                                              (8 ch/link)      (4 links)
 pattern       |           |
          event_manager (windows, tags)     global_counter (clk40, 20 bit) -> gray_sync -> time stamp
          clock_manager: clk320 -> clk32, clk40, clk10, word_load, per-domain resets
```

## Packets on the wire

A packet is one channel's data for one time window: a **5-word header**
followed by **payload words**. Every word is 10 bits.

| word | contents |
|------|----------|
| h1 | `{hadd[3:0], channel[4:0], 1}`. Bit 0 is always 1, so the first word of a packet is never zero. |
| h2 | window start time, global counter bits 19..10 |
| h3 | payload size, the number of words that follow the header (0..1023) |
| h4 | window start time, global counter bits 9..0 |
| h5 | `{truncated, window_number[8:0]}` |

The payload is a series of clusters. Each cluster is:

- its samples, oldest first;
- **TC** (time count): the index, inside the window, of the cluster's
  first sample;
- **CS** (cluster size): the number of words in the cluster, counting TC
  and CS themselves.

Each cluster can be parsed from its end: read CS, step back CS words, and
you are at the first sample. A window with no pulse gives a header-only
packet of 5 words. With zero suppression off, a window of `ns_e` samples
is one cluster of `ns_e + 2` words.

How a link sends packets:

- One word leaves per 32 MHz period, least significant bit first, ten
  320 MHz bits per word.
- When no packet is in progress, the link sends the idle word 0.
- A receiver therefore finds a packet at the first set bit after idle.
  That bit is bit 0 of h1.
- The receiver then counts `5 + h3` words. Payload words may be zero, so
  counting is the only safe way to find the end.
- A link is handed over between channels only on packet boundaries, so
  packets are never interleaved.

The window start time comes from the 40 MHz global counter. It advances
by 4 for each 10 MHz sample.

## Zero suppression (zsu)

The zero suppression unit decides, for each sample, whether it is kept.
It uses four settings:

| setting | width | meaning |
|---------|-------|---------|
| `thrd` | 10 bits | A sample `>= thrd` is above threshold. |
| `seq_mask` | 2 bits | Glitch filter: a run of samples above threshold counts as a pulse only if it is at least this long. 0 behaves like 1. |
| `premask` | 2 bits | Samples kept before a pulse, 0..3. |
| `postmask` | 3 bits | Samples kept after a pulse, 0..7. |
| `en` | 1 bit | With `en = 0`, every sample is kept. |

The hard part is that a sample's fate depends on samples that arrive
later. Two things need the future:

- A run is known to be long enough only `seq_mask - 1` samples after it
  starts.
- A sample may be a presample of a pulse that has not started yet.

The unit solves this by delaying the stream by a fixed `D = 3 + 3`
samples. This is the largest premask plus the largest glitch length.

- A run counter watches the undelayed input.
- Once a run reaches `seq_mask`, that sample and the earlier samples of
  the run are marked in a shift register `q` that holds one bit per
  sample age.
- When a sample is `D` samples old, every pulse sample up to `premask`
  samples younger than it is already known.
- Its flag is then the OR of `q` over ages `D - premask .. D + postmask`.

The latency is fixed at 7 clk10 cycles for any setting. The window tag of
each sample travels through the same delay line, so flag, sample and tag
stay together.

"At or above" is deliberate. In the reference example:

- the samples are `00B 00D 00F 00E 00D 00C 00B 00A` on a `009` baseline;
- the threshold is `00A`;
- all eight samples are counted as the pulse.

With 2 presamples and 3 postsamples, such a pulse gives a payload of
2 + 8 + 3 + TC + CS = 15 words. The packet is 20 words.

## Cluster formatting (dfu)

The data format unit turns flagged samples into clusters:

- A cluster opens at the first flagged sample of a run inside a window.
- It closes when the flag drops or the window ends. Clusters never cross
  a window boundary.
- A counter starts at 2, to count TC and CS ahead of time, and adds one
  per sample. Its value is CS.

**Two words per cycle.** Closing a cluster produces TC and CS in the cycle
after its last sample. Samples arrive one per cycle, so that cycle may
already carry a sample. The worst case is a window's last sample being
flagged: that sample, then TC and CS, and at once the first sample of the
next window. The DFU solves this as follows:

- It writes up to **two words per 10 MHz cycle** (`wr.n`, `wr.w0`,
  `wr.w1`).
- A cycle that needs three words moves the third one into the next cycle.
- At most one word is ever carried, checked by an assertion. This works
  because the cycle after a window's last sample holds only the next
  window's first sample.

Because words can be carried, the DFU must tell the ring buffer exactly
where one window's words end:

- `eow` marks the cycle in which the ending window's last word is
  written.
- `n_old` says how many of that cycle's words still belong to it.
- `sow` marks the first sample cycle of a window, where the ring buffer
  takes the time stamp.

Windows must be at least 2 samples long. The event manager enforces this.

## Ring buffer: two clocks, two memories

Each channel has a ring buffer.

**Write side (clk10).**

- Data memory: `DATA_DEPTH = 2048` words, split into even and odd banks so
  that the DFU's two words per cycle can be stored. Each bank is a simple
  dual-port memory with one write port and one read port.
- Write address: the pointer `wp` advances by 0, 1 or 2 per cycle.
- `num10bit` counts the payload of the open window.
- At `eow` the packet is closed in a single cycle. Its 50-bit header
  (table above) is written into a header memory of `HDR_PKTS = 32` entries
  and the header pointer `hpkt` advances.
- The payload size is taken at that moment and stays fixed until the
  header has been sent. The next window's count starts again at 0 in the
  same cycle.

**Read side (clk32).**

- A state machine (idle, header, data) waits until the packet counter
  seen from the write side is ahead of its own.
- It raises `req`. When the link arbiter answers `gnt`, it sends h1..h5
  and then `h3` payload words, one per clk32 cycle, with no gaps.
- `sop` marks h1 and `eop` marks the last word.
- Memory reads are synchronous. The payload read register and the output
  flags are loaded on the same clk32 edge, so the payload follows the
  header with no gap.

**Clock crossing.** Three counters cross between the domains, each
through `gray_sync` (Gray-code register, two-flop synchroniser, back to
binary):

- the packet counter `hpkt`, from write to read;
- the read pointer `rp`, from read to write, to tell how much data
  memory is free;
- the header read counter `rpkt`, from read to write, to tell how many
  header entries are free.

The read side only ever sees whole packets. A packet becomes visible
after its data words are in memory. The free space seen by the write
side is always an underestimate. Both facts follow from the synchronised
values lagging the real ones.

**Overflow.** Two rules:

- **Truncation.** If the data memory is full, or a packet already holds
  1023 payload words (the largest value h3 can hold), the rest of that
  window's words are discarded. The packet is still closed normally, with
  the words it has, and h5 bit 9 is set. A truncated packet is always a
  prefix of the full one, with no holes.
- **Drop.** If all 32 header entries are in use when a window ends, the
  whole packet is dropped. Its data memory space is given back at once,
  and `dropped_pkts` counts it.

A link carries 32 Mword/s and serves 8 channels. Without zero suppression,
8 channels produce about 80 Mword/s, so in that mode the buffers fill and
these rules take effect after a while. With zero suppression and sparse
pulses, the links keep up easily.

## Time windows (event_manager)

- **Continuous mode** (`cont = 1`): windows of `ns_e` samples follow each
  other without a gap.
- **Triggered mode** (`cont = 0`): a rising edge on `trg` opens a window
  on the next sample.
  - A trigger edge while a window is still open (other than on its last
    sample) is refused and reported on `trg_early`.
  - `ns_e` is clamped to 2..1021.

The manager tags each sample with `tw`, `first`, `last` and the sample
index `tc`. The presamples block delays the data by `npre` samples, up to
31. A window therefore starts `npre` samples before the trigger. The
same block makes the ADC's two's complement samples unsigned by inverting
the MSB, which adds 512.

## Clocks and resets (clock_manager)

Only `clk320` is needed:

- clk32 = clk320 / 10, always derived;
- clk40 = clk320 / 8, or the `clk40_ext` pin;
- clk10 = clk320 / 32, or the `clk10_ext` pin.

All derived clocks are registered outputs with 50 % duty cycle and are
held high in reset. Because clk32 is exactly ten clk320 periods,
`word_load` can mark one clk320 cycle in the middle of each clk32 period.
On that cycle each serialiser takes its next word, while the clk32
registers are stable.

Each domain gets its own reset, asserted asynchronously and released two
edges after `rst_n` rises. In a two-state simulator with random power-up
values, a reset synchroniser can power up low. Its output then never
falls, and the flops behind it are only reset by a second reset pulse.
The system testbench pulses reset twice for this reason. A four-state
simulator or real silicon does not need the second pulse.

## Test pattern source (stim_shift_reg)

This is the FPGA platform's stimulus: an 8-bit x 300 shift register.

- A host loads it while holding `host_en`.
- Once `host_en` is released, it plays one byte per 10 MHz sample while a
  window is open, and recirculates.
- Outside windows it outputs 09h.

With `use_test = 1`, every channel takes this pattern instead of its ADC
input.

## Top level (sampa_emu)

The default parameters are the chip's:

| parameter | default | meaning |
|-----------|---------|---------|
| `N_CH` | 32 | channels |
| `N_LINK` | 4 | serial links |
| `DATA_DEPTH` | 2048 | data memory words per channel |
| `HDR_PKTS` | 32 | header entries per channel |
| `NS_E_MAX` | 1021 | longest window |
| `PRE_MAX` | 32 | presample delay line |
| `STIM_LEN` | 300 | test pattern length |

Channel `c` is served by link `c / 8`. The settings that would live in
configuration registers are top-level ports shared by all channels:

- `ns_e`, `cont`, `npre`, `zcfg`;
- `hadd`, the chip address;
- the clock selects.

Synthesis at the defaults gives about 13 k cells, 24 k flip-flop bits
and 700 k memory bits, before technology mapping.

## Where this design departs from, or goes beyond, the SAMPA description

Specified by the SAMPA description and followed here:

- 32 channels and 4 links;
- 10 MHz processing and a 32 MHz buffer-to-link interface, derived from
  320 MHz;
- the 20-bit 40 MHz counter;
- MSB inversion;
- the ZSU settings and their widths;
- continuous and triggered windows, with a maximum of 1021 samples;
- the cluster format samples/TC/CS, with CS counting itself and TC;
- the 5-word header, with the payload size held until the header is
  sent;
- the 2048-word data memory and the 256 x 10-bit header memory;
- the reference packet sizes: 5, 20, 35, 50 and 65 words for 0–4 pulses
  per 300-sample window, and 307 with zero suppression off. All of these
  are reproduced.

This design's own choices:

- **Header bit layout.** Only h3 (the size) is given by the description.
  The other header words here are a reasonable layout, not the chip's.
- Up to two DFU words per cycle, and the even/odd memory banks.
- One 50-bit header entry per packet.
- Gray-code pointer crossing.
- The truncation and drop rules.
- The time stamp taken when a window's first word reaches the buffer.
- Round-robin packet arbitration with a fixed channel-to-link map. The
  chip can be set to use fewer links; that option is not built.
- LSB-first bit order and the idle word 0.
- ZSU latency 7.
- Refusing early triggers, with a trigger latency of one sample.
- A delay line of 32 presamples.
- The test register clocked at 10 MHz and recirculating.

Not built, for lack of a specification:

- baseline corrections 1–3, the digital shaper (tail cancellation) and
  the pedestal memory;
- the I2C interface and the channel and global registers;
- the neighbour-chip and heartbeat inputs of link 0;
- the analog front end and the ADC.

## Verification

Each block has a testbench in `tb/`, named `tb_<block>.sv`. Each one
compares the block against values worked out independently and ends by
printing `TB_RESULT checks=N failures=M`. A watchdog stops any hung run.
All of them pass with random initial register values.

`tb_sampa_emu` runs the whole chip at the default parameters, driven only
through its pins. A reference model predicts every packet of every
channel. Four receivers deserialise the links, and every packet is
compared: header, time stamp step, size, window number and payload.

It runs four phases, with about 154,000 checks and about 3,000 packets
in total:

1. **Test pattern:** 0–4 pulses per window, sizes 5/20/35/50/65.
2. **Triggered ADC input:** pulses, glitches, and triggers inside open
   windows.
3. **Short continuous windows:** header memory full, packets dropped.
4. **Zero suppression off:** 307-word packets, data memory full,
   truncation.

It counts each mechanism and fails if any never happened:

- continuous and triggered windows;
- refused triggers;
- rejected glitches;
- clusters closed by a window end;
- test-pattern, ADC and ZSU-off windows;
- truncated and dropped packets;
- traffic on every link.

To run a testbench with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sampa_pkg.sv tb/tb_sampa_emu.sv --top-module tb_sampa_emu -o sim
./obj_dir/sim +verilator+rand+reset+2 +verilator+seed+1
```

Swap in any other `tb_<block>` the same way. The full-chip test
simulates about 2 ms of chip time in about one second of wall time,
after roughly 10 s of compilation. The block tests are faster. Some block testbenches shrink parameters
for speed, for example a 64-word data memory in `tb_ring_buffer` so that
truncation happens quickly.
