# Hybrid multi-channel histogrammer (FPGA side)

Many timing experiments (time-correlated photon counting, time-of-flight PET,
range finding) need dozens to hundreds of histograms filled in parallel at the
full clock rate. An FPGA can do the counting in parallel, but it cannot hold
128 histograms of 256 bins with 32-bit counters in block RAM, while a processor
with external DRAM has the memory but not the rate.

This design splits the work. Each channel counts in a small, fast histogram of
2^N bins with only M = 16 bits per bin (a "mini-histogram"). When one of its
bins is about to overflow, the channel stops, its mini-histogram is copied to a
shared Readout BRAM and cleared, and the channel starts again. A processor
(a soft CPU with a DMA engine and a DRAM controller, not part of this RTL) is
interrupted. It fetches the copy and adds it into a full 32-bit histogram in
external memory. The FPGA therefore needs only 2^N x 16 bits per channel plus
one shared readout buffer, whatever the final counts.

The RTL here is the programmable-logic part. Its defaults are 128 channels,
256 bins, 16-bit mini-histogram counters and 32-bit timestamps.

## Block structure

```
             per channel h (x H)                         shared
 meas[h] ──┐  ┌──────────────────┐  bin  ┌────────────────┐ copy stream ┌──────────────┐
 ref_ts[h] ┴─►│ timestamp_binner ├──────►│ mini_histogram ├────────────►│ readout_ctrl │── irq
 ev_valid[h]─►│  (dt, offset,    │       │ 2^N x M, +1    │◄── grant ───┤ arbiter, id  │◄─ xfer_done
              │   truncation)    │       │ pipeline       │── req ─────►│ queue        │
              └──────────────────┘       └────────────────┘             └──────┬───────┘
                  ▲ TIME_OFFSET[h], BIT_TRUNC[h]   ▲ enable, threshold, flush  │ write
                  │                                │                    ┌──────▼───────┐
              ┌───┴────────────────────────────────┴────────────────────┤ readout_bram │
              │ hist_axi_regs: AXI4 slave, register map, window ◄───────┤ H*2^N x M    │
              └──────────────────────────────▲──────────────────────────┴──────────────┘
                                             │ AXI4 (processor / DMA)
```

| File | Module | Role |
|---|---|---|
| `rtl/hist_pkg.sv` | package | address map constants, region decoder, channel state type |
| `rtl/timestamp_binner.sv` | `timestamp_binner` | timestamp pair to bin index, range check |
| `rtl/mini_histogram.sv` | `mini_histogram` | one channel: counter memory, +1 pipeline, freeze and copy |
| `rtl/readout_ctrl.sv` | `readout_ctrl` | chooses a frozen channel, writes its copy into the Readout BRAM, id queue, interrupt |
| `rtl/readout_bram.sv` | `readout_bram` | H slots of 2^N x M words |
| `rtl/hist_axi_regs.sv` | `hist_axi_regs` | AXI4 burst slave and register map |
| `rtl/histogram_wrapper.sv` | `histogram_wrapper` | top: wires H channels and the shared blocks |

## From timestamps to bins

A channel receives a measured and a reference timestamp (T = 32 bits each). It
computes `dt = meas - ref_ts` modulo 2^T, then

```
bin = (dt - TIME_OFFSET) >> BIT_TRUNC        kept if 0 <= bin < 2^N
```

One bin is therefore 2^BIT_TRUNC timestamp LSBs wide. The channel covers
`[TIME_OFFSET, TIME_OFFSET + 2^(N+BIT_TRUNC))` LSBs. Events outside that range
are dropped, not wrapped. Two worked settings for a converter with a 36.6 fs
LSB and N = 8:

* BIT_TRUNC = 15 and TIME_OFFSET = 1747626 give 1.2 ns bins from 64 ns to
  371 ns. A 70 ns interval (1912568 LSB) falls in bin 5.
* BIT_TRUNC = 7 gives 4.69 ps bins. Each channel can then be given its own
  TIME_OFFSET, so several channels cover adjacent windows of one measurement.
  The windows are exactly contiguous when the TIME_OFFSET step between
  channels is 2^(N+BIT_TRUNC).

The binner is combinational, so it adds no latency of its own. A converter
that already delivers the interval `dt` as one code can drive `meas` with it
and tie `ref_ts` to zero.

## The counting pipeline

`mini_histogram` keeps one M-bit counter per bin in a memory with one
registered read port and one write port. It accepts one event per clock:

* In the cycle an event is presented (`ev_valid && ready`), its bin is read.
* In the next cycle the count plus one is written back.

The counter is thus updated two clocks after the event. Two events on the same
bin in consecutive clocks would otherwise read a stale count, so the last
written (bin, count) pair is kept in a register and used in place of the memory
output when the bins match. Events two or more clocks apart need nothing
special, because the memory is read-before-write.

## Near overflow, dead time and the copy

The near-overflow threshold sits in a common register (reset value 2^M - 2).
The channel freezes (`ready` low) in the clock after any counter reaches it.
One event may already be in the pipeline at that moment and is still counted,
so the threshold is clamped to 2^M - 2 and no counter can wrap. A write to the
FLUSH register freezes a channel in the same way. This read request is used to
empty the channels at the end of an acquisition.

A frozen channel raises `req` once its pipeline is empty. The readout
controller serves one channel at a time. It picks, round-robin from the channel
after the last one it served, a requesting channel whose Readout BRAM slot is
free, and pulses that channel's `grant`. The channel then streams its 2^N bins
in order, one per clock. Each bin is cleared in the same clock it is read. The
controller writes bin b of channel h to Readout BRAM word `h*2^N + b`. After
the last bin it:

* pushes h into an id queue,
* marks slot h busy,
* raises `irq`, which stays high while the queue is not empty.

The channel starts counting again from zero as soon as its copy ends. It does
not wait for the processor. A channel that fills up again before the processor
has fetched its previous copy stays frozen until that slot is freed.

For the processor side, one round is:

1. on `irq`, read READOUT HEAD to get the channel id h;
2. read the 2^N words at window `0x8000 + h*2^N`, normally as one 2^N-beat
   INCR burst issued by a DMA engine;
3. add them into the channel's 32-bit histogram in external memory, allocating
   that histogram the first time h is seen;
4. pulse `xfer_done` for one clock. This pops the queue and frees slot h.

Events that arrive while a channel is frozen are lost. `ev_ready` shows when a
channel is counting, so a source can measure its own dead time. In the worst
case every channel fills the same bin at the full clock rate. Each channel then
freezes after about 2^16 clocks and waits for the processor to drain up to H
copies. The average accepted rate is lower than the clock rate by the ratio of
those two times.

## Register map

The AXI4 port uses 32-bit data. Word index = byte address / 4, so the
address is 18 bits wide. Bursts of up to 256 beats are accepted:

* FIXED bursts repeat one word.
* INCR bursts step one word per beat. WRAP bursts are treated as INCR.
* The beat size is always 4 bytes.
* Each direction handles one transaction at a time.
* The ID is returned, and the response is always OKAY.

| Word index | Name | Access | Contents |
|---|---|---|---|
| 0x0000 | MAGIC | R | 0x48495354 |
| 0x0001..0x0004 | H, N, M, T | R | build parameters |
| 0x0100 | CTRL | RW | bit0: acquisition enable (reset 0) |
| 0x0101 | THRESH | RW | near-overflow count (reset 2^M - 2, clamped to it) |
| 0x0102 | FLUSH | W | bit31 = 1: read request to every channel; otherwise the channel number in the low bits |
| 0x0200 | RO_HEAD | R | bit31: a copy is waiting; low bits: its channel id |
| 0x0201 | RO_COUNT | R | number of copies waiting |
| 0x0300..0x3FFF | (unmapped) | | reads 0, writes ignored |
| 0x4000 + 4h + 0 | TIME_OFFSET[h] | RW | T bits |
| 0x4000 + 4h + 1 | BIT_TRUNC[h] | RW | clog2(T) bits |
| 0x4000 + 4h + 2 | STATUS[h] | R | bit0 counting, bit1 frozen, bit2 slot busy |
| 0x8000 + h*2^N + b | Readout BRAM | R | copy of bin b of channel h (M bits, zero-extended) |

The Readout BRAM window holds 2^15 words, so a build must keep H * 2^N <= 2^15.
`histogram_wrapper` stops elaboration with an error for larger sizes.
The default 128 x 256 fills it exactly.

## Interface and timing of the top

`histogram_wrapper` has parameters `H`, `N`, `M`, `T` and `IDW`, with the
defaults above. It has one clock, `aclk`, and a synchronous active-low reset,
`aresetn`. Its ports are:

* per-channel inputs `ev_valid`, `meas` and `ref_ts`, and the output
  `ev_ready`;
* `irq` out and `xfer_done` in;
* the AXI4 slave port, with an ID width parameter `IDW` (default 4).

| What | Clocks |
|---|---|
| counter memory clear after reset (`ev_ready` low) | 2^N |
| accepted event to updated counter | 2 |
| event rate per channel | 1 per clock |
| FLUSH write taken to `irq` for an idle controller | 2^N + 4 |
| copy of one channel (controller busy) | 2^N + 3 |
| AXI read address taken to first RVALID | 2 |
| next read beat after a beat is taken | 2 |
| AXI write data beats | 1 per clock after the address |
| last write beat to BVALID | 1 |

## Design decisions

The original design fixes the parts listed in the opening sections:

* the channel structure;
* the 16-bit cache counters extended to 32 bits by the processor;
* the two-clock, one-event-per-clock counter;
* copies tagged with the channel id in a shared Readout BRAM;
* the interrupt and transfer-completion steps;
* the region layout of the address map;
* the per-channel TIME_OFFSET and BIT_TRUNC registers.

The following are choices of this implementation:

* **Offset direction.** TIME_OFFSET is subtracted, so it marks the start of the
  range. An adder that adds a negative offset is equivalent, but the register
  then holds the two's complement.
* **One clock.** The whole block runs on one clock. In the original system the
  histogram side runs at 150 MHz and the processor at 130 MHz. Here the
  crossing is left to the bus interconnect, and `xfer_done` must be
  synchronised to `aclk` by the integrator.
* **AXI4 subset.** The slave handles one burst at a time per direction and
  always answers OKAY. A read burst gives one beat every two clocks, because
  the data mux is registered after the registered Readout BRAM read.
* **Freeze policy.** The channel stops at the threshold and drops events until
  its copy is done. The one in-flight event is absorbed by the 2^M - 2 clamp.
* **Clear sweep.** The counter memory is cleared after reset instead of relying
  on memory initialisation.
* **Arbitration and queue.** Copies are arbitrated round-robin, there is one
  slot per channel, ids are queued first-in first-out, and the interrupt is a
  level.
* **Register offsets.** The offsets inside each region and the contents of the
  header are this implementation's own.
* **Memory mapping.** The counter memories are plain arrays. A synthesis tool
  may map a 256 x 16 array to distributed RAM rather than block RAM.

Not built as RTL:

* the processor and its software;
* the DMA engine;
* the DRAM controller and the DRAM;
* the serial link to the host PC;
* the time-to-digital converter.

These are vendor or third-party blocks. The end-to-end test bench contains
behavioural stand-ins for the processor, the DMA and the DRAM.

## Verification

Each block has a self-checking test bench in `tb/`. Each prints one line,
`TB_RESULT checks=<n> failures=<n>`, and has a watchdog.

* `tb_timestamp_binner` checks 20 000 random timestamp pairs and the range
  edges against a reference computed by integer division, including the 70 ns
  example above.
* `tb_mini_histogram` covers:
  * the clear sweep;
  * the 2-clock latency, by peeking the counter memory;
  * random traffic with repeated bins;
  * the copy order and its one-bin-per-clock rate;
  * the memory clear;
  * freezing at a low threshold, at the default threshold and at an
    all-ones threshold, where no counter may wrap.
* `tb_readout_ctrl` uses behavioural channels. It checks every Readout BRAM
  write, the id queue order, the 2^N + 3 clock copy time and round-robin order.
  It also checks that a channel with a busy slot is never granted.
* `tb_readout_bram` runs the full 32768-word memory against a reference array.
* `tb_hist_axi_regs` checks every register region, the byte strobes and the
  FLUSH pulses. It also checks the readout window, the read latency, response
  hold under back-pressure, INCR and FIXED bursts in both directions, IDs,
  RLAST and the beat spacing.
* `tb_histogram_wrapper` runs the whole design at the default size, with no
  parameter overrides:
  * 128 channels with random timestamps;
  * a processor stand-in that services every interrupt with one 256-beat AXI4
    burst per copy and keeps 32-bit histograms;
  * a phase with a low threshold, so copies and contention are frequent;
  * a single bin driven past 2^16 at the default threshold;
  * a final flush of all channels.

  All 128 x 256 32-bit histograms must equal a reference model of the accepted
  events. The test also requires each of these to occur at least once:
  near-overflow freezes, busy-slot waits, several channels requesting at once,
  dead-time losses, out-of-range drops, same-bin forwarding and bins beyond
  2^16.

* `tb_tof_pet_workload` runs the measurement settings at the default size:
  * Run A: time-over-threshold values of 70 to 252 ns with 1.2 ns bins from
    64 ns. The bins used must lie within 5..156, and every histogram must
    match the reference.
  * Run B: all 128 channels see the same values. Each channel has 4.69 ps bins
    and a window adjacent to the next (TIME_OFFSET step 2^15), so the channels
    together form one 32768-bin histogram from 64 to 217.6 ns. Each event in
    that span must be counted exactly once.
  * Run C, the worst case: every channel is hit in one bin on every clock.
    Counting must run at one event per clock between freezes. The average
    accepted rate must lie between the clock rate and the lower bound
    `1 / (1 + H * t_service / (2^M - 1))` events per clock, where `t_service`
    is the processor stand-in's measured time per mini-histogram. With 520
    clocks per copy, the run measures 0.96 events per clock per channel
    against a bound of 0.50. The margin exists because copies into the
    Readout BRAM overlap with counting.

Running a test with Verilator (5.x):

```
verilator --binary --timing --assert -Wall -Wno-fatal -y rtl \
    rtl/hist_pkg.sv tb/tb_histogram_wrapper.sv --top-module tb_histogram_wrapper
./obj_dir/Vtb_histogram_wrapper
```

Replace the test bench name to run the others. The full-size tests simulate
several hundred thousand clocks of all 128 channels in seconds. The RTL is
lint-clean apart from unused-signal and unused-parameter notes. The unused
signals are the AXI byte-offset address bits, the upper bits of loop indices,
and the per-channel out-of-range flag, which the top leaves unconnected.

Not verified:

* timing closure at 150 MHz, or FPGA resource use;
* behaviour with a real DMA engine or a real processor;
* operation with two clock domains.
