# Gamma-ray camera acquisition block: trigger, pulse processing, DDR2 storage and PCIe DMA

A gamma-ray camera on a fusion experiment has 19 scintillator lines of sight. Each line sees
fast detector pulses at up to a few million per second, during a plasma pulse of about 30 s.
This RTL is the firmware of one **acquisition block**: one FPGA with four 13-bit ADC channels
sampling at 250 MHz, a 2 GB DDR2 memory and a PCIe x1 link to a host computer. Two blocks sit on
one ATCA board, and three boards cover the camera.

Every block can do three things with its samples:

- keep them in local memory: all samples (**raw**), only a window around each pulse
  (**segmented**), or only each pulse's energy (**processed**);
- compute pulse energies on the fly and **stream** them to the host over PCIe;
- do both at once (**concurrent**). Raw data fills the memory while energies are streamed, so the
  host can later check the on-line energies against an off-line analysis of the raw samples.

One clock (the 250 MHz acquisition clock) runs the whole block. The DDR2 controller/PHY and the
PCIe endpoint core are vendor IP and are not part of this RTL. The top module `trp_fpga_top`
gives them plain ports:

- a request/grant word interface to the memory controller;
- a 64-bit packet stream, an MSI request/acknowledge pair and a small register bus to the
  PCIe core.

## Data flow

```
ADC x4 ─► acq_channel x4 ───────────────────────► stream_merge ─► sync_fifo ─┐ (64-bit events)
           input_buffer → trigger_detector ─┬─ raw_packer ──┐                 ├─► dma_engine ─► PCIe core
                                            ├─ segmenter ───┼─► stream_merge ─► ddr2_store_ctrl ─┘
                                            └─ pha_trapezoid┘   (128-bit words)   (to DDR2 and back)
time_stamper, task_manager, reg_file, master_slave_sync: shared by the four channels
```

Each channel (`acq_channel`) is built like this:

- `input_buffer` places each 13-bit sample in the top bits of a 16-bit word. It also packs four
  samples into a 64-bit word at a quarter of the sample rate. The packing is needed for a 400 MHz
  double-data-rate ADC (`LANES=2`); this block is built for the 250 MHz ADC.
- `trigger_detector` finds pulses.
- The samples then go to three paths:
  - `raw_packer`: pairs of 64-bit words become 128-bit memory words;
  - `segmenter`: pulse windows, also used for the calibration data;
  - `pha_trapezoid`: energies.
- Each channel offers one 128-bit **store word** per record to the memory side and one 64-bit
  **stream event** to the PCIe side.

Two `stream_merge` units collect the four channels, one for the memory side and one for the
stream side:

- each input has its own FIFO (64 words on the memory side, 64 events on the stream side);
- the inputs are served round-robin;
- a segment (header plus data words) is never interleaved with another channel's words;
- an input is served only when a whole segment sits in its FIFO, which then leaves at one word
  per clock. A segment arrives slowly (one word per 8 samples), so without this rule one channel
  would block the others for the whole segment. Segments longer than 504 samples do not fit in
  the FIFO; they are passed on as they arrive.

All time information comes from one 44-bit **time stamp** (`time_stamper`). It counts
acquisition clocks and is cleared by every START, so it spans 2^44 / 250 MHz ≈ 19.5 h.

## Trigger

A channel triggers when its signal rises above 2^e ADC counts, with e = 0..12 set per channel.
The signal is the mean of the last 1, 2, 4 or 8 samples (a moving average against noise). The
trigger is a **rising crossing**: it fires on the first sample above the threshold after a sample
that was not above it.

In segmented and calibration mode, a trigger starts a **pulse-width inhibit**: no new trigger
for `seg_width` samples. The trigger pulse leaves aligned with the sample that caused it; both
are delayed by the same pipeline.

## Data modes in DDR2

Every DDR2 word is 128 bits. The record types are:

| mode | record | layout (MSB first) |
|---|---|---|
| raw | 8 samples | eight 16-bit samples of one channel, oldest in [15:0]; channels take turns word by word |
| segmented | header | `{4'h5, ch[1:0], width[15:0], pre[15:0], 6'b0, seq[39:0], ts[43:0]}` |
| segmented | data | ⌈width/8⌉ words of eight samples; the last word is zero-filled |
| calibration | as segmented | produced by channel 2 only (used to estimate the pole-zero factor) |
| processed | energy | `{4'h3, 60'b0, event[63:0]}` |

A segment is `seg_width` samples long. It starts `seg_pre` samples before the sample that
triggered. A circular delay line of `PRE_MAX` = 256 samples gives the pre-trigger history.
`seg_pre` must be below both `PRE_MAX` and `seg_width`.

A 64-bit energy **event** is `{ch[1:0], pileup, valid, ts[43:0], energy[15:0]}`. It is used in
two places: in the low half of the processed DDR2 record, and on its own in the PCIe stream.

## Trapezoid filter and pile-up

`pha_trapezoid` turns each pulse into one energy. It uses the recursive trapezoidal shaper of
Jordanov and Knoll. Samples go in as signed 16-bit values (v), and the filter computes, every
sample:

```
d(n) = v(n) - v(n-k) - v(n-l) + v(n-k-l)
p(n) = p(n-1) + d(n)
r(n) = p(n)·2^8 + M·d(n)           M: pole-zero factor, Q8.8
s(n) = s(n-1) + r(n)
```

For an exponential pulse that decays by b per sample, set M = b/(1-b). s(n) is then a trapezoid:

- it rises over k samples;
- it stays flat for l-k samples;
- its height is proportional to the pulse amplitude.

A mismatched M makes the flat top tilt. The calibration data exists to measure the decay
constant.

A 512-sample circular buffer gives the three delayed taps, so k ≤ l and k + l < 512 are required.
Taps that reach back before the path was enabled read as zero. This keeps a stale buffer from
leaving a permanent offset in the accumulators.

Energy measurement:

1. At a trigger, s is saved as the baseline.
2. The largest excursion of s above that baseline over the next k+l+2 samples is the height.
3. energy = height >> (8 + e_shift), saturated to 16 bits.
4. The event leaves k+l+2 samples after its trigger, with the trigger's time stamp.

A trigger during a measurement is a **pile-up**:

- it is counted;
- it is reported at once as an event with `pileup=1` and energy 0;
- the measurement already running goes on.

Per-channel trigger and pile-up counters can be read by the host.

Defaults (register reset values): k = 32, l = 48, M = 0, e_shift = 0.

The 2 GB memory lasts:

- about 1.07 s in raw mode;
- about 3.9 s in segmented mode at 2 M pulses/s with 128-sample windows;
- about 17 s in processed mode at 2 M events/s per channel.

## Operating modes and the task manager

After the block is armed, every START runs one **task** (`task_manager`). START comes from
software or from the external timing system. The task's operating mode is one of these:

| mode | acquisition | ends on | afterwards |
|---|---|---|---|
| `OP_STORE` | chosen data mode → DDR2 | byte count / memory full, interval, software stop | retrieval from DDR2 |
| `OP_STREAM` | processed events → PCIe | interval, software stop | stream flushed |
| `OP_CONCURRENT` | raw → DDR2 **and** events → PCIe | interval, software stop | stream flushed, then DDR2 retrieved |

The interval (`ACQ_TIME`) is counted in microseconds; 0 means no limit. A full memory stops the
DDR2 writes but not the stream.

The task goes through these states:

- IDLE, then ARMED;
- ACQ;
- FLUSH_S: the stream buffer is sent out, with its last PCIe packet zero-padded;
- DRAIN: wait until no channel is finishing a segment or measurement and the storage FIFOs are
  empty;
- RETR: DDR2 retrieval;
- FLUSH_D, then back to ARMED.

A segment or energy measurement under way when acquisition stops is completed. So every counted
trigger produces its event, and no segment is cut short.

The **stream/DDR2 arbitrator** (`src_ddr`) chooses what feeds the DMA engine: the stream buffer
during acquisition, DDR2 during retrieval. It also sets the DMA packet size (see below).
Retrieval reads the words back in write order as 64-bit halves, low half first, with up to four
memory reads in flight.

## DMA packets, PCIe packets and MSI

The host gives a buffer address and sets a **DMA request** bit. The engine then sends one **DMA
packet**, made of PCIe memory-write packets (TLPs):

- **DDR2 retrieval:** 32 TLPs per DMA packet = 4096 bytes.
- **Streaming:** 1 TLP per DMA packet. At a low count rate an event never waits for 31 more
  packets' worth of data.

Each TLP carries 32 doublewords (128 bytes) and goes to the next 128-byte block of the host
buffer. When the DMA packet is done, the engine:

1. raises `msi_req` and holds it until `msi_ack`;
2. clears the request bit;
3. waits for the host to set the request bit again.

A TLP leaves only when its 16 data words are buffered, except during a flush. A flush sends
what is there padded with zeros, or ends the DMA packet early if nothing is left.

TLP beats on `tx_data` (64 bits, first doubleword in [63:32]; a beat moves when `tx_valid` and
`tx_ready` are both high):

| beat | [63:32] | [31:0] |
|---|---|---|
| 0 (`tx_sof`) | DW0 = `0x4000_0020` (3-DW header, memory write, length 32) | DW1 = `{req_id, tag, 4'hF, 4'hF}` |
| 1 | DW2 = address | payload DW0 |
| 2..16 | payload DW(2i-3) | payload DW(2i-2) |
| 17 (`tx_eof`, `tx_rem=1`) | payload DW31 | unused |

Within each 64-bit data word the low doubleword is sent first, so it lands at the lower host
address. The host therefore sees the memory contents in order, as little-endian 64-bit words.

An assertion in `dma_engine` checks that a beat stays stable while `tx_ready` is low.

## Boards, master and START

Every block in the shelf must start on the same clock edge. `master_slave_sync` handles this:

- The board in slot `MASTER_SLOT` (7 by default) is the master.
- The master drives the backplane START line. The source is the external START, or a software
  START stretched to 4 clocks.
- Every board, the master included, starts on the synchronized rising edge of that line. START
  reaches `start_o` 3 clocks after the line rises.
- `clk_src` tells the board clock multiplexer what to use: 0 internal, 1 external, 2 backplane.

## Registers

The register bus uses 32-bit registers at word addresses. Reads have one clock of latency.

| addr | name | contents |
|---|---|---|
| 0x00 | CTRL | [1:0] operating mode, [3:2] data mode (0 raw, 1 segmented, 2 processed, 3 calibration), [4] arm, [5] software START (pulse), [6] stop (pulse), [7] external START |
| 0x01 | STATUS | [2:0] task state, [3] busy, [4] memory full, [5] master, [6] DMA request pending, [7] error log not empty, [31:16] error count |
| 0x02 | ACQ_TIME | interval in µs |
| 0x03 | NBYTES | bytes to store (0 = whole memory) |
| 0x04 | PULSE | [15:0] width, [31:16] pre-trigger samples (reset 128 / 16) |
| 0x05 | TRIG | 4 bits of threshold exponent per channel, [17:16] log2 averaging (reset 6 / 2) |
| 0x06 | SHAPER | [9:0] k, [25:16] l |
| 0x07 | PZ | [15:0] M (Q8.8), [20:16] energy shift |
| 0x08 | DMA_ADDR | host buffer address |
| 0x09 | DMA_CTRL | [0] DMA request |
| 0x0A–0x0C | counters | words written, TLPs sent, DMA packets sent |
| 0x0D/0x0E | ERR_LO/HI | oldest error: time stamp, channel, code (1 DDR2-path overflow, 2 stream overflow); writing 0x0E pops |
| 0x10–0x17 | counters | triggers and pile-ups per channel |
| 0x18/0x19 | TS | current time stamp |
| 0x1A | TASKS | tasks completed |

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example, with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/trp_pkg.sv tb/tb_trp_fpga_top.sv
./obj_dir/Vtb_trp_fpga_top
```

`tb_trp_fpga_top` runs the top at its default parameters. It models the ADCs (exponential pulses
on noise), the DDR2 controller (random grant and latency), the backplane and the host. It runs
seven tasks:

1. raw store until memory full;
2. segmented store;
3. calibration;
4. processed store;
5. streaming with a software stop;
6. concurrent;
7. streaming while the host does not read, so the buffers overflow into the error log.

It compares every retrieved word with the memory model. It also checks:

- that streamed events equal the trigger counters;
- that segment headers and packet sizes are right;
- that each mechanism occurred at least once: memory full, time limit, software stop, inhibit,
  pile-up, flush padding, stream/DDR2 switch, MSI, overflow, error log, backplane START,
  calibration.

It takes well under a second.

`tb_workloads` runs the top, at its default parameters, at the operating points the system is
sized for. It checks that nothing overflows and that every trigger gives its record. It also
measures the memory fill rate:

| point | settings | measured |
|---|---|---|
| raw | | 64 KiB in 8198 clocks, so 2 GiB in 1.07 s |
| segmented | 2 M pulses/s per block, 128-sample windows | 17 words per pulse, 2 GiB in about 4 s at 2 M/s |
| processed | 2 M pulses/s per channel | one record per trigger |
| concurrent | link throttled to a PCIe x1 rate (one beat in 9 clocks) | every event streamed, then the raw data retrieved |

## Where this design makes its own choices

The following follow the description this design was built from:

- the block structure;
- the four data paths and the three operating modes;
- the 44-bit time stamp;
- the power-of-two thresholds 2^0..2^12, the averaging and the pulse-width inhibit;
- pile-up events that are counted without an energy;
- calibration on channel 2 only;
- the 128-bit DDR2 words and 64-bit stream events;
- 128-byte PCIe payloads, 4096-byte and single-TLP DMA packets, and an MSI per DMA packet;
- the master chosen by slot, with START over the backplane.

The following are this design's own:

- all record and header layouts, the register map and the reset values;
- the exact trigger rule (rising crossing, moving average);
- the filter equations, the peak search and the energy scaling. The source only says
  "trapezoidal shaper from IIR filters";
- the drain and flush steps, and the DMA request/clear handshake;
- the memory and PCIe core interfaces;
- the master slot number.

Known limits:

- The ADC and the logic share one clock. There is no clock-crossing FIFO.
- Only the 250 MHz, 13-bit ADC runs through the channel. `input_buffer` alone supports the
  two-lane DDR ADC.
- The 44-bit stamp spans 19.5 h, not more than 24 h.
- Payloads larger than 128 bytes are not supported.
- Events are not reordered across channels in the stream.
