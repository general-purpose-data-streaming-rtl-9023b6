# Streaming high-resolution TDC with LACCP clock synchronisation

This is a free-running ("trigger-less") time-to-digital converter for FPGAs.
It measures, without any trigger, the arrival time of the leading and
trailing edges of every hit on 64 input channels. The results leave as one
stream of 64-bit words. Several such modules can be read out side by side
and their timestamps compared directly. To make that possible, all modules
count the same time: a clock-synchronisation protocol, LACCP, runs over the
serial links that already carry the clock between the FPGAs. It aligns each
module's time counter to a root module to better than a clock period.

The RTL covers the whole digital path:

- clock synchronisation (heartbeat unit, the two LACCP roles);
- the per-channel measurement chain (sampling of a tapped delay line,
  edge finding, calibration, fixed-latency pipeline, edge pairing,
  TOT filter);
- the two-stage merger that rebuilds the time frames at the output.

The serial link itself, the network core and the clock generation are
outside the RTL. They appear as ports.

## Time base: heartbeat frames

All time is counted by a **heartbeat unit**:

- a 16-bit counter at 125 MHz (8 ns per count);
- a 24-bit frame number.

When the counter wraps to 0 the unit raises `heartbeat` for one cycle. That
moment starts a new **heartbeat frame** of 2^16 × 8 ns = 524.3 µs, and the
frame number increments.

A complete timestamp is made of three parts:

- the frame number, sent once per frame in a delimiter word;
- the 16-bit counter value (coarse time);
- a 13-bit fine time inside the 8 ns cycle (steps of 8 ns / 8192 ≈ 0.98 ps).

Frame number and counter together give a unique time over
2^40 × 8 ns ≈ 2.4 h. That is longer than a typical data-taking run.

Every channel, and every merger stage, marks the end of a frame with a
**heartbeat delimiter** word. The output stream is therefore a sequence of
frames:

```
TDC words of frame n ... | delimiter(frame n+1) | TDC words of frame n+1 ... | delimiter(n+2) ...
```

The delimiter carries the number of the frame that starts. A TDC word
belongs to the frame whose delimiter follows it.

## LACCP: aligning counters across modules

Modules form a tree. The clock root free-runs. Every other module is the
**secondary** of one upstream link. It can also be the **primary** of
downstream links, which makes it a clock hub. The link below LACCP
provides three services, assumed here as ports:

- a recovered 125 MHz clock that is frequency-locked to the upstream
  module;
- a **pulse** with a 2-bit type, delivered with fixed latency;
- slow 64-bit **messages**.

After link-up the link also reports its receive alignment:

- the IDELAY tap count (78 ps per tap);
- the bitslip offset of the deserialiser (1 ns per step, signed).

The sum of the two is called `dt`.

**Coarse offset.** The secondary sends a round-trip request pulse. The
primary echoes it one cycle later. The secondary counts the round trip
`T_rt` in cycles. After removing the one-cycle turnaround, half the round
trip is the one-way delay. That is the *coarse offset*, in 8 ns steps.

**Fine offset.** The recovered clock differs from the primary's clock by a
phase below one period. Each receiver's `dt` is exactly the delay it added
to align that phase. The phase difference is therefore
`(dt' − dt) / 2`, where:

- `dt'` is the secondary's value;
- `dt` is the primary's value, sent as a message.

If the net round trip is odd, halving it lost half a period. 4000 ps is
then added to the fine offset.

**Accumulation.** A hub forwards its own accumulated fine offset (the root
sends 0). Each secondary adds its local value. When the sum reaches ±8000 ps
it is folded back by one period, and the coarse offset is corrected by ±1.
Any number of stages can be chained this way.

**Loading.** While synchronised:

- Each root heartbeat travels down as a heartbeat pulse. On its arrival
  the secondary loads its counter with `coarse offset + 1`. That is the
  primary's counter value in the following cycle.
- The frame number follows as a message and is loaded in the same frame.

The heartbeat unit flags `sync_err` if a later load would move an
already-locked counter.

The fine offset is *reported*, not applied. The clock phase itself is not
shifted. Analysis software corrects the timestamps with
`fine_offset_acc`. The offsets are measured once per link-up.

Worked example (from the end-to-end testbench):

| Quantity | Root → top link | Top → leaf link |
|---|---|---|
| Latency | 20 cycles down, 21 up | 15 cycles down, 16 up |
| Secondary IDELAY | 26 taps | 26 taps |
| Round trip `T_rt` | 42 | 32 |
| Net round trip | 41 (odd) | 31 (odd) |
| Coarse offset | 41/2 = 20 | 31/2 + 1 = 16 |
| Local fine offset | 26 × 78/2 + 4000 = 5014 ps | 5014 ps |
| Accumulated fine offset | 5014 ps | 5014 + 5014 = 10028 ps, folded to 2028 ps |
| Counter correction | 0 (top counter = root counter) | +1 (leaf counter = top counter + 1) |

## Measuring an edge

**Delay line.** The hit runs along a carry chain of 192 taps:

- taps alternate between the O and CO outputs of the carry primitive;
- the first tap uses CO, because the calibration clock enters the first
  element.

The line is sampled by flip-flops at 500 MHz. The 500 MHz clock is phase
aligned to the 125 MHz clock.

**Bubble suppression.** Delay lines show "bubbles": non-monotonic codes
such as 000101111. Each group of three neighbouring sampled taps is
therefore ORed. This gives 64 effective taps of about 30 ps.

**Trailing edges.** The trailing edge is measured by a second timing unit
on the bit-inverted code.

**Timing unit.** The unit works in two clock domains:

- **500 MHz.** An edge is seen when effective tap 0 turns on. Its position
  is 64 minus the number of set taps. Counting ones tolerates left-over
  bubbles.
- **Crossing to 125 MHz.** Each 8 ns cycle contains four 500 MHz samples.
  Every sample writes into one of four slots. A register that toggles at
  125 MHz tells which sample coincides with the 125 MHz edge; that sample
  writes slot 0. The slot number becomes the 2-bit *phase region*. If
  several slots saw an edge, the earliest wins, so one edge per 8 ns is
  kept.
- **Calibration.** `{phase, tap}` addresses a 4 × 64 calibration table.
  The delay of the same tap differs between the four phase regions of the
  125 MHz cycle, hence one table per region. The table returns the 13-bit
  fine time.
  - It powers up linear: `entry = {phase, tap, 5'b0}`, i.e. 2 ns per
    region and 31.25 ps per tap.
  - It is written through `lut_wr_*`. The values come from a code-density
    histogram, taken with the 26.2144 MHz calibration clock selected into
    the line (`cal_sel`).

Simulation results with the behavioural delay line (10 ps per carry
output):

| Table | Worst error | RMS error |
|---|---|---|
| Linear table | ≈ 110 ps | — |
| Calibrated table | ≤ 60 ps | 10–25 ps |

## Channel pipeline (fixed latency)

```
hit → delay line → sampler → timing unit (lead) ─┐
                           → timing unit (trail) ┴→ path merger → delay buffer (250 cycles)
    → trigger gate → delimiter inserter → pairing unit → TOT filter → channel word
```

Everything up to the delimiter inserter has a constant latency, the same
for all channels. The coarse counter is attached after the delay buffer.
The attached value is therefore the hit time plus a constant. Software
subtracts this constant; it is about 2 µs, measured in simulation.

- **Path merger.** Puts both edges of one 8 ns cycle into one slot. A
  `trail_first` flag records which edge came first.
- **Delay buffer.** A circular RAM with a fixed distance of 250 cycles
  (2 µs). It gives an external trigger time to arrive.
- **Trigger gate.** In the default trigger-less mode (`trig_mode = 0`)
  everything passes. In triggered mode only slots that leave the buffer
  while `trig_gate` is high pass.
- **Delimiter inserter.** Adds the 16-bit counter value to each slot. At
  the heartbeat it adds the delimiter request from `delimiter_generator`.
  That request is shared by all channels.
- **Pairing unit.** Each leading edge waits for the next trailing edge.
  The time over threshold (TOT = trailing − leading, in fine steps) is then
  written into the leading word, and the trailing edge is dropped. This
  halves the data rate. A pending leading edge is sent *unpaired* (TOT 0,
  word bit 51 set) in three cases:
  - a delimiter arrives, so that the edge stays in its own frame;
  - a new leading edge arrives first;
  - 512 cycles (4.1 µs, the TOT range) pass without a trailing edge.

  The frame's delimiter then carries the UNPAIRED flag. A short queue of
  8 words serialises the up to three words one cycle can produce.
- **TOT filter.** When `tot_en` is set, only words with
  `tot_min ≤ TOT ≤ tot_max` pass. This removes noise pulses and unpaired
  edges. Delimiters always pass.

## Word formats

TDC word:

| Bits | Field |
|---|---|
| 63:60 | type `4'hB` |
| 59:53 | channel (0..127) |
| 52 | reserved |
| 51 | 1 = unpaired leading edge (TOT is 0) |
| 50:29 | TOT, 22 bits, 8 ns / 8192 units |
| 28:13 | 16-bit heartbeat counter (coarse) |
| 12:0 | fine time, 8 ns / 8192 units |

Delimiter word:

| Bits | Field |
|---|---|
| 63:60 | type `4'hC` |
| 59:52 | flags |
| 51:24 | 0 |
| 23:0 | frame number |

The flags are:

| Flag | Value | Meaning |
|---|---|---|
| LOST | `01` | a channel dropped words in this frame |
| MISMATCH | `02` | merged delimiters had different frame numbers |
| UNPAIRED | `04` | a leading edge was sent without TOT |

Time of a TDC word, in ns: `coarse × 8 + fine × 8 / 8192`. This stamp is the
hit time plus a fixed pipeline latency of about 2 µs. The stamp lies in frame
n−1, where n is the number in the next delimiter.

## Merging: rebuilding the frames

The channel streams are merged in two stages. In the original hardware the
two stages sit in two FPGAs: the front mergers on the TDC mezzanine cards,
the back merger on the main board.

- **front_merger.** 32 channel FIFOs (64 words each), then a 32-to-1
  merger core, then an output FIFO (256 words).
- **back_merger.** A merger core over the front-merger outputs (two in the
  top), then an output FIFO (1024 words). It has a valid/ready output
  towards the network core.

**Merger core.** It forwards data words one per cycle, round-robin over
the inputs that hold data. This is roughly arrival order. When an input
shows a delimiter, the core consumes it and stops reading that input.
When every input has stopped, the core emits one delimiter and releases
all inputs. That delimiter carries:

- the frame number;
- the OR of the merged delimiters' flags;
- MISMATCH, if the frame numbers disagreed.

The core sustains one 64-bit word per 125 MHz cycle (8 Gbps). In
simulation with all inputs busy it moved 715 words in 726 cycles.

**Overflow.** When a channel FIFO is full, a new TDC word is dropped, and
the next delimiter of that channel carries LOST. One entry is always kept
free for the delimiter, so frame structure survives any overload. The
`ch_lost` status bits show drops per channel.

## Top level: `str_tdc_top`

Default parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_FRONT` | 2 | front-merger groups (mezzanine cards) |
| `CH_PER_FRONT` | 32 | channels per group |
| `DELAY_CYCLES` | 250 | delay-buffer length (2 µs) |
| `CH_FIFO_DEPTH` | 64 | channel FIFO depth |
| `FM_FIFO_DEPTH` | 256 | front-merger output FIFO depth |
| `BM_FIFO_DEPTH` | 1024 | back-merger output FIFO depth |

Clocks:

- `clk`: 125 MHz, the recovered link clock;
- `clk_fast`: 500 MHz, rising edges coincident with `clk`.

Ports:

| Group | Signals |
|---|---|
| Detector | `hit[63:0]`, `cal_clk`, `cal_sel` |
| Upstream link (LACCP secondary) | `up_link_up`, `up_idelay_tap`, `up_serdes_ofs`, pulse tx/rx with type, message rx |
| Downstream link (LACCP primary) | the same, with message tx and `dn_msg_tx_ready` |
| Role | `root_mode`: free-run as clock root and forward a zero fine offset |
| Run control | `trig_mode`, `trig_gate`, `tot_en`, `tot_min`, `tot_max`; `lut_wr_en/ch/trail/addr/data` to load one channel's table |
| Output | `out_valid`, `out_data[63:0]`, `out_ready` |
| Status | `synced`, `rtt_cycles`, `coarse_offset`, `fine_offset_local`, `fine_offset_acc`, `hb_counter`, `hb_frame`, `heartbeat`, `sync_err`, `ch_lost` |

## Departures from the original hardware

- **Shared heartbeat unit.** Both channel groups share one heartbeat unit
  and one LACCP secondary. In the original hardware each mezzanine FPGA
  has its own, synchronised over an internal link.
- **Delay line and sampler.** The carry-chain delay line is a behavioural
  model (`tdl_carry_chain`) with 10 ps per output. On an FPGA it must be a
  placed carry chain, with flip-flops placed next to it.
- **Calibration.** The calibration histogram is not built in; tables are
  loaded through the write port.
- **Outside the RTL.** The MIKUMARI link is outside the RTL, as are the
  TCP/IP core, the clock PLLs and the input buffers. The link's services
  are ports, and a fixed-latency model of the link is used in the
  testbenches.
- **Fine offset.** It is reported, not applied, and it is measured once
  per link-up. A drop of `link_up` restarts the measurement.
- **Own choices.** The following are choices of this design:
  - the word formats;
  - the LACCP pulse types and message layout;
  - the pairing and overflow rules;
  - the round-robin order in the merger;
  - FIFO depths;
  - the single-edge-per-8-ns limit.
- **Low-resolution variant.** The 1 ns low-resolution TDC variant is not
  included.

## Simulation

Every testbench is self-checking. Each ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/str_tdc_pkg.sv rtl/laccp_pkg.sv tb/tb_str_tdc_top.sv --top-module tb_str_tdc_top
./obj_dir/Vtb_str_tdc_top
```

| Testbench | Covers | What is checked |
|---|---|---|
| `tb_heartbeat_unit` | heartbeat_unit | wrap, heartbeat, frame count, loads, `sync_err` |
| `tb_laccp` | laccp_primary, laccp_secondary | three links (even/odd round trip, ±1 correction): round trip, coarse, local and accumulated fine offset, counter relation, frame number |
| `tb_tdl_sampler` | tdl_carry_chain, tdl_sampler | 64-bit codes against the tap delays |
| `tb_timing_unit` | timing_unit, calib_lut | timestamp error with linear and written tables; one output per edge; all phase regions |
| `tb_odp_chain` | path_merger, delay_buffer, trigger_gate, delimiter_generator, delimiter_inserter | 253-cycle latency, coarse stamping, delimiter placement, gating |
| `tb_paring_unit` | paring_unit, tot_filter | pairing, TOT, three flush rules, queue overflow, filter window |
| `tb_tdc_channel` | tdc_channel | timestamp spread about 105 ps, TOT, frames, noise rejection |
| `tb_sync_fifo` | sync_fifo | against a queue model |
| `tb_front_merger` | front_merger | channel order, frames, LOST exactly when words were dropped |
| `tb_back_merger` | back_merger, merger_core | frame rebuilding, flags, throughput, back-pressure |
| `tb_str_tdc_top` | whole design | see below |

`tb_str_tdc_top` runs the default 64-channel configuration through a
three-module chain: root, then this top, then a leaf. It runs about 1.6 ms
of simulated time, about 30 s with Verilator. It counts, and requires, each
of the following:

- synchronisation and chained synchronisation;
- counter and frame loads;
- paired words on many channels;
- noise pulses removed by the TOT filter;
- pulses removed by the closed trigger gate;
- an unpaired 6 µs pulse with the UNPAIRED flag;
- words of a channel with a written calibration table;
- merged delimiters with the root's frame numbers;
- reader stalls, including one of 20 µs.

Timestamps minus true hit times agree within about 110 ps over all
channels.
