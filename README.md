# FlexRay bus monitor: timestamped, triggered recording and replay

A FlexRay communication controller hides most of what happens on the bus.
Bit timing, framing and CRC checks stay inside the protocol engine. Received
frames wait in the controller-host interface for an unknown time and carry
no time of arrival. That is enough for an application, but not for
diagnosing a distributed system that runs close to its timing limits.

This design puts a recording path where the controller-host interface would
be. Every event the monitor records gets a timestamp from a free-running
sample-clock counter:

- a received frame,
- a cluster synchronisation,
- a GPS second pulse,
- an edge on a bus line.

The event is packed into a self-describing record and queued with other
records of its kind. The queues are merged, whole record by whole record,
into a dual-ported RAM that the host CPU empties under interrupt. A trigger
unit decides when each queue records. It can trigger on edges, states, data
values, ranges and times, on AND/OR combinations of these, and on sequences
with event counts. Recording can be placed after the trigger or run up to
it. The same timestamps drive the reverse path: recorded frames written back
by the host are handed to the protocol engine again at their original
relative times ("replay"). A situation that was seen on the road can thus be
re-enacted on the bench.

The FlexRay protocol engine is not part of this RTL. Its interfaces are
ports of `monitor_top`.

```
            host CPU (reads records, writes replay records)
              |  irq           ^                      |
        +-----------+          |               +-------------+
        | dpram_fifo|  <--- local bus ---+     | dpram_fifo  |  (replay FIFO)
        +-----------+                    |     +-------------+
              ^                   +-------------+     |
              |                   | bus_arbiter |     v
              |                   +-------------+  +-------------+
   +----------+----------+----------+              | replay_unit | --> protocol engine
   |record_   |record_   |record_   |record_       +-------------+     transmit side
   | queue    | queue    | queue    | queue               ^ fired
   | data     | cl. sync | gl. sync | line edges          |
   +----^-----+----^-----+----^-----+----^-----+   +--------------+
   |record_   |record_   |record_   |record_   |<--| trigger_unit |<-- status, rxd,
   | encap En | encap En | encap En | encap En |   +--------------+    frame words,
   +----^-----+----^-----+----^-----+----^-----+          ^            sync strobes
        |          |          |          |                | ts
   frames from  cluster    GPS 1-pps   rxd[1:0]    +-----------+
   protocol     sync +     (sync_      (line_      | time_base |---> ts to all
   engine       cluster    event_src)  edge_src)   +-----------+
                time
```

## Time base and timestamps

`time_base` is a 32-bit counter that advances once per sample clock. The
sample clock is 80 MHz: eight samples per bit at the FlexRay rate of
10 Mbit/s. One count is therefore one sample (12.5 ns), and every
over-sampled bit position on the bus can be told apart. The counter wraps
every 2^32 / 80 MHz = 53.7 s. It pulses `ts_wrap` in the cycle after a
wrap, so host software can extend the timestamps.

The counter cannot be loaded or adjusted. Records therefore never go
backwards in time, even when several recordings are related to each other.
Those relations come from records instead of from corrections to the clock:

- A cluster sync record carries the protocol engine's cluster time.
- A global sync record carries the count of GPS pulses.

The host can work out the oscillator's frequency error from global sync
records one second apart. There is no rate correction in hardware.

## Records

All records are sequences of 32-bit words:

| word | content |
|------|---------|
| 0 | header: `[31:24]` identifier, `[23:16]` length in words (header included), `[15:0]` source info |
| 1 | timestamp: time base value in the cycle the event started |
| 2.. | payload, 0 to 253 words |

| identifier | record | payload | info field |
|---|---|---|---|
| `8'h01` | data frame | frame words from the protocol engine | `pe_fr_info` (for example channel and status) |
| `8'h02` | cluster sync | cluster time given with the strobe | 0 |
| `8'h03` | global sync | running count of GPS pulses | 0 |
| `8'h04` | line edge | none | `[1:0]` new state of rxd B/A, `[15:8]` changes merged into this record |

The length at the head of each record lets the host step from one record to
the next without parsing payloads. The identifier leaves room for records
from other networks. Record types and their encodings are defined in
`rtl/mon_pkg.sv`.

Some timestamps are offset from the true edge by a fixed number of clocks,
caused by the synchronisers:

- A global sync record is 3 clocks after the GPS edge.
- A line-edge record is 2 to 3 clocks after the line changed.

Frame and cluster sync timestamps are taken in the clock of the protocol
engine's strobe, which is synchronous. A frame is stamped when the protocol
engine starts handing it over (`pe_fr_start`), not at its first bit on the
wire. The protocol engine is expected to start the hand-over at a fixed
point of the frame, for example once the header with the length is
decoded, and then pass words on as they arrive. The timestamps are then
late by a constant, which cancels out in relative times and in replay.

Both FlexRay channels share the one frame stream, as the single data-frame
queue implies. If frames on channels A and B overlap, the second one's
hand-over waits for the first, and its timestamp is late by that wait: at
most 69 clocks (under 9 bit times) when the protocol engine buffers each
frame and hands it over in one burst.
Keeping both channels exact would need a second data-frame encapsulator and
queue. The arbiter and trigger are parameterised by the number of queues,
so that is a wiring change in `monitor_top`.

## Triggering

The trigger unit (`rtl/trigger_unit.sv`) is configured through one packed
struct, `trig_cfg_t`, and controlled by the level `arm`. It is built from
three stages.

**Conditions.** Four condition units each test one thing in every clock:

| kind | true when |
|---|---|
| `COND_RISE` / `COND_FALL` | signal `sig[sel]` rose / fell since the last clock |
| `COND_STATE` | `(sig & mask) == (refv & mask)` |
| `COND_EQ` | a frame word is accepted this clock and `(data & mask) == (refv & mask)` |
| `COND_RANGE` | a frame word is accepted and `lo <= data <= hi` |
| `COND_TIME` | `ts == refv` |

In `monitor_top` the signal vector is:

```
sig = {pe_status[2:0], rxd_sync[1:0], pps_pulse, csync_strobe, frame_start}
        bits 7..5        4..3           2          1             0
```

Conditions on the communication channel and on error states arrive as
protocol engine status lines, and are tested with `COND_STATE` or an edge.

**Combination.** Two product terms each AND any subset of the conditions
(`use_c`). Any of the subset can be inverted first (`neg_c`). The terms are
then ORred. "(A and B) or (not C)" is `term[0] = {use A,B}`,
`term[1] = {use C, negate C}`.

**Sequence.** Four stages. Each stage waits until its product term has been
true `count` times (0 counts as 1), then hands over to the next. The trigger
fires when stage `last_stage` completes. "A, then B three times" is
stage 0 = (term A, 1), stage 1 = (term B, 3), `last_stage = 1`. Nothing
counts before the unit is armed. An event of a later stage that comes too
early is ignored.

**Response time.** This is the point of the two paths. With
`use_seq = 0` the combination drives the trigger combinationally. Recording
starts in the same clock as the event: a frame whose start coincides with
the trigger event is recorded. With `use_seq = 1` the sequencer's output is
registered, so the trigger comes one clock after the final event. Choose
the simple path when the first clock matters.

**Trigger position.**

- `TRIG_POST`: the record window opens at the trigger.
- `TRIG_PRE`: the window is open from arming, so everything before the
  trigger is recorded too.

In both modes the window closes `post_len` clocks after the trigger opens
it (the trigger clock included). `post_len = 0` keeps it open until `arm`
falls. `trig_ts` holds the trigger's timestamp, so in pre-trigger mode the
host can find the trigger point in the stream. Because the host
continuously moves records from the DPRAM into its own memory, the history
before the trigger is as long as that memory, not a fixed hardware buffer.

The record window is driven onto the per-queue `triggers` lines, masked by
`q_sel` (bit 0 data, 1 cluster sync, 2 global sync, 3 line edges). `fired`
stays high from the trigger until disarming. It can start the replay.

## From event to host memory

**Encapsulator** (`record_encap`). It samples the timestamp in the start
clock of an event. A record is taken only if two things hold in that clock:

- the queue's trigger line is high;
- the queue has room for the whole record.

Otherwise the payload is still consumed, so the source never stalls. The
record is lost, and if the trigger line was high, the loss is counted in
`dropped[q]`. A record that started inside the window is completed even if
the window closes meanwhile. The header goes out in the start clock and the
timestamp in the next; `ev_ready` is low in that clock. After that the
encapsulator takes one payload word per clock. `pe_fr_abort` discards a
frame in progress.

**Queues** (`record_queue`). Each record type has its own FIFO because the
events happen in parallel. The encapsulator commits a record with its last
word, and only committed words are visible to the reader. An abort rewinds
the write pointer to the last commit.

**Arbiter** (`bus_arbiter`). Round robin over the queues. A queue is served
when it holds a committed record and the DPRAM FIFO has room for the whole
record; the length comes from the header at the queue's head. The record is
then copied in one burst, one word per clock. This takes one clock to
choose plus L clocks for L words. Records are never interleaved, and the
DPRAM never holds a partial record. When the DPRAM is too full for the
waiting record, the queue is held back. Once that queue fills, its
encapsulator drops records.

**DPRAM FIFO** (`dpram_fifo`). The two ports run on different clocks:

- Port A is written by the arbiter on the sample clock.
- Port B is read by the host on `h_clk`. Data comes back one clock after
  `h_rd`, like a synchronous RAM.

The pointers cross the clock boundary in Gray code through two flops each.
Each side sees a slightly old but safe view of the other: free space and
fill level are never overstated. `irq` is high while the host-side level is
at or above `threshold` (0 disables it). The intended interrupt routine
reads until `h_level` is 0.

**Rates and sizes.** Frames alone are light load. A FlexRay channel
delivers a 32-bit word every 256 sample clocks, and the local bus moves one
word per clock.

Bit-level monitoring is what loads the path:

- Each edge on a bus line is a 2-word record and costs 3 arbiter clocks.
- With both lines switching at every bit boundary, that is 0.5 words per
  clock into the DPRAM. Real coded traffic gives about half of that.
- The host then has to drain tens of millions of words per second. This
  design cannot lower that figure, so it is what to budget for when line
  edges are selected in `q_sel`.

The queue sizes follow from the longest time a queue has to wait for the
bus, which is while a 68-word frame record is being copied:

- The data queue holds two largest records, because frames of both
  channels can be handed over back to back.
- The edge queue holds the edges of that wait.

With smaller queues the full-speed load test loses records.

## Replay

The host writes records into a second `dpram_fifo` (host clock in, sample
clock out). Typically these are a recording with some nodes' frames
removed, re-enacted against the remaining real nodes.

`replay_unit` works through the records in order:

- It skips anything that is not a data frame.
- For a data frame it waits until `ts - (rec_ts + rp_offset)`, taken as a
  signed number, is no longer negative. This comparison stays correct
  across a wrap of the time base.
- One clock later it raises `pe_tx_start`, with the length and info. It
  then hands the payload over with `pe_tx_valid`/`pe_tx_ready`.

The fixed latency keeps the spacing between frames exact. A frame that is
already overdue when it is read goes out at once and counts in `rp_late`.
With `rp_on_trig` set, replay waits for the trigger unit to fire. Fetching
takes two clocks per word, far faster than the bus consumes words.

## Interfaces of `monitor_top`

| group | ports |
|---|---|
| clocks, resets | `clk` (sample clock), `rst_n`, `h_clk`, `h_rst_n` |
| configuration | `tb_run`, `trig_cfg`, `q_sel[3:0]`, `arm`, `threshold` |
| received frames | `pe_fr_start`, `pe_fr_len` (payload words, given at the start), `pe_fr_info`, `pe_fr_valid`/`pe_fr_data`/`pe_fr_ready`, `pe_fr_abort` |
| sync and status | `pe_csync` (one-clock strobe), `pe_ctime`, `pe_status[2:0]`, `gps_pps` (asynchronous), `rxd[1:0]` (asynchronous) |
| host, recording | `h_rd`, `h_rdata`, `h_level`, `irq` |
| host, replay | `h_wr`, `h_wdata`, `h_wfree`, `rp_run`, `rp_on_trig`, `rp_offset` |
| transmit (replay) | `pe_tx_start`, `pe_tx_len`, `pe_tx_info`, `pe_tx_valid`/`pe_tx_data`/`pe_tx_ready` |
| status | `ts`, `ts_wrap`, `trig`, `trig_ts`, `armed`, `done`, `recording`, `enc_busy`, `dropped[4]`, `grant`, `edges_merged`, `rp_late`, `rp_replayed`, `rp_busy` |

A frame source must give the payload length with `pe_fr_start` and present
words only after the start clock. A FlexRay frame header holds its payload
length, so the protocol engine knows it early.

Configuration is static while armed. A host register interface to write it
is not part of this design: `trig_cfg`, `q_sel`, `threshold` and the replay
controls are plain ports.

## Sizes

| parameter | default | where it comes from |
|---|---|---|
| `TS_W` (mon_pkg) | 32 | 53 s wrap-around at 80 MHz needs 31.98 bits |
| sample clock | 80 MHz | 8 x over-sampling of 10 Mbit/s (a clock constraint, not a parameter) |
| `DP_DEPTH` | 16384 words (64 KiB) | this design's choice: the size of the dual-port RAM of an Altera EPXA4, the device such a monitor was built on |
| `DQ_DEPTH` | 256 words | this design's choice: two largest records back to back (2 x 68 words, frames of both channels), rounded up to a power of two |
| `SQ_DEPTH` | 16 words | this design's choice: five cluster or global sync records |
| `EQ_DEPTH` | 64 words | this design's choice: the edges of both lines (up to one per 4 clocks) that arrive while a largest frame record is copied; 32 words lost edges under full bit-level load |
| `RP_DEPTH` | 4096 words | this design's choice |
| conditions / terms / stages | 4 / 2 / 4 | this design's choice (mon_pkg) |
| record length field | 8 bits | this design's choice; fits the largest FlexRay frame |

## What follows the concept and what is this design's own

These parts follow the monitoring concept:

- the blocks and their connections: time base, trigger unit, encapsulators
  gated by trigger lines, dedicated queues, bus arbiter, DPRAM organised as
  a FIFO with a threshold interrupt, replay in the reverse direction;
- the three named record types (data frames, cluster sync, global sync)
  with a GPS 1-pps input;
- an identifier and a length at the head of each record;
- one timestamp count per sample;
- the 32-bit width implied by 8 x 10 Mbit/s and a wrap period of about
  53 s;
- the trigger features: edges, states, data match and range, time, AND/OR/NOT
  combinations, sequences, event counts, pre- and post-trigger, and a fast
  subset with same-clock response.

These are this design's own choices:

- all widths and encodings, and the record layout beyond the identifier and
  length;
- the handshakes, the commit/abort queues, the drop-on-full policy and its
  counters;
- round-robin arbitration in whole-record bursts;
- the dual-clock scheme;
- the numbers of trigger units;
- how pre-trigger is realised (recording from arming rather than a ring
  buffer);
- the line-edge record for bit-level monitoring;
- the details of the replay unit.

Not built:

- the FlexRay protocol engine (an existing controller core; its interfaces
  are ports here);
- the host CPU and its storage and network;
- the bus drivers and star couplers;
- a configuration register interface;
- fault injection, for which no mechanism is defined beyond "reverse path
  plus trigger";
- hardware calibration of the oscillator's frequency error or drift.

## Simulating

Each file in `rtl/` holds one module or the package `mon_pkg`, so
verilator can find modules by name. Every testbench in `tb/` checks itself
and ends with a line `TB_RESULT checks=N failures=M`.

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/mon_pkg.sv tb/tb_monitor_top.sv --top-module tb_monitor_top
./obj_dir/Vtb_monitor_top
```

Replace `tb_monitor_top` by any other testbench name. Verilator has no x
or z; every register that is read has a reset.

| testbench | what it shows |
|---|---|
| `tb_monitor_top` | the whole monitor at default sizes (see below) |
| `tb_full_speed_load` | both channels at full speed for 4 ms at default sizes: back-to-back frames of 2 to 66 words, half of the slots carrying frames on both channels that end in the same clock, a host with 10 us interrupt latency; random bit-level traffic on both bus lines (about 40000 edges); every frame, cluster sync and line edge is recorded in order and intact, nothing is dropped or merged, no hand-over waits more than 70 clocks |
| `tb_time_base` | one count per clock, holding, wrap period 2^b in a narrow copy |
| `tb_trigger_unit` | each condition kind, 300 random vectors against "(A and B) or not C", "A then B three times" with registered response, same-clock fast response, post window length, pre-trigger, open window |
| `tb_record_encap` | record layout and timestamp, header/timestamp timing, gating, drop when full, abort |
| `tb_record_queue` | random records with commits and aborts against a model |
| `tb_bus_arbiter` | L+1 clocks per record, round robin, no interleaving, DPRAM space check |
| `tb_dpram_fifo` | two unrelated clocks, order, no overstated level or space, interrupt rise and fall |
| `tb_sync_event_src` | GPS pulse to event (latency, count), cluster strobe with its cluster time |
| `tb_line_edge_src` | one event per edge with 2-3 clock latency, merging while busy |
| `tb_replay_unit` | release at timestamp + offset + 1, payload, skipped sync record, late frame, correct wait across a time-base wrap |

`tb_monitor_top` runs the defaults (16384-word DPRAM) in a few seconds. It
plays the protocol engine, the GPS receiver, the bus lines and the host's
interrupt routine, and runs four acquisitions:

1. a fast trigger on a status edge, with a frame starting in the trigger
   clock and a 3000-clock post window;
2. a pre-trigger acquisition closed by the sequence "cluster sync, then two
   frames whose first word matches `DEAD----h`";
3. an open window during which the host stops reading, so the DPRAM fills,
   the arbiter waits, queues overflow and records are dropped (one frame is
   also aborted);
4. a replay of five recorded frames, started by a time trigger.

It checks every record against its own log of events. Every frame expected
in a window is either recorded, in order and intact, or counted as dropped.
It also counts each mechanism and fails if one never occurred.

Not simulated: a wrap of the full 32-bit time base inside the whole design
(53.7 s of sample clocks). The wrap itself is covered in `tb_time_base`
with a narrow counter, and in `tb_replay_unit` by starting the time base
just before a wrap.
