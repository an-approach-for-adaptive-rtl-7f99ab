# TAP: a throughput-aware, page-hit-aware write buffer for FB-DIMM DRAM

DRAM in open page mode keeps the last row of each bank open. An access to an open row (a page
hit) costs only a column burst. An access to any other row first costs a PRECHARGE and an
ACTIVATE, and activation is a large share of DRAM power and heat. The processor waits for reads
but not for writes. So a write that would miss its page can be held back until some other
operation opens its row, and then issued right behind that operation as a page hit.

This RTL implements that idea as the TAP (throughput-aware page-hit-aware write buffer). The TAP
sits in the Advanced Memory Buffer (AMB) of a Fully Buffered DIMM, between the command decoder and
the DDR2 port. It has three parts:

* **Activated Rows Table**: which row is open in each bank.
* **Write Buffer**: a CAM of write addresses next to an array of 64-byte write data.
* **Adaptive Adjustor**: measures DRAM throughput and enables 64, 32, 16 or 0 buffer entries.
  When traffic is light, a page hit saves little and the buffer's own power is wasted.

Reads are never held back. A read whose line is still in the buffer gets the buffered data
through the read FIFO.

## Files

| file | module | role |
|---|---|---|
| `rtl/tap_pkg.sv` | package | address map, `op_t`, size codes, event struct |
| `rtl/cmd_decoder.sv` | `cmd_decoder` | registers an operation and splits its address |
| `rtl/activated_rows_table.sv` | `activated_rows_table` | open row per bank pair |
| `rtl/write_buffer.sv` | `write_buffer` | CAM + data array, broadcast compare, clock-enable sizing |
| `rtl/victim_select.sv` | `victim_select` | LFSR choice of the entry to evict |
| `rtl/adaptive_adjustor.sv` | `adaptive_adjustor` | cycles-per-10-accesses counter and size decision |
| `rtl/operation_queue.sv` | `operation_queue` | in-order queue towards the DDR port |
| `rtl/read_fifo.sv` | `read_fifo` | in-order read data, with write-buffer forwarding |
| `rtl/tap.sv` | `tap` | top: the control that ties the parts together |
| `tb/*_tb.sv` | | one self-checking testbench per module |
| `tb/dram_model.sv` | `dram_model` | behavioural open-page DDR2 model (simulation only) |

## Address map

Each operation moves one 64-byte line. A 30-bit byte address covers the 1 GB module:

| bits | field |
|---|---|
| 1:0 | byte within a 4-byte column |
| 4:2 | column within an 8-beat burst |
| 5 | which bank of a bank pair |
| 10:6 | 64-byte section of the row |
| 15:11 | bank pair (32 pairs) |
| 29:16 | row (16384 per bank) |

The module has 64 banks, used in pairs. Bit 5 selects a bank within the pair, so one 64-byte line
is two 32-byte bursts issued side by side. Both banks of a pair always open the same row. The
independent unit is therefore the bank pair, and the Activated Rows Table has 32 entries. A
*row match* means the same bank pair and the same row. An *address match* means the same
64-byte line (bits 29:6).

## What happens to an operation

At most one operation enters the operation queue per clock. The control in `tap.sv` picks it by
priority:

1. **Row-match flush.** An entry whose row was just opened is issued, lowest index first. New
   commands wait until all such entries have gone.
2. **The decoded command:**
   * *Read*: goes to the operation queue and gets a read-FIFO slot. On an address match, the
     buffered data is stored in that slot.
   * *Write, row open* (the table hits): goes to the operation queue.
   * *Write, row closed, line already buffered*: overwrites that entry (write merging).
   * *Write, row closed, buffer off*: goes to the operation queue.
   * *Write, row closed, free entry*: buffered.
   * *Write, row closed, buffer full*: `victim_select` picks an entry at random. That entry
     goes to the operation queue and the new write takes its slot in the same cycle. If the new
     write is in the victim's row, it is flagged to follow the victim.
3. **Drain.** An entry outside the enabled range is written back after a size reduction. This
   happens only when no command is waiting and the operation queue is empty.

Whatever enters the operation queue updates the Activated Rows Table in the same cycle. Its
address is also broadcast to the CAM. Every valid entry with a row match is flagged, and the
flagged entries are issued by rule 1 in the cycles that follow. So each flushed write lands right
behind the operation that opened its row and hits that row in the DRAM. A REFRESH (`refresh_i`)
closes all rows in the table.

Several properties keep the data correct, and they are what the end-to-end test checks:

* A buffered write's row is never open. It was closed when the write was buffered. The first
  operation to open it flags the entry, and new commands stall until the entry has gone.
  So a write that finds its row open never has an older copy of its line in the buffer. An
  assertion in `tap.sv` checks this.
* Write merging keeps at most one entry per line. An address match is therefore unique.
* A read with an address match is queued before the matching write is flushed. The DRAM returns
  the old data, and the read FIFO discards it in favour of the buffered data. The read still
  returns in DRAM order and with DRAM latency, so forwarding adds no delay.

## The Adaptive Adjustor

The adjustor counts the clock cycles that the DRAM takes for K = 10 accesses. An access is one
operation leaving the operation queue. Each such interval is one sample:

| cycles for 10 accesses | entries enabled |
|---|---|
| < 500 | 64 |
| 500 – 999 | 32 |
| 1000 – 3999 | 16 |
| ≥ 4000 | 0 (buffer off) |

The size changes only when four consecutive samples all ask for the same size, and that size
differs from the current one. A sample also ends after 4000 cycles even without 10 accesses. By
then its class can only be "off", and this lets an idle DRAM switch the buffer off.

The size code sets `active_n` (64, 32, 16 or 0). Entries 0–15, 16–31 and 32–63 form the
gateable segments. An entry is clocked only while it is inside the active range or still holds a
write. Synthesis can turn that enable into clock-gating cells. When the size shrinks, new writes
use only the smaller range, and rule 3 writes back what is left above it. The segment is then
idle.

## Interfaces and timing of `tap`

* `cmd_valid/cmd_ready`, `cmd_kind`, `cmd_addr[29:0]`, `cmd_data[511:0]`: southbound operations.
* `dram_valid/dram_ready`, `dram_op` (`op_t`): to the DDR port, in order.
  `dram_rd_valid/dram_rd_data`: read data back, in order, without back-pressure.
* `rd_valid/rd_ready`, `rd_data`, `rd_fwd`: northbound read data. `rd_fwd` marks data taken from
  the write buffer.
* `refresh_i`: closes all rows.
* `wb_size_o`, `wb_switch_o`, `events_o`: current size, a size-change strobe and per-cycle event
  strobes (read, direct write, buffered, merged, row flush, address forward, evict, drain).

A command is registered by the decoder in one cycle. It can enter the operation queue in the
next cycle and leave for the DDR port at the edge after that. An idle read therefore reaches the
DDR port two cycles after it is accepted.

Main parameters of `tap`:

| parameter | default | meaning |
|---|---|---|
| `N_ENTRIES` | 64 | write buffer entries (power of two, at least 4) |
| `K_ACCESSES` | 10 | accesses per sample |
| `T1`, `T2`, `T3` | 500, 1000, 4000 | sample thresholds in cycles |
| `SAMPLES` | 4 | agreeing samples needed to switch |
| `INIT_SIZE` | `SZ_64` | size after reset |
| `OPQ_DEPTH` | 8 | operation queue depth |
| `RDQ_DEPTH` | 16 | read FIFO slots, which bounds the reads in flight |

To get a fixed-size buffer of n entries, set `N_ENTRIES = n` and set the thresholds above any
sample length.

## Where this RTL goes beyond, or reads into, the description it follows

The following are choices made here. The method itself does not fix them:

* **Row field.** The row is taken as bits 29:16, so that it does not overlap the bank-pair bits
  and gives 16384 rows per bank.
* **Operation size.** Every operation is 64 bytes. A 128-byte cache-line read is expected to
  arrive as two operations.
* **Victim choice.** Eviction picks a random entry, using an LFSR, rather than the oldest.
* **Write merging.** A second write to a line that is already buffered overwrites the entry.
  With the buffer off, a write to a line still held in an entry that has not yet drained also
  overwrites that entry. This keeps old data from reaching the DRAM last.
* **Flush ordering.** New commands stall while row-matched writes are issued. These writes go
  out one per cycle, lowest entry first.
* **Drain timing.** "DRAM not busy" means no command is waiting and the operation queue is empty.
* **Threshold boundaries.** Exact boundary values go to the slower class. The four samples must
  agree on one size. A sample is cut off at T3 cycles.
* **Reset state.** After reset the size is 64 entries and all rows are closed.
* **Buffer sizes.** Queue depths, handshakes and latencies are this design's own. There are no
  byte masks: every write carries a full line.
* **DRAM behaviour.** The DDR port is assumed to follow the open-page policy that the Activated
  Rows Table mirrors.

Not included:

* the DDR2 chips, which `tb/dram_model.sv` stands in for;
* the FB-DIMM serial links and memory controller;
* the AMB's DDR command port, which turns queued operations into ACTIVATE, PRECHARGE, READ and
  WRITE commands.

The TAP's ports stop where those parts would connect.

## Verification

Each module has a self-checking testbench. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog.

* `cmd_decoder_tb`: random operations with back-pressure, against a reference bit slicing. Also
  checks the one-cycle latency.
* `activated_rows_table_tb`: random updates, lookups and refreshes, against a table model.
* `write_buffer_tb`: every output of the CAM and array each cycle, against a model, with frequent
  row and address matches and random size changes.
* `adaptive_adjustor_tb`: samples of exact length at the threshold boundaries. Checks the size
  after every sample, the four-sample rule, streaks that break, idle detection and the number of
  switches.
* `victim_select_tb`: in-range victims, the reference LFSR sequence and coverage of every entry.
* `operation_queue_tb`, `read_fifo_tb`: scoreboards with random traffic and back-pressure. For
  forwarded reads, checks that the buffered data wins over the DRAM data.
* `tap_tb`: the whole TAP at its default parameters, with `dram_model`. A golden memory checks
  every read, and at the end every line written must be in the DRAM. The test runs several kinds
  of traffic:
  * An array-copy pattern, which reads one array and writes another in other rows of the same
    bank. Its page hit rate must beat that of the same stream sent straight to the DRAM by more
    than 20 points. It measures about 95 % against 0 %.
  * Forwarding and merging traffic, and random traffic with refreshes.
  * Traffic that slows step by step, so the buffer shrinks to 32, 16 and off and drains. Fast
    traffic then turns it back on.

  Each mechanism must occur at least once: direct write, buffering, merge, row flush, address
  forward, eviction, drain, resize (to 32, to 16 and to off) and refresh.
* `tap_workload_tb`: the whole TAP at its defaults under two synthetic four-core mixes. In each,
  every core reads two source arrays and writes a destination array, and the cores share banks.
  * *Heavy mix*, one command per cycle: the page hit rate is 0.30 against 0.00 for the same
    stream sent straight to the DRAM, activations fall from 3072 to 2116, and the buffer stays at
    64 entries.
  * *Light mix*, about one command per 500 cycles: the Adaptive Adjustor switches the buffer
    off, as intended for memory-light programs.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/tap_pkg.sv tb/tap_tb.sv --top-module tap_tb -o sim
    ./obj_dir/sim

Replace `tap_tb` with the name of any other testbench. The full-size `tap_tb` runs in well under
a second.

## Known limits

* The testbench DRAM model uses simple cycle costs for hit, closed and conflict accesses. It is
  not a timing-accurate DDR2 model. Page-hit figures from it show the mechanism at work, not
  absolute numbers.
* The Verilator lint reports `rst_n` used both as an asynchronous reset and in the `disable iff`
  of the assertions in `tap.sv`. The warning concerns only the assertions.
* Unused-bit lint warnings remain for address bits 5 and 1:0. Bit 5 is ignored by design, and
  bits 1:0 are below the line size.
