# Accelerating similarly structured data: a range partitioner and a query tile array

Databases spend much of their time shuffling large tables of records that all look alike: fixed-size rows or columns of fixed-width values. This RTL builds two accelerators for that kind of data:

- **HARP**, a hardware range partitioner. It is fed with streams of records and sorts each one into one of 2N+1 partitions by comparing its key with N ascending splitter values. It sits behind a small streaming framework: stream buffers between memory and the accelerator, and a last-level-cache request buffer that routes stream fills to the accelerator rather than into the cache.
- **Q100**, an array of relational-operator tiles (select, filter, ALU, aggregate, join, sort, partition, append, concatenate, stitch). The tiles are connected by an all-to-all stream fabric and execute query plans on columns and tables.

Both are written in synthesizable SystemVerilog (IEEE 1800-2017). The top module `asd_top` holds the two side by side.

## HARP: how a record is partitioned

A 64-byte burst holds four 16-byte records with 4-byte keys. A record passes through four stages:

1. **Serializer** (`harp_serializer`). It takes a burst from the inbound stream buffer and feeds one record per cycle into the conveyor. It takes the next burst in the same cycle as the last record of the current one leaves, so there is no bubble between bursts.
2. **Conveyor** (`harp_conveyor`). This is a linear pipeline with one stage per splitter; the default is 127 stages. At stage *i*:
   - a key below splitter *i* is written to partition buffer *2i*;
   - a key equal to splitter *i* is written to partition buffer *2i+1*;
   - any other key moves on to stage *i+1*.

   Records that pass every stage go to partition *2N*, so 127 splitters give 255 partitions. Several stages can write in the same cycle, because each buffer has only one possible writer stage.

   If any stage targets a full buffer, the whole conveyor and the serializer hold for that cycle (`conv_stall`). This is the only back-pressure inside HARP.
3. **Partition buffers** (`harp_partition_buffer`). There is one FIFO per partition, each 8 records deep.
4. **Merge** (`harp_merge`). It drains the fullest buffer, one record per cycle, as a burst of up to four records. Each burst is tagged with its partition number and record count.

   During the last read of a burst, the merge already picks the next buffer, but it excludes the one it is draining. So bursts from *different* partitions follow each other without a gap. Two bursts in a row from the *same* partition need a fresh selection cycle: B+1 cycles instead of B (`merge_b2b`). When every record has the same key this costs 25 % throughput. The testbench measures 1.22 cycles per record in that case, against about 1.0 for uniform keys.

`harp` wraps these four stages with the three control operations:

- set_splitter (`spl_we/idx/val`)
- `partition_start`
- `partition_stop`

The controller runs IDLE → RUN → DRAIN. In DRAIN it no longer pulls input. Once the serializer and conveyor are empty, it asserts `flush`, which makes the merge also send partial bursts. When every buffer is empty it pulses `done`.

## Streaming framework around HARP

`harp_system` connects HARP to memory the way a core would use it:

- **`llc_fill_router`**: the LLC request buffer, with a C/S (cache/stream) bit next to the D/P (demand/prefetch) bit.
  - Requests go to memory tagged with their buffer index and may return out of order.
  - On a fill, the C/S bit of that entry selects the destination: the inbound stream buffer for a stream load (sbload), or the cache array, with address and prefetch bit, for an ordinary miss.
  - A stream fill waits while SB_in is full. This is the full/empty bit that blocks sbload.
- **`stream_buffer`**: a FIFO with a memory side and an accelerator side. It is used twice:
  - SB_in: 16 entries of 64 bytes.
  - SB_out: 255 entries. Each entry holds a burst, its partition number and its record count, so software can place it.

  The empty bit blocks sbstore (`sbst_*` → `st_*`).
- **Context save and restore.** While `ctx_hold` is high, the accelerator side of both buffers is shut. The memory side then pops every entry of the buffer chosen by `ctx_sel` (sbsave, `save_*`) and can push the same entries back in order (sbrestore, `restore_*`). After release, HARP continues exactly where it stopped.

Widths and depths are parameters. Their defaults are the baseline: 127 splitters, 16-byte records, 4-byte keys, 4 records per burst, SB_out of 255 entries.

## Q100 tiles

Every tile port is a stream with `valid`, `ready`, `data` and `eos`. A stream ends with exactly one end-of-stream beat, which carries no data. Element-wise tiles with two inputs (ALU, boolean generator, filter, concatenator, stitcher) consume them in lockstep; the joiner and appender advance each input on its own. Every tile has a registered output and handles one element per cycle, except the sorter.

| Tile | Module | What it does (this implementation) |
|---|---|---|
| ALU | `q100_alu` | 64-bit ADD, SUB, MUL (low half), DIV (x/0 = 0), AND, OR, NOT; second operand is a column or a constant |
| Boolean generator | `q100_boolgen` | column vs column or constant: EQ, NEQ, LT, LTE, GT, GTE, built from one less-than and one equality comparator |
| Column filter | `q100_colfilter` | passes data elements whose boolean is 1 |
| Aggregator | `q100_aggregator` | SUM, COUNT, MIN, MAX, AVG per run of equal group-by values (input sorted on the group) |
| Joiner | `q100_joiner` | inner equi-join, primary-key table with foreign-key table, both sorted on the key (sort-merge); output {foreign[511:0], primary[511:0]} |
| Partitioner | `q100_partitioner` | the HARP core at Q100 widths (1024-bit records, 64-bit keys, 7 splitters / 15 partitions), one record per "burst"; tags each record with its partition |
| Sorter | `q100_sorter` | bitonic sort of up to 1024 records on the low 64 bits; a longer table raises a sticky `overflow` and the extra records are dropped |
| Appender | `q100_append` | table a, then table b |
| Column selector | `q100_colselect` | bytes [offset, offset+width) of each record, zero-extended to 256 bits |
| Concatenator | `q100_concat` | (a << 8·b_bytes) \| b |
| Stitcher | `q100_stitch` | up to four columns packed into a record, column 0 lowest, widths in bytes |

The sorter buffers the whole table and then runs the bitonic network one compare-and-exchange per cycle. It only sorts over the smallest power of two M that holds the table; empty places count as larger than any key. Sorting therefore takes (M/2)·log2 M·(log2 M + 1)/2 cycles, which is 28 160 for 1024 records. The testbench checks this count exactly.

### The tile array and fabric (`q100`)

The default array is the configuration this design targets:

- Large tiles: 2 partitioners, 1 sorter, 4 ALUs.
- Small tiles: 4 aggregators, 6 boolean generators, 6 column filters, 4 joiners, 8 appenders, 7 column selectors, 2 concatenators, 3 stitchers.
- Stream buffers: 6 inbound and 2 outbound.

That gives 53 sources and 92 sinks.

Fabric words are 1033 bits: {eos, 8-bit tag, 1024-bit data}. Narrower tiles use the low bits. The tag carries the partition number out of a partitioner, and appenders pass it through.

Each sink (a tile input or an outbound buffer) has a multiplexer, set by `sink_sel[k]` and enabled by `sink_en[k]`, in front of a 2-entry queue. One source may feed several sinks (a fork). It advances only when every enabled sink that selected it has room. The queues break every combinational path between producers and consumers.

A query plan is loaded as a fabric setting plus the per-tile configuration ports. Changing the plan between temporal steps is left to the controlling software.

## Departures and limits

- The Q100 fabric is an ideal crossbar. The on-chip network the Q100 would use is not designed here.
- The Q100 partitioner's splitter count (7) and buffer depth (2) are this design's choices. So are the join method (sort-merge, inputs sorted), the ALU operation set, the unsigned arithmetic and the byte-based column layouts.
- Stream-buffer entries are 64 bytes, matching HARP bursts; an sbload of 128 or 256 bytes would be several entries. SB_in depth (16), partition-buffer depth (8) and request-buffer size (16) are assumed.
- Equal-to-splitter keys get their own partition (2i+1). This is what makes 2N+1 partitions from N splitters.
- The core, the caches beyond the request buffer, and memory are not part of the RTL. The testbenches model memory.
- Synthesis of the full top takes long because of the Q100 crossbar (92 × 53 × 1033 bits) and the sorter's 1024 × 1024-bit buffer. Each tile on its own synthesizes quickly.

## Simulating

Every testbench under `tb/` checks itself and ends by printing `TB_RESULT checks=N failures=M`. Most of them run at the default sizes. To build one with Verilator, list both packages first, then the RTL, then the testbench:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_asd_top \
  rtl/harp_pkg.sv rtl/q100_pkg.sv rtl/harp_serializer.sv rtl/harp_conveyor.sv \
  rtl/harp_partition_buffer.sv rtl/harp_merge.sv rtl/harp.sv rtl/stream_buffer.sv \
  rtl/llc_fill_router.sv rtl/harp_system.sv rtl/q100_[a-oq-z]*.sv rtl/q100.sv rtl/asd_top.sv \
  tb/tb_asd_top.sv -o sim && ./obj_dir/sim
```

- `tb_asd_top` runs both accelerators at once at their default sizes.
  - HARP side: a 600-burst table loaded by stream loads mixed with cache misses, with a save and restore halfway through, then a table whose keys all fall in one partition.
  - Q100 side: a filter → multiply → stitch → sort → aggregate query that also feeds a partitioner, a join + append + concatenate query, and an oversized sort.
  - It counts every mechanism and fails if any of them never occurred: conveyor stall, same-partition back-to-back burst, SB_in back-pressure, cache-routed fill, save, restore, store, partitioner stall and back-to-back, fabric fork, sorter overflow.
- `tb_harp_system` and `tb_q100` run the same scenarios on one side only. They share `tb/tb_harp_scenario.svh` and `tb/tb_q100_scenario.svh`.
- Each block has its own testbench, `tb_<module>`. Most of these use the random stream drivers in `tb/tb_q100_common.svh`.

Simulation is two-state. Every register is reset, so the result does not depend on the initial values.
