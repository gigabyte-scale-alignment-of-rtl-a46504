# Partitioned systolic sequence alignment with drive-backed partition storage

This design aligns a query sequence (DNA or protein, one byte per character) against a much longer
reference sequence. It uses a linear systolic array of processing elements (PEs). Each PE holds one
query character. The reference streams through the chain at one character per clock, so an array of
`N_PE` PEs scores `N_PE` cells of the dynamic-programming matrix per cycle, one anti-diagonal at a time.

An FPGA holds only about a hundred such PEs, but useful queries are millions of characters long. The
array is therefore reused: the query is cut into **partitions** of `N_PE` columns, and the reference
is scored against one partition after another. The hard part is the data that moves from partition
to partition. For every reference row, the last PE emits a 28-byte link word, and the first PE of the
next partition needs that word back for the same row. A gigabyte-scale reference therefore produces
tens of gigabytes of intermediate data per partition, at 2800 MB/s in each direction at 100 MHz. On-chip
memory cannot hold that, so the **partition FIFO** is a set of solid-state drives. Half of them are
written while the other half is read, and the halves swap roles at every partition. The array stalls
whenever storage cannot keep up. Counters measure how much throughput the storage bandwidth costs.

```
 query memory ──► partition_ctrl ──► pe_array (N_PE PEs) ──► partition_fifo ──► DRAM buffers ──► drives (write half)
 reference ──────►      │        ◄── link words of the previous partition ◄──── drives (read half)
                        │
                        └──► pss (end states: on chip, spill to DRAM) ──► darm ──► alignment mappings
```

## Scoring in a PE (`dialign_pe`)

Query characters are matrix columns `i`; reference characters are rows `j`. The score is local
alignment (Smith-Waterman) with affine gaps:

```
E(j,i) = max(H(j,i-1) - GAP_OPEN, E(j,i-1) - GAP_EXTEND)      gap in the query, from the left PE
F(j,i) = max(H(j-1,i) - GAP_OPEN, F(j-1,i) - GAP_EXTEND)      gap in the reference, kept in the PE
H(j,i) = max(0, H(j-1,i-1) + s(q_i, r_j), E(j,i), F(j,i))     s = +2 match, -1 mismatch
```

The package sets the defaults GAP_OPEN = 3 and GAP_EXTEND = 1, in `rtl/dialign_pkg.sv`. A PE keeps
only three scores of its own: `H(j-1,i)`, `F(j-1,i)` and the diagonal `H(j-1,i-1)`. The diagonal is
simply the `H` that arrived from the left on the previous row. This is the linear memory that makes
the systolic form possible. A PE also keeps the best `H` of its column and the row where it first
occurred.

### The seven-word link (`link_t`)

Every cycle, each PE passes seven 32-bit words to its right neighbour (28 bytes):

| word | meaning |
|---|---|
| `ref_char` | reference character (8 bits used) |
| `row` | reference coordinate `j`, 1-based |
| `h` | `H(j,i)` of the sender's column |
| `e` | `E(j,i)` of the sender's column |
| `row_best` | best `H` on row `j` over all columns passed so far |
| `row_best_col` | its query coordinate |
| `flags` | bit 0 marks the last reference row |

The link carries everything the next column needs. It is also exactly the word stored between
partitions, so partition `p+1` continues as if the array were longer. The first partition feeds
PE 0 with the matrix border (`h = 0`, `e = -inf`).

### End state (`pe_state_t`)

After a partition, each PE reports four 32-bit words (16 bytes): its column's best score, the row of
that score, the column coordinate (0 for an unused PE) and its query character.

## Partitioning (`partition_ctrl`, `pe_array`)

For each partition `p`, the controller does four things:

1. **Load**: it clears the column state and shifts `N_PE` query characters into the array's load
   chain. The loader feeds the last column first, so PE `k` ends up with column `p*N_PE + k + 1`.
   In the last partition, columns past the end of the query are loaded as *bypass* PEs, which
   forward their input unchanged.
2. **Open**: it waits until the FIFO reports `flushed` (all writes of the previous partition are on
   the drives). Then it opens the FIFO: write half = `p mod 2`, read half = the other one. The first
   partition does not read. The last partition does not write.
3. **Run**: it streams `rlen` rows into PE 0.
   - Partition 0 reads them from the reference stream.
   - Later partitions read them from the FIFO. The link word contains the reference character, so the
     reference source is read only once.
   - The last PE's output goes to the FIFO. In the last partition it goes to the `row_*` port instead.

   The whole array holds (`en` low) only when its output cannot be written. When the input side has no
   word, a bubble enters and the array keeps running, so the two cases are counted separately.
4. **Save**: it captures the end states and shifts them out of the last PE into the state storage at
   address `p*N_PE + k`. The chain needs `N_PE` shifts.

After the last partition, the retrieval module runs over all `partitions*N_PE` records.

Timing: a row that enters PE 0 leaves PE `N_PE-1` after `N_PE` enabled cycles. Each partition
therefore takes `rlen + N_PE` enabled cycles in the run phase. This holds exactly:
`run_cycles = out_stall_cycles + in_stall_cycles + partitions*(rlen + N_PE)`. The end-to-end test
checks this identity.

## The partition FIFO on drives (`partition_fifo`, `raid_ctrl`, `dram_fifo`, `stream_fifo`)

- `raid_ctrl` splits the `N_DRIVES` drives into two halves.
  - Writes are striped RAID-0 style over the write half. `STRIPE` consecutive words go to one drive,
    then the next `STRIPE` words go to the next drive, round robin.
  - Reads walk the same pattern over the other half, so words return in the order they were written.
  - At `part_start`, it sends every involved drive a command: open for writing from its start, or
    stream back what was last written.
- Each drive has a write buffer in off-chip DRAM (`dram_fifo`). It absorbs the drive's varying write
  latency without losing data.
  - Every word bound for the drive is written to the tail of a ring of `DBUF_RING_DEPTH` words in
    that drive's DRAM region, through its own channel (`dbuf_*`).
  - The head of the ring is read back into an on-chip prefetch cache of `DBUF_CACHE_DEPTH` words,
    which feeds the drive.
  - A read is issued only when the cache has room for its answer, so DRAM responses need no
    backpressure. A ring slot is reused only after its read has returned.
  - With a ready DRAM, a word passes through in 3 cycles plus the DRAM read latency, at one word per
    cycle.
- Each drive also has an on-chip read buffer (`stream_fifo`, `BUF_DEPTH` words) for its read latency.
- `flushed` is high when every write buffer (DRAM ring, reads in flight and cache) is empty and no
  command is pending.

The default ring holds a whole partition's stream for references of up to a million rows, so the
array is not held up by the write side during a partition. Instead it waits at the start of the next
partition until the drives have taken everything. Longer references fill the ring, and then the
array stalls on its output.

The drive port of the top (`drv_*`, one set per drive) is a simple stream interface, with whole
224-bit link words and valid/ready:

- `drv_cmd_valid` / `drv_cmd_write` / `drv_cmd_ready`: open a write stream (`drv_cmd_write = 1`) or a
  read stream (`drv_cmd_write = 0`).
- `drv_wr_valid` / `drv_wr_ready` / `drv_wr_data`: words going to the drive.
- `drv_rd_valid` / `drv_rd_ready` / `drv_rd_data`: words coming back.

A SATA host core and its transceiver must sit behind each port: they are not part of this RTL.
`tb/ssd_model.sv` is a behavioural drive with random readiness.

### Bandwidth

| | per direction |
|---|---|
| needed: 28 B per row at 100 MHz | 2800 MB/s |
| default `N_DRIVES = 2` (one 3 Gb/s SATA drive per half, about 300 MB/s) | 300 MB/s |
| `N_DRIVES = 10`, 6 Gb/s drives (5 per half, about 600 MB/s each) | 3000 MB/s |

With the default two drives, the array can run at only about 11% of its stall-free rate. The
end-to-end test models this: its drives accept a word on 11% of cycles, and the measured run phase
reaches about 16% of the stall-free rate. The share is higher than 11% because the `N_PE` drain cycles per partition
need no storage. Ten 6 Gb/s drives would sustain the full rate. The design supports any even
`N_DRIVES`. `tb_drive_scaling` runs both systems side by side on the same 100-PE array and the same
kind of workload. It times the partition phases, including the wait for the drives at each
partition start. With 2 drives ready on 11% of cycles it measures 15% of the stall-free time, and
with 10 drives ready on 21% of cycles it measures 83-87%. The remainder is drive command and DRAM
read latency at each partition change.

Because every word bound for a drive passes through DRAM once on the way in and once on the way out,
the DRAM must carry twice the write stream: 5600 MB/s at full rate, or 600 MB/s with the two
prototype drives. The tests give each drive's DRAM channel one word per cycle in each direction. How
much a real DRAM controller delivers is outside this design.

## Partition-State-Storage and retrieval (`pss`, `darm`)

`pss` holds one 128-bit record per PE per partition.

- The first `ONCHIP_DEPTH` records (default 1600 = 16 partitions of 100 PEs) are in on-chip memory,
  with one read per cycle and one cycle of latency.
- Higher addresses spill to off-chip DRAM through the `pss_dram_*` port, at `address - ONCHIP_DEPTH`.
  A DRAM read blocks further reads until its data returns. This keeps responses in order, and it
  makes retrieval slower in the spilled region.

`darm` reads records `0 .. n-1` back to back and skips unused PEs. For every column whose best score
is at least `threshold`, it emits a mapping `aln_query_pos -> aln_ref_pos` with `aln_score`. The
threshold sets how many weaker local matches are reported besides the strong ones. `darm` also
reports the hit count and the overall best mapping. With storage that is always ready, retrieval
takes `n + 2` cycles.

## Top-level interface (`dialign_top`)

| parameter | default | meaning |
|---|---|---|
| `N_PE` | 100 | PEs in the array (about what fits one FPGA) |
| `N_DRIVES` | 2 | drives, even; half written, half read per partition |
| `STRIPE` | 16 | words per drive before moving to the next drive of the half |
| `BUF_DEPTH` | 64 | words per drive read buffer (power of two) |
| `DBUF_RING_DEPTH` | 1048576 | words per drive write buffer in DRAM (28 MiB) |
| `DBUF_CACHE_DEPTH` | 16 | words of on-chip prefetch cache per write buffer (power of two, above the DRAM read latency for full rate) |
| `PSS_ONCHIP_DEPTH` | 1600 | end-state records kept on chip |

Ports, by group:

- **Control**
  - Inputs: `clk`, `rst_n` (asynchronous, active low), `start` (one-cycle pulse), `qlen`, `rlen`,
    `threshold`. Keep `qlen`, `rlen` and `threshold` stable until `done`.
  - Status: `busy` and `done` (one-cycle pulse).
  - Counters: `partitions`, `run_cycles`, `in_stall_cycles`, `out_stall_cycles`.
- **Query memory**: `q_req_valid` / `q_req_addr` (0-based) request a character. `q_resp_valid` /
  `q_resp_char` return it, in order, with any latency and no backpressure.
- **Reference stream**: `ref_valid` / `ref_ready` / `ref_char`. It is read once, in the first
  partition.
- **Drives**: `drv_*`, as described above.
- **DRAM for the drive write buffers**: per drive, `dbuf_wr_*` (valid/ready, address relative to the
  drive's region), `dbuf_rd_*` (valid/ready request) and `dbuf_rd_resp_*` (valid only, in order). The
  DRAM controller must complete an accepted write before any read it accepts later.
- **DRAM for the state storage**: `pss_dram_wr_*` (valid/ready), `pss_dram_rd_*` (valid/ready
  request) and `pss_dram_rd_resp_*` (valid only, in order).
- **Results**
  - `row_valid` / `row_link`: the link word of each row leaving the last partition. Its `row_best`
    and `row_best_col` give the best score of every reference row over the whole query. A row is
    accepted when `row_valid` is high and the array is not stalled.
  - `aln_*`, `hits`, `best_score`, `best_query_pos`, `best_ref_pos`: the retrieval output.

All coordinates are 32 bits, so references and queries of up to 4·10⁹ characters are addressed.

## What the source description fixes and what this design chose

These points follow the source description:

- the linear array with one stored query character per PE and a streamed reference;
- about 100 PEs;
- 8-bit characters and 32-bit coordinates;
- seven 32-bit words passed between PEs and four 32-bit end-state words per PE;
- partitions that reuse the array;
- a FIFO that is read and written at the same time, between partitions;
- end-state storage that overflows from on-chip memory to DRAM;
- SSDs organised by a RAID controller behind SATA cores, with latency buffers;
- two drive halves that swap read and write roles per partition.

These points are this design's own choices:

- **The scoring.** The source uses DIALIGN, a segment-based relative of Smith-Waterman with a
  user threshold, and does not give its recurrence. This RTL uses Smith-Waterman with affine gaps and
  applies the threshold at retrieval.
- **The meaning of the seven link words and the four end-state words.** The source fixes only how
  many there are.
- **The retrieval output.** The retrieval module emits per-column best mappings. It does not do a full
  trace-back.
- **RAID-0 striping, the stripe size and the drive command format.**
- **Who manages the drive buffers.** The source keeps the write buffers in board DRAM, managed by a
  soft processor. Here they are in DRAM too, but hardware manages the rings, with no processor in
  the data path. The ring and cache sizes are this design's own. The read buffers are on chip.
- **The on-chip state capacity and the DRAM port protocol.**
- **One retrieval path.** In the single-partition case the source's retrieval module reads the end
  states straight out of the PE chain. Here the chain is always shifted into the state storage first
  (`N_PE` cycles, as in the source) and retrieval reads the storage, so short and long queries share
  one path.
- **Reading the reference once.** The reference character travels inside the link word, so later
  partitions do not re-read the reference source.
- **The stall and bubble policy, the bypass PEs for the query tail, and the performance counters.**

Not built, reached through ports instead:

- the SATA host cores and the FPGA's serial transceivers;
- the drives themselves;
- the DRAM controller;
- the soft processor;
- the reference source (a drive or Gigabit Ethernet).

## Sizes the design can take

- **Reference.** The reference is 1 byte per character at 1 character per cycle (100 MB/s at
  100 MHz). `rlen` is 32 bits, so references of up to 4.29·10⁹ characters are addressed. That
  covers the one-, two- and three-gigabyte genomes of the source. For each partition, the drives must
  hold `28 × rlen` bytes per half, which is 28 GB for a 1 GB reference.
- **Query.** A megabyte query (10⁶ characters) needs 10,000 partitions and 10⁶ end-state records
  (16 MB). 1600 of those records are on chip and the rest go to DRAM.
- **Short queries.** A query of at most 100 characters runs in a single partition and touches no
  drive.

## Simulation

Every testbench in `tb/` checks itself and ends by printing `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dialign_pkg.sv tb/sw_ref_pkg.sv \
          tb/tb_dialign_top.sv --top-module tb_dialign_top -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_dialign_pe` | One PE as column 2 of a model matrix, with random bubbles and stalls. Also the end state, the state chain and bypass. |
| `tb_pe_array` | 8 PEs, full and partial query. Also output rows, latency of exactly `N_PE` cycles, and the end states in shift order. |
| `tb_partition_ctrl` | Controller with a real 4-PE array and modelled FIFO and storage, over 3 partitions. Also stalls and bubbles. |
| `tb_stream_fifo` | Buffer against a queue model, including a write while full with a read in the same cycle. |
| `tb_dram_fifo` | DRAM-held write buffer with a 40-word ring: order, ring full, addresses inside the ring, `empty`, and one word per cycle with a ready DRAM. |
| `tb_raid_ctrl` | Commands, stripe routing and read order over 3 partitions with 4 drives. |
| `tb_partition_fifo` | Buffers, RAID controller, 4 drive models and 4 DRAM channel models (24-word rings): data order, half placement, `flushed`, backpressure, every word through DRAM. |
| `tb_pss` | On-chip and spilled records, DRAM addresses, read order, one read per cycle on chip. |
| `tb_darm` | Mappings, threshold, skipping of unused PEs, best mapping and cycle count. |
| `tb_dialign_top` | The whole design at its default parameters: a 1730-character query (18 partitions) against a 200-character reference, with slow drives and PSS spill. See below. |
| `tb_drive_scaling` | Two complete accelerators (`tb/accel_harness.sv`) with 2 and with 10 drives, a 450-character query (5 partitions) against a 300-character reference. Checks rows and mappings against the model and the run time against the stall-free time. |

`tb_dialign_top` compares every output row, mapping and counter with the model, and checks the cycle
accounting identity. It also requires that each mechanism occurred at least once:

- wait for the drive buffers to flush at a partition start;
- input bubble;
- bypass PEs;
- drive half swaps;
- state spill to DRAM;
- drive backpressure;
- threshold hits and misses.

The reference model is `tb/sw_ref_pkg.sv`: a plain software Smith-Waterman with the same constants.
It runs in about ten seconds.
