# Defect-tolerant L2 cache with selective multibit ECC

At high SRAM defect densities (0.5 percent of cells in the target case), about 28 percent of
the blocks of a 1 MB L2 cache hold at least one 64-bit subblock with two or more
defective cells. The SEC-DED code that L2 caches already carry cannot cope with
that, and protecting *every* subblock with a double-error-correcting code costs
too many check bits and puts a slow decoder on every read.

This design uses the strong code only where it is needed. It also hides the
strong code's cost behind access locality:

* A conventional L2 core keeps its (72,64) SEC-DED code on every subblock. This
  handles subblocks with no defect or with one defect.
* Subblocks with two defects (*m-subblocks*) also get DEC-TED BCH check bits. These
  are kept in a separate fully associative **M-ECC cache**, which is tagged by the
  subblock's location in the array.
* A **predecoding buffer** keeps corrected copies of the m-blocks read most
  recently. When it hits, the 82-cycle BCH decoder is skipped.
* A **fast lookup (FLU) buffer** remembers the blocks seen most recently that
  have *no* m-subblock. When it hits, the large, energy-hungry M-ECC cache is
  not searched.
* A **dirty replication (DR) cache** keeps a second copy of the most recent L1
  write-backs. Once a subblock's code is spent on defects, a soft error can only
  be detected, not corrected. So every dirty block keeps a backup, either in the
  DR cache or in memory, and the block is restored from that backup.

Subblocks with three or more defects are assumed to be repaired by ordinary
spare rows and columns. That repair is outside this RTL.

## Terms

| term | meaning |
|---|---|
| g-, s-, m-subblock | 64-bit subblock with 0, 1, or at least 2 defective cells |
| g-block | block of only g-subblocks |
| s-block | block with s-subblocks but no m-subblock |
| m-block | block with at least one m-subblock |
| location | physical place of a block in the array: `{set, way}` (14 bits at the default size). A subblock location adds the 3-bit subblock index. |
| plain block | g-block or s-block: needs no multibit ECC |

## Structure

```
                   req / resp (64-byte blocks)            mem_* (next level)
                           |                                   ^
                    +------v-----------------------------------+------+
                    |                l2_mecc_top (controller)         |
                    |                                                 |
                    |  l2_core ----------- raw + SEC-DED data -----+  |
                    |   tags, LRU,                                 |  |
                    |   l2_data_sram (8 x 72-bit words/block)      v  |
                    |   secded_enc/dec x 8        mecc_core           |
                    |                              predecode_buf (64)  |
                    |  dr_cache (64 blocks)        flu_buf (64)        |
                    |                              mecc_cache (8192)   |
                    |                              bch_enc/bch_dec x 8 |
                    +-------------------------------------------------+
                                         ^ cfg_* (M-ECC tags from flash / BIST)
```

| file | role |
|---|---|
| `rtl/l2_pkg.sv` | sizes, GF(2^7) arithmetic, Hsiao column table, BCH generator, event struct |
| `rtl/l2_mecc_top.sv` | top: controller for reads, write-backs, misses and recovery |
| `rtl/l2_core.sv` | tags, valid/dirty, per-set true LRU, SEC-DED encode/decode of 8 subblocks |
| `rtl/l2_data_sram.sv` | behavioural model of the data SRAM, with stuck-at defects and soft-error injection |
| `rtl/secded_enc.sv`, `rtl/secded_dec.sv` | (72,64) Hsiao SEC-DED |
| `rtl/mecc_core.sv` | multibit ECC core and its operation flow |
| `rtl/mecc_cache.sv` | fully associative M-ECC cache |
| `rtl/bch_enc.sv`, `rtl/bch_dec.sv` | DEC-TED BCH encoder and 82-cycle PGZ decoder |
| `rtl/predecode_buf.sv`, `rtl/flu_buf.sv` | the two small buffers of the M-ECC core |
| `rtl/dr_cache.sv` | dirty replication cache |
| `rtl/lru_ages.sv` | LRU order helper (age counters) |

## How a read hit is served

The controller reads the block's tag and data from the core. It then passes three
things to `mecc_core`: the raw stored data, the data after SEC-DED correction, and
the per-subblock SEC-DED "uncorrectable" flags. `mecc_core` then decides, in this
order:

1. **Predecoding buffer hit.** The buffer holds an already corrected copy of this
   m-block. That copy is returned, and neither the M-ECC cache nor the decoder is
   used.
2. **FLU hit.** The location is known to be plain, so the SEC-DED result is
   final. The M-ECC cache is not searched.
3. **M-ECC search.** All 8192 tags are compared with the block location in one
   cycle. The search yields one hit bit and one check-bit word for each of the
   eight subblocks.
   * No hit: the block is plain. Its location goes into the FLU buffer, and the
     SEC-DED result is returned.
   * Hits: each m-subblock is decoded by its own BCH lane, using the raw data and
     the stored check bits. The lanes run in parallel and take 82 cycles. The other
     subblocks keep their SEC-DED result. The merged block is returned and put into
     the predecoding buffer.

Both small buffers use true LRU replacement. They are keyed by **location**, not by
memory address. Defects belong to the location, so an FLU entry stays correct
however often the block's contents change. A predecoding copy is updated whenever
its location is written.

A read hit answers exactly `L2_LATENCY` (13) cycles after the request is accepted.
If explicit multibit decoding took place, it answers 13 + 82 = 95 cycles after. The
M-ECC search is assumed to fit inside the core's access time. Internally the work
finishes earlier, and the controller holds the response until that cycle.

## The DEC-TED code and its decoder

The multibit code is a binary BCH code over GF(2^7) with designed distance 5:

* The field polynomial is x^7+x^3+1.
* The generator is g(x) = m1(x)·m3(x) = `0x4377`, of degree 14.
* The code is shortened to 78 bits: 64 data bits and 14 check bits.
* One overall parity bit extends it to distance 6, so it corrects two errors and
  detects three.
* The 15 bits `{parity, bch[13:0]}` fit the 2-byte M-ECC entry.

`bch_enc` is a combinational, unrolled LFSR division.

`bch_dec` follows the Peterson–Gorenstein–Zierler method and handles two bits per
cycle. Its schedule is:

| cycles | work |
|---|---|
| 1 | capture the 78-bit word and the stored parity |
| 39 | Horner evaluation of S1 = r(α) and S3 = r(α³), two bits per step, plus the parity check |
| 1 | S1³ and S1⁻¹ (the inverse as S1^126, a chain of squarings and products) |
| 1 | σ2 = (S3 + S1³)/S1, and the search set-up (σ1 = S1) |
| 39 | Chien search: test z = α^j, two positions per cycle, as roots of z² + σ1·z + σ2, and flip each root's bit |
| 1 | classify and register the result |

Classification:

* S1 = S3 = 0: no error in the 78 bits. An odd parity only means that the parity
  bit itself was wrong.
* S1 = 0, S3 ≠ 0: uncorrectable.
* σ2 = 0: one error, at the single root. If the parity is even, the parity bit was
  also wrong, so two errors were corrected.
* σ2 ≠ 0 with even parity: two errors. Exactly two roots must be found, otherwise
  the word is uncorrectable.
* σ2 ≠ 0 with odd parity: three errors, reported as uncorrectable.

## Writes, the DR cache and soft-error recovery

**L1 write-back** (`req_we_i = 1`, always a full 64-byte block):

1. The block is written into the core and marked dirty. A miss allocates a way
   without fetching from memory.
2. `mecc_core` re-encodes the check bits of any m-subblocks and updates a
   predecoding copy. An FLU hit lets it skip the M-ECC search.
3. The block is written into the DR cache:
   * a hit updates the copy;
   * a miss fills a free entry;
   * if the DR cache is full, its least recently used copy is first written to
     memory.

**Dirty victim.** When a dirty block is evicted, the controller first reads it
through the same correction path as a read. It then writes the block to memory and
discards its DR copy.

Together these steps keep one invariant: *the latest data of every dirty block is in
the DR cache or in memory*. When a read finds a subblock that its code can only flag,
`mecc_core` reports `uncorr_o`. This happens when:

* an s-subblock has one defect plus a soft error (SEC-DED sees two errors); or
* an m-subblock has two defects plus a soft error (DEC-TED sees three).

The controller then takes the block from the DR cache if it is there, and otherwise
from memory. It rewrites the block in place with its dirty bit unchanged, which also
clears the soft error, and returns the repaired data. A dirty victim that cannot be
read and has no DR copy is not written back, because memory already holds its latest
data.

## Interfaces and timing (`l2_mecc_top`)

* **Request:** `req_valid_i` / `req_ready_o`. Read when `req_we_i` = 0, write-back
  when it is 1. The controller handles one request at a time.
* **Response:** `resp_valid_o` for one cycle, with `resp_data_o` for reads.
* **Memory:** `mem_req_o` stays high until a one-cycle `mem_ack_i`. Read data comes
  on `mem_rdata_i` together with the ack. An assertion checks that the request is
  held.
* **M-ECC tags:** `cfg_we_i` writes entry `cfg_idx_i` with `cfg_loc_i`
  (`{set, way, subblock}`) and `cfg_valid_i`. This port stands for the flash or
  built-in self-test that supplies the defect map. A tag write also empties the
  predecoding and FLU buffers.
* **Events:** `events_o` gives one strobe per mechanism: buffer hits and inserts,
  M-ECC searches, decodes, DR hits, inserts, evictions and discards, L2 misses and
  write-backs, and the two kinds of recovery.
* **Reset:** `rst_n` is asynchronous and active low. It clears the valid bits of
  every structure, so no SRAM contents need initialising.

| parameter | default | meaning |
|---|---|---|
| `SETS`, `WAYS` | 2048, 8 | 1 MB with 64-byte blocks |
| `MECC_ENTRIES` | 8192 | 16 KB of 2-byte check-bit entries |
| `PBUF_ENTRIES` | 64 | predecoding buffer (4 KB) |
| `FLU_ENTRIES` | 64 | FLU buffer |
| `DR_ENTRIES` | 64 | DR cache |
| `L2_LATENCY` | 13 | read-hit latency in cycles |

At 0.5 percent defect density, about 4.1 percent of the 131072 subblocks are
expected to be m-subblocks. That is about 5350 entries, inside the 8192 built. The
buffer sweeps used to size the design (16 to 128 entries for the buffers, 8 to 64
for the DR cache, 4- to 16-way L2) are all legal parameter values.

## What is modelled rather than designed

`l2_data_sram` is a **behavioural model** of the data array, not synthesizable
RTL for a real macro:

* Defective cells are stuck-at cells. A write cannot change them.
* Test code places defects with `set_stuck(word, bit, value)`.
* Test code injects soft errors with `flip(word, bit)`.

In word `set*WAYS + way`, subblock s occupies bits `[72*s +: 72]`, laid out as
`{8 check bits, 64 data bits}`.

The following parts are outside this RTL:

* the processor and the L1 caches;
* the next-level memory;
* the non-volatile store of the defect map;
* the spare-row and spare-column repair of subblocks with three or more defects.

## Departures and design choices

These points are this implementation's own choices, not part of the original
architecture:

* The L2 core uses LRU replacement and a Hsiao SEC-DED code.
* The field polynomial is our choice.
* The overall parity bit is stored next to the 14 BCH check bits, so entries are
  15 bits wide.
* There are eight parallel decoder lanes, so a block with several m-subblocks still
  costs 82 cycles.
* The buffers are keyed by location.
* A predecoding copy is updated when its block is written.
* A tag reload flushes both buffers.
* The controller is serial, with request/ack handshakes.
* The exact recovery sequence is ours.

The original operation flowcharts of the M-ECC core and the DR cache were rebuilt
from their prose description.

Not modelled:

* energy and area (the original evaluation's main metrics);
* soft errors inside the small buffers themselves.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and has
a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_l2_mecc_top \
    rtl/l2_pkg.sv tb/tb_l2_mecc_top.sv -Mdir obj -o sim && obj/sim
```

| testbench | what it covers |
|---|---|
| `tb_l2_mecc_top` | Reduced size: 16 sets × 4 ways and 4-entry buffers. Places random defects and loads the M-ECC tags. Runs 6000 random reads and write-backs with locality against a memory model, plus periodic soft errors. Checks the data of every read and the exact 13- or 95-cycle hit latency, and requires every event to occur. |
| `tb_l2_mecc_full` | Default size, 300-cycle memory. Runs a directed pass: miss, decoded hit (95 cycles), predecoding hit (13), DR insert, FLU classification and hit, and soft-error repair from memory. |
| `tb_mecc_core` | The read/write flow against reference LRU lists. Checks 1- and 2-bit defect correction, detection of triple errors, and latencies of 1, 2 and 84 cycles. |
| `tb_bch` | Divisibility of codewords by g(x), parity, correction of 0 to 2 errors, detection of 3, and the 82-cycle latency. |
| `tb_secded` | Column properties, all single-bit errors, and random double-bit errors. |
| `tb_l2_core`, `tb_mecc_cache`, `tb_predecode_buf`, `tb_flu_buf`, `tb_dr_cache`, `tb_l2_data_sram` | Each unit against a reference model. |
