# MapReduce on an FPGA: Map accelerators feeding a cuckoo-hash Reduce co-processor

In MapReduce, Map tasks turn input into `(key, value)` pairs and a Reduce step
merges all values that share a key. This design does both steps in hardware:

- Several small **Map accelerators** each scan their own slice of the input.
- They **emit** pairs over one shared AXI bus.
- A single **Reduce accelerator** merges the pairs into an on-chip key/value
  scratchpad. Its two hash tables are managed by cuckoo hashing.

When the Map stage ends, a host reads the merged results from the Reduce
accelerator. It either looks up keys it already knows, or drains a FIFO that
lists every distinct key once.

Two Map applications are built:

- **Histogram**: counts the R, G and B intensities of an image.
- **Word Count**: counts how often each word of a text occurs.

They show the two ways the Reduce accelerator can be used: with keys known in
advance, or with arbitrary keys.

```
            load port (host / DMA)                       host AXI master
                 │                                            │
   ┌─────────────┴──────────────┐                             │
   │ map_histogram x NUM_HIST   │──emit──┐                    │
   │   (own BRAM bank each)     │        │   axil_interconnect│ (round robin,
   │ map_wordcount x NUM_WC     │──emit──┼──► N masters ──────┘  one slave)
   │   (own BRAM bank each)     │        │         │
   └────────────────────────────┘                 ▼
                                         reduce_accel
             ┌────────────────────────────────────────────────────────┐
             │ reduce_axi_if: per-master KEY/VALUE slots, CTRL, STATUS,│
             │                lookup, key-FIFO readout                 │
             │      │ emit queue (sync_fifo, QDEPTH)                   │
             │      ▼                                                  │
             │ reduce_ctrl (FSM) ── reduce_hash h1 ─► T1 (bram_sdp)    │
             │      │             └─ reduce_hash h2 ─► T2 (bram_sdp)   │
             │      │  hit_compare x2, value_merge, avg_divider        │
             │      └──► unique-key FIFO (sync_fifo)                   │
             └────────────────────────────────────────────────────────┘
```

## The scratchpad and how a pair is merged

Each table row is 104 bits wide (`kv_row_t` in `mr_pkg.sv`):

| bits | field | use |
|---|---|---|
| 103:40 | key | 64-bit key, compared on every access |
| 39:33 | cnt | number of values merged into the row, saturating at 127 |
| 32 | valid | row holds an entry |
| 31:0 | value | running sum, wrapping modulo 2^32 |

There are two tables, T1 and T2. Each has `2^ADDR_W` rows, 4096 by default.
The key and value widths, the 8 tag bits, the valid bit and the 12-bit table
address follow the original design. Using the other 7 tag bits as a merge
counter is this design's choice: the averaging mode needs a count per key.

The control unit in `reduce_ctrl` is a small FSM that serves one request at a
time. Clears come first, then host lookups, then queued emits.

**Emit with hashing on.** This mode is for keys that are not known in advance:

- Both tables are read in the same clock, T1 at `h1(key)` and T2 at `h2(key)`.
- A hit in either table rewrites that row: the value is added and `cnt` goes up by one.
- On a miss the key is new:
  - It is pushed into the unique-key FIFO.
  - It is written into `T1[h1(key)]`.
  - An entry already in that slot is evicted to its slot in T2, `T2[h2(y)]`.
    Whatever it displaces there goes back to T1, and so on.
- This chain of displacements is cuckoo hashing. A lookup never needs more
  than the two reads, while an insertion may take longer.
- After `MAX_KICKS` displacements (32) the FSM gives up:
  - The entry that is still homeless is latched in `FAIL_KEY`/`FAIL_VAL`.
  - The sticky `FAIL` status bit is set.
  - The host keeps that entry in software. This is the same fallback used
    for keys that are too long (below).

**Emit with hashing off ("direct mode").** This mode is for keys known to be
small integers. The key is used as the address:

- Key bit `ADDR_W` selects T1 or T2, and the low bits select the row.
- Keys beyond `2 x 2^ADDR_W` set the `RANGE` status bit and are dropped.

Histogram uses direct mode. Blue, green and red intensities are keys 0–255,
256–511 and 512–767, so after a run the host reads 768 known keys.

**Timing of one pair.** A pair that hits takes 2 clocks: read, then write back.
A new key takes 2 clocks plus 2 per displacement. The emit queue in front of
the FSM absorbs bursts from the bus. When the queue is full, the AXI slave
holds `AWREADY`/`WREADY` low, so the Map accelerator waits.

**The hash functions.** Both are pure XOR networks truncated to `ADDR_W` bits:

- `h1` cuts the key into `ADDR_W`-bit pieces and XORs them together.
- `h2` sends key bit *b* to address bit `(7b + ⌊b/ADDR_W⌋) mod ADDR_W`.
  The multiplier is 5 if `ADDR_W` is a multiple of 7.

The original design only says the hashes are "simple XOR functions", so the
exact networks are this design's own. They matter more than they seem to:

- Word keys are ASCII letters, and only the low 5 bits of each byte vary.
- A first version folded the key on 16-bit boundaries, with a byte swap in `h2`.
  It failed 38 insertions for 1,538 distinct words in 8,192 rows, at under 20% load.
- The reason: `h2` of any two-letter word depended only on `c0 ^ c1`.
- The present pair gives no failures on the same text.

**Lookups and averaging.** A lookup reads both tables and returns the hit
row's sum and count. With averaging on (`CTRL.avg_en`), it returns the sum
divided by the count instead. `avg_divider` computes the quotient one bit per
clock, which adds 33 clocks per lookup.

The four configurations of the original design are run-time modes of one
instance, not four separate builds:

| | hashing on | hashing off |
|---|---|---|
| accumulate | Word Count | Histogram, Linear Regression |
| average | K-means | |

**Unique-key FIFO.** Every key that enters the tables for the first time is
pushed into a FIFO. A key that only moves between tables during a
displacement is not pushed again. After the run, the host reads `FIFO_CNT`.
It then reads `FIFO_POP` once per key, which returns the oldest key and
removes it, and looks each key up. The FIFO has one entry per table row, so
it cannot overflow while the tables still have room.

A **clear** (`CTRL` bit 2) writes every row invalid, taking `2^ADDR_W` clocks,
and flushes the FIFO. The same clear also runs after reset. Emits that arrive
during a clear wait in the queue.

## Register map (AXI4-Lite, 64-bit data, byte addresses)

| addr | name | access | meaning |
|---|---|---|---|
| 0x00 | CTRL | W/R | [0] hash_en, [1] avg_en, [2] clear (write only, starts a clear) |
| 0x08 | STATUS | R | [0] busy (FSM or queue not idle), [1] lookup done, [2] FAIL, [3] count saturated, [4] RANGE, [5] key FIFO overflow; bits 2–5 are sticky until a clear |
| 0x10 | LKEY | W | key to look up |
| 0x18 | CMD | W | [0] start a lookup of LKEY |
| 0x20 | RESULT | R | [31:0] sum or average, [38:32] count, [40] hit |
| 0x28 | FIFO_CNT | R | keys in the unique-key FIFO |
| 0x30 | FIFO_POP | R | oldest key; the read removes it |
| 0x38 | FAIL_KEY | R | key of the last failed insertion |
| 0x40 | FAIL_VAL | R | [31:0] its value, [38:32] its count |
| 0x48 | STATS | R | [31:0] pairs merged, [63:32] displacements |
| 0x100 + 16s | KEY(s) | W | emit slot *s*: key |
| 0x108 + 16s | VALUE(s) | W | emit slot *s*: value; the write emits the pair |

Each bus master has its own slot, so a KEY write from one master cannot be
paired with a VALUE write from another, even though the bus interleaves them.
In `mr_top`, slot *i* is Map accelerator *i* and the host is the last slot.
The host may emit pairs too. Responses are always OKAY, and unmapped
addresses read as zero.

## Map accelerators and the bus

**`axil_emit_master`** turns a valid/ready emit into two AXI4-Lite writes:
KEY, then VALUE. Each write waits for its B response, and `emit_ready` rises
once the pair has been accepted.

**`map_histogram`** reads one pixel `{0, R, G, B}` per 32-bit word from its bank.
It emits three pairs per pixel with value 1: key `B`, key `256+G` and key `512+R`.

**`map_wordcount`** scans its bank one byte per clock:

- Letters and the apostrophe are word characters, folded to upper case.
  Everything else ends a word.
- Words of up to 8 characters are packed into the 64-bit key, first
  character in the low byte, and emitted with value 1.
- Longer words do not fit a key. They are only counted (`long_words`) and
  left to software, because such words are rare.
- Text must be split between banks at word breaks.

Both Map accelerators raise `done` only after their last pair has been
accepted by the Reduce accelerator. The host must still wait for
`STATUS.busy` to clear before it reads results, because pairs may still be
in the emit queue.

**`axil_interconnect`** connects N masters to one slave:

- Writes and reads each have their own round-robin arbiter.
- A grant is held from address to response, so one transaction is in flight per direction.
- The bus is the throughput limit of the platform. At full size, the 8
  Histogram accelerators need 6 clocks per pair: each pair is two single
  writes through one slave port.

## Top level (`mr_top`) and defaults

| parameter | default | origin |
|---|---|---|
| NUM_HIST | 8 | largest Histogram kernel count evaluated |
| NUM_WC | 32 | largest Word Count kernel count evaluated |
| HIST_BANK_WORDS | 38,400 | 640 x 480 pixels / 8 |
| WC_BANK_WORDS | 768 | 3 KiB per bank; 90,094 bytes / 32 = 2,816 plus slack for word breaks |
| ADDR_W | 12 | table address width of the original design |
| QDEPTH | 16 | this design's choice |
| MAX_KICKS | 32 | this design's choice |

Operation from the host's side:

1. Load each bank and its length through `load_*`/`len_*`. `load_sel`
   numbers the Histogram accelerators first, then the Word Count ones.
2. Write CTRL: hash_en=0 for Histogram, 1 for Word Count.
3. Pulse `hist_start` or `wc_start`.
4. Wait for `*_done`, then for `STATUS.busy` to clear.
5. Read the results.

Run one application at a time, since each needs its own mode. The `ev_*`
outputs report stalls, displacements and failed insertions for monitoring.

## Where this departs from the original design

- **Table size.** The original text gives both "2K key/value pairs" and a
  12-bit table address. This design follows the 12-bit address: 2 x 4096
  rows. Set `ADDR_W=10` for 2 x 1024 = 2K rows.
- **Failed insertions.** The original rebuilds the table when cuckoo
  insertion loops. Here the homeless entry is handed to software
  (`FAIL_KEY`/`FAIL_VAL`), and rehashing is not implemented.
- **Modes.** The four Reduce versions are run-time modes of one instance.
- **Map kernels.** The original generates its Map kernels with high-level
  synthesis from C code. Only Histogram and Word Count are written here, by
  hand. Matrix Multiplication, String Match, Linear Regression, PCA and
  K-means have no RTL: their kernels are not described beyond one line each.
- **Host link.** The host, its PCIe link and external memory are outside
  this RTL. The bank load port and the host AXI port stand where they would
  connect.
- **Own choices.** The hash networks, the register map, the emit slots, the
  emit queue, the averaging divider and the count in the tag bits are all
  this design's own.
- **K-means counts.** With 7-bit counts, an average is exact only up to 127
  merged values per key. Beyond that `SAT` is set and the average is wrong,
  which K-means-sized clusters would exceed.

## Verification

Every module has a self-checking testbench in `tb/` that compares against a
reference model computed inside the testbench. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- **`tb_mr_top`** runs the whole platform at reduced size:
  - Configuration: 2 Histogram and 3 Word Count accelerators, 2 x 512-row
    tables, a 2-entry queue, and 1 displacement allowed.
  - Sequence: Histogram, then Word Count started while the tables are still
    clearing, then Histogram again.
  - It checks every histogram bin, every word count (including those failed
    into software) and the key FIFO contents.
  - It counts each mechanism and fails if any never occurs: bus stalls, queue
    back-pressure, displacements, failed insertions, mode switches, long
    words, FIFO pops, averaged reads and direct-mode hits.
- **`tb_mr_top_full`** runs the top at its default parameters:
  - A 640 x 480 image (921,600 pairs) through the 8 Histogram accelerators.
  - Then 90,094 bytes of generated text (1,538 distinct words) through the 32
    Word Count accelerators.
  - All 768 bins and every word are checked. It takes about 35 s in Verilator.
- **Generated data.** All testbench data is generated with `$urandom`, so no
  data files are needed.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  --top-module tb_mr_top -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/mr_pkg.sv tb/tb_mr_top.sv -o sim && ./obj_dir/sim
```

`tb/axil_host_tasks.svh` holds the host's AXI read/write, emit and lookup
tasks. `tb/mr_top_flow.svh` holds the end-to-end flow and its reference
models. Both are shared by the top-level testbenches.
