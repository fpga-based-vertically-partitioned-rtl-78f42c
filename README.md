# Vertically partitioned TCAM built from plain SRAM

A ternary CAM (TCAM) compares a search key against every stored word at once,
where each stored bit may be 0, 1 or X (don't care), and returns the address of
the matching word. Dedicated TCAM cells are expensive on an FPGA. This design
gets the same lookup from ordinary synchronous RAM plus a little logic.

The default is the table size the design was made for: **16 entries of 16 bits,
in K = 2 vertical partitions of 8 bits**. A search takes three clock cycles, and
a new key can start every cycle.

## Main idea: turning a ternary lookup into RAM reads

Cut the ternary table into K columns of SW = W/K bits, called *vertical
partitions*. Each partition answers one question: which entries hold a
sub-word matching this SW-bit slice of the key? With the X bits expanded, a
sub-word is a plain SW-bit binary value. So the answer can be stored in advance,
once per possible value, as an N-bit vector with one bit per entry address.
The key matches entry j only if every partition reports j. The K vectors are
therefore ANDed, and a priority encoder picks one address from the result.

Storing a full 2^SW x N table per partition would be enough. The design instead
stores only the values that actually occur, packed densely, and finds a value's
row with two small structures:

* **BPT (Bit Position Table)**: one presence bit per possible sub-word value,
  arranged as 2^(SW-P) rows of 2^P bits. Each row also stores a signed
  (SW+1)-bit **Last Index (LI)**: the number of present values in all earlier
  rows, minus one. An empty table has LI = -1 in every row.
* **APTAG (APT Address Generator)**: a ones counter plus an adder. It counts
  the set bits of the selected row from bit 0 up to and including the selected
  bit, then adds LI. The result is the rank of the value among the present
  values. That rank is the row address (APTA) in the next table.
* **APT (Address Position Table)**: row *r* holds the N-bit address vector of
  the r-th present value. It has room for 2^SW rows, so every possible value
  can be present.

The SW-P high bits of a sub-word select the BPT row (the BPT address, BPTA).
The P low bits select a bit in that row (the bit position indicator, BPI). If
that bit is 0, no entry holds the sub-word. The partition's *activation* is then
low, and its partial match vector (PMA) is forced to all zeros.

### A worked example (one partition, SW = 8, P = 4)

Entry 0 holds the sub-word `000000X1`, and entry 1 holds `00000011`.
Expanding the X gives the values 0x01 (entry 0) and 0x03 (entries 0 and 1).

| structure | contents |
|---|---|
| BPT row 0 (values 0x00..0x0F) | bits 1 and 3 set, LI = -1 |
| BPT rows 1..15 | no bits, LI = 1 |
| APT row 0 (value 0x01) | `...0001` (entry 0) |
| APT row 1 (value 0x03) | `...0011` (entries 0, 1) |

Searching 0x03 selects BPT row 0 and BPI 3. Bits 0..3 hold two ones, so
APTA = -1 + 2 = 1, and APT row 1 gives entries {0, 1}. Searching 0x02 finds
bit 2 clear, so the PMA is zero.

## Search path and timing

```
key ─┬─ sub-word 0 (key[15:8]) ─ BPT ─ APTAG ─ APT ─ gate ─┐
     └─ sub-word 1 (key[7:0])  ─ BPT ─ APTAG ─ APT ─ gate ─┴─ AND ─ priority encoder ─ reg ─ result
cycle:   0 (key taken)          1 (BPT row out)  2 (PMA out)      3 (res_valid)
```

* Cycle 0: `srch_valid && srch_ready` takes the key, and the BPT row is read
  (synchronous RAM).
* Cycle 1: APTAG works out APTA from the row, and the APT row is read.
* Cycle 2: each PMA is gated by its activation bit. The PMAs are ANDed into
  the match vector (MA), and the priority encoder picks the **lowest**
  matching address. The outputs are registered.
* Cycle 3: `res_valid` is high, with `res_hit`, `res_addr` and `res_ma`
  (bit j of `res_ma` = address j).

Partition 0 takes the most significant sub-word.

## Loading the table: the mapping sweep

The BPT and APT contents depend on the whole column. One new entry can shift
the rank of every value after it. So the tables are not patched in place. After
every write they are rebuilt from a register copy of the ternary table, which
is kept in `data_mapper`:

1. Entry writes use a valid/ready handshake. The fields are `wr_addr`,
   `wr_value`, `wr_xmask` (1 = X) and `wr_keep` (1 = store, 0 = delete).
2. The next cycle starts a sweep over all 2^SW sub-word values v, in
   ascending order, one per cycle, with all partitions in parallel. For each v,
   every partition compares v with its slice of every valid entry, ignoring X
   bits. This produces a match vector.
3. If the vector is non-zero, it is written to APT row `rank`, and `rank` is
   incremented.
4. Presence bits are collected for the current BPT row. On the last value of
   the row, the row is written together with its LI, which is the rank at the
   start of the row minus one.

A sweep takes 2^SW = 256 cycles, with `busy` high throughout. While `busy` is
high, `srch_ready` is low. A write waits (`wr_ready` low) while a key is being
offered or any search is still in the pipeline, so the tables never change
under a search in flight. An assertion in `vp_tcam` checks this. After reset,
one sweep runs on the empty table. This sets every LI to -1 and clears every
presence bit before the first search.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `W` | 16 | word width |
| `N` | 16 | number of entries |
| `K` | 2 | number of vertical partitions (W must be a multiple of K) |
| `P` | 4 | BPI width; each BPT row holds 2^P bits |

Memory per partition is a BPT of 2^(SW-P) x (2^P + SW + 1) bits and an APT of
2^SW x N bits. At the defaults that is 400 + 4096 bits, or 8992 bits for both
partitions. The ternary copy in the mapper takes 2·W·N + N flip-flops. The APT
size and the sweep length both grow as 2^SW. Wide words need more partitions,
not wider sub-words.

## Modules

| file | role |
|---|---|
| `rtl/tcam_pkg.sv` | default sizes, mapper state type |
| `rtl/bpt.sv` | Bit Position Table: presence bits + Last Index, 1-cycle read |
| `rtl/aptag.sv` | ones counter + adder → APT address (combinational) |
| `rtl/apt.sv` | Address Position Table, 2^SW x N, 1-cycle read |
| `rtl/vp_partition.sv` | BPT → APTAG → APT → activation gate for one partition |
| `rtl/pma_and.sv` | AND of the K partial match vectors |
| `rtl/priority_encoder.sv` | lowest set bit → address, hit flag |
| `rtl/data_mapper.sv` | ternary table registers and the mapping sweep |
| `rtl/vp_tcam.sv` | top level: mapper, K partitions, AND, encoder, result register |

## Design choices beyond the architecture

The architecture itself is taken as described: vertical partitioning, BPT with
Last Index initialised to -1, APTAG as a ones counter plus adder, APT of
2^SW x N, AND, priority encoder. The following are this design's own choices:

* **P = 4.** The split of a sub-word into BPT row and bit position is
  otherwise unspecified.
* **Ones counter includes the selected bit.** With LI starting at -1, this
  makes the first present value address APT row 0.
* **Synchronous RAM and the 3-cycle pipeline.** The original work reports only
  a combinational delay of about 10.6 ns on a Cyclone III. The timing of this
  RTL on any FPGA has not been measured.
* **Lowest address wins** in the priority encoder.
* **Hardware mapping sweep.** Doing the mapping in hardware, the
  value-plus-mask entry format, the write handshake and the rule that searches
  win over writes are all this design's own. The original describes the data
  mapping phase only as an operation, not as a circuit.
* **Searches stop during a rebuild.** There is no double-buffering, so no
  search is possible during the 256-cycle rebuild.

## Verification

Each module has a self-checking testbench in `tb/<module>_tb.sv`. It prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* `bpt_tb`, `apt_tb`: write/read against a copy of the memory.
* `aptag_tb`: every BPI for 400 rows, checked against `$countones`.
* `pma_and_tb`, `priority_encoder_tb`: random and corner vectors.
* `vp_partition_tb`: builds BPT/APT contents for random ternary sub-tables
  itself, searches all 256 sub-words back to back, and checks each PMA
  against a direct ternary compare and a 2-cycle latency.
* `data_mapper_tb`: captures every table write, and after each sweep
  recomputes presence bits, Last Indexes and APT rows from its own copy of
  the table. It also checks the 256-cycle sweep, the start-up sweep and
  write blocking.
* `vp_tcam_tb`: end to end at the default parameters. It runs random ternary
  tables, back-to-back keys, deletes and writes that race searches. Every
  result is compared with a direct ternary match, including the 3-cycle
  latency. It also covers the reference case: key `1000011110000111` with a
  table in which entry 3 matches only the first sub-word and entry 8 the
  whole key, so the result must be address 8 alone. The test counts hits,
  misses, multiple matches, keys present in one partition but missing overall,
  hits through X bits, refused keys, held writes and deletes. It fails if any
  of them never happens.

To run one with Verilator (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert --top-module vp_tcam_tb \
  -y rtl +libext+.sv -Irtl rtl/tcam_pkg.sv tb/vp_tcam_tb.sv -o sim
./obj_dir/sim
```

Add `-y tb` for testbenches that use other files from `tb/` (none do at
present). The whole end-to-end test takes well under a second.

## Limits

* The timing, LUT and power figures of the original implementation are
  neither reproduced nor checked.
* Multiple matches are resolved by address only. There is no longest-prefix
  or other priority scheme beyond placing entries at the right addresses.
* Partitions must all have the same width (W divisible by K).
