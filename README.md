# Two-level memory for a multi-unit video signal processor

A video signal processor with several function units (FUs) working side by
side needs an on-chip memory that is both large and many-ported. It must be
large, so that a motion-estimation search area does not have to be fetched
again and again through the chip's pins. It must also have many ports, so
that every FU can read its operands each clock. A true multi-port SRAM gives
the ports, but its word lines and bit lines grow with the square of the
port count, so it cannot also be large.

This design splits the two needs over two levels:

* **Memory A**: a plain, dense input buffer. It is filled 32 bits per
  clock from a DMA input and holds the search area.
* **Memory B**: a small working store built only from one-read-one-write
  banks. It *emulates* a multi-port memory by keeping several copies of each
  datum, one in every read column that will need it. Copies are made as the
  data is written, so the area grows linearly with the port count.

Between the levels run four 32-bit buses with switches. Depending on how
the switches are set, Memory B acts as one 16-read/4-write memory, two
8-read/2-write memories, four 4-read/1-write memories, or sixteen
independent one-read memories with sixteen times the capacity.

The RTL follows the architecture of the paper *A Novel Memory Architecture
for Video Signal Processor* for four FUs. Where that description leaves
details open, the choices are this design's own. They are marked below and
in each file's header.

## Organisation

```
  DMA input (32b) ──┬────────────────────────────────────────────┐
                    │ one write address for all 16 bank A's       │ direct
          ┌─────────▼─────────┐ ... four groups ...               │ input
          │ Memory A, group g │ 4 byte banks x 192 B              │
          └─────────┬─────────┘                                   │
                    │ 32b read word of group g                    │
     splitting sw.  ▼                                             ▼
  bus 0..3  ═══════╪═════ ╪ ═════╪═════ ╪ ═══ concatenating switches (1, 2 or 4 segments)
                    │
         16b write mux per bank B  (bus half, or FU result)
                    │
          ┌─────────▼─────────┐
          │ bank B  stack 0   │──┐  4 read columns per group run down
          │ bank B  stack 1   │──┤  through the 4 stacked banks
          │ bank B  stack 2   │──┤  ("cascaded" read lines)
          │ bank B  stack 3   │──┘
          └─────────┬─────────┘
                    │ 4 x 8b read ports
                  FU g  ── 16b result back to the write muxes
```

| Part | Module | Size at the defaults |
|---|---|---|
| Memory A | `memory_a` | 4 groups x 4 byte banks x 192 B = 3 KB |
| Bus switches | `bus_switch` | 4 buses x 32 b |
| Write muxes | `bank_b_wmux` | one per bank B, 16 b |
| Memory B | `memory_b` | 4 groups x 4 stacked bank B's x 256 B = 4 KB |
| Read column group | `memory_b_group` | 4 read columns x 256 B |
| Bank B | `bank_b` | 4 x 4 sub-banks x 16 B |
| One-read-one-write bank | `sram_1r1w` | parameterised array |
| Top | `vsp_memory` | everything above |

Memory A holds 3 KB. That is what a full-search block matcher needs with a
maximum displacement D = 16 and 16x16 macroblocks: a search area of
(2D+16)^2 = 2304 bytes plus one macroblock strip, 16 x (2D+16) = 768 bytes,
prefetched for the next block. A silicon prototype of this architecture
built half of both levels (1.5 KB and 2 KB). The parameters `A_DEPTH`,
`N_STACK` and `SUB_DEPTH` scale the memory.

## Bank B: where the ports come from

A bank B is a 4 x 4 array of 16-byte one-read-one-write sub-banks.

* **Rows** (data1..data4) are where bytes are written. A write carries a
  16-bit word: its low byte L goes to rows 1 and 3, and its high byte H
  goes to rows 2 and 4.
* **Columns** are read ports. Each column has its own read decoder and
  reads one byte per clock from any of its four sub-banks, at address
  `{row, word}`.
* **One 4-bit write decoder** serves the whole bank: every sub-bank written
  in a clock is written at the same word.

Two kinds of select fields decide where a write lands:

* **SEL1** (4 bits) chooses the rows written, one bit per row.
* **SEL2** (2 bits, one field for rows 1-2 and one for rows 3-4) chooses the
  columns that take a copy:

| SEL2 | columns written |
|---|---|
| 00 | 1, 2, 3, 4 |
| 01 | 1, 2 |
| 10 | 1, 3 |
| 11 | 1 |

SEL2 = 00 puts one byte into four read ports at once. To give the columns
*different* contents, write the same address on successive clocks while
stepping SEL2. Each later write overwrites a subset of the earlier copies:

| SEL2 sequence (one clock each, values d1, d2, ...) | col 1 | col 2 | col 3 | col 4 |
|---|---|---|---|---|
| 00, 01, 10, 11 | d4 | d2 | d3 | d1 |
| 00, 01 | d2 | d2 | d1 | d1 |
| 00, 10 | d2 | d1 | d2 | d1 |
| 00, 11 | d2 | d1 | d1 | d1 |

The published version of this table gives column 2 = d3 and column 3 = d2
for the first sequence. That contradicts its own SEL2 column table and its
other three rows. The RTL follows the column table, so the first row reads
as above.

In the top view each group stacks four bank B's. Read column c of the group
is column c of every stacked bank, joined on one read line, so a read column
spans 256 bytes at the address

```
rd_addr[7:0] = { stack[1:0], row[1:0], word[3:0] }
```

Every stacked bank has its own write port. Up to four writes therefore land
in one group per clock, and up to sixteen in the whole of Memory B.

## Using Memory B as a multi-port memory

The control logic outside this block decides how the copies are laid out.
The memory only carries out what it is told. These uses are exercised by the
end-to-end test:

* **16 read / 4 write.** Set `part = PART_1`, so every group sees every bus
  and every FU. Each datum is written into all four groups with SEL2 = 00,
  so all 16 columns hold the same 256 bytes. Four different words, one per
  stack level, can enter in one clock: for example, the four FU results,
  with bank (g, s) taking FU s for every group g.
* **Two 8R/2W or four 4R/1W memories.** `PART_2` cuts the buses between
  groups 1 and 2. `PART_4` cuts them between every pair of groups. A group
  can then reach only the buses and FUs of its own segment. A bank-B write
  that names an unreachable source is dropped, flagged on `wr_illegal`, and
  reported by an assertion.
* **Sixteen 1R memories.** SEL2 sequences, as above, give every column its
  own data, so all 4 KB hold distinct bytes.
* **Block matching.** Frame rows are copied from Memory A into the frame
  column of every group, and template pixels are spread so that FU j holds
  template column j. The four FUs then read four frame/template pairs per
  clock and form four absolute differences. With the other two columns of
  each group they do the same for a second candidate position.
* **Butterfly / bit-reverse access.** x1..x4 are copied into every column.
  FU j reads x(j) on one column and x(3-j) on another in the same clock, so
  no routing network is needed.

## Memory A and the buses

A DMA write puts a 32-bit word of four pixels at one address shared by all
sixteen bank A's. Byte k goes to bank k of each group enabled in
`dma_gmask`, so pixels 1, 5, 9, ... share a bank, as do pixels 2, 6,
10, ..., and so on. Each group reads its four banks at its own address and
drives the 32-bit word onto its bus. The splitting switch of bus j
(`bus_from_dma[j]`) can put the DMA word on the bus instead, which bypasses
Memory A. Each bank-B write mux takes the low or high 16 bits of a reachable
bus, or the 16-bit result of a reachable FU.

## Timing

All state changes on the rising edge of `clk`. There is no reset: like the
SRAM it models, the memory holds undefined data until written.

| clock | action |
|---|---|
| t | `a_re`/`a_raddr`: Memory A read |
| t+1 | word on the bus; a bank B with `bwr.we` writes it at the end of the clock |
| t+2 | `rd_en`/`rd_addr`: Memory B read |
| t+3 | `rd_data` valid for the FU |

DMA-direct and FU words skip the first step. Reads are registered: a read
port holds its byte until it is read again. A read of a word being written
in the same clock returns the old value. All of this timing is this design's
choice; the source only states the three-step order (load A, copy into B,
compute).

## Departures and open points

* **Controller and function units are not included.** The addresses and
  the SEL1, SEL2, switch and source settings are all top-level inputs, each
  clock. The FUs appear only as 16-bit result inputs and 8-bit read
  outputs.
* **Full organisation, not the prototype.** The defaults are the four-FU
  organisation (3 KB + 4 KB). The prototype chip built half of each.
* **Own choices:**
  * how the 16-bit write word maps onto the four byte rows (L to rows 1
    and 3, H to rows 2 and 4);
  * SEL1 as one enable per row;
  * which bus each group owns;
  * that a cut-off bus reads as zero;
  * the rule that FU results, like buses, are reachable only within a bus
    segment;
  * the per-group write mask of Memory A;
  * the read address layout and all latencies.
* **The SEL2 sequence table** is corrected as described above.
* **Circuit-level parts are not modelled**: the eight-transistor two-port
  cell, the word-line drivers and the physical layout (sub-banks placed in a
  16 x 1 row).
* **Workloads that do not fit.** A displacement of 64 needs about 22.5 KB
  of Memory A (search area 20736 B plus a 2304 B prefetch strip). The
  default 3 KB holds a search area for D up to 19, and a search area plus
  its prefetch strip for D = 16. Raise `A_DEPTH` for larger displacements.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the
module's outputs with a reference model of its own and prints
`TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|---|---|
| `tb_sram_1r1w` | read/write, latency, hold, old-data-on-collision |
| `tb_bank_b` | the four SEL2 sequences above, plus random SEL1/SEL2 traffic against a full byte model |
| `tb_memory_b_group` | simultaneous stacked writes and cascaded reads |
| `tb_bus_switch` | every partition and every bus source |
| `tb_bank_b_wmux` | source selection and legality |
| `tb_memory_a` | DMA group masks, per-group reads, pixel interleave |
| `tb_memory_b` | all 16 banks written at once from random legal and illegal sources, all 16 ports read |
| `tb_vsp_memory` | the whole memory at its default sizes |

`tb_vsp_memory` runs:

* block matching of a 4x4 template over 16 candidate positions of a 7x8
  frame, with the sums of absolute differences checked;
* FU write-back into all 16 columns;
* butterfly access;
* the 8R/2W and 4R/1W splits;
* the sixteen-distinct-column organisation;
* the three-clock Memory A to FU path.

`tb_block_matching` runs a complete full search at the default sizes. It
uses displacement 16 and a 16x16 macroblock:

* the 48x48 search area goes into Memory A;
* the next 16x48 strip is prefetched into the rest of Memory A during the
  search, which fills it to exactly 3072 bytes;
* each search row and template row is streamed into Memory B in turn;
* four modelled FUs work through all 33x33 candidates, two candidates per
  FU per clock on all 16 read ports.

Every sum of absolute differences and the best motion vector are checked.
The search takes 42,240 compute clocks (about 52,000 clocks in all).

`tb_vsp_memory` counts each mechanism (A-to-B transfer, DMA-direct write, FU write-back,
each partition, each SEL2 code, 16-port reads, 16 writes in one clock) and
fails if any never happened.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/vsp_mem_pkg.sv tb/tb_vsp_memory.sv \
          --top tb_vsp_memory -o tb && ./obj_dir/tb
```

Replace the testbench name to run another. Every testbench finishes in well
under a second,
except `tb_block_matching` (about half a minute, mostly compilation).

## Files

* `rtl/vsp_mem_pkg.sv`: widths, the `part_e`/`bsrc_e` enums, the `bwr_t`
  bank-write control struct, and the SEL2 decode function
* `rtl/*.sv`: one module per file, as listed in the table above
* `tb/tb_*.sv`: the testbenches
