# Reconfigurable built-in self-repair for RAMs with spare rows, columns and cells

A system-on-chip usually holds several embedded RAMs of different sizes. Each
one can ship with spare storage and repair itself after manufacturing, but
giving every RAM its own test and repair logic costs area. This design shares
**one** memory BIST (MBIST) and **one** redundancy analyser (BIRA) among three
RAMs of different size and redundancy. It reconfigures them at run time for
whichever RAM is being processed.

Each RAM has three kinds of redundancy:

* **one spare row**: an extra word that replaces a whole faulty word;
* **one spare column**: an extra bit in every word that replaces one faulty
  bit position in all words;
* **spare cells**: single bits, each replacing one faulty (word, bit) cell.

Most manufacturing defects are isolated cells. So spare lines go only to rows
or columns with several defects, and scattered defects get spare cells.

| RAM  | words x bits | row / column address bits | spare rows | spare columns | spare cells |
|------|--------------|---------------------------|------------|---------------|-------------|
| RAM0 | 16 x 16      | 4 / 4                     | 1          | 1             | 16          |
| RAM1 | 32 x 32      | 5 / 5                     | 1          | 1             | 32          |
| RAM2 | 64 x 64      | 6 / 6                     | 1          | 1             | 64          |

A "row" is a word address and a "column" is a bit position within the word. A
faulty cell is therefore named by a (row, column) pair.

## The repair flow

`rebisr_top` runs the following on one `start` pulse, for RAM0, RAM1 and RAM2
in turn:

1. **Reconfigure.** `rebisr_ctrl` drives the configuration of the RAM under test
   into the MBIST and the BIRA: its row bits, column bits and spare-cell count.
2. **Test.** `mbist` runs March C- over the RAM *and its spares*:

       up(w0); up(r0,w1); up(r1,w0); down(r0,w1); down(r1,w0); up(r0)

   The test bus covers addresses `0 .. 2^ra`, where address `2^ra` is the spare
   row. Each test word is `2^ca + 2` bits wide: bit `2^ca` is the spare
   column, and bit `2^ca + 1` of word *k* is spare cell *k* (only in words
   `0 .. cells-1`). Each failing bit of a read word is reported as
   (`fail`, `fau_row`, `fau_col`).
3. **Collect.** `bira` files each report:
   * A fault in the spare row or the spare column marks that spare as unusable.
   * A fault in bit `2^ca + 1` of word *k* marks spare cell *k* as unusable;
     allocation then skips that cell.
   * Every other fault goes into the `bitmap`, a list of distinct faulty cells.
     March C- reads each cell five times, so a repeated report is dropped.
4. **Allocate.** When the MBIST signals the end of the test (`mar_com`), the
   BIRA assigns spares using the rule described in the next section.
5. **Load.** The BIRA shifts the resulting repair signature into the RAM
   wrapper's repair register over `ld`/`tdi`. It then raises `sel`, and the
   sequencer latches `sel` as the RAM's `mode` bit.
6. **Use.** In normal mode (`mode[i] = 1`), `mem_wrapper` reroutes every access
   that touches a repaired row, column or cell.

When all three RAMs have been processed, `done` rises. `repaired[i]` then tells
whether RAM *i* was fully repaired.

## The allocation rule

This is the heart of the design. The BIRA walks the bitmap entries in the
order they were first detected and skips entries already marked repaired. For
each remaining entry (r, c) it counts, **among the entries not yet repaired**:

* `rc`: how many are in row r;
* `cc`: how many are in column c.

It then decides:

| condition                               | action                                                         |
|-----------------------------------------|----------------------------------------------------------------|
| `rc > cc` and the spare row is free     | spare row takes row r; every unrepaired entry of row r is marked repaired |
| `rc < cc` and the spare column is free  | spare column takes column c; every unrepaired entry of column c is marked repaired |
| otherwise, if a spare cell is left      | a spare cell takes (r, c)                                      |
| otherwise, if a spare line is still free| that line takes r or c                                         |
| otherwise                               | the RAM cannot be repaired                                     |

A spare row or column counts as free when it is unused and passed the March
test.

Counting only the unrepaired entries matters. Take this 8 x 8 example, whose
faults are listed in detection order:

| # | row | col |
|---|-----|-----|
| 1 | 001 | 001 |
| 2 | 001 | 100 |
| 3 | 100 | 000 |
| 4 | 100 | 011 |
| 5 | 100 | 111 |
| 6 | 101 | 001 |
| 7 | 110 | 101 |
| 8 | 111 | 001 |

The allocation proceeds as follows:

* **Entry 1:** `rc = 2`, `cc = 3`. The spare column takes column 001, which
  repairs entries 1, 6 and 8.
* **Entry 2:** entry 1 is already repaired, so row 001 now holds only one
  unrepaired fault. `rc = cc = 1`, so a spare cell takes (001, 100).
* **Entry 3:** `rc = 3`, `cc = 1`. The spare row takes row 100, which repairs
  entries 3, 4 and 5.
* **Entry 7:** a spare cell takes (110, 101).

`tb_bira` checks exactly this outcome. `tb_mem_wrapper` and `tb_rebisr_top`
use the same fault pattern.

The third line of the table applies even when only the *preferred* spare line
is taken. For example, if `rc > cc` but the spare row is already used, the
entry goes to a spare cell, even when the spare column is still free. The
fourth line is a fallback of this design: once the spare cells run out, a
leftover spare line is still used rather than giving up.

The BIRA scans the bitmap one entry per cycle, once to count and once to mark.
Analysis therefore takes at most about `2·N²` cycles for `N` distinct faults:
about 74 k cycles for a full bitmap of 192 entries.

## Repair register and signature format

Each wrapper holds `(NC + 2)` items of `{valid, row[RA], col[CA]}`, packed
into one vector with item *k* at bits `[k*IW +: IW]`, where `IW = 1 + RA + CA`:

| item     | meaning                                    |
|----------|--------------------------------------------|
| 0        | spare row (`col` field unused)             |
| 1        | spare column (`row` field unused)          |
| 2 .. NC+1| spare cells 0 .. NC-1; a defective cell's item stays invalid |

Loading works as follows:

* While `ld` is high, the register shifts left by one bit per clock and takes
  `tdi` as its new LSB.
* The BIRA sends the MSB of the highest item first, for
  `(cells + 2) * (1 + ra + ca)` cycles. That is 162 bits for RAM0, 374 for
  RAM1 and 858 for RAM2.
* The BIRA drives the field widths from the run-time configuration, so one
  serializer serves all three wrappers. The top gates `ld` to the wrapper of
  the selected RAM.

## Normal-mode remapping (`mem_wrapper`)

With `sel = 1`:

* **Row hit.** If the address matches a valid spare-row item, the access goes
  to physical word `2^RA` (the spare row). Nothing else applies.
* **Spare column.** Otherwise, if the spare column is valid, a write also
  copies `wdata[col]` into physical bit `2^CA`. A read returns that bit in
  position `col`.
* **Spare cells.** Each valid spare-cell item whose row matches keeps its bit
  in a flip-flop of the wrapper. Writes update the flip-flop and reads return
  it in place of the array bit.

The BIRA never assigns overlapping spares, so these overrides never conflict.
Reads take one cycle, like the array: the wrapper registers the read address
to substitute the right bits when the data returns.

With `sel = 0`, the test bus reaches the full `(2^RA + 1) x (2^CA + 1)` array
directly, and bit `2^CA + 1` of test word *k* reads and writes spare cell *k*.
The corner cell shared by the spare row and the spare column is
never used in normal mode, so a defect there is ignored.

## Interfaces and timing

* **Clock and reset.** One clock. `rst_n` is an asynchronous, active-low
  reset for all control state. The cell arrays are not reset.
* **RAM ports.** Each RAM's normal port (`mN_cen`, `mN_wen`, `mN_addr`,
  `mN_wdata`, `mN_rdata`) is SRAM-style: `cen` and `wen` are active low, and
  read data arrives on the cycle after the read. Use a port only once its
  `mode` bit is high.
* **MBIST run length.** A defect-free March run takes `10·(2^ra + 1)` cycles
  of one operation each, plus three cycles to `mar_com`. When a read word
  mismatches, the MBIST stalls and reports the failing bits one per cycle,
  lowest column first, before issuing the next operation.
* **Whole-sequence length.** Processing all three RAMs without defects takes
  about 2,600 cycles. With tens of defects per RAM it takes 4,000–7,000
  cycles.
* **Defect inputs.** The `mN_defect_mask` / `mN_defect_val` inputs model
  manufacturing defects as stuck-at cells. Bit `w*(2^CA+1)+b` is cell (word w,
  bit b). `mN_cell_defect_mask` / `mN_cell_defect_val` do the same for spare
  cell *k* at bit *k*. Tie them to zero in a real use.

## Modules

| file                     | contents |
|--------------------------|----------|
| `rtl/rebisr_pkg.sv`      | widths of the shared test bus, `ram_cfg_t` and the table of the three RAM configurations, `test_req_t` |
| `rtl/sram_array.sv`      | cell array with spare row and column, synchronous single port, stuck-at defect inputs |
| `rtl/mem_wrapper.sv`     | test/normal mux, serial repair register, spare cells, remapping |
| `rtl/mbist.sv`           | reconfigurable March C- generator and comparator |
| `rtl/bitmap.sv`          | de-duplicating list of faulty cells with repaired flags and overflow |
| `rtl/bira.sv`            | fault sorting, allocation rule, signature serializer |
| `rtl/rebisr_ctrl.sv`     | sequencer over the three RAMs |
| `rtl/rebisr_top.sv`      | the three wrapped RAMs with the shared MBIST, BIRA and sequencer |

Size the MBIST and BIRA for a different largest RAM through `MAX_RA`,
`MAX_CA` and `MAX_CELLS` in the package. Add or change RAMs in
`ram_cfg()` and in `rebisr_top`. The bitmap depth (`bira.DEPTH`) defaults to
`64 + 64 + 64 = 192`: the most distinct faults that one spare row, one spare
column and 64 spare cells of the largest RAM could ever cover. A RAM with
more distinct faults overflows the bitmap and is reported as not repaired.

## Simulating

Every testbench is self-checking. Each one ends with a line
`TB_RESULT checks=N failures=M` and contains a cycle watchdog. Testbenches use
the reference allocation in `tb/rebisr_ref_pkg.sv`. For example:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
        rtl/rebisr_pkg.sv tb/rebisr_ref_pkg.sv tb/tb_rebisr_top.sv --top-module tb_rebisr_top
    ./obj_dir/Vtb_rebisr_top

| testbench            | what it shows |
|----------------------|---------------|
| `tb_sram_array`      | read/write with one-cycle latency, held read data, stuck-at defects including spare row/column |
| `tb_mbist`           | operation counts (5 writes + 5 reads per address), run length, exactly the injected cells reported (spares included, whole failing word), in 8x8 and 64x64 configurations |
| `tb_bitmap`          | insertion, duplicate filter, overflow, repaired flags, clear |
| `tb_bira`            | the worked example, defective spare row, defective spare cells skipped, exhausted spares, bitmap overflow, 60 random cases against the reference model, serial signature length |
| `tb_mem_wrapper`     | test access to spares, defects visible without repair, all words intact after loading the example repair, missing spare cell detected |
| `tb_rebisr_ctrl`     | RAM order, configurations, per-RAM mode and result latching |
| `tb_rebisr_top`      | full size, end to end: eight rounds of defects in all three RAMs. Repair outcome and spare usage are checked against the reference, and every repaired RAM is checked word by word in normal mode. It also counts that each mechanism occurred: repeated reports, every kind of spare, defective spares, overflow, unrepairable RAM, reads through each kind of spare, and reconfiguration for each RAM. |
| `tb_repair_rate`     | repair-rate experiment: 12 trials each of 10/20/30/40 random defects in the 16x16 RAM and 10/50/100/150 in the 32x32 RAM |

## Repair rate

The defect counts in the table come from the published evaluation.
`tb_repair_rate` places defects uniformly at random over the main array, each
stuck at a random value, and measured these rates:

| RAM   | defects | repaired (this design, uniform defects) | published repair rate |
|-------|---------|-----------------------------------------|-----------------------|
| 16x16 | 10 / 20 / 30 / 40   | 100% / 100% / 0% / 0%   | 100% / 100% / 100% / 87% |
| 32x32 | 10 / 50 / 100 / 150 | 100% / 0% / 0% / 0%     | 100% / 100% / 70% / 60%  |

The published evaluation does not say how its defects were distributed. With
uniformly scattered defects, 16 spare cells plus one row and one column cannot
cover 30 defects: beyond the 16 cells, only defects that share the one
repaired row or the one repaired column are covered, and uniform defects
rarely share lines. The published rates therefore imply strongly clustered defects, or a
different definition of a defect. The allocation logic itself is checked
against an independent model, not against these rates.

## Where this design makes its own choices

The scheme fixes the following:

* one shared, reconfigurable MBIST (March C-) and BIRA;
* the redundancy organisation (spare row, spare column, spare cells);
* the bitmap of faulty addresses;
* the counting-based allocation rule and its order of preference;
* a wrapper per RAM with a test/normal mux and a repair register loaded from
  the BIRA;
* the RAM sizes (16x16, 32x32, 64x64) and the spare-cell counts of the first
  two RAMs (16 and 32).

The following are choices of this implementation:

* 64 spare cells for the 64x64 RAM;
* words as rows and bit positions as columns;
* SRAM-style active-low port polarity and one-cycle read latency;
* the stuck-at defect model and its inputs;
* solid data backgrounds in March C-;
* serial reporting of failing bits with the test stalled;
* the bitmap depth, duplicate filter and overflow handling;
* the fallback when spare cells run out;
* ignoring the spare corner cell;
* the repair-register item format and serial protocol;
* the order in which RAMs are processed;
* the spare cells held in flip-flops and tested as an extra data bit of the
  first test words.

The published area and power results (cell counts, µm², nW after synthesis
with a commercial tool) are not reproduced here.
