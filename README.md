# Parallel March C- BIST with fault location and transparent mode for a bit-oriented SRAM

A march test on an N-bit memory costs a fixed number of operations per cell:
March C- needs 10N, which for a 256 Mbit part is 2.7 G operations. This design
cuts that by testing many cells at once. The cell array is divided into N/k
*basic march blocks* of k cells each. The address decoders accept a mask word,
so one access can select the cell at the same position in every block. March C-
then runs over the k positions of one block while every block follows it in
lock step.

Two test modes share the hardware:

* **Non-transparent test** (for fabrication test). The contents are destroyed.
  A write reaches all N/k blocks in one cycle. A read senses one word line, and
  a *parallel comparator* checks that the selected cells all hold the same
  value; no expected value is needed. When the comparator fires, the BIST
  finds the faulty cell by halving the set of selected columns, then reports
  its address and goes on.
* **Transparent test** (for periodic test in the field). The contents are kept.
  This is March C- after the usual transparent transformation: each element
  reads a cell and writes back the complement of what it read. A first pass
  reads only, and predicts into a MISR (signature register) what the test pass
  should read. The test pass must then produce the same signature.

## Organisation of the array and of the address

The array has `2^ROW_BITS` word lines and `2^COL_BITS` bit lines, one bit per
cell. The defaults are 2048 x 2048 = 4 Mbit. `BLK_BITS` (default 3) is
½·log2(N/k). The blocks form a `2^BLK_BITS` x `2^BLK_BITS` grid: 8 x 8 = 64
blocks of 256 x 256 = 64 Kbit.

```
row address    = { block row    [BLK_BITS] , row in block    [ROW_BITS-BLK_BITS] }
column address = { block column [BLK_BITS] , column in block [COL_BITS-BLK_BITS] }
position in block (BMBAG address) = { row in block , column in block }   (log2 k bits)
```

The upper address bits number the block. Masking them selects the same position
in every block:

| access                | row mask (MR) | column mask (MC) | cells touched       |
|-----------------------|---------------|------------------|---------------------|
| non-transparent write | block bits    | block bits       | N/k, one per block  |
| non-transparent read  | none          | block bits       | sqrt(N/k), one word line |
| fault location step   | none          | some block bits  | half of the previous set |
| transparent read/write| none          | none             | 1                   |
| normal access         | none          | none             | 1                   |

Reads never mask row bits, because only cells on one word line can be sensed
together. A read-and-write element therefore needs sqrt(N/k) reads for each
parallel write. The block-row bits of those reads come from a second counter.

## The two counters and how they sequence March C-

March C- runs as
`up(w0); up(r0,w1); up(r1,w0); down(r0,w1); down(r1,w0); down(r0)`, elements M1 to M6.

* **BMBAG** (basic march block address generator, `bmbag.sv`) is a
  (log2 k + 3)-bit up/down counter. Its low bits are the position in the
  block. Its three top bits, U/D, A and B, are bits that the position
  field carries into. They count finished sweeps, so their value *is* the
  element being run. The controller keeps no separate state for it.
* **MdAG** (masked row address generator, `mdag.sv`) is a
  (BLK_BITS + 1)-bit up/down counter. Its low bits are the block row of a read.
  Its top bit C is the carry (or borrow) that says all block rows have been
  read.

The decode of {U/D, A, B} is in `bist_pkg::decode_el`:

| U/D | A B | non-transparent         | transparent      |
|-----|-----|-------------------------|------------------|
| 0   | 00  | M1                      | T1 (like M2)     |
| 0   | 01  | M2                      | T2 (like M3)     |
| 0   | 10  | M3                      | set stage        |
| 0   | 11  | set stage               | –                |
| 1   | 11  | M4                      | T3               |
| 1   | 10  | M5                      | T4               |
| 1   | 01  | M6                      | T5               |
| 1   | 00  | end                     | end of pass      |

For each position in M2..M6 the controller does the following:

1. While C = 0, it reads one word line. The row is {MdAG, row in block}. MdAG
   then steps up, or down in the down sweeps.
2. When C = 1, it does the parallel write of the element. In M6 this slot is a
   dummy read. BMBAG steps once. MdAG is reloaded: to 0 for an up sweep, or to
   C = 0 with all-ones address for a down sweep.

M1 is one parallel write per cycle.

The up sweeps end when BMBAG reaches U/D,A,B = 0,1,1. With C = 0 this is the
code 0110, which drives the *set stage*. That one cycle loads both counters
with all ones (MdAG: C = 0, address all ones). BMBAG then counts down from
U/D,A,B = 1,1,1 with the position at its top. Each wrap of the position field
lowers {A,B} by one, and {A,B} = 00 ends the test.

**Cycle count (non-transparent):** `1 + k + 5k(sqrt(N/k) + 1) + 2`, plus
`BLK_BITS` for each fault located. The defaults give 3,014,659 cycles, against
41.9 M operations for serial March C-. The usual operation count
`5k + 5·sqrt(kN)` leaves out the k dummy reads of M6 and the three control
cycles (start, set stage, end).

## Fault location

A read in M2..M6 may pull `error_flag_n` low, meaning the sqrt(N/k) cells of
that word line disagree. The controller then holds both counters and enters
`diag` for `BLK_BITS` cycles. Cycle j unmasks one more block-column bit,
from the top one down, with that bit at 0, which selects the lower half of
what remains. The comparator switches to *reference mode*: it flags if any
selected cell differs from the value the element expects (0 in M2/M4/M6, 1 in
M3/M5). A flag means the faulty cell is in the lower half. No flag sets the
bit to 1 and keeps the upper half. The upper half is not read
separately: with one faulty cell, a clean lower half can only mean the fault is
in the upper one. This saves a cycle per step. After the last step, `fault_addr` =
{block row from MdAG, position, block column just found} is valid for the one
cycle `fault_valid` is high. `fault_count` counts these reports. The test then
continues with the next read.

Limits:

* A fault that makes several cells of one word line wrong in the same way goes
  unseen, because the comparator only sees disagreement. This is the coverage
  cost of testing in parallel: the blocks' cells at one position can couple
  with each other.
* Location assumes one faulty cell per read group. With more than one, the
  search still ends at a cell that read wrong.
* A cell is reported again in every element that reads it wrong. A stuck-at-1
  cell is reported 3 times (M2, M4, M6) and a stuck-at-0 cell twice.

## Transparent mode

Here the column mask is always 0. Every cell's written value depends on its own
content, so one write cannot serve several cells, and reads and writes touch
one cell each. For each BMBAG position, MdAG steps the block row. A small
block-column counter inside the controller steps the block column. It runs
fastest, and downward in the down sweeps. Each cell is:

* **prediction pass** (T1'..T5', no writes): read, and feed the MISR. The
  elements expecting the complement (T2, T4) invert the value first.
* **test pass** (T1..T5): read and feed the MISR. In T1..T4, write back the
  complement in the next cycle.

After both passes `sig_fail` is set if the two signatures differ. Each cell is
written four times, an even number, so it ends with its initial value.
The up sweep has only two elements, so the set stage is decoded at
U/D,A,B,C = 0100. The MISR (`misr.sv`) is 16 bits, polynomial
x^16+x^14+x^13+x^11+1. Its inputs are the cells of the current in-block column
in all block columns, masked to the one being read.

Cycle count: `1 + 5k(N/k+1) + 2 + 4k(2N/k+1) + k(N/k+1) + 2`, about 14N.

## Modules

| file                      | role |
|---------------------------|------|
| `bist_pkg.sv`             | element type, per-element read/write values, U/D-A-B decode |
| `mask_decoder.sv`         | decoder with mask word (used for rows and for columns) |
| `sram_array.sv`           | cell array: parallel masked write, one-word-line read; optional stuck-at cell |
| `parallel_comparator.sv`  | Error Flag: selected bit lines disagree (or differ from a reference) |
| `bmbag.sv`, `mdag.sv`     | the two address counters |
| `misr.sv`                 | signature register |
| `bist_ctrl.sv`            | controller; holds BMBAG, MdAG and the MISR |
| `sram_bist_top.sv`        | everything wired together, normal port multiplexed with the BIST |

Top-level use: with `tm = 0` the memory is a plain 1-bit RAM (`addr` = {row,
column}, `we`, `din`, combinational `dout`). Raise `tm` to start a test.
`transparent` is sampled on that edge. Wait for `done`, then read `fail`,
`sig_fail` and the fault reports. Dropping `tm` resets the BIST. The `saf_*`
inputs make one cell stuck at a value, which exercises the test; tie `saf_en`
low otherwise.

## Simulating

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`. For example:

```
verilator --binary --timing --assert -Irtl rtl/bist_pkg.sv rtl/*.sv \
    tb/tb_sram_bist_top.sv --top-module tb_sram_bist_top -o sim && obj_dir/sim
```

(`rtl/bist_pkg.sv` has to come first. If it is listed twice, drop it from the
glob.)

* `tb_bist_ctrl` checks the controller against a March C- trace generated by
  loops in the testbench, command by command and cycle by cycle. It also
  checks stuck-at location and the transparent test on a 16 x 16 array.
* `tb_sram_bist_top` runs the whole design at 64 x 64 cells, 8 x 8 blocks:
  normal access, both tests with and without a stuck-at cell, exact cycle
  counts, and preserved contents after the transparent test. It checks that
  every mechanism (parallel write, parallel read, Error Flag, location step,
  set stage, dummy read, prediction pass, write-back, signature mismatch)
  happened.
* `tb_table1_ops` runs the controller alone for N = 4M and 16M with
  k = 16K, 64K, 256K and 1M, counting operations. It finds 5k writes and
  5·sqrt(kN) reads, for example 2.95 M for 4M/64K and 26.21 M for 16M/1M,
  against 41.9 M and 167.8 M for serial March C-. It also counts 14N
  operations for the transparent test.
* `tb_sram_bist_full` runs one non-transparent test at the default 4 Mbit size
  with a stuck-at-0 cell. It takes about 3 M cycles, a few minutes in Verilator.

## Where this design makes its own choices

The architecture leaves these open. Each is marked in the module headers:

* what the counters' SET/RESET load;
* the bit order of the block fields in the address;
* the comparator's reference mode for fault location;
* continuing the march after a location;
* the single-cell transparent access and its block-column counter;
* the MISR;
* the `transparent` mode pin;
* the normal-mode port;
* the stuck-at emulation.

The array, decoder and comparator are given at the level of their logic
function, not as the custom transistor circuits a real SRAM would use.
`sram_array` is a register array, so the default 4 Mbit instance is large in
simulation and impractical in synthesis. In silicon it is a memory macro with
masked decoders and a comparator on the sense-amplifier outputs.

Defaults follow a 4 Mbit memory with 64 Kbit blocks. To change them, set
`ROW_BITS`, `COL_BITS` and `BLK_BITS` on `sram_bist_top`. Example: a 256 Mbit
array with 1 Mbit blocks is 14 / 14 / 4.
