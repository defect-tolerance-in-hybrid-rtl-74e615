# A repairable look-up table on a defective nano fabric

Nanodevice crossbars can store far more bits per area than CMOS, but a large
share of their cells come out of manufacturing broken. This design builds one
2^N x N look-up table (N inputs, N outputs, 2^N entries) on such a fabric and
makes it usable despite the defects. The fabric gets spare rows and spare
columns. Every row and every column has a one-bit CMOS *tag*. A 1 means the
row or column is part of the LUT, and a 0 means it is left out. A built-in repair
engine tests the fabric and moves the 1s onto the least defective rows and
columns. No address encoder, remapping table or fuse logic is needed: the
tags alone decide which cells hold the LUT.

There are two repair schemes, selected by the parameter `SPLIT`:

* **Tagged repair** (`SPLIT=0`) uses one set of column tags for the whole LUT.
* **Modified tagged repair** (`SPLIT=1`, the default) cuts every column into
  an upper half (addresses with MSB 0) and a lower half (MSB 1). Each half
  gets its own set of column tags, so a column that is bad in one half can
  still serve the other. The spare rows are shared between the two halves.
  This costs N+CSP extra tag bits and tolerates more defects.

The default size is a 2^4 x 4 LUT with 100% spares: 4 spare columns and
16 spare rows.

## Fabric geometry

`nano_fabric` is a behavioural model of the crossbar. It is not CMOS logic.
It has 2^N + RSP rows and N + CSP columns, laid out as follows:

```
            own columns 0..N-1   spare columns N..N+CSP-1
own rows    [   LUT area      ] [   spare columns      ]   2^N rows
spare rows  [   spare rows    ]  (no cells)                RSP rows
```

The corner where a spare row meets a spare column has no cells. A spare row
is therefore exactly one LUT row wide, and a spare column is exactly one LUT
column tall. For the default size the fabric has
(16+16)(4+4) - 16*4 = 192 cells, three times the LUT's 64 bits.

The tags cost (2^N + RSP) + HALVES*(N + CSP) bits. That is 40 bits for
tagged repair and 48 bits for modified repair (`tag_bank`, held in flip-flops
that stand for SRAM bits).

In simulation, defects are injected through `defect_mask` and `defect_val`.
A masked cell is stuck at its value: writes are ignored and reads always
return that value. A missing corner position reads 0.

## How the tags define the LUT

This is the part that is easiest to get wrong, and the rest of the design is
built around it (`lut_access`, combinational).

**Rows.** LUT address k goes to the k-th physical row whose tag is 1. The
rows are counted in this order:

    [own rows of the upper half] [spare rows] [own rows of the lower half]

With `SPLIT=0` the order is simply own rows, then spare rows. Repair always
keeps exactly 2^N row tags set. In the modified scheme, the repair also keeps
exactly 2^(N-1) tagged rows among the upper own rows plus the spares given to
the upper half. So when a spare replaces an upper-half row, the spare moves
into the upper half of the address space. The rows that follow it shift by
one place but stay within their half. The spares given to the upper half
always come before those given to the lower half. The split of the spares
between the halves (i for the upper half, RSP-i for the lower) therefore needs
no storage beyond the row tags.

**Columns.** Output bit j of an own row comes from the j-th column whose tag
is 1. The tag set used is the one for the half the address falls in, chosen
by `addr[N-1]` when `SPLIT=1`. A spare row has no cells under the spare
columns, so it is always read and written through the N own columns,
whatever the column tags say.

Writes use the same mapping. The N data bits are scattered onto the row's
columns, and untagged cells are written 0. A truth table is programmed after
repair, so entries that moved are written to their new place.

## The repair procedure

`repair_ctrl` runs these steps after `repair_start`:

1. **Initialise the tags.** Own rows and columns are set to 1, spares to 0.
2. **Column stage, once per half** (twice for the modified scheme). Each own
   row of the half is tested. Testing a row takes four cycles: write all 0s,
   read back, write all 1s, read back. A cell that fails either read is
   defective. Each column's defects over those rows are counted. Then the
   spare columns are taken one at a time, and each one replaces the most
   defective tagged column of that half if it has strictly fewer defects.
3. **Row stage, once.** Every row is tested again. Its defects are counted
   over the columns it would be read through: the tagged columns of each
   half for an own row, the own columns for a spare row. The spare rows are
   then offered in index order, first to the upper half. Each spare replaces
   the most defective tagged row of the half if it has strictly fewer
   defects. This stops when the half is clean or no spare is left. The lower
   half then gets the spares that come after the last one the upper half
   took.
4. **Verdict.** `repair_ok` is 1 when every tagged row is clean over the
   columns it is read through. Otherwise no defect-free LUT was found.

While it runs, the engine keeps one defect counter per column and two per
row (one for each half). These counters are part of the repair engine, not of
the per-LUT overhead counted above.

**Timing.** A repair takes
`2 + HALVES*(4*2^N/HALVES + CSP) + 4*(2^N+RSP) + R + 1` clock edges from the
edge that accepts `repair_start` to the edge that sets `repair_done`. R is
the number of row-stage steps: one per spare looked at, plus one per half.
The lower half may look again at spares the upper half skipped. At the
default size, modified repair takes between 205 and 237 cycles.

## Using `hybrid_lut`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset (tags go to their initial values) |
| `repair_start` | in | one-cycle pulse starts a repair; must not be sent while busy |
| `repair_busy`, `repair_done`, `repair_ok` | out | the engine owns the fabric while busy; done stays high until the next start; ok says whether a defect-free LUT was found |
| `cfg_we`, `cfg_addr`, `cfg_data` | in | after repair, writes one LUT entry per clock |
| `lut_in`, `lut_out` | in/out | LUT evaluation, combinational (while `cfg_we` is low) |
| `lut_ready` | out | `repair_done & repair_ok` |
| `defect_mask`, `defect_val` | in | defect injection into the fabric model |
| `row_tag`, `col_tag`, `col_repl`, `row_repl` | out | tag state and the replacement counts of the last repair |

The sequence of use:

1. Reset.
2. Pulse `repair_start` and wait for `repair_done`.
3. If `repair_ok` is 1, write the 2^N entries through `cfg_*`.
4. Apply inputs on `lut_in` and read `lut_out`.

The parameters are `N`, `CSP`, `RSP` and `SPLIT`. The design needs at least
one spare row and one spare column, and N >= 1.

## Defect tolerance

`tb/tb_repair_sweep.sv` measures failure rate against defect rate. A defect
rate of p means round(p * cells) stuck cells, placed at random on distinct
cells. The sweep uses 100 random fabrics per rate. The *targeted defect rate*
is the highest rate up to which no repair failed. The table compares it with
the values published for this technique.

| LUT | spares | tagged: here / published | modified: here / published |
|---|---|---|---|
| 2^3 x 3 | 25% | 9% / 10% | 9% / 12% |
| 2^3 x 3 | 50% | 12% / 11% | 12–14% / 14% |
| 2^3 x 3 | 100% | 18% / 17% | 18–19% / 20% |
| 2^4 x 4 | 25% | 5% / 5% | 6% / 6% |
| 2^4 x 4 | 50% | 9% / 9% | 10% / 9% |
| 2^4 x 4 | 100% | 14–15% / 14% | 16% / 15% |
| 2^6 x 6 | 25% | 3% / 3% | 3–4% / 4% |
| 2^6 x 6 | 50% | 6% / 6% | 6–7% / 6% |
| 2^6 x 6 | 100% | 10% / 10% | 11% / 11% |
| 2^5 x 5 | 100% | 12% / (curve only) | 13% / (curve only) |

Where a range is given, different random seeds gave different values. The
published numbers come from 10,000 runs per point, so the small-sample values
here are optimistic by about a percent. Even so, the trends match: modified
repair is at least as good as tagged repair, smaller LUTs tolerate more, and
more spares help. The full-size testbench runs the default tile at 200
fabrics per rate. It reports no failure up to 15% defects, which matches the
published 15% for a 2^4 x 4 LUT with 100% spares.

### Benchmark circuits

`tb/tb_iscas_yield.sv` estimates the failure probability of the ISCAS'85
benchmark circuits C432 to C7552. It uses only their published LUT counts,
between 12 (C432, C499) and 95 (C6288) LUTs of sizes 2^2 x 2 to 2^6 x 6.
The LUT contents and the wiring between LUTs are not available, so no
circuit is built. A circuit counts as working when all of its LUTs repair.
The testbench measures per-size failure rates at 100% spares with modified
repair and combines them as 1 - prod(1 - p_N)^count_N.

Every circuit reaches 11% here, limited by its 2^6 x 6 LUTs. The published
figures are 13–14%, which is higher than the published 11% for a single
2^6 x 6 LUT with 100% spares. Those figures may therefore rest on a spare
budget or a count that is not stated.

## Where this design departs from, or adds to, the published description

The published description gives the tags, their initial values, the order
of the scans (columns first, per half in the modified scheme; rows in one
stage), the sharing of spare rows between halves, and the sizes. The
following are this design's own choices:

* **Spare-row mapping.** A spare row is read through the own columns. Spare
  rows are handed out in index order, upper half first. This is what lets a
  tag-only design share spare rows between halves. It also matches the cell
  count above, which has no spare-row x spare-column cells, and the measured
  tolerance above.
* **Defect detection.** Stuck-at cells, found by a write-0/write-1 test.
* **"Least defective".** This means the lowest defect count over the cells
  the row or column would actually serve. A spare only replaces a unit that
  is strictly worse.
* **Repair engine.** The counters, the cycle-level timing, the
  start/busy/done/ok handshake, and the programming and evaluation ports are
  all invented here.
* **Not built.** Networks of LUTs, such as the ISCAS'85 benchmarks mapped to
  2^2 x 2 ... 2^6 x 6 LUTs, are not built. Only their LUT counts are known,
  not their contents or wiring. The earlier "Repair Most" technique, used
  only for comparison, is not built either.

## Files and simulation

`rtl/` holds:

* `hybrid_lut.sv`: the top level.
* `nano_fabric.sv`: behavioural model of the fabric.
* `tag_bank.sv`: the row and column tags.
* `repair_ctrl.sv`: the repair engine.
* `lut_access.sv`: the tag-to-address mapping.

`tb/` holds one self-checking testbench per module, plus:

* `tb_hybrid_lut.sv`: end to end, both schemes side by side. It counts
  column replacements, row replacements in each half and repair failures,
  and fails if any of them never happened.
* `tb_hybrid_lut_full.sv`: the default tile, sweeping defect rate, with
  program and readback.
* `tb_repair_sweep.sv`: all LUT sizes and spare budgets.
* `tb_iscas_yield.sv`: circuit-level failure estimate for the benchmark
  circuits.
* `repair_model_pkg.sv`: a reference model of the repair. The testbenches
  use it to predict tags, verdicts, replacement counts and repair time
  exactly.

Every testbench prints `TB_RESULT checks=<n> failures=<n>`. To build and run
one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_hybrid_lut \
          tb/repair_model_pkg.sv tb/tb_hybrid_lut.sv
./obj_dir/Vtb_hybrid_lut
```

Each testbench runs in a few seconds. The sweep takes about 20 s to run,
plus about 30 s to compile.

`nano_fabric` is a simulation model. For silicon it would be replaced by the
real crossbar and its sense and drive circuits. The synthesizable parts are
`tag_bank`, `repair_ctrl` and `lut_access`. Two concurrent assertions
guard the interface: no `repair_start` while a repair runs, and no `cfg_we`
before a repair has finished.
