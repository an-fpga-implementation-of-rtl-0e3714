# Hough Transform track finding for one ATLAS ITk region

This RTL finds charged-particle tracks in one region of the ATLAS Inner Tracker
(ITk). The region covers 0.3 to 0.5 rad in azimuth. The method is a Hough
Transform (HT). In the transverse plane, a track from the beam line that has
transverse momentum pt and charge q passes through a detector cluster at radius
r and azimuth phi when

    phi0 = phi + r * qA/pt          (A = 0.0003 GeV/mm, small-angle approximation)

Here phi0 is the track's azimuth at the beam line. So each cluster fixes a
straight line in the (qA/pt, phi0) plane. Every cluster of a track lies on a
line through the same point, and that point gives the track's parameters. The
hardware draws each cluster's line into an *accumulator*, a grid of 216 qA/pt
rows by 32 or 64 phi0 columns. It then looks for bins that lines from nearly
every detector layer cross.

Two independent finders are provided. Both follow the two FPGA versions of this
algorithm proposed for the ATLAS Phase-II Event Filter:

* **Flexible HT** (`flex_ht`). Computes every line from the cluster's own r
  and phi. It uses 8 layers, a 216 × 32 accumulator and stores up to 160
  clusters per layer. After it finds a candidate bin, it recovers the clusters
  that made it. It holds two events: one is loaded while the other is
  scanned.
* **Low-Resources HT** (`lr_ht`). Treats the radius of each layer as known. It
  draws a pre-computed pattern chosen by phi alone, so it needs no multipliers.
  It uses a 216 × 64 accumulator and covers barrel layers only.

`ht_top` instantiates both side by side. They share no signals.

## Coordinates and number formats

All formats are choices of this implementation. They are defined in `ht_pkg`.

| quantity | format |
|---|---|
| phi (input) | signed 16 bit, in 1/256 of a phi0 column, measured from 0.3 rad. Values outside the region are allowed. |
| r (input, Flexible HT only) | unsigned 11 bit, in mm |
| qA/pt rows | 216 equal intervals over ±3·10⁻⁴ /mm, which is ±A/(1 GeV). Row 0 is the most negative. |
| phi0 columns | 32 (Flexible) or 64 (Low-Resources) equal intervals over 0.2 rad |
| line values inside the arithmetic | signed 44 bit, with 24 fraction bits of a column |

A column is 0.00625 rad wide in the Flexible HT and 0.003125 rad in the
Low-Resources HT. A row is 2.78·10⁻⁶ /mm high. At r = 1000 mm one row moves
the line by 0.44 Flexible columns.

**What a line marks.** Each line is evaluated at the 217 row *borders*. Row k
marks every column between the line's values at its lower and upper border. The
upper border is open, so a line that ends exactly on a column edge does not
mark the next column. This means a steep line marks two adjacent columns in a
row instead of jumping over one. At least one column is always marked.

**What a bin counts.** The accumulator keeps one bit per layer and bin. The
count of a bin is the number of layers whose line crosses it, so 0 to 8 for the
Flexible HT. A bin is a track candidate when its count is at least `THRESH`.
The default is the number of layers minus one: 7 of 8, or 4 of 5. This allows
one missing layer.

## Flexible HT

```
 clk_in domain          |  clk (core) domain
                        |
 in_* words ──► cdc_fifo ──► per layer: cluster_mem ─────────────┐
 (≤1 cluster per layer) |             line_drawer ─► ht_accumulator
                        |                                 │ row per cycle
                        |                            peak_finder
                        |                                 │ (row, col)
                        |                            cluster_recovery ◄─┘ all stores
                        |                                 │
                        |                           out_* words, event_*
```

### Event flow

1. **Load.** An event arrives as a sequence of input words. Each word carries
   at most one cluster per layer (`in_layer_valid`, `in_cluster`). The last
   word has `in_eoe` set. The core takes one word per cycle. Each cluster in
   the word goes into its layer's `cluster_mem` and into its layer's
   `line_drawer`. All 8 layers are handled in the same cycle.
2. **Drain.** After the end-of-event word, the core waits 4 cycles for the
   last lines to reach the accumulator.
3. **Scan.** `peak_finder` reads the accumulator one row at a time, taking 2
   cycles per row. It counts the layers in each bin and emits each bin at or
   above `THRESH` as a (row, column) candidate. Candidates come in row order,
   lowest column first.
4. **Recover.** Candidates are handled one at a time. For each one,
   `cluster_recovery` goes through every stored cluster index, all layers in
   parallel. It recomputes the cluster's line in the candidate's row and checks
   whether the candidate column is inside it. It produces one output word per
   index. The word holds the cluster of each layer and a hit flag per layer.
   `out_last` is set on the last index. The number of words per candidate is
   the largest layer count, or 1 if all layers are empty.
5. **Clear.** The accumulator and the stores are emptied in one cycle.
   `event_done` pulses, together with `event_ncand` and `event_overflow`.

### Two events in flight

The accumulator and the cluster stores exist twice, as two *banks*
(`N_BANKS = 2`). The line drawers are shared. While one bank is scanned and
recovered, the next event is loaded into the other bank. The banks are used in
turn, so events finish in the order they arrived. When both banks hold an
event, the next event's words wait in the input FIFO. Once the FIFO is full,
`in_ready` drops. With `N_BANKS = 1` loading waits until the only bank is
cleared.

### Drawing a line with few multipliers (`line_drawer`)

Evaluating `phi + r*q_k` at all 217 borders would need 217 multipliers per
layer. The line is linear in the row index, so the drawer uses segments
instead:

* **Stage 1.** Multipliers compute three things:
  * the value at border 0: `base = phi + r*q_0`
  * the offsets inside one segment of SEG = 8 rows: `d_i = r*i*dq` for
    i = 0..8
  * the segment step, which is `d_8`

  This is 10 products per cluster.
* **Stage 2.** The segment is copied up the accumulator. Copy j starts at
  `base + j*d_8`, built as a chain of additions. Border `j*8+i` is then
  `base + j*d_8 + d_i`.

All values are exact integers with 24 fraction bits. The copies therefore give
bit-for-bit the same result as evaluating the formula on every border.
`cluster_recovery` relies on this. It computes `phi + r*(q_0 + k*dq)` directly
for one row, and it must agree exactly with what was drawn. The drawer's output
is a 216 × 32 mask, registered two cycles after its input.

### Clusters beyond the store

A layer stores at most 160 clusters per event. A cluster that arrives when its
layer's store is full is dropped. It is neither stored nor drawn, so the
accumulator only holds lines that recovery can still find. Such an event
reports `event_overflow`.

### Clock domains

The input words enter on `clk_in` and cross to the core clock `clk` through
`cdc_fifo`. This is a 16-entry dual-clock FIFO with Gray-coded pointers and
two-flop synchronisers. Both resets are asynchronous, active low, and must be
released synchronously to their own clocks.

### Timing

For one event in the core clock:
* load: one cycle per input word
* drain: 4 cycles
* scan: 2·216 = 432 cycles, plus 1 cycle per candidate
* recovery: (largest layer count + 2) cycles per candidate
* clear: 1 cycle

With full stores (160 clusters per layer) this comes to about
600 + 162 × candidates cycles. A 10 µs budget at 350 MHz is 3500 cycles, so
an event meets it if it has at most 17 candidates. Because of the two banks,
loading an event overlaps the scan of the previous one. The time between
events is therefore the larger of the load time and the scan-plus-recovery
time, not their sum.

## Low-Resources HT

Every cluster of a layer is assumed to sit at that layer's radius. The line
therefore depends only on phi, so it can be stored rather than computed.
`lr_range_sel` splits phi into two parts:

* its column
* one of NSUB = 4 sub-ranges inside the column, found by comparing against
  fixed boundaries

The sub-range selects one of four patterns in the layer's `lr_pattern_rom`. A
pattern gives, for every row, the first and last column the line can reach,
measured from the cluster's own column. The pattern is shifted to the
cluster's column, clipped to the 64 columns, and ORed into that layer's plane
of the accumulator. The peak finder then works as in the Flexible HT. There is
no cluster recovery in this version.

The pattern of sub-range s covers every line whose phi lies in that sub-range
and whose radius lies in the layer's band [R_LO, R_HI]. For row k:

    lo = floor( s/NSUB     + min(R_LO*q_k,   R_HI*q_k)   * C )
    hi = ceil ((s+1)/NSUB  + max(R_LO*q_k+1, R_HI*q_k+1) * C ) - 1     (hi >= lo)

Here q_k is row k's lower border and C = 64 / 0.2 rad converts radians into
columns. The table is computed from this formula when the design is
elaborated.

* **Fix r** (`SCAN_R = 0`, the default). Each layer has a single radius, so
  the pattern is narrow.
* **Scan r** (`SCAN_R = 1`). The radius spans ±`R_HALF` (10 mm) around the
  layer's radius. The patterns are wider. This finds more tracks but also
  produces more candidates.

The five layer radii (291, 405, 562, 762 and 1000 mm) are estimates of the
ITk barrel layers, not measured values.

Timing: a word reaches the accumulator two cycles after it is accepted. After
the end-of-event word:
* drain: 2 cycles
* scan: 2 cycles per row, plus 1 cycle per candidate
* clear: 1 cycle

`in_ready` is low from the end-of-event word until the clear.

## Interfaces

All handshakes are valid/ready. A word transfers on a clock edge where both
valid and ready are high. A producer holds its word stable until it is taken.
Assertions check this at the peak finder and recovery outputs.

| module | input | output |
|---|---|---|
| `flex_ht` | `in_valid/in_ready`, `in_layer_valid[8]`, `in_cluster[8]` (`{r, phi}`), `in_eoe` (clock `clk_in`) | `out_valid/out_ready`, `out_row`, `out_col`, `out_index`, `out_hit[8]`, `out_cluster[8]`, `out_last`; `event_done`, `event_ncand`, `event_overflow` (clock `clk`) |
| `lr_ht` | `in_valid/in_ready`, `in_layer_valid[5]`, `in_phi[5]`, `in_eoe` | `cand_valid/cand_ready`, `cand_row`, `cand_col`, `cand_count`; `event_done`, `event_ncand` |
| `ht_top` | the ports of both, prefixed `flex_` and `lr_` | |

## How far this follows the reference design

The following are taken from the published description:
* the HT formula
* the region and the accumulator sizes (216 × 32 and 216 × 64)
* 8 layers and 160 stored clusters per layer for the Flexible HT
* drawing one cluster per layer concurrently
* drawing a truncated line and copying it along the accumulator
* extracting candidates, then recovering each candidate's clusters by
  reapplying the formula, one candidate at a time
* separate clock domains
* handling two events at once
* in the Low-Resources HT, a fixed radius per layer, phi compared with
  predefined ranges to choose a pre-generated pattern, and the Fix r / Scan r
  alternatives

The following are choices of this implementation:
* all number formats and the qA/pt range
* marking at row borders
* counting layers rather than lines
* the thresholds
* the segment length
* the input word format and event framing
* dropping clusters beyond 160
* the FIFO at the clock crossing
* the organisation in two banks
* the recovery output format
* the number of Low-Resources layers, their radii, the sub-range count and
  the Scan r band
* the Low-Resources HT running on a single clock

The following are not implemented:
* the host link (PCIe)
* the z-slicing of events
* duplicate removal
* track fitting

No FPGA resource or clock-rate results are claimed for this RTL.

## Files

| file | contents |
|---|---|
| `rtl/ht_pkg.sv` | sizes, formats, slope constants, row/column mask helpers |
| `rtl/cdc_fifo.sv` | dual-clock FIFO |
| `rtl/line_drawer.sv` | segment-copy line drawing |
| `rtl/ht_accumulator.sv` | per-layer hit-bit accumulator |
| `rtl/peak_finder.sv` | row scan and threshold |
| `rtl/cluster_mem.sv` | per-layer cluster store |
| `rtl/cluster_recovery.sv` | second pass over the stored clusters |
| `rtl/flex_ht.sv` | Flexible HT |
| `rtl/lr_range_sel.sv`, `rtl/lr_pattern_rom.sv`, `rtl/lr_ht.sv` | Low-Resources HT |
| `rtl/ht_top.sv` | both finders |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_ht_ref.sv` | reference arithmetic shared by the testbenches |

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. For example, to run the full-size test of
both finders with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_ht_top \
        -Irtl -Itb rtl/ht_pkg.sv tb/tb_ht_ref.sv rtl/*.sv tb/tb_ht_top.sv
    ./obj_dir/Vtb_ht_top

Replace `tb_ht_top` with any other testbench name. All testbenches use the
default sizes, except `tb_ht_accumulator`, `tb_peak_finder` and
`tb_cdc_fifo`, which use small ones.

* `tb_flex_ht` sends four events back to back. One has a track that is alone,
  one has two tracks and noise, one has a layer that overflows, and one is
  empty. Loading of one event overlaps the scan of the previous one. Every output word is compared with a model that computes the lines
  directly from the formula. It checks that input stalls, output
  back-pressure, overflow and rows with several candidates all occur.
* `tb_lr_ht` runs Fix r and Scan r instances side by side. It compares both
  with a model that evaluates the pattern formula in floating point.
* Building `tb_lr_ht` takes a few minutes, because the pattern tables are
  computed during elaboration. The other testbenches build in under a minute.

## Changing the design

* Sizes are parameters: `N_ROWS`, `N_COLS`, `N_LAYERS`, `DEPTH`, `THRESH`,
  `N_BANKS`, `SEG` (which must divide `N_ROWS`), `NSUB`, `R_MM`, `SCAN_R` and `R_HALF`.
  The defaults of `ht_top` are the sizes given above.
* The qA/pt range and the region width are `QAPT_MAX` and `PHI_REGION_W` in
  `ht_pkg`. The slope constants are derived from them.
* `MAX_PHI0` (64) in `ht_pkg` limits the number of columns.
