# Streaming curvature classification of range maps

This RTL labels every pixel of a range map (a depth image) with the local
shape of the surface there: plane, ridge, valley, peak, pit or saddle. It
runs at several scale levels at the same time. The labels come from the
signs of the mean curvature H and the Gaussian curvature K (HK
segmentation):

| sign H | sign K | surface |
|---|---|---|
| 0 | 0 | plane |
| + | 0 | valley (concave cylinder) |
| − | 0 | ridge (convex cylinder) |
| + | + | pit (concave ellipse) |
| − | + | peak (convex ellipse) |
| any | − | saddle (hyperbolic) |

The map streams in as vectors of eight neighbouring samples, and results
stream out at a fixed rate. No frame is buffered: the processors keep only
the rows that their difference operators need.

Two processor types are provided. They are alternatives with the same
interfaces:

* **Type 1 (`dcp1`)** uses one-sided (backward) differences. It needs a
  single row of memory, and its results for a vector leave a few clocks after
  the vector arrives. The price is noisier derivatives. Its thresholds are
  8 bits with 6 fraction bits, and it takes 22 clocks per vector.
* **Type 2 (`dcp2`)** uses centred, rounded differences over a 5 x 5
  neighbourhood. It needs four rows of memory, and its results lag the
  input by two rows. Its thresholds are 12 bits with 11 fraction bits, and it
  takes 32 clocks per vector.

The top level, `dcp_top`, builds one scale-space pipeline of each type.
Each pipeline is a chain of three processors. While processor *s* classifies
level *s*, it also averages 2 x 2 blocks into level *s+1*. Processor *s+1*
reads that new level through the same handshake that processor 0 uses
towards the range-map source. All levels are therefore processed at once,
and the whole pyramid takes no longer than level 0 alone.

## Data formats (`dcp_pkg`)

* **Range word**, 32 bits:
  `{empty[31], valid[30], Z[29:20], Y[19:10], X[9:0]}`. X, Y and Z are
  unsigned 10.3 fixed point (0 to 127.875). Only Z enters the curvature.
  X, Y and the valid flag are carried into the next scale level.
* **Range vector** `rvec_t`: eight range words for columns u .. u+7 of one
  row. It is declared `[0:7]`, so word 0 (column u) is the most significant
  word of the 256-bit vector. The map is read in raster order, so vector *i*
  holds row `i / (COLS/8)`.
* **Classification word** `class_word_t`, 32 bits:
  `{label[31:16]=0, 6'b0, sign_H[9:8], 6'b0, sign_K[1:0]}`. Signs use 2-bit
  two's complement: `00` zero, `01` positive, `11` negative. A
  classification vector `cvec_t` holds eight of these words in the same lane
  order as `rvec_t`.

## Curvature signs without division (`hk_logic`)

With E = 1+Zx², F = ZxZy, G = 1+Zy², e = Zxx, f = Zxy, g = Zyy and
norm = 1+Zx²+Zy², the curvatures are:

```
K = (e·g − f²) / (norm·(E·G − F²))
H = (2fF − eG − gE) / (2·(E·G − F²)·√norm)
```

Only the signs after thresholding are needed, where a value inside ±T counts
as zero. Each fraction is therefore split into a numerator P and a
denominator B, and the unit compares `|P|` with `T·|B|`. The sign is then
`sign(P)·sign(B)`. No divider is used.

Every product is kept at full width, and the fixed-point points are lined up
by shifting P. The unit is a 7-stage pipeline and accepts one pixel per
clock. A pixel exactly on the threshold counts as non-zero.

Each processor has eight of these units, one per lane. The thresholds may
change at any time and apply from the clock on which they are compared.

### Square root (`sqrt_pwl`)

√norm takes norm as unsigned 22.6 and returns unsigned 11.3. It works in
three ranges:

* **Below 64:** an exact look-up table of `floor(8·√(k/64))/8`, with 4096
  entries built at elaboration. This is where flat surfaces land.
* **64 to 65536:** 20 straight-line segments `y = a·x + b`. Their nodes are
  64, 128, 192, 256, 384, 512, 1024, 2048, 4096, 6144, 8192, 12288, 16384,
  20480, 24576, 32768, 38912, 45056, 50176 and 55296. The nodes are dense
  where norm usually lies.
* **Coefficients:** each segment's `a` and `b` is the least-squares line fit
  of √x over that segment, rounded to unsigned 25.18.

The worst error above 64 is under 0.75. The square root only scales the H
denominator, so this error matters only for pixels whose |H| lies within a
few percent of Th. The latency is three clocks.

## Type 1: backward differences (`dcp1`)

```
Zu  = Z[v,u]  − Z[v,u−1]      Zv  = Z[v,u]  − Z[v−1,u]
Zuu = Zu[v,u] − Zu[v,u−1]     Zvv = Zv[v,u] − Zv[v−1,u]
Zvu = Zv[v,u] − Zv[v,u−1]
```

The processor is built from these blocks:

* **Row differences** (`du_logic`, used for Zu, Zuu and Zvu) keep one
  sample: the last one of the previous vector. That register reads as zero
  at the start of a row.
* **Column differences** (`dv_logic`, used for Zvv) keep one row in a block
  memory. For each vector they read the word at its column and then write
  the new vector back.
* **First column difference plus scale kernel** (`dv_scale_logic`): its row
  memory stores whole range words, so the 2 x 2 kernel (`scale_space_gen`)
  shares it.
* **Scale kernel** (`scale_space_gen`): on odd rows it averages the current
  and previous rows. The division by 4 is a 2-bit right shift of the 12-bit
  sum.
  * An even vector gives output lanes 0..3, and the next odd vector gives
    lanes 4..7 and completes the next-level vector.
  * The new valid flag is the AND of the four input flags.

Each bit width grows by one per difference stage: Z is 10 bits unsigned, the
first differences are 11 bits signed, and the second differences are 12
bits signed.

Zero is read outside the map, so the top two rows and left two columns get
results, but those results are meaningless.

## Type 2: centred differences (`dcp2`)

```
Zu  = rnd((Z[v,u+1] − Z[v,u−1]) / 2)
Zv  = rnd((Z[v+1,u] − Z[v−1,u]) / 2)
Zuu = rnd((Z[v,u+2] − 2Z[v,u] + Z[v,u−2]) / 4)
Zvv = rnd((Z[v+2,u] − 2Z[v,u] + Z[v−2,u]) / 4)
Zvu = rnd((Z[v+1,u+1] − Z[v+1,u−1] − Z[v−1,u+1] + Z[v−1,u−1]) / 4)
```

`rnd` drops the low bits and adds back the highest dropped bit, which rounds
half up. Setting `ROUND=0` gives plain truncation instead.

**Window** (`dcp2_window`). The window block is the hardest part.
* **Memory:** the block memory has one word per column block. Each word
  holds that block for rows v−1, v−2, v−3 and v−4.
* **Per input vector** (row v, block j), it does three things:
  * reads the word;
  * writes back {v, v−1, v−2, v−3};
  * appends the resulting 5-row column to a three-block window.
* **Emission:** when block j arrives, block j−1 of row v−2 has all its
  neighbours. It is emitted as a 5 x 12 Z window: the 8 centre columns plus
  2 on each side.
* **End-of-row flush:** the last block of a row is emitted one clock after
  it arrives, with zeros to its right. The next vector must not arrive on
  that clock; the fixed vector period ensures this.

**Derivatives** (`dcp2_deriv`) computes all five derivatives for eight
pixels in one clock.

**Output:**
* Results for row r are written when row r+2 streams in.
* The last two rows of a map produce no output, so a frame yields ROWS−2
  result rows.
* Samples outside the map read as zero.

**Scale kernel:** this type has a separate `scale_space_gen`. It takes the
incoming vector and the row above from the same memory read.

## Interfaces and pacing (`dcp_ctrl`, `out_writer`, `scale_port`)

**Source handshake:**
1. The processor pulses `read_cmd` for one clock, with
   `src_addr = src_base + 32·index`.
2. The source answers, any number of clocks later, by putting the vector
   on `r_vec` and pulsing `read_done`.

The same handshake connects the levels of a pipeline: `scale_port` answers
the next processor's `read_cmd` from a two-entry buffer of next-level
vectors.

**Output handshake:**
1. One `wr_cmd` pulse carries eight classification words, with
   `wr_addr = dst_base + 32·index`.
2. The sink acknowledges with `wr_done`.

A four-entry buffer decouples the datapath from the sink. Holding `wr_done`
high turns the processor into a plain streaming source, which is stream
mode.

**Pacing:**
* A new vector is requested exactly `VEC_PERIOD` clocks after the previous
  request: 22 for type 1 and 32 for type 2.
* A request that is due is held back (a stall) while the datapath still
  holds a vector, while the output buffer has fewer than two free entries,
  or while the next-level buffer is full.
* `stall_count` counts those clocks.
* `frame_done` pulses once the last classification has been acknowledged.

**Scale count:** `ss_count` is sampled with `start` and selects how many
levels run (1..3). Levels at or beyond it stay idle, and the last active
level produces no further level.

## Timing

| | type 1 | type 2 |
|---|---|---|
| clocks per 8-pixel vector | 22 | 32 |
| 128 x 128 map (2048 vectors) | 45056 clocks | 65536 clocks |
| at the intended clock | 451 µs @ 100 MHz | 1.31 ms @ 50 MHz |
| first result after its input vector | 12 clocks | two rows + two vectors |

* The deeper levels have a quarter of the vectors each and run during level
  0, so three levels take as long as one.
* Per map, the published figures are 47104 and 67584 clocks, which is one
  clock more per vector than the published per-vector rates of 22 and 32.
  This design follows the per-vector rates.

## Where this design departs from the published description

* **Zuu and Zvv sign (type 2):** the published formulas subtract the outer
  sample (`− Z[v,u−2]`). That is not a second difference, since a flat
  surface would give a non-zero result. The sign is corrected here.
* **Positive sign code:** one published table gives `10` for a positive
  sign, but the classification table and the two's-complement rule give
  `01`. `01` is used.
* **Scale-kernel output half:** the output half is selected by the LSB of
  the vector index. The published text names bit 2 of the column.
* **Intermediate widths in the HK unit:** the published hardware truncates
  some intermediate products, but the widths are not given. Here every
  product keeps full width.
* **Not published, so chosen here:** the square-root coefficient values and
  the table for [0, 64), the output write handshake, the stall rule, the
  buffer depths, the address step of 32 bytes per vector, and all latencies.
* **Not built:**
  * the gradient (debug) output variant;
  * the single-processor variant that re-reads every level from memory;
  * the serial variant with one shared HK unit;
  * the CPU, memory controller and software around the processors. Their
    handshakes are the top's ports.

## Files

| file | content |
|---|---|
| `rtl/dcp_pkg.sv` | types and constants |
| `rtl/sqrt_pwl.sv` | piecewise-linear square root |
| `rtl/hk_logic.sv` | H/K sign unit |
| `rtl/du_logic.sv`, `rtl/dv_logic.sv` | row / column differences |
| `rtl/scale_space_gen.sv`, `rtl/dv_scale_logic.sv` | 2 x 2 scale kernel; column difference sharing its row memory |
| `rtl/dcp_ctrl.sv` | source handshake, counters, pacing, frame end |
| `rtl/vec_fifo.sv`, `rtl/out_writer.sv`, `rtl/scale_port.sv` | buffers, output handshake, next-level port |
| `rtl/dcp1.sv` | type-1 processor |
| `rtl/dcp2_window.sv`, `rtl/dcp2_deriv.sv`, `rtl/dcp2.sv` | type-2 window, derivatives, processor |
| `rtl/dcp_top.sv` | the two three-level pipelines |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_ref_pkg.sv` holds the floating-point reference classifier and a synthetic scene |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
A watchdog ends any run that hangs. For example, to run the top at the full
128 x 128 size with three levels:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv \
  --top-module tb_dcp_top_full rtl/dcp_pkg.sv tb/tb_ref_pkg.sv tb/tb_dcp_top_full.sv
./obj_dir/Vtb_dcp_top_full
```

To run another testbench, change the top module and the last file. `-y rtl`
lets verilator find the modules it needs. The two packages are listed
first, because other files import them.

**What the testbenches check:**
* **Reference model:** a floating-point model classifies every pixel from
  its own derivatives and compares the result with the hardware. Pixels
  whose |H| lies within 15 % of Th are not judged, because the square root
  is approximate.
* **End-to-end testbenches** (`tb_dcp_top` on a 16 x 64 map,
  `tb_dcp_top_full` at 128 x 128):
  * run four frames: fast, slow with random acknowledges, one level in
    stream mode, and two levels;
  * check addresses, vector periods and frame times;
  * count the stalls, inter-level transfers, scale-count changes,
    end-of-row flushes, frame_done pulses and stream-mode writes, and fail if
    any never happened.

The full-size run takes about five seconds.
