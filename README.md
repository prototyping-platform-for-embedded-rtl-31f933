# NSSD patch-search accelerator for monocular EKF-SLAM

A feature-based monocular SLAM (MonoSLAM-style EKF) spends most of its time on
one job: for every tracked feature it must find where that feature's 11x11
pixel patch moved to in the new camera frame. The filter predicts a small search
region, typically 20 to 24 pixels across. The patch is compared with every 11x11
window inside the region, and the window with the lowest Normalised Sum of
Squared Differences (NSSD) wins. On a dual-core ARM Cortex-A9, this correlation
loop takes more than half the run time of the whole SLAM program.

This RTL is an FPGA kernel that takes over the whole window loop, not just one
correlation. The host hands it the reference patch and the complete search
region once. The kernel caches both on chip and scores every window at one
window line (11 pixels) per clock. It then returns a single record: the best
NSSD and the window position where it occurred. The target system is a Cyclone V
SoC (DE1-SoC). There the ARM side runs Linux and the SLAM program, and the
kernel sits in the FPGA fabric, reached through the HPS-FPGA bridges.

## What the NSSD is, and how the kernel computes it

For a reference patch `f` and a candidate window `t`, both of n = 121 pixels:

    NSSD = 1/n * sum( (f - mean_f)/sigma_f - (t - mean_t)/sigma_t )^2

Gain and offset changes in brightness do not affect it. It is 0 for a perfect
match, about 2 for unrelated patches and 4 for an inverted copy.

Computed literally, this needs three passes over the pixels (means, then
deviations, then the sum). The kernel uses a one-pass form instead. A single
loop gathers five integer sums:

    Sf = sum f     St = sum t     Sf2 = sum f^2     St2 = sum t^2     Sft = sum f*t

The rest is closed-form arithmetic on those five numbers. It is rearranged over a
common denominator, so each window needs only one division:

    mean_f = Sf/n,  var_f = Sf2/n - mean_f^2,  sigma_f = sqrt(var_f)    (same for t)
    G      = mean_f*sigma_t - mean_t*sigma_f
    Num    = Sf2*var_t + St2*var_f + n*G^2 - 2*Sft*sigma_f*sigma_t
             + 2*G*(St*sigma_f - Sf*sigma_t)
    Den    = var_f * var_t
    NSSD   = (Num/Den) * (1/n)

Every division by n becomes a multiplication by the constant 1/n. The five sums
are exact integers: 15 bits for the plain sums and 23 bits for the squares and
products. Everything after them is IEEE-754 single precision.

Expanding the definition shows that `Num/Den` equals the NSSD times n. The
testbenches check the hardware against the literal three-pass formula, computed
in double precision.

## Block structure

    host (ARM) --32-bit control slave--> kernel_csr
                                             |
                        +--------------------+---------------------+
                        v                                          |
    global memory <== gm_loader ==> local_mem (patch, 121 B)       |
     (DDR3)      |               => local_mem (region, 1600 B)     |
                 |                         | 11 px + 11 px / clk   |
                 |                   scan_ctrl -> sums_unit -> nssd_unit -> min_tracker
                 |                                                             |
                 +<========== result_writer <==================================+

| module | role |
|---|---|
| `nssd_search_kernel` | top; sequences LOAD, SCAN, WRITE and shares one bus master between loader and writer |
| `kernel_csr` | argument registers, start/status, cycle and stall counters |
| `gm_loader` | pipelined read master; copies the patch, then the region, into local memory, 4 pixels per word |
| `local_mem` | byte store; 4-byte masked write port, 11-pixel line read port (one-cycle latency) |
| `scan_ctrl` | walks window positions (v outer, u inner) and the 11 lines of each window, one line per clock |
| `sums_unit` | unrolled line datapath: 11 pixels of each patch per clock into the five running sums |
| `nssd_unit` | 9-stage single-precision pipeline from sums to NSSD; accepts one window per clock |
| `min_tracker` | keeps the strictly smallest NSSD and its (u, v); the first of equal scores wins |
| `result_writer` | writes the 3-word result record to global memory |
| `nssd_pkg` | constants (`PATCH` = 11), types, and the float helper functions |

### The scan and its timing

The reason for the local memories is the line rate. Each clock, the scan reads
line `r` of the reference patch and line `v+r`, columns `u..u+10`, of the
region. These are 22 byte reads per clock. Global memory could not supply them
without stalls, but the on-chip copy can. The line loop is fully unrolled, with
11 multipliers per product term, and a new line enters every clock. Windows
follow each other without a gap, so:

    scan cycles = (W - 10) * (H - 10) * 11      for a W x H region

A fixed drain follows: 1 cycle of memory read, 1 in the sums unit and 9 in the
NSSD pipeline. Neighbouring windows share 10 of their 11 columns, but the
design still re-reads them from the on-chip copy. This costs nothing in time,
because the line rate limits the scan, not memory bandwidth.

A complete run is:

1. **LOAD**: `(121 + W*H)/4` word reads, issued back to back while
   `waitrequest` is low, with results taken in order from `readdatavalid`.
2. **SCAN**: as above.
3. **WRITE**: three word writes.

In simulation, with a memory that stalls on 25% of cycles, a 24x24 region
(196 windows) takes about 2,400 cycles. A 40x40 region (900 windows, the
largest size in the evaluation this design targets) takes about 10,500 cycles.
At the 125 MHz the kernel was clocked at, that is about 19 us and 84 us.

### Number formats and accuracy

The float operators in `nssd_pkg` are small combinational functions: add,
multiply, divide, square root and compare. They support normal numbers and zero
only. They truncate instead of rounding, and they flush subnormal values to zero.
The reference kernel was also compiled with relaxed, reduced-rounding float
options, so bit-exact IEEE results were never the goal. In the same spirit, the
four numerator terms are added as a balanced tree, `(a + b) + (d - c)`, rather
than left to right.

Against a double-precision NSSD, the pipeline stays within 1e-2 absolute plus
0.1% relative on random, identical, inverted and gain/offset-changed patches.
An exact match typically scores around 1e-6.

**Flat windows.** When either patch has all pixels equal, its variance is zero
and the NSSD is undefined. The float variance of such a patch does not come out
as exactly zero; a rounding residue remains. The unit therefore detects
flatness exactly, on the integer sums (`n*S2 == S1^2`), and scores the window
+infinity. A flat window therefore never wins. If every window of a region is
flat, or the region is smaller than 11 pixels in either direction, the result
NSSD is +infinity and the `found` status bit stays 0.

## Host interface

### Control registers

The control slave has 32-bit data and a read latency of 1.

| index | name | access | meaning |
|---|---|---|---|
| 0 | CTRL/STATUS | W: bit0 = start; R: bit0 busy, bit1 done (sticky), bit2 found | start is ignored while busy; a start clears done and the counters |
| 1 | REF_BASE | R/W | byte address of the 11x11 patch (121 bytes, row-major) |
| 2 | REG_BASE | R/W | byte address of the search region (W*H bytes, row-major) |
| 3 | RES_BASE | R/W | byte address of the 3-word result |
| 4 | REG_W | R/W | region width in pixels (at most 40) |
| 5 | REG_H | R/W | region height in pixels (at most 40) |
| 6 | CYCLES | R | cycles the kernel was busy in the last run |
| 7 | STALLS | R | cycles the loader's reads were held by `waitrequest` |

The `irq` output follows the done flag.

### Memory layout and result record

Pixels are unsigned 8-bit grey levels, packed four per 32-bit word,
little-endian. Pixel `i` is in byte lane `i % 4`. Both buffers start
word-aligned. The result record is:

    RES_BASE+0  NSSD of the best window (IEEE-754 single)
    RES_BASE+4  u: column of the best window's top-left pixel in the region
    RES_BASE+8  v: row of the best window's top-left pixel in the region

The host turns (u, v) into a frame position. It adds the region's origin in
the frame, plus `PATCH/2` = 5 in each direction if it wants the window centre,
as a MonoSLAM-style search does. It also computes the search box from the
predicted feature position and its innovation covariance, and clips the box to
the image. Those steps stay in software.

### Bus protocol

The master port `avm_*` follows Avalon-MM conventions:

- A request and its address are held while `waitrequest` is high.
- Read data returns any number of cycles later, with `readdatavalid`, in
  request order.
- Reads and writes never overlap; an assertion checks this.

Reset (`rst_n`) is asynchronous and active low. It clears control state only.

## Where this design departs from, or adds to, the kernel it follows

- **Source language.** The reference kernel was written in OpenCL and built
  by a vendor compiler. This is hand-written RTL with the same datapath: five
  integer sums, an 11-wide unrolled line loop at II = 1, a single division per
  window, and 1/n as a multiplier constant.
- **Local memory replication.** The original compiler replicated each local
  memory 3 times to serve the 11 loads per clock. Here the memory is one byte
  array with an 11-wide read port, and banking is left to synthesis.
- **Read latency.** The local memory read is registered, with one clock of
  latency, as in an FPGA block RAM. The scan controller delays its line
  controls to match, so the line rate does not change.
- **Own choices.** These are all this design's own:
  - the control register map and the cycle and stall counters;
  - the bus protocols and the 32-bit word;
  - the byte packing;
  - the result layout and the top-left coordinate convention;
  - the v-major scan order;
  - the +infinity start value of the best score;
  - the handling of flat windows.
- **Region size limit.** The region is limited to `MAX_REGION` x `MAX_REGION`
  = 40 x 40 pixels. This covers the largest search evaluated for this kernel:
  900 window positions, a 30 x 30 grid. It also covers the 20 to 24 pixel
  regions seen while tracking. Larger regions need a larger `MAX_REGION`.
  Loader writes past the end of the region memory are dropped, and such
  windows read as zero.
- **Float arithmetic.** The float arithmetic truncates, as described above.
  Scores can differ from an IEEE round-to-nearest implementation in the last
  few bits. Near-ties between windows may therefore resolve differently.

## Not included

The ARM host, the DDR3 memory and its controller, the HPS-FPGA bridges, and the
board-support logic that the OpenCL tool flow generates are not part of this
RTL. The kernel's two bus ports are where they attach. For simulation,
`tb/gm_model.sv` models the global memory: fixed read latency, with
`waitrequest` raised at random.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. Shared testbench code is in
`tb/tb_ref_pkg.sv` (double-precision reference NSSD, float decoding) and
`tb/gm_model.sv`. For example:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/nssd_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/gm_model.sv \
      tb/tb_nssd_search_kernel.sv --top-module tb_nssd_search_kernel
    ./obj_dir/Vtb_nssd_search_kernel

For a unit testbench, replace the last file and the top module with
`tb/tb_<module>.sv` and `tb_<module>`; files that are not needed are ignored.

`tb_nssd_search_kernel` runs the top at its default parameters. It covers six
searches:

- an exact copy of a window in a 24x24 region;
- a gain/offset copy in a 40x40 region (900 windows);
- a random patch in a 21x23 region, whose last word is partial;
- a region with a flat block;
- a region too small to hold a window;
- an all-flat region.

It checks the best NSSD and its position against a double-precision search of
every window. It also checks that the time from the end of the load to the
write-back is 11 cycles per window plus a constant. Finally, it checks that
read stalls, write stalls, best-match updates, flat windows, an empty region
and a partial last word each occurred. It takes well under a second.

`tb_workloads` runs the two evaluations the kernel was sized for, again at
default parameters:

- **Benchmark sweep.** It uses square random regions of side 11 to 40, which
  gives 1, 4, 9, ..., 900 windows. The patch is cut from the region at a random
  place. Each run must return that exact place and an NSSD near 0, and its scan
  must take 11 cycles per window plus the same constant. It prints the kernel
  cycle count for every size. With 25% memory stalls, these range from about
  115 cycles (1 window) to about 10,500 cycles (900 windows).
- **One tracking frame.** It tracks 15 features in a random frame, with search
  boxes 20 to 24 pixels across placed around a prediction up to 4 pixels off.
  Each reference patch is the true patch under a gain and offset change. Every
  feature must be found at its true centre. The whole frame takes about 26,000
  kernel cycles, roughly 14 us per feature at 125 MHz.

The unit testbenches, `tb_<module>.sv`, check each block on its own:

- `sums_unit`: the exact sums and the one-cycle output timing;
- `nssd_unit`: values, latency and flat-window handling;
- `scan_ctrl`: every address, and 11 cycles per window;
- `gm_loader`: byte-exact copies under random stalls;
- `local_mem`, `min_tracker`, `result_writer` and `kernel_csr`.

## Changing it

- `PATCH` (in `nssd_pkg`) is the patch side. If you change it, also widen
  `SUM1_W`/`SUM2_W` to fit `PATCH^2 * 255` and `PATCH^2 * 255^2`.
- `MAX_REGION` (on the top) sets the region memory, `MAX_REGION^2` bytes, and
  the index widths.
- The float helpers are plain functions. To meet a faster clock, split or
  retime the stages in `nssd_unit` (each stage holds up to three dependent
  operators). The throughput needed is only one window per 11 clocks.
