# Gaussian-pyramid tracking engine: multiresolution correlation for tracking, mosaics and stabilisation

This design finds a set of targets in every video frame and reports how they
moved. It is built around two engines:

- a **pyramid engine** reduces each frame into a Gaussian pyramid: level 0 is
  the frame, and every further level is a low-pass filtered copy at half the
  width and half the height;
- a **correlation engine** compares a stored target with every candidate
  position in a search window and keeps the best match. The match is
  measured by SAD, SSD or normalised cross correlation.

The two engines work together in a coarse-to-fine search. The whole image is
searched only at the coarsest level, where a 512x512 frame is 64x64 pixels
and a 40x40 target is 5x5. Each finer level then searches just a few
positions around twice the previous answer. After the search, each target's
stored picture is refreshed from the new frame, so a slowly turning or
deforming object stays tracked. A small voting unit combines the movements of
all targets into one global movement vector. A target that was lost cannot
pull that vector away from the majority.

The global vector is all that the mosaic and stabilisation applications need
from the hardware. A host program uses it to place a frame in a mosaic or to
cut the stabilised sub-image. That host-side composition is not part of this
RTL.

Everything is plain synthesizable SystemVerilog (IEEE 1800-2017) with one
module per file in `rtl/`. The top module is `pyramid_tracking_system`.

## What happens in one frame

```
 host writes frame ──► data memory (level 0)
                            │
   start ──► tracking_controller
               1. pyramid_architecture: level 0 → 1 → 2 → 3 (same memory)
               2. first frame : targets take their initial positions
                  later frames: for each target, multires_controller runs
                                correlation_architecture at level 3 (whole image),
                                2, 1, 0 (±2 positions) → new position, (dy,dx)
               3. target_updater: copy each target's patch, all levels,
                                  into its slot of the target memory
               4. voting_system: global (dy,dx) of the majority
   done ◄──────┘   pos_row/pos_col, vec_dy/vec_dx, votes
```

The data memory has a single port. At any time the memory-bus multiplexor
(`bus_mux`) gives it to one master: the host, the pyramid or the tracker.
The tracking controller chooses the owner from its phase. A second
multiplexor gives the target memory to the correlation reads or to the
updater writes.

### Memory layout

- **Data memory:** level 0 starts at address 0, stored row by row, and each
  level follows the one before it. With a 512x512 frame the levels start at 0,
  262,144, 327,680 and 344,064, for 348,160 bytes in total. Width and height
  must be powers of two.
- **Target memory:** each target has a slot of
  `sum_l (TMAX>>l)^2` bytes (21,760 for TMAX=128). Inside a slot, level `l`
  is stored with a row stride of `TMAX>>l`. A target at level `l` occupies
  `(h>>l) x (w>>l)` of that space.

## The pyramid engine

Each output pixel is

```
g_l(i,j) = ( sum_{m,n=-2..2} w(m,n) * g_{l-1}(2i+m, 2j+n) + 128 ) >> 8
w(m,n)   = w^(m) w^(n),   w^ = [1 4 6 4 1] / 16
```

Input pixels outside the image are replaced by the nearest edge pixel. The
mask is 5x5, separable, normalised and symmetric. `coeff_rom` stores it as
25 integers that sum to 256, so normalising is a shift.

**Processor of pyramidal convolution (`pyramid_processor`).** A processor
contains:

- five shared image registers: a shift register holding the last five pixels
  of a row;
- one coefficient memory;
- two convolution modules, each with its own control generator and register
  bank.

Module 0 builds output row `orow0` and module 1 builds row `orow0+1`. Every
input row is read once, and each module uses it with its own mask row:

- the control generator computes `tap = vrow - 2*orow + 2` and fetches mask
  row `tap` when it is between 0 and 4;
- the convolution module multiplies the five image registers by that mask row
  and adds the five products;
- the register bank adds the sum into the accumulator of its output column.

The first mask row loads the accumulator instead of adding to it. After five
rows the bank holds a finished output row.

**Address generator and schedule.** The address generator builds one level at
a time, in passes of `2*NPROC` output rows (two per processor). A pass has
four steps:

1. **Read.** Virtual input rows `2*j0-2 … 2*j0+4*NPROC` are read. Each row
   runs from virtual column -2 to W+1, one pixel per cycle, with the address
   clamped at the image edges. Every processor sees every pixel.
2. **Drain.** Two cycles let the last pixels reach the accumulators.
3. **Write-back.** The banks are now full, and `irq` pulses for one cycle.
   Every bank that holds a real output row is copied to the data memory at
   one pixel per cycle: the bank is read in one cycle and the memory is
   written in the next.
4. **One idle cycle** frees the memory port for the next pass.

So a pass costs `(4P+3)(Win+4) + 2 + rows*Wout + 1` cycles, where `P` is
NPROC and `rows` is the number of output rows in the pass. It costs one more
cycle when the last pass is short. `cycles` reports the count from start to
done.

When a pixel arrives from memory at cycle t, it is shifted in at the end of
t. In cycle t+1 the window holds columns `c-4 … c`. When `c` is even and at
least 2, the window is centred on input column `c-2`, and the result goes to
output column `(c-2)/2`.

## The correlation engine

`correlation_architecture` searches one window of candidate top-left
positions at one level. The `mode` input chooses the measure:

| Mode | Term per pixel pair | Better match |
|---|---|---|
| `CORR_SAD` | `|i-t|` | smaller sum |
| `CORR_SSD` | `(i-t)^2` | smaller sum |
| `CORR_NCC` | `i*t`, plus the energy term `i*i` | larger correlation |

Here `i` is the image pixel and `t` the target pixel.

**NCC without a divider.** Normalised cross correlation is
`n / sqrt(d * e)`, where:

- `n = sum(i*t)`;
- `d = sum(i*i)`;
- `e = sum(t*t)`.

The target energy `e` is the same for every candidate, so ranking by
`n / sqrt(d)` gives the same order. Two candidates a and b are compared
exactly, without a square root or a division:

```
a better than b  <=>  n_a^2 * d_b > n_b^2 * d_a
```

This is a 64x32-bit product on each side, written once as the package
function `corr_better`. For NCC each correlation register holds a second
accumulator for `d`. An all-black patch (`d = 0`) loses to every other
candidate.

**Four candidates per cycle.** `correlation_controller` takes candidates
four columns at a time. Its Current Row register holds `r` and its Current
Column register holds `c0`. For each target row `tr` it reads image pixels
`(r+tr, c0+k)` for `k = 0 … tw+2`, together with target pixel `(tr, k-3)`.
After three reads, the four image registers hold columns `c0+k-3 … c0+k`.
These are exactly the pixels that candidates `c0 … c0+3` compare with target
column `k-3`. Each cycle, the four `correlation_function`s produce four terms
and the four `correlation_registers` accumulate them. A group of four
candidates costs `th*(tw+3)` cycles. Columns beyond the window are masked.

**Pipeline.**

| Cycle | Step |
|---|---|
| t | address issued |
| t+1 | data returned and loaded into the registers |
| t+2 | terms accumulated |
| t+3 | finished group compared |

In cycle t+3, `local_comparator` picks the best of the four candidates.
`global_comparator` replaces the Best Global Register, and the Best Row and
Best Column registers, only when the new candidate is strictly better. The
first best candidate in scan order therefore wins. `done` pulses once the pipeline has drained, a few cycles after the
last read (start to `done` is `groups*th*(tw+3)+6` cycles).

**Coarse to fine (`multires_controller`).**
- At level `LEVELS-1` the whole image is searched: every position where the
  target fits.
- At each finer level, the search centres on twice the previous answer and
  covers ±`SEARCH_R` positions, clipped to the image.
- The level-0 answer is the target's new position.

**Target update (`target_updater`).** For every level `l`, the updater copies
the `(h>>l) x (w>>l)` pixels at `(row>>l, col>>l)` of the frame's pyramid into
the target's slot, at one pixel per cycle. This gives the target pyramid
directly. No separate reduction of the target is needed.

**Voting (`voting_system`).** Two movements agree when both components differ
by at most `TOL` (1) pixel. The target with the most agreeing targets,
itself included, wins; on a tie the lowest index wins. Its movement becomes
the global vector and `votes` gives the size of its group.

## Top-level interface (`pyramid_tracking_system`)

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst` | in | clock; synchronous active-high reset |
| `host_re`, `host_we`, `host_addr[19:0]`, `host_wdata[7:0]` | in | host access to the data memory. Only legal while `busy` is low. |
| `host_rdata[7:0]` | out | read data, one clock after the address |
| `start` | in | one-cycle pulse that processes the frame now in memory |
| `first_frame` | in | frame without correlation: targets take `init_row/init_col` |
| `mode` | in | `CORR_SAD`, `CORR_SSD` or `CORR_NCC` |
| `num_targets[2:0]` | in | 1 … MAX_TARGETS |
| `tgt_h`, `tgt_w` | in | target size at level 0 (at most 2^LOG2_TMAX) |
| `init_row[]`, `init_col[]` | in | initial top-left corners, used on the first frame |
| `busy`, `done` | out | busy while a frame runs; `done` pulses at the end |
| `pos_row[]`, `pos_col[]` | out | current top-left corner of each target |
| `vec_dy`, `vec_dx`, `votes` | out | global movement vector and the size of its group |
| `pyr_cycles` | out | cycles of the last pyramid build |
| `pyr_irq` | out | pulses at each register-bank write-back |
| `bus_owner`, `corr_done`, `corr_lvl`, `update_done` | out | progress: who owns the data memory, each finished search window and its level, each refreshed target |
| `bus_error` | out | set until reset if a master requested the data memory without owning it |

To process a frame, the host:

1. writes `2^LOG2_W * 2^LOG2_H` pixels to addresses `0 …`;
2. pulses `start`, with `first_frame` high for the first frame;
3. waits for `done`.

The pyramid levels can be read back through the host port.

### Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `LOG2_W`, `LOG2_H` | 9, 9 | frame of 512x512 pixels |
| `LEVELS` | 4 | pyramid levels 0 … 3 |
| `NPROC` | 1 | processors of pyramidal convolution |
| `MAX_TARGETS` | 5 | number of target slots |
| `LOG2_TMAX` | 7 | largest target side, 128 pixels |
| `SEARCH_R` | 2 | refinement radius at each finer level |

The pixel width is 8 bits. Accumulators are 16 bits in the pyramid and 32
bits in the correlation engine.

## Performance

All figures are measured in simulation with a 512x512 frame at the defaults.
The "reported" numbers are those published for the original FPGA
implementation. Times assume a 25 MHz clock.

| Pyramid, processors | 1 | 2 | 3 | 4 |
|---|---|---|---|---|
| this design, cycles | 695,074 | 564,370 | 526,649 | 499,018 |
| reported, cycles | 696,613 | 464,444 | 386,923 | 348,568 |

With one processor the schedule matches the reported count to within 0.2%.
Extra processors help less here than in the reported figures, because this
design reads one pixel per cycle from one memory port. Extra processors only
save re-reads of input rows.

| Tracking, cycles per target after the pyramid | 40x40 | 60x120 | 80x80 |
|---|---|---|---|
| this design | 61,258 | 222,888 | 196,833 |
| reported (per added target) | ≈34,000 | ≈96,500 | ≈110,600 |

Most of a target's cost is the full search at the coarsest level, plus the
level-0 refinement, at one candidate group of four per `th*(tw+3)` cycles.

A whole frame here costs the pyramid plus the tracking, one after the
other. For one 40x40 target that is 695,074 + 61,258 ≈ 756,000 cycles. The
reported whole-frame throughput for that case is 414,928 cycles, which is
less than the reported single-processor pyramid alone. The reported tracking
runs must therefore have overlapped the pyramid with correlation, or used a
faster pyramid. This design does neither: the data memory has one port, and
the engines take turns on it.

## How far to trust it, and where it is this design's own

The sources of the design are:

- **From the source description:** the block structure of both engines;
- **From the source description:** the order of operations in a frame;
- **From the source description:** coarse-to-fine search from a whole-image
  search at the coarsest level;
- **From the source description:** target updating and majority voting;
- **From the source description:** the 512x512, four-level example;
- **From the source description:** up to five targets and the target sizes
  above.

The following are choices of this design:

- the binomial weights;
- edge replication at the borders;
- rounding;
- the way the two convolution modules of a processor share a pass;
- the pass schedule and memory layout;
- the four-adjacent-columns candidate scheme;
- the ±2 refinement window;
- taking the target pyramid from the frame pyramid;
- the voting tolerance, and using the winner's vector rather than an average;
- initial target positions come from input ports on the first frame, not from
  a parameter area in memory;
- every target has a fixed slot sized for the largest target, instead of
  addresses packed according to the actual target sizes;
- NCC ranked by cross-multiplication, without a square root, a division or
  mean removal.

Known limits:

- **NCC is weak on flat patches.** NCC is computed without removing the
  mean. On the nearly flat, blurred patches of the coarsest level, the true
  match and its neighbours score almost the same. A sub-pixel change of the
  coarse target is then enough to pick a neighbour. SAD and SSD are much
  more robust here. The end-to-end NCC frame therefore moves objects by whole
  coarse pixels.
- **One winner per level.** The search keeps a single winner at each level. A
  coarse-level match can land on a different object if two objects look
  alike once blurred to 1/8 size. The testbenches use objects of clearly
  different brightness.
- **Power-of-two frames.** Frame width and height must be powers of two.
- **Host software is not included.** This covers the mosaic composition, the
  stabilised-window display and the host transfer software.

## Simulation

Every testbench in `tb/` is self-checking and ends with
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --top-module tb_pyramid_tracking_system \
  -y rtl -y tb +libext+.sv -Irtl rtl/pyr_pkg.sv tb/tb_pyramid_tracking_system.sv
./obj_dir/Vtb_pyramid_tracking_system
```

| Testbench | What it shows |
|---|---|
| `tb_pyramid_tracking_system` | Four frames at 128x128 with three levels. Four objects, three moving together and one on its own. Checks exact positions, the global vector, the out-voted target, pyramid pixels read back through the host port, and that every mechanism occurs (write-back interrupt, first frame, full and refined searches, updates, SAD, SSD and NCC, each bus owner). |
| `tb_pyramid_tracking_system_full` | The same scenario at the default size: 512x512, four levels, 40x40 targets. Runs in seconds. |
| `tb_pyramid_workload` | Full-size pyramid with 1-4 processors. Checks every pixel against a reference model and every cycle count against the schedule. |
| `tb_tracking_workload` | Full-size tracking of 1-5 targets at 40x40, 60x120 and 80x80. Checks every position and prints the cycle counts above. |
| `tb_<block>` | Unit tests of each module against models computed in the testbench. |

Simulations need no data files. Images are generated with `$urandom` inside
the testbenches.
