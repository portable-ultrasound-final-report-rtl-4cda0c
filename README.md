# Parallel quickhull engine for a portable ultrasound device

A small ultrasound device turns the echoes of one scan into a cloud of 2-D
points. It then shows the outline of that cloud: its convex hull. This RTL
computes the hull in hardware. It splits the cloud into blocks of 256 points
and runs eight quickhull processing elements in parallel, one per block.
A master core then merges the eight partial hulls into the hull of the whole
cloud, and the result is streamed to a display port.

Everything is synthesizable SystemVerilog. The analog parts are not designed
here. That means the transducer and its pulse/receive electronics, the
speaker and the display. They connect through plain ports of the top module.

## One frame, end to end

`ultrasound_top` runs one frame after another through seven states:

| state        | what happens                                                                 | leaves when                 |
|--------------|------------------------------------------------------------------------------|-----------------------------|
| `INIT`       | memories cleared, waiting                                                    | `pulse_req` = 1             |
| `PULSE_SEND` | `tx_pulse` high toward the transducer                                        | `listen` = 1                |
| `PULSE_RECV` | each `rx_valid` appends `rx_point` to the point memory (max 2048)            | `rx_done` = 1               |
| `DIVIDE`     | the dispatcher copies point *i* into core *i*/256, one point per cycle        | last point copied           |
| `PROCESS`    | all 8 cores run; each core's hull goes through the FIFO to the master core as soon as that core finishes | every core drained |
| `MERGE`      | the master core runs quickhull on the collected sub-hull points              | merged hull ready           |
| `DISPLAY`    | the hull points stream out on `disp_valid/disp_ready/disp_point/disp_last`   | last point taken, back to `INIT` |

```
 rx_point ──► point_memory ──► processor_array ─────────────► hull_fifo ──► master_core ──► disp_point
 (2048 pts)                    ├ dispatcher                   (16 points)   (quickhull engine
                               └ 8 × quickhull_core (256 pts)                sized 2048 points)
```

`proc_done[7:0]` shows which cores have finished in the current frame.
`frame_cycles` counts the cycles since the frame left `INIT`. `error` is set
if any point stack overflowed; see the section on sizes. `cloud_full` means
the point memory is full and further echo points are dropped.

## The quickhull processing element (`quickhull_core`)

This is the part that is hard to follow, so it gets the most room here.

### The algorithm

Take the leftmost point `min` and the rightmost point `max`. Every hull
vertex lies on the chain above the line min→max or on the chain below it.
For a directed line a→b, take the points strictly to its left. If there are
none, `a` is a hull vertex and nothing lies between a and b. If there is
exactly one, `a` and that point are hull vertices. If there are more, the
point furthest from the line is a hull vertex. The line is then replaced by
a→far and far→b, and only the points left of a→b are kept, because none of
the others can lie outside the new lines.

"Left of" uses the cross value
`cross(p, a→b) = (ax−px)(by−py) − (ay−py)(bx−px)`, computed by `qh_cross`.
With y pointing up, the value is positive when p is left of a→b. Only
strictly positive values count. Points exactly on a line are therefore never
treated as outside it.

### Three stacks instead of recursion

The recursion runs on three on-chip arrays:

* **line stack**: the lines still to be examined (`line_t` = {b, a}).
* **point stack**: for each of those lines, the points that may lie left of
  it, stored one set after another.
* **size stack**: the number of points in each set, so the top set starts
  at `ptop − size`.

The six states:

1. `INITIAL` clears the pointers.
2. `FIND_MAX_MIN` scans the set once for `min` and `max`. Points are ordered
   by x, and ties are broken by y, so both extremes are hull vertices.
3. `HULL_START` pushes min→max and then max→min. It copies the loaded set
   once, so that each of the two lines owns a copy.
4. `CROSS` reads the top set, one point per cycle. It counts the points with
   a positive cross value and keeps the first point with the largest value.
   It also packs the positive points in place at the bottom of the set. This
   packing is the "pop the set, push the positive points" step, and it costs
   no extra cycles.
5. `HULL_RECURSE`:
   * **0 points outside**: write `a` to the hull, then pop the line and its
     set.
   * **1 point outside**: write `a` and that point, then pop.
   * **more than 1 point outside**: copy the packed set once more, one point
     per cycle. Replace the line with a→far and push far→b on top. The two
     lines then own identical copies.

   The core returns to `CROSS` while lines remain, and otherwise goes to
   `END`.
6. `END` means idle, and `done` is high.

The top entry is always examined first. Hull points are therefore written
in the order the stacks pop them, which is **not** the order around the
polygon. If a display needs a closed polygon, it must sort the points by
angle around their centroid.

### Cycle cost

Each step takes one clock. For a set of n points:

```
cycles = 1 (INITIAL) + n (FIND_MAX_MIN) + n (HULL_START)
       + Σ over examined lines |set of that line|        (CROSS)
       + Σ leaves 1 + Σ splits |packed set|              (HULL_RECURSE)
```

The cycle count is measured from the edge that takes `start` to the first
cycle with `done` high. Each `CROSS` scans only the points that can still
lie outside its line, so random sets cost about n·log n. The testbench
checks this count exactly against a model. Typical results on random sets
(at 100 MHz), next to the runtimes reported for the original single-core
design:

| points | coordinates | this RTL, cycles | this RTL at 100 MHz | originally reported |
|--------|-------------|------------------|---------------------|---------------------|
| 16     | 0–31        | 111              | 1.1 µs              | 4.1 µs              |
| 32     | 0–31        | 259              | 2.6 µs              | 10.2 µs             |
| 64     | 0–31        | 506              | 5.1 µs              | 22.5 µs             |
| 256    | 0–31        | 2089             | 20.9 µs             | 77.9 µs             |
| 16     | 0–63        | 128              | 1.3 µs              | 4.8 µs              |
| 32     | 0–63        | 249              | 2.5 µs              | 10.3 µs             |
| 64     | 0–63        | 543              | 5.4 µs              | 20.0 µs             |
| 256    | 0–63        | 1974             | 19.7 µs             | 109 µs              |

The reference runtimes came from another implementation and other point
sets. Only the order of magnitude is comparable. The testbench checks that
each measured time does not exceed the reported one.

A whole frame of 2048 random points over the full 0–255 range takes about
7,800 cycles from `pulse_req` to the last displayed point (78 µs at 100 MHz).
About 2,600 of those cycles go to receiving the echo points, at the
testbench's rate of four points every five cycles. About 2,050 go to
dividing the cloud.
The waveform of the original 8-processor design ends near 152 µs.

### Sizes and the point-stack limit

| parameter      | default | meaning |
|----------------|---------|---------|
| `MAX_PTS`      | 256     | largest set per core (8-bit x and y, packed {y, x}) |
| `LSTACK_DEPTH` | 258     | line-stack and size-stack entries; the line stack never holds more lines than the hull has vertices + 2 |
| `PSTACK_DEPTH` | 1024    | point-stack entries (16 bits each) |

The point stack holds two copies of each split set. `HULL_START` alone needs
2·n entries. A tree of splits whose sets shrink very slowly could need more
than 4·n. The 8-bit grid limits how many hull vertices a set can have, and
random sets and a 256-point circle stay far below the limit. If a copy would
not fit anyway, the core sets `overflow_o` and stops at `END` with the hull
found so far, and the top raises `error`. To make this impossible, raise
`PSTACK_DEPTH`. The core testbench forces this case with a deliberately
small stack and checks that it is reported.

### Core interface

While `done` is high, write the set with `ld_en/ld_addr/ld_data`. Point *i*
goes to address *i*, directly into the bottom of the point stack. Then pulse
`start` with `num_pts` (0 to 256). When `done` returns, `hull_size` points
can be read at `hull_rd_addr/hull_rd_data`, with a combinational read. An
empty set gives an empty hull. A set whose points are all equal gives one
point.

## Dividing and merging

* **`dispatcher`** walks the point memory from address 0 and writes point
  *i* to core *i* / 256 at local address *i* mod 256. It reports the size of
  every sub-set: 256, the remainder, or 0. A cloud of N points takes N + 2
  cycles. If the cloud does not fill all cores, the last cores get
  fewer points or none.
* **`processor_array`** holds the dispatcher and the 8 cores. It starts all
  cores together once the whole cloud is divided. A core is drained into the
  FIFO as soon as it is done. When several cores are waiting, the lowest
  index goes first. The cores finish at different times because their sets
  differ.
* **`hull_fifo`** is a 16-entry valid/ready FIFO between the array and the
  master core. The master core takes a point every cycle, so the FIFO rarely
  fills. Its handshake still stalls the gatherer correctly when it does.
* **`master_core`** collects the sub-hull points into an engine of 2048
  points (a `quickhull_core` with `MAX_PTS` = 2048). When `MERGE` begins and
  the FIFO is empty, it runs quickhull on them. This is exact: a vertex of the
  whole cloud's hull is also a vertex of the hull of the block that holds it,
  so the hull of all block-hull vertices equals the hull of the cloud. The
  merged hull has no edges inside the cloud, unlike a picture built from the
  eight partial hulls.

## Point format

`quickhull_pkg` defines `point_t` as `{y[7:0], x[7:0]}` (x in the low byte),
`line_t` as `{b, a}`, the signed 19-bit `cross_t`, and the two state enums.
`rx_point` and `disp_point` use the same 16-bit format.

## What follows the original description and what is chosen here

The original description fixes:

* the device states and their order;
* a memory, a dispatcher inside a processor array, 8 slave cores, a FIFO
  and one master core that divides and merges;
* 256 points per core with 8-bit coordinates;
* the six core states with their actions, the three stacks and the order in
  which they are pushed;
* the cross formula and its strict `> 0` test.

This design chooses:

* **Handshakes and ports.** All of them: the point load port, start/done,
  valid/ready on the FIFO path and the display, and the scan-control inputs
  `pulse_req`, `listen` and `rx_done`.
* **Multi-cycle states.** `HULL_START` and the split case of `HULL_RECURSE`
  copy one point per cycle. The original shows each of them as a
  single-cycle state.
* **Extreme points.** They are found by x with y as tie-break. In an older
  listing the whole 16-bit word was compared, which orders by y first.
* **Empty sets.** A set with no points, or with all points equal, ends at
  once.
* **Stack sizes.** The point stack is larger than the 256 entries described,
  because the described `HULL_START` already needs 512, and overflow is
  detected.
* **Splitting.** The cloud is split by address into contiguous blocks.
* **Scheduling.** All cores start together, and each is drained as soon as
  it finishes.
* **Merging.** The merge is a second quickhull run. How the merge works was
  not described.
* **FIFO depth.** It is 16 entries, a depth that was not given.
* **End of frame.** After `DISPLAY` the device returns to `INIT`.
* **Core count.** It is 8, as in the text. A network diagram of the original
  shows six slave cores.

The following are not built:

* the transducer, speaker and display;
* the sorting of echo data by distance thresholds, which an early version of
  the concept mentions without a criterion;
* an optional image write-back path.

## Files

`rtl/`:

* `quickhull_pkg.sv`: types and constants;
* `qh_cross.sv`: the cross-value unit;
* `quickhull_core.sv`: the processing element;
* `dispatcher.sv`, `processor_array.sv`, `hull_fifo.sv`, `point_memory.sv`,
  `master_core.sv`;
* `ultrasound_top.sv`: the top level.

`tb/`:

* one self-checking testbench per module (`tb_<module>.sv`);
* `qh_ref_pkg.sv`: a queue-based quickhull model that gives the exact hull
  sequence and cycle count, plus Andrew's monotone chain as an independent
  hull check.

## Simulating

With Verilator 5 (from the repository root; `-y` lets Verilator find the
modules):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/quickhull_pkg.sv tb/qh_ref_pkg.sv tb/tb_ultrasound_top.sv \
    --top-module tb_ultrasound_top -o sim
./obj_dir/sim
```

Replace `tb_ultrasound_top` with any other testbench name. Each testbench
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog if
the design hangs.

* **`tb_ultrasound_top`** runs at the default size. It sends three frames:
  2048 points, 900 points, and 2148 points (the last 100 must be dropped,
  with `cloud_full` raised). It compares the displayed hull with
  the model and with the monotone chain. It also requires that every device
  state, staggered core completion, all three `HULL_RECURSE` outcomes and a
  display stall each happen at least once.
* **`tb_quickhull_core`** runs the table workloads above. It also runs edge
  cases (an empty set, one point, all points equal, two points, collinear
  points, a 256-point circle) and random sets, and checks hull and cycle
  count exactly.
* **The other testbenches** use reduced sizes (4 cores of 32 points, small
  FIFOs and memories) to stay short.
