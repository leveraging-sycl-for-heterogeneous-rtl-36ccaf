# Banded DTW accelerator

This circuit computes constrained dynamic-time-warping (cDTW) distances. It
compares every window ("epoch") of a long signal with every one of a set of
reference sequences ("patterns"). The cost matrix is limited to a
Sakoe-Chiba band. The defaults are:

| Quantity | Default |
|---|---|
| Epoch and pattern length `E` | 1024 |
| Band half-width `W` | 16, so each row has `B = 2W+1 = 33` cells |
| Stride between consecutive epochs | 256 samples |

Each epoch and each pattern is z-normalised before the comparison. The
distance is the usual recurrence:

```
x(i,j) = (P[i] - E[j])^2 + min( x(i-1,j-1), x(i-1,j), x(i,j-1) )     |i-j| <= W
```

Here `i` is the pattern sample (the row) and `j` is the epoch sample.

The design is a set of independent kernels. The top is `cdtw_accel` with
`NR = 24` kernels. Each kernel (`cdtw_kernel`) has:

- one epoch generator;
- one pattern generator;
- `PEP = E/stride = 4` computation modules;
- one result write-back unit.

Every computation module compares one epoch with `NP = 32` patterns at once.
A kernel handles up to 512 epochs per run, so the whole accelerator covers a
block of 24 × 512 epochs against 32 patterns.

## Dataflow inside a kernel

```
 signal + epoch stats ──► epoch_gen ──► epoch queue 0..3 ─┐
                                                          ▼
 query + pattern stats ─► pattern_gen ─► pat queue ─► compute 0 ─► pat queue ─► compute 1 ─► ... ─► compute 3
                                                          │                      │                    │
                                                     DTW queue 0            DTW queue 1          DTW queue 3
                                                          └──────────► result_wb ◄──────────────────┘
                                                                          │
                                                                 distance writes
```

All links are valid/ready streams through first-word-fall-through queues
(`sync_fifo`). No central controller schedules anything. A module works
whenever its inputs have data and its outputs have room, and stops
otherwise. The queue depths are:

| Queue | Depth at the defaults |
|---|---|
| Epoch queue | stride + 10 = 266 |
| Pattern queue | stride × NP = 8192 |
| DTW result queue | NP = 32 |

Consecutive epochs overlap by 3/4. So while epoch `q` is being computed,
epochs `q+1 .. q+3` are already receiving their first samples. That is the
reason for four modules: module `s` takes epochs `s, s+4, s+8, ...`.

## The computation module (`cdtw_compute`)

This is the hard part of the design.

### Cell order

A module walks the band row by row. A row is one pattern sample. Each row has
`B` cells, and every cell is computed for all `NP` patterns before the next
cell starts. The order of work is therefore:

```
for row i in 0..E-1:
  for band cell k in 0..B-1:        (epoch sample j = i - W + k)
    for pattern m in 0..NP-1:
      one cell per clock
```

One cell is issued per clock. An epoch therefore takes `E × B × NP` cycles,
which is 1,081,344 cycles at the defaults. The module then produces `NP`
distances.

### Why interleave patterns

A new cell needs the result of its West neighbour `x(i,j-1)`. That is the
same pattern's previous cell, issued exactly `NP` cells earlier. So the
adder-minimum loop can be pipelined: with `NP` greater than the pipeline
depth (3 here), the value is always ready in time. No forwarding network is
needed.

### Where the three neighbours come from

| Neighbour | Source |
|---|---|
| **West** `x(i,j-1)` | `wreg[m]`, the last result of pattern `m`. |
| **North** `x(i-1,j)` | Same epoch sample, previous row. In the band index it is cell `k+1` of row `i-1`. That cell was issued `(B-1) × NP` cells ago. `dtw_buff` is a circular buffer of exactly that length (1024 words, so a plain 10-bit counter). The word read at the pointer is the North value, and the new result is written back to the same slot three cycles later. |
| **North-West** `x(i-1,j-1)` | The North value of the previous cell of the same pattern. `nwreg[m]` keeps the last `dtw_buff` word read for pattern `m`. |

The edges of the band are handled by forcing values to infinity:

- North is infinite at `k = B-1`, because that cell is outside the band of
  the previous row. It is also infinite at row 0.
- North-West is infinite at row 0.
- West is infinite at `k = 0`.
- Cells whose epoch index falls outside `0 .. E-1` get an infinite cost.
- The first cell `x(0,0)` is just its own squared difference.

### Samples

The `B` epoch samples of the current row sit in a window register with a
valid bit each. At the end of a row the window shifts by one and takes one
new sample from the epoch queue, so each epoch sample is read once.

The pattern sample of row `i` is read from the pattern queue during the
`k = 0` cell. It is kept in `vpat[m]` for the rest of the row and is also
forwarded to the next module's pattern queue. Pattern samples therefore pass
down the chain of four modules, and the patterns are stored only once per
kernel.

### Pipeline and stalls

The pipeline has three stages:

1. Issue and select the operands.
2. Difference, and the minimum of three.
3. Square.

A saturating add then writes the result to `dtw_buff` and `wreg`. When the
cell is `x(E-1,E-1)`, the result also goes to the DTW queue.

Issue stalls when any of these holds:

- the next epoch or pattern sample is missing;
- the forward pattern queue is full;
- the DTW queue could not take the results already in flight.

A stall only delays cells. All buffers are indexed by cell count, so a stall
never corrupts the neighbour taps.

## Epoch generator (`epoch_gen`)

The generator reads the signal one stride block at a time. Each sample
belongs to up to four overlapping epochs. For each active epoch in turn, the
generator normalises the sample with that epoch's statistics and pushes the
result into that epoch's queue, one (sample, epoch) pair per clock.

Each epoch's mean and inverse standard deviation are read once, when its
first block starts. They go into one of four statistics slots (block number
mod 4). At the start and end of a run, some of the four pairs belong to no
epoch. Those slots are skipped, at one clock each.

## Pattern generator (`pattern_gen`)

The generator reads the `NP` patterns one after another, normalises them and
stores them in a local memory of `NP × E` words. It then sends them
interleaved: sample 0 of every pattern, then sample 1 of every pattern, and
so on. It repeats this once per round of four epochs. With
`load_patterns = 0`, a new run reuses the stored patterns without reading
memory again.

## Result write-back (`result_wb`)

Epochs finish in order: epoch `q` comes out of DTW queue `q mod 4`. The unit
drains each epoch's `NP` results and writes them pattern-major, at address
`m × n_epochs + q`.

## Number formats

The arithmetic is fixed point. Floating point would need vendor cores.

| Quantity | Format |
|---|---|
| Samples | 16-bit signed |
| z values | 16-bit signed with 11 fraction bits, saturating |
| Statistics per epoch or pattern | 16-bit mean, 24-bit inverse standard deviation scaled by 2^27 (`cdtw_pkg::stat_t`) |
| Squared difference | shifted right by 11, so it has the z scale |
| Cost | 32-bit unsigned, saturating; all ones means infinity |

The host must precompute the statistics.

## Interfaces of the top (`cdtw_accel`)

Each kernel has its own streams:

| Stream | Direction | Content |
|---|---|---|
| `sig` | in | signal samples |
| `est` | in | epoch statistics |
| `q` | in | pattern samples |
| `pst` | in | pattern statistics |
| `wr` | out | address and distance |

A run starts with a pulse on `start`, together with:

- `n_epochs`: a multiple of 4, at most 512;
- `load_patterns`: whether to read new patterns.

`done` pulses once every kernel has written its last result.

The external memory system is not part of the RTL. The streams mark where
load/store units would connect. Splitting the full comparison matrix into
blocks, and giving any leftover patterns or epochs to other processors, is
left to host software.

## Throughput

Without stalls, each module delivers 32 distances per 1,081,344 cycles. With
96 modules that is 2.84 × 10⁻³ distances per clock, or about 850 distances
per ms at 300 MHz. Real throughput is lower whenever the queues between
modules fill or run empty.

For comparison, the HLS build this architecture comes from ran at 300 MHz on
a Stratix 10 MX and reached about 295 distances per ms. That build loses time
to stalls between its queues.

## How far it has been checked

- Every module has a self-checking testbench, and every testbench has been
  shown to fail against a deliberately broken copy of its module.
- Distances are compared with a software dynamic-programming model that uses
  the same fixed-point rounding. They match exactly, including at the default
  sizes.
- The RTL has been linted and elaborated with two SystemVerilog front ends,
  and synthesised generically. At the defaults this gives about 26k cells and
  33k flip-flop bits, plus about 29 Mbit of memory; most of that is the
  pattern stores and the pattern queues.
- It has not been placed and routed on an FPGA, so 300 MHz is not
  demonstrated here.

## Differences from the original description

- Fixed-point arithmetic instead of single-precision float.
- The epoch band is a multiplexed window rather than a rotating circular
  shift register.
- The pattern sample is taken during the first band cell, not in an extra
  slot per row.
- The pipeline has 3 stages instead of an HLS pipeline of up to 30 stages.
- `n_epochs` is set at run time.
- `load_patterns` lets later runs reuse the stored patterns.

## Files

`rtl/`:

| File | Content |
|---|---|
| `cdtw_pkg.sv` | types and saturating helpers |
| `sync_fifo.sv` | FIFO queue |
| `circ_buffer.sv` | `dtw_buff` |
| `znorm.sv` | z-normalisation |
| `cdtw_compute.sv` | computation module |
| `epoch_gen.sv` | epoch generator |
| `pattern_gen.sv` | pattern generator |
| `result_wb.sv` | result write-back |
| `cdtw_kernel.sv` | one kernel |
| `cdtw_accel.sv` | top with `NR` kernels |

`tb/`:

| File | Content |
|---|---|
| `cdtw_ref_pkg.sv` | full dynamic-programming reference model, in the same fixed point |
| `kernel_driver.sv` | memory model for one kernel; checks every write |
| `cdtw_compute_harness.sv` | driver and checker for the computation module |

The testbenches are:

| Testbench | What it checks |
|---|---|
| `sync_fifo_tb` | FIFO against a model |
| `circ_buffer_tb` | power-of-two and other lengths |
| `znorm_tb` | normalisation against the model |
| `epoch_gen_tb` | generator order and values |
| `pattern_gen_tb` | load, then reuse |
| `result_wb_tb` | order and addresses |
| `cdtw_compute_tb` | the textbook 6-sample example (distance 9, exact cycle count), and random epochs with gaps |
| `cdtw_kernel_tb` | one kernel over two runs, the second reusing the patterns |
| `cdtw_accel_tb` | two small kernels under heavy back-pressure; counts stalls, full queues, pointer wraps, out-of-band cells and forwarded patterns |
| `cdtw_accel_full_tb` | the top at the default sizes (24 kernels, four epochs each); checks every distance and that an epoch takes exactly 1,081,344 cycles |

Every testbench prints `TB_RESULT checks=N failures=M`.

## Running

Run a testbench with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/cdtw_pkg.sv tb/cdtw_ref_pkg.sv tb/cdtw_kernel_tb.sv --top-module cdtw_kernel_tb
./obj_dir/Vcdtw_kernel_tb
```

The full-size test takes a few minutes to build and about four minutes to
run.
