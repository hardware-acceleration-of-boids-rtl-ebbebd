# Boids flocking accelerator

This is a small hardware engine that runs Reynolds' boids flocking rules for a
swarm of agents, called boids, drawn on a 640x480 VGA screen. Once per video
frame it takes each boid in turn. It compares that boid with every other
boid and gathers three kinds of information:

- **separation:** boids that are too close (inside 8 px);
- **alignment:** the mean velocity of visible neighbours (inside 40 px);
- **cohesion:** the mean position of the same neighbours.

It then turns that information into a new velocity and position and writes
them back to memory. There is no processor in the loop. A control FSM steps
through the swarm, one datapath does the arithmetic, and a register memory
holds the swarm. The same memory answers the VGA driver's "is there a boid
on this pixel?" query.

The main idea is to trade a large, parallel, single-cycle writeback for a
very simple control loop. A frame of N boids always takes exactly

    N * (2 + 2*(N-1)) cycles

For the default N = 100 that is 20,000 cycles, or 0.4 ms at 50 MHz.

The RTL follows the architecture of a published student FPGA accelerator for
boids (a 50 MHz DE1-SoC board design). Throughout the sources, "reference
design" means that accelerator. Where it leaves details open, the choices
made here are listed under "What is this design's own choice" below.

## Number format

All arithmetic is on signed 32-bit fixed-point numbers with 16 fraction bits
(sign, 15 integer bits, 16 fraction bits; `32'h0001_0000` is 1.0). A product
is the full 64-bit product with bits [47:16] kept (`fix15_mul`), so it is
truncated toward minus infinity. Overflow wraps.

In memory the fields are narrower, and they are sign-extended again when read:

| field | stored bits | range |
|-------|-------------|-------|
| X     | 28          | ±2048 px |
| Y     | 27          | ±1024 px |
| VX, VY| 21          | ±16 px/frame |

All of these live in `rtl/boids_pkg.sv`, together with the `boid_t`
(x, y, vx, vy) and `accum_t` (six sums) structs and the state enum.

## The frame loop (`xcel_ctrl`)

The controller is a five-state FSM with two counters. `boid_tot_ctr` is the
boid being updated. `boid_itr_ctr` is the boid being compared with it.

```
init ──VGA_VS falls──> sa_init ─> sa_ld <─> sa_calc ─> ac_wb ─┬─> sa_init  (more boids)
 ^                                                            └─> init     (last boid)
```

| state   | cycles per boid | what happens |
|---------|-----------------|--------------|
| init    | –               | wait for a falling edge of VGA_VS (`fall_edge_detector`) |
| sa_init | 1               | read boid `tot` into the Boid State registers; clear the sums and the counter |
| sa_ld   | N-1             | put boid `itr` on the memory read port |
| sa_calc | N-1             | latch the Accumulation unit's result; advance `itr` |
| ac_wb   | 1               | write the Writeback unit's result to address `tot` |

`itr` never points at `tot`. When the increment would land on `tot` it jumps
one further, and it starts at 1 when `tot` is 0. So every boid sees exactly
N-1 others. The end of a scan is tested on the next index after that jump.
Without this, the last boid (where `tot` = N-1) would scan one boid short or
read past the swarm. An assertion (`a_itr_in_range`) checks that no scan
reads the boid being updated or runs past the swarm.

There is one memory read port. Its address is `tot` in sa_init and `itr`
otherwise. The memory is read combinationally, so sa_ld does no work of its
own. It is kept as a separate state so that a memory with latency could later
be waited on there. That is also why a frame costs 2 cycles per pair and not 1.

Boids are updated **in place**. Boid i already sees the new positions of
boids 0..i-1 and the old ones of i+1..N-1. This is part of the algorithm as
built, not an error. A bit-exact model must do the same.

## Accumulation (`xy_sep_chk`), one neighbour per sa_calc cycle

For the held boid S and the boid O just read:

1. dx = S.x − O.x and dy = S.y − O.y. Each is clamped to ±127 px, then
   squared with `fix15_mul`, and the squares are added.
2. If the sum is below 64 (8²), O is **too close**. dx and dy are added to
   close_x and close_y, and nothing else changes.
3. Otherwise, if the sum is below 1600 (40²), O is **visible**. Its x, y, vx
   and vy are added to near_x, near_y, near_vx and near_vy, and the 10-bit
   neighbour counter is incremented.
4. If the counter is already all ones, the visible boid is dropped (it
   **saturates**). Separation is still checked for every boid.

The counter saturates because the average is formed through a reciprocal
table. That table has one entry per counter value, so the counter must not
wrap.

The ±127 px clamp is an addition of this design. Without it the 16.16 sum of
squares wraps for boids more than about 128 px apart, and a distant boid can
look close. The clamp changes nothing inside the visual range.

## Writeback (`xy_writeback`), one whole boid update in one cycle

This is the large block: ten multipliers and a table lookup, all
combinational, used once per boid in the ac_wb cycle.

1. `lut_divider` gives 1/n (floor(65536/n), 0 for n = 0) for the neighbour
   count n. Four multipliers turn the four near-sums into averages.
2. The boid's own x, y, vx and vy are subtracted from the averages. If
   n = 0, these four differences are forced to zero.
3. The new velocity is v + CENTER·(avg pos − pos) + MATCH·(avg vel − vel) +
   AVOID·close. That is six multipliers.
4. `xy_bound_chk` applies the screen and speed rules:
   - **edge turn:** past a margin (100 px from each screen edge), the turn
     factor 0.2 is added to or subtracted from the velocity component,
     steering the boid back towards the middle.
   - **speed:** the speed is approximated as max(|vx|,|vy|) + min(|vx|,|vy|)/4.
     Above 6, both components become v − v/4. Below 3, they become v + v/4.
     This is one correction per frame, with no division.
5. The new position is the old position plus the bounded velocity.

The inputs of this block are forced to zero outside ac_wb, to cut switching
activity. Its output goes to the memory with no register in between.

## Memory and VGA (`boid_mem`, `sign_extend`, `vga_pixel_or`)

The swarm is held in four register arrays, one entry per boid. A write keeps
only the stored bits of each field. A read sign-extends each field back to
32 bits through `sign_extend`. Every X and Y register also feeds
`vga_pixel_or`. For each boid, that block compares the integer part of X with
the driver's `next_x` and the integer part of Y with `next_y`, and ORs the
results together. The answer is white (`8'hFF`) on a boid and black
elsewhere.

This needs one pair of comparators per boid, and it is the main reason this
memory does not scale to large swarms.

## Top level (`boids_xcel`)

| port | dir | meaning |
|------|-----|---------|
| clk, rst | in | clock, synchronous active-high reset |
| vga_vs | in | VGA vertical sync; a falling edge starts a frame |
| next_x, next_y [9:0] | in | pixel the VGA driver draws next |
| pixel_color [7:0], pixel_hit | out | white and 1 when a boid is on that pixel |
| host_we, host_addr, host_wdata | in | load initial boids; ignored while `busy` |
| busy, frame_done | out | frame in progress; pulse on the last writeback |
| state, ev_* | out | FSM state and per-cycle events (close, visible, saturated, no_neighbours, turned, too_fast, too_slow, itr_skip) |

Parameters: `NUM_BOIDS` (default 100, at least 2); `CW`, the counter width
(default 10); and `AW`, the index width (derived). The VGA timing generator
itself is not included. It belongs to the board support around this design,
and its signals are the ports above.

## What is this design's own choice

These points follow the reference algorithm and structure:

- the number format and stored widths;
- the thresholds 40 px and 8 px;
- the speed limits 3 and 6, the speed approximation and the shift-based
  scaling;
- table-based averaging, the zeroing on an empty neighbourhood, and the
  saturating counter;
- the FSM, the index skip and the cycle count;
- in-place update and the OR-based VGA interface.

These are choices made here:

- the weights: cohesion 0.0005, alignment 0.05, separation 0.05 (parameters
  of `xy_writeback`);
- the turn factor 0.2 and the 100 px margins (parameters of `xy_bound_chk`);
- the ±127 px clamp before squaring;
- truncating fixed-point products;
- a reciprocal table of 1024 entries, one per counter value;
- clearing the sums in sa_init;
- synchronous reset to zero;
- the host load port and the observation outputs;
- the 8-bit white-on-black colour.

Two points of the original description disagree with themselves, and one
reading is used here. The protected-range test is described both as "sum of
squares below 8" and, in the circuit, as below 64 (8 px squared); 64 is used.
The velocity fields are described as 21 bits but also as holding -8..+7;
21 bits are kept, which hold ±16 px/frame.

Some things are not built: a memory-ready handshake for slower memory,
parallel datapaths, a pipelined writeback, and the switch inputs of the
original board build.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The expected values come from
`tb/boids_ref_pkg.sv`, a behavioural model written with 64-bit integer
arithmetic and explicit pixel constants. It includes a whole-frame model
(`r_frame`) that updates in place, just as the hardware does.

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/boids_pkg.sv tb/boids_ref_pkg.sv tb/tb_boids_xcel_full.sv \
    --top-module tb_boids_xcel_full -o sim
./obj_dir/sim
```

Swap the testbench name to run another one. The two system-level tests are:

- `tb_boids_xcel`: 8 boids with a 2-bit counter, over 25 frames. Every
  mechanism occurs and is counted: separation, visible accumulation, counter
  saturation, an empty neighbourhood, edge turn, slow-down, speed-up, the
  index skip, waiting for VGA_VS, a host write blocked while busy, and pixel
  hits. The memory is compared with the model after every frame, and every
  frame is checked to take N(2+2(N−1)) cycles.
- `tb_boids_xcel_full`: the default 100-boid build, 3 frames of 20,000
  cycles each. It runs in about two seconds.

## Sizes and throughput

| swarm | cycles per frame | at 50 MHz | simulated |
|-------|------------------|-----------|-----------|
| 2     | 8                | 0.16 µs   | yes |
| 10    | 200              | 4 µs      | yes |
| 50    | 5,000            | 0.1 ms    | yes |
| 100 (default) | 20,000   | 0.4 ms    | yes |
| 200   | 80,000           | 1.6 ms    | yes |
| 340   | 231,200          | 4.6 ms    | yes |
| 912   | 1,663,488        | 33.3 ms   | yes, one frame |

A 30 frames/s display at 50 MHz gives 1,666,667 cycles per frame. 912 boids
is therefore the largest swarm whose update fits in one frame.
`tb_boids_swarm_sizes` builds every size in the table except 100, runs each
against the reference model and checks the cycle formula. The 100-boid
build is covered by `tb_boids_xcel_full`.

What limits a real build is not time but area:

- the register memory holds 97 bits per boid;
- the pixel logic needs one comparator pair per boid;
- the writeback's ten 32x32 multipliers dominate the arithmetic, whatever
  the swarm size.

The 10-bit counter caps the neighbours that count towards an average at
1023, which no swarm above can reach.

## Changing it

- **Swarm size:** set `NUM_BOIDS`. The counters, the index width and the
  memory follow from it. Cost per frame is quadratic. Memory and VGA
  comparators are linear in N.
- **Behaviour:** the weights, turn factor, margins and speed limits are
  parameters of `xy_writeback` and `xy_bound_chk`, with defaults in
  `boids_pkg`. If you change them, update the constants in
  `tb/boids_ref_pkg.sv` as well.
- **Neighbour counter:** `CW` sets both the saturation point and the size of
  the reciprocal table (2^CW entries).
