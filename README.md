# Real-time face-milling simulator in FPGA fabric

This design simulates the face milling of a compliant workpiece. It runs in
hard real time, fast enough to stand in for the real machine in a
hardware-in-the-loop test bench. Every 42 µs it does three things:

- advances a reduced modal model of the workpiece by one implicit time step;
- works out the cutting forces of the edges of a multi-edge face-milling
  cutter, with feedback from the surface that the previous edge left behind;
- puts the resulting tool–workpiece vibration out on a 16-bit DAC.

An external system watches that analog signal for chatter. When it sees
chatter, it raises a digital STOP input. The simulator then stops the feed
within one step, just as a machine operator or a chatter-suppression
controller would.

The whole loop runs in the fabric. A processor is used only to load the model
before the run and to collect the results afterwards. This removes the cost
of a software–hardware call every step, and it lets the loop time itself
against a free-running 64-bit clock counter, not an operating-system timer.

## The model in one step

### Structure

The system is described by N hybrid coordinates ξ, with matrices M, C and K:

    M ξ'' + C ξ' + K ξ = f

ξ can hold the coordinates of the tool, and the modal coordinates of the
workpiece, normally its five lowest vibration modes. The loop does not tell
them apart. The host puts both blocks into M, C and K.

The cutter and the workpiece meet at each edge in contact. Two host-written
3×N tables turn ξ into the relative deflection of an edge, in the edge's own
frame:

- T, indexed by the edge angle, carries the coordinates of the rotating tool
  into the edge's frame. Its modal columns are zero.
- W, indexed by the finite-element node under the tool, holds the constraint
  rows of the workpiece at that node. Its tool columns are zero.

The three directions are:

- along the tool axis (`qz`);
- a change of cut thickness (`dh`);
- a change of cut width (`db`).

With T all zero, the model reduces to a rigid tool cutting a compliant
workpiece.

### Cutting force of one edge (`cutting_force`)

For an edge `l` that is in contact, let `bD` and `hD` be the nominal cut
width and thickness. Let `dw = (qz, dh, db)` be the deflection now, and
`dw'` the deflection that the previous edge `l-1` saw one tooth period τ
earlier. Then:

    F1 = kd · ( bD·hD − bD·dh − hD·db + db·dh + bD·dh' − db·dh' )
    F2 = μ2 · F1
    F3 = μ3 · F1

These are the proportional force and its two companion components. The `dh'`
terms are the regenerative (time-delayed) feedback: the previous edge left a
wavy surface, and it changes the thickness this edge removes. The `db·dh`
terms are the nonlinear part of the instantaneous and delayed feedback.

### Loading the structure

- With `G = T(angle) − W(node)`, the deflection of an edge is `dw = G·ξ`.
- The force is split in two parts. The proportional part is `−DP·dw`, where
  every row of DP is `(0, kd·(bD − db), kd·hD)` scaled by 1, μ2 or μ3. This
  part is moved into the stiffness: `Gᵀ·DP·G` is added to K for this step.
  The rest, `R = F0 + DO·dw'` (desired force plus delayed feedback), enters
  the load as `f += Gᵀ·R`. `cutting_force` gives both F and R.
- The rows of DP are scaled copies of one row. `Gᵀ·DP·G` is therefore the
  outer product `u·cᵀ`, with `u = Gᵀ·(1, μ2, μ3)` and
  `c = kd·((bD − db)·G₁ + hD·G₂)`. It costs N² multiply-adds per active edge.
- DP depends on the width change `db`. `db` is taken from the deflection
  formed with the previous step's coordinates. This makes the coupling
  linear within one step.
- The output of the step is `y = −W(node)[0]·ξ`. This is the displacement of
  the workpiece surface under the tool, along the tool axis.
- The delayed deflection comes from a circular buffer that holds `(qz, dh, db)`
  of every edge for the last `DELAY_DEPTH` steps.

### Kinematics

The cutter angle advances by `dphase` per step, where 2³² is one revolution.
The tool position advances by `feed` per step along the path.

- Edge `l` sits one pitch (2³²/EDGES) behind edge `l−1`.
- Its nominal thickness `hD` is read from a 2^ANG_BITS-entry table indexed by
  the top bits of its angle. The host fills this table with
  `f_z · sin κr · cos φ`, with negative values where the edge is out of the
  workpiece.
- An edge whose `hD ≤ 0` is not cutting. It is skipped, and its buffer entry
  is zero.
- The node under the tool comes from a pre-computed position-to-node map
  (`node_map`). The cell is the integer part of the position, clamped to the
  table. A map lookup costs two cycles, where a nearest-node search would cost
  hundreds.

### STOP

STOP sets the feed to zero. The tool position freezes, `hD` is forced to zero
for every edge, and the structure rings out freely. STOP is latched until the
next run.

## Time budget of a step (`aloop`)

The step is `dt_cycles` clock cycles long: 4200 at 100 MHz is 42 µs. It runs
in two phases. The computation time t_c plus the synchronisation time t_s
must fit into the step.

| phase | what happens | cycles (N = 5, 6 edges) |
|---|---|---|
| map | read the node of the current cell | 2 |
| per edge | `hD` lookup; if active: `dw = Gξ` (3N MACs), delayed read, force, `GᵀR` into f and u, c (N steps), `u cᵀ` into dK (N² steps) | 2 inactive, N² + 4N + 5 = 50 active |
| solve | load f, one Newmark-Beta step | 1233 + 5 |
| output | `y = −W[0]·ξ`, result beat | ≈ 7 |
| sync | wait for deadline, DAC beat, sample input | rest of the step |

In the full-size test, the longest measured computation was 1400 of 4200
cycles for the reference cut. With all six edges in contact in every step,
which is the worst case, it was 1541 cycles. The loop therefore keeps real
time in every state, with more than half of the step to spare.

### Deadline and overruns

Step `k` starts at the absolute clock count `t0 + k·dt_cycles`. This is a
deadline that moves forward by a fixed amount, not a delay measured from the
end of the computation, so steps do not drift. If the counter is already past
the deadline when the loop gets there, the step is counted in `overruns` and
the loop goes on at once. `max_tc` reports the longest computation seen.

### Stale beats

The counter and the input word reach the loop through one-stage AXI4-Stream
register slices with `tvalid` held high. A slice holds a beat that may be a
whole step old. The loop therefore throws away the first beat it sees before
each read. Without this, the first step of a run looks late and STOP acts one
step late.

## The Newmark-Beta step (`newmark_solver`, `gauss_solver`, `fx_div`)

The integrator is the classic implicit Newmark-Beta scheme. The host computes
the constants a0…a7 from β, γ and dt:

    a0 = 1/(β dt²)   a1 = γ/(β dt)   a2 = 1/(β dt)   a3 = 1/(2β) − 1
    a4 = γ/β − 1     a5 = dt/2·(γ/β − 2)   a6 = dt(1 − γ)   a7 = γ dt

Each step:

1. `u = a0 x + a2 v + a3 a`, `w = a1 x + a4 v + a5 a`.
2. `Keff = K + dK + a0 M + a1 C`. Here dK is the stiffness the cutting
   process adds in this step. It is cleared and then accumulated entry by
   entry before the step starts.
3. `r = f + M u + C w`.
4. Solve `Keff x' = r` by Gaussian elimination without pivoting, then back
   substitution.
5. `a' = a0 (x' − x) − a2 v − a3 a`, `v' = v + a6 a + a7 a'`.

The datapath is one multiply-accumulate unit and one shared 72-cycle
restoring divider. Every elimination multiplier and every unknown is a true
division, not a product with a reciprocal, because a reciprocal loses too
much precision with stiff pivots.

Cycle counts:

- Solver for N = 5: 1171 cycles. The formula is in `gauss_solver.sv`.
- Whole step: 2N² + 2N + 2 more, so 1233 cycles.

This is far slower than a fully parallel datapath could be, but well inside
the step.

### Division by zero

A zero pivot does not stop the run. The quotient saturates, `singular` is
raised, and the loop carries on.

## Number format (`milling_pkg`)

All model quantities are signed fixed point Q24.24 in 48 bits (`fix_t`).
Additions, subtractions and products saturate. A 32-bit Q16.16 format is
not enough, because the acceleration update multiplies a small difference of
positions by `a0`. Scale the model to suit the format:

- With dt = 42 µs, a0 is about 2.3·10⁹ in seconds. Time is therefore best
  expressed in milliseconds, which gives dt = 0.042 and a0 ≈ 2270.
- Displacements can be expressed in micrometres or similar.
- Keep the products of stiffness and displacement below 2²³.

The testbenches use milliseconds.

## Platform around the loop (`milling_top`)

| block | role |
|---|---|
| `clock_counter` | 64-bit free-running cycle counter |
| `axis_reg_slice` (64 bit) | counter register read by the loop |
| `axis_reg_slice` (32 bit) | discrete input register. Bits 29..0 are 0, bit 30 is DIG_0 (STOP), bit 31 is SW14. Both pins go through two-flop synchronisers |
| `aloop` | the real-time loop |
| `dac_spi` | AD5541A driver on the Pmod DA3 pins |

`LED_0` and `LED_1` mirror SW14 and DIG_0. SW14 is carried in the input word
but the loop does not use it.

### DAC code and frame (`dac_spi`)

The DAC code is `32768 + y·dac_gain`, clamped to 0…65535. Choose `dac_gain`
so that the expected ±0.01 mm full scale fills the range.

`dac_spi` crosses from `aclk` to `spiclk` with a toggle handshake. It sends
one frame per sample:

1. CS falls.
2. 16 bits go out MSB first. SCLK is spiclk/2, and the DAC samples DIN on the
   rising SCLK edge.
3. CS rises.
4. LDAC pulses low for two cycles.

A frame takes 37 spiclk cycles. `s_axis_tready` stays low until the frame is
done, so a slow DAC side stalls the loop instead of losing samples.

### Outside the fabric

These parts are not in the fabric and appear only as ports of `milling_top`:

- the processor;
- the clock and reset generators;
- the bus and DMA plumbing;
- the level shifters and the external chatter detector.

## Host interface

Configuration is written only while the loop is idle. `cfg_addr[19:16]`
selects the region, and the value is in the low 48 bits of `cfg_data`.

| region | contents | address |
|---|---|---|
| 0 | scalars: 0 kd, 1 bD, 2 μ2, 3 μ3, 4 dphase, 5 feed, 6 tau_steps, 7 n_steps, 8 dt_cycles, 9 pos0, 10 phase0, 11 dac_gain | `[3:0]` |
| 1 | a0…a7 | `[2:0]` |
| 2, 3, 4 | M, C, K | row `[15:8]`, column `[7:0]` |
| 5 | W table | node·3N + row·N + column |
| 6 | node map | cell; data = node |
| 7 | hD table | angle index |
| 8 | T table | angle index·3N + row·N + column |

### Raw values

`dphase`, `tau_steps`, `n_steps`, `dt_cycles`, `phase0` and `dac_gain` are
raw integers. All the others are `fix_t`.

For a spindle speed n (rev/min) and a step dt:

- `dphase = 2³² · n/60 · dt`;
- `tau_steps = round(60 / (n · EDGES) / dt)`.

For 1112 rev/min, 6 edges and 42 µs this gives 3343157 and 214.

### Running

Pulse `start` to run. Each step gives one `res_valid` beat with the step
number and the displacement `y`. A memory outside the module must take these
beats, because a 120 s run is 2.86 million steps. `done` rises at the end,
and `steps`, `overruns`, `max_tc`, `stopped` and `singular` then describe
the run.

## Where this design departs from a fully coupled model

- **Linearised width change.** The proportional term enters the stiffness.
  However, the width change `db` inside it, and the deflection stored for the
  delayed feedback, come from the previous step's coordinates. They are not
  iterated to convergence.
- **Tabulated coupling.** T is tabulated against the edge angle, with the
  resolution of the `hD` table. W is tabulated per node, and the node comes
  from the position map. Both are therefore step functions of the angle and
  the position.
- **Tables instead of trigonometry.** Cutter geometry enters only through the
  `hD` table and `bD`.
- **Sizes.** The map size (1024 cells), node count (64), angle resolution
  (256) and delay depth (256 steps) are choices of this design. The delay
  depth covers spindle speeds down to about 930 rev/min with 6 edges at
  42 µs.
- **Speed.** The Newmark step is sequential. It takes 1233 cycles, about a
  third of the step, where a parallel datapath could take a few hundred.

## Verification

Every block has a self-checking testbench that prints
`TB_RESULT checks=… failures=…`. Reference values come from real-valued
models in `tb/milling_ref_pkg.sv`: a Gaussian solver with partial pivoting
and a Newmark step.

| testbench | what it checks |
|---|---|
| `tb_clock_counter` | counting under a random enable, synchronous reset |
| `tb_axis_reg_slice` | random valid/ready traffic: no beat lost or duplicated, order kept, stalled output held, latency |
| `tb_cutting_force` | random inputs against the full force and its right-hand part, latency |
| `tb_node_map` | map contents, clamping at both ends, read latency |
| `tb_dac_spi` | decoded SPI frames, bit order, SCLK rate, LDAC pulse, no new sample while a frame is in flight |
| `tb_gauss_solver` | random diagonally dominant systems, exact cycle count, zero pivot |
| `tb_newmark_solver` | 200 steps of a coupled, damped 5-mode system under a varying load, with a random added stiffness dK in 100 of them, against the real-valued step; clear; constant step time |
| `tb_aloop` | reduced loop (N = 3, 4 edges) against a full model of the loop, with DAC stalls, STOP, forced overruns and a singular system |
| `tb_milling_top` | default size, reference cut |

### The default-size test

`tb_milling_top` runs the design at its default size, with the reference cut
and the five lowest natural frequencies of the workpiece: 184.6, 211.4,
242.2, 434.4 and 571.5 Hz, with 5 % damping. It runs for 500 steps, with
STOP raised after step 399, and checks:

- every result and DAC frame against the model;
- that frames are exactly 42 µs apart;
- that the longest computation fits into the step.

A second run repeats the checks, without STOP, for 300 steps of a faster
cut: 1212 rev/min, with the feed raised in the ratio 1512/1112 and a tooth
period of 196 steps. A third run shortens the step to force overruns. A fourth
run puts all six edges in contact in every step and checks that the worst-case
computation still fits. The test counts:

- active and inactive edges;
- delayed feedback;
- STOP;
- overruns;
- DAC frames;
- map cell changes.

Any of these that never happens is reported as a failure. The test takes
about 20 s to build and 7 s to run.

## Simulating

Compile the packages first. Use Verilator 5 with timing support:

    verilator --binary --timing -Wno-fatal --top-module tb_milling_top \
        rtl/milling_pkg.sv tb/milling_ref_pkg.sv \
        rtl/fx_div.sv rtl/gauss_solver.sv rtl/newmark_solver.sv \
        rtl/cutting_force.sv rtl/node_map.sv rtl/clock_counter.sv \
        rtl/axis_reg_slice.sv rtl/dac_spi.sv rtl/aloop.sv rtl/milling_top.sv \
        tb/tb_milling_top.sv
    ./obj_dir/Vtb_milling_top

For any other block, change the top module and the testbench file. Every file
starts with a comment that gives its interface, its timing and its own
choices.
