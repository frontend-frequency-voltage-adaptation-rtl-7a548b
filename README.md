# Frontend frequency-voltage adaptation for minimum energy × delay²

A clustered processor can be split into clock domains along its clusters: one frontend
(fetch, decode, rename and steering, reorder buffer, commit), several backends (issue,
registers, execution, L1 data cache) and the L2 cache, each with its own clock and supply,
and every signal between domains crossing a synchronizing FIFO. In such a design the
frontend is still a monolithic block and burns a large share of the power (about 39%,
against about 11% per backend). This RTL lowers the frontend's frequency and voltage
whenever doing so costs little time, choosing, once per interval of 100K micro-ops, the
operating point that minimises the predicted **energy × delay²** (ED2P) of the next
interval.

The decision needs no thresholds and no tuning. It rests on one observation: the frontend
feeds the backends through a micro-op queue. If that queue is full, dispatch, not the
frontend clock, sets the pace, and the frontend can slow down almost for free. If it is
empty, every lost frontend cycle is lost time.

## The prediction

For the interval that just ended at level *n*, and for every candidate level *l*:

```
time:    T_l / T_n = 1 + (f_n / f_l - 1) * k          k = (1 - p) / (1 + b)
energy:  E_l       = E_n + E_FE,n * (V_l^2 / V_n^2 - 1)
cost:    (T_l / T_n)^2 * E_l        -> choose the level with the smallest cost
```

* `p` is the average fraction of the frontend queue that was occupied during the interval.
  `1 - p` is the free fraction: by Little's law, free slots divided by the fill rate give
  the time a micro-op waits to be dispatched.
* `b` is the branch misprediction rate since execution began (mispredictions per resolved
  branch). Mispredictions lower the rate at which the queue is filled, so they make the
  frontend clock matter less.
* `E_n` is the energy of the whole processor in the interval. `E_FE,n` is that of the
  frontend, the only part whose voltage changes. Dynamic energy scales with V².
* `T_n` is common to all candidates, so it is never measured.

Two limits:

* With `k = 0` (a saturated queue), every level predicts the same time, so the lowest
  voltage (level 20) wins.
* With `k = 1` (an empty queue and perfect prediction), time scales like 1/f. Slowing down
  then pays only if the frontend's share of the energy is large: for the first step below
  10 GHz, the share would have to exceed about 60%.

### In hardware (`ed2p_controller`)

Everything is Q.16 fixed point.

* The ratios f_n/f_l and V_l²/V_n² come from two 21×21 constant tables. `fv_pkg` computes
  them at elaboration from the operating points, so nothing divides by a frequency or a
  voltage at run time.
* `k` is the only run-time division, done once per interval on a 96-cycle sequential
  divider. It is computed as
  `k = (cycles·Q − occ_sum) · branches / (cycles·Q · (branches + mispredicts))`,
  where `Q` is the queue depth and `occ_sum` is the per-cycle occupancy summed over the
  interval. This folds both fractions into one division.
* The candidate levels are evaluated one per clock: two multiplies for the predictions and
  two for the cost, 96-bit. The smallest cost is kept; on a tie the faster level wins.

A decision takes about 160 frontend cycles after the interval ends:

* the energy read-out handshake;
* 96 cycles of division;
* 21 cycles of search;
* a few cycles between states.

An interval is 12,500 cycles or more, so there is ample slack. An assertion flags an
interval that ends while a decision is still running.

The energy-per-access constants are treated as energies at the nominal (level-0) voltage.
The frontend's measured energy is therefore first scaled by V_n²/V_0², to the voltage the
frontend actually ran at, before it enters the formula. This is a choice of this design;
the method itself does not say how the constants relate to voltage.

## Measuring energy in every domain (`energy_monitor`)

Each domain has performance counters, one per activity source (for example array accesses,
issued micro-ops, cycles). Each counter has a fixed Energy per Access Register (EAR), set
as a parameter. When asked, the monitor does four things:

* freezes its counters into a snapshot;
* restarts them, so that the events of the snapshot cycle count in the next interval and no
  event is lost or counted twice;
* multiplies each snapshot counter by its EAR, one per clock;
* returns the sum.

The controller lives in the frontend domain and the monitors live in their own domains. The
read-out is therefore a four-phase handshake:

1. The controller raises `energy_req`.
2. Every monitor synchronises it, computes, holds `energy` stable and raises `snap_ack`.
3. The controller, after synchronising all the acknowledges, reads the energies and drops
   the request.
4. The monitors drop their acknowledges.

The number of events per domain and the EAR values in `cmcd_top` (4 frontend, 4 per
backend, 2 in the L2) are illustrative. Set them for the real circuit.

## Interval statistics (`fe_perf_monitor`)

* Intervals are counted in **committed** micro-ops, 100,000 by default. Micro-ops beyond
  the boundary count towards the next interval.
* Per interval, the monitor sums the frontend queue's occupancy over every frontend cycle
  and counts the cycles.
* Branches and mispredictions are counted from reset and never cleared. When the branch
  count would reach 2³¹, both counters are halved, which keeps the rate and cannot
  overflow.
* `stats_valid` pulses in the cycle after the boundary.

## Changing level without stopping the clock (`fv_stepper`, `voltage_regulator`, `fv_clock_gen`)

Each domain has 21 operating points:

| level | MHz | V | level | MHz | V | level | MHz | V |
|---|---|---|---|---|---|---|---|---|
| 0 | 10000 | 1.100 | 7 | 8348 | 0.832 | 14 | 6696 | 0.632 |
| 1 | 9764 | 1.057 | 8 | 8112 | 0.800 | 15 | 6460 | 0.608 |
| 2 | 9528 | 1.016 | 9 | 7876 | 0.769 | 16 | 6224 | 0.584 |
| 3 | 9292 | 0.976 | 10 | 7640 | 0.739 | 17 | 5988 | 0.562 |
| 4 | 9056 | 0.938 | 11 | 7404 | 0.711 | 18 | 5752 | 0.541 |
| 5 | 8820 | 0.901 | 12 | 7168 | 0.683 | 19 | 5516 | 0.521 |
| 6 | 8584 | 0.866 | 13 | 6932 | 0.657 | 20 | 5280 | 0.501 |

Frequency falls by 236 MHz per level. The supply slews across the whole range in 1 µs, so
one level takes 50 ns. A domain keeps running through a change only between adjacent
levels. The controller may jump straight to any target; `fv_stepper` then walks there one
level at a time.

* **Speeding up:** the voltage rises first. The stepper raises `vreq` with the new
  `volt_level` and waits for the regulator's `vack`. Only then does the clock switch to the
  faster level.
* **Slowing down:** the clock switches first, then the voltage falls, and the stepper waits
  for it to settle.

The clock level is therefore never faster than the supply. An assertion checks that the two
levels differ by at most one, in the safe direction. A new target is taken up at the next
step boundary.

The regulator and the clock generator are analog or macro parts. `voltage_regulator` and
`fv_clock_gen` are behavioural simulation models with the ports such parts would have:

* The regulator ramps linearly, in ten sub-steps per move, over 50 ns per level, then
  acknowledges.
* The clock generator samples its level once per period and produces only whole periods,
  computed to 1 fs.

Replace both with the real macros for implementation.

## Crossing clock domains (`dc_fifo`)

Every domain crossing is a dual-clock FIFO. Each backend has four
20-entry input queues: integer, floating point, memory and copy micro-ops. The top
instantiates all 16 queues from the frontend to the four backends.

* Each side keeps a binary pointer modulo 2·DEPTH.
* The pointer is passed to the other side as a Gray code through a two-flop synchronizer.
  The writer may therefore see the queue fuller than it is, and the reader may see it
  emptier, never the reverse.
* DEPTH need not be a power of two. The Gray code is taken of `pointer + 2^(PW-1) − DEPTH`.
  Those 2·DEPTH codes sit symmetrically in the middle of the reflected Gray sequence, so
  the wrap-around also changes only one bit.
* The read port is show-ahead. `wr_level` and `rd_level` give each side's view of the
  fill.

An entry becomes visible to the reader 2–3 read edges after it is written. The circuit this
scheme stands in for is a custom synchronizer: it makes data readable at the next read edge
whenever the write edge leads that edge by at least 30% of the read period, and otherwise
at the edge after. That behaviour depends on cell timing and cannot be built from standard
cells, so each crossing through `dc_fifo` costs about one read cycle more than that circuit
would.

For simulation with the faster timing there is `sync_fifo_model`, a behavioural model with
the same ports. It stamps every write and read with the simulation time and measures each
clock's period from its last two edges. At a read edge it releases the writes that lead the
edge by at least `THRESHOLD_PCT` (30) percent of the read period. Freed space reaches the
writer by the same rule, measured against the write period. Setting the top's
`BQ_TIMING_MODEL` parameter to 1 puts this model in place of the 16 `dc_fifo` queues. It
uses real-valued time and does not synthesize.

## The top (`cmcd_top`)

`cmcd_top` holds:

* the frontend queue;
* the 16 backend queues;
* one energy monitor for the frontend, one per backend and one for the L2;
* the statistics monitor;
* the controller and the stepper;
* the two models, which generate `fe_clk`.

The parts around it are its ports:

| port group | domain | meaning |
|---|---|---|
| `fq_in_*`, `fq_flush` | frontend | trace cache writes up to 8 micro-ops per cycle; a misprediction flushes |
| `fq_out_*`, `fq_pop_count` | frontend | dispatch reads up to 8 per cycle (show-ahead) |
| `bq_wr_*`, `bq_full` | frontend | steering writes backend *b*, class *q* |
| `bq_rd_*`, `bq_empty` | backend *b* | the backend reads its queues |
| `commit_mops`, `br_resolved`, `br_mispredicted` | frontend | per-cycle commit and branch outcomes |
| `fe_events`, `be_events[b]`, `l2_events` | own domain | per-cycle activity counts for the energy monitors |
| status outputs | frontend | interval end, decision, target, current frequency and voltage level, MHz, mV, step pulses |

Clocking and reset:

* `be_clk[b]` and `l2_clk` are inputs; `fe_clk` is an output.
* `rst_n` is asynchronous. Each domain leaves reset two of its own clock edges after
  release (`reset_sync`), so all clocks must run during reset.
* All other flip-flops use synchronous, active-low reset.

Defaults:

| parameter | default |
|---|---|
| backends | 4 |
| queue classes per backend | 4 |
| backend queue depth | 20 |
| frontend queue depth | 64 |
| fetch width | 8 |
| dispatch width | 8 |
| micro-op width | 64 bits |
| interval | 100,000 micro-ops |
| `BQ_TIMING_MODEL` | 0 (`dc_fifo` queues) |

The frontend queue depth, fetch width and micro-op width are choices of this design; the
others are the processor's published configuration.

The top is synthesizable except for the two models (three with `BQ_TIMING_MODEL = 1`).
Synthesis of the top as it stands stops at them. The top also checks, with an assertion,
that the supply never drops below the voltage of the current frequency level.

## What is not here

The following parts are outside this RTL and connect through the top's ports:

* the trace cache (32K micro-ops, 4-way);
* the branch predictor;
* the IA-32 decoder;
* register renaming and steering (8 micro-ops per cycle, 8 cycles of dispatch latency);
* the reorder buffer;
* the out-of-order backends (40-entry integer and FP issue queues, 96-entry memory order
  buffer, 20-entry copy queue, register files, L1 data caches);
* the copy crossbar;
* the 2 MB L2 cache;
* the per-domain clock trees;
* the regulators and clock generators of the backend and L2 domains, which run at fixed
  levels: their clocks are inputs.

Only the frontend-to-backend queues are built among the domain crossings. The return paths
(results to the reorder buffer, L2 requests and fills) would use the same `dc_fifo`.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_fv_level_rom` | every level against the closed form and the voltage list; the ratio tables against real arithmetic |
| `tb_dc_fifo` | exactly 20 entries before full; 2–3 read edges per crossing; 2,000 random entries in order while the write clock changes speed twice |
| `tb_fetch_queue` | 4,000 cycles against a reference queue, including full and flush |
| `tb_fe_perf_monitor` | interval sums and branch totals against a reference; 12-bit counters force halving |
| `tb_energy_monitor` | exact energy for quiet snapshots; no event lost or double-counted while activity continues; handshake order and latency |
| `tb_ed2p_controller` | 44 decisions; for each, all 21 predictions are redone in real arithmetic |
| `tb_fv_stepper` | one level per request; voltage-before-frequency order; step counts; retargeting mid-walk |
| `tb_voltage_regulator` | 1 µs for 0→20, 50 ns per level, monotonic ramp, settled voltage |
| `tb_fv_clock_gen` | period at six levels; no short period across changes; enable |
| `tb_sync_fifo_model` | writes leading a read edge by 50, 30, 29 and 10 ps of a 100 ps period become visible after 1, 1, 2 and 2 edges; 1,500 random entries in order on unrelated clocks, with the queue filling |
| `tb_cmcd_top` | end-to-end run, below |
| `tb_cmcd_top_sync` | the same run with `BQ_TIMING_MODEL = 1` |

In `tb_ed2p_controller`, the controller's choice must be within 0.01% of the true minimum
cost. The corner cases must pick level 20 (full queue) and level 0 (empty queue).

`tb_cmcd_top` runs the whole top at its default parameters, with 100K-micro-op intervals,
in two phases:

1. **Dispatch-bound:** the queue stays full. The controller chose level 14 (6.7 GHz,
   0.632 V), and the stepper walked there in 14 × 50 ns.
2. **Fetch-bound:** the queue is nearly empty. The controller returned to level 0.

Along the way the testbench checks:

* all micro-op data through the frontend queue and through the 16 backend queues;
* the clock period and the supply at both ends;
* that every mechanism occurred: interval end, energy read-out, decision, step down, step
  up, frontend queue full, backend queue full and empty, flush.

The run takes about a second in Verilator. `tb_cmcd_top_sync` repeats it with the
threshold-timed queues; there the controller also chooses level 14 in phase A.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert --top-module tb_cmcd_top -y rtl -y tb +libext+.sv \
          -Irtl -Itb rtl/fv_pkg.sv tb/tb_cmcd_top.sv -o sim
./obj_dir/sim
```

Replace `tb_cmcd_top` with any other testbench name. `rtl/fv_pkg.sv` must come first,
because the other files import it.

## Departures and open points

* **Synchronizer timing:** the generic two-flop FIFO replaces the threshold-based
  synchronizer, so each crossing takes about one read cycle longer. `sync_fifo_model`
  gives the threshold timing in simulation only.
* **Threshold direction:** the synchronizer's rule is stated here as "a write that leads the
  read edge by at least the threshold is seen at that edge", the way such circuits work.
* **Choices of this design:** the following are not fixed by the method and were chosen
  here:
  * the definition of `p` as the occupied fraction of the queue;
  * `b` counted per resolved branch;
  * the voltage scaling of EAR energies;
  * Q.16 fixed point;
  * interval counting on committed micro-ops;
  * the voltage/frequency order of a step;
  * all handshakes.
* **Backend and L2 clocks:** their frequencies are not specified. The testbench uses about
  8 GHz for the backends and 4 GHz for the L2.
* **Energy values:** the EAR values and event lists are placeholders. Until they are set
  from the real circuit, the absolute levels chosen (for example 14 rather than 20 for a
  nearly full queue) reflect them.
