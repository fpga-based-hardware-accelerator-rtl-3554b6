# K-means cluster-assignment accelerator

This is a small pipelined engine for the assignment step of K-means clustering on
2-D data. It holds up to 256 points and 4 centroids in on-chip RAM. For every
point it computes the squared Euclidean distance to each centroid, keeps the
smallest, and writes the index of the nearest centroid into an assignment RAM.
One distance is computed every clock cycle, so a point takes 4 cycles. The scan
over all points is repeated for a fixed 5 iterations. The RTL follows a
published FPGA accelerator for K-means (Artix-7, 100 MHz). That work reports 1
point per 4 cycles, about 9 cycles of latency per point, 10.29 µs per iteration
and 51.45 µs for the run, and this RTL meets those figures cycle for cycle.

The centroids are **not** recomputed between iterations. The published design
leaves the centroid update to future work, and so does this RTL. Each of the
5 iterations therefore produces the same assignments. What you get is a
nearest-centroid classifier with a deterministic schedule. It is also the
assignment half of a full K-means loop, and a centroid-update stage could read
its assignment RAM.

## Datapath

```
            pid ┌──────────────┐ point  ┌─────────┐ dist ┌──────────────┐ best_idx ┌────────────┐
   ┌──────┐ ───►│ km_point_mem │───────►│         │─────►│              │─────────►│            │
   │      │     └──────────────┘        │ km_edc  │      │km_min_select.│          │km_assign_  │
   │km_fsm│ cid ┌──────────────┐centroid│ (4 clk) │      │              │best_valid│   mem      │
   │      │ ───►│km_centroid_  │───────►│         │      │              │─────────►│ we         │
   │      │     │   mem        │        └─────────┘      └──────────────┘          │            │
   │      │     └──────────────┘                            ▲ valid, idx,          │ waddr      │
   │      │ valid,pid,cid  ┌────────────────────────────┐   │ start_point          └────────────┘
   └──────┘ ──────────────►│ km_pipe_align (5 stages)   │───┘   pid ─► 1 reg ─► waddr ─┘
                           └────────────────────────────┘
```

| Module | Role |
|---|---|
| `km_pkg` | coordinate, point, distance and state types; widths |
| `km_fsm` | IDLE / ASSIGN / UPDATE / CHECK controller; issues one (point, centroid) pair per cycle |
| `km_point_mem` | 256 × 32-bit point RAM, 1-cycle synchronous read, write port for loading |
| `km_centroid_mem` | 4 × 32-bit centroid RAM, same timing |
| `km_edc` | squared-distance pipeline: operand register, subtract, square, add |
| `km_pipe_align` | 5-stage delay line carrying valid, point index and centroid index beside the distance |
| `km_min_selector` | running minimum over a point's 4 distances, result register |
| `km_assign_mem` | 256 × 2-bit assignment RAM, written by the selector, read by the host |
| `kmeans_top` | wiring, host ports, status and debug probes |

## Following one pair through the pipeline

Timing is the hardest part to get right, because the indices and the distance
travel on separate paths. They must meet again at the selector. The controller
issues a pair in cycle *t*, with registered `pid`/`cid` acting as RAM
addresses. From there:

| cycle | what happens |
|---|---|
| t | `pid`, `cid` on the RAM read addresses; `issue_valid` = 1 |
| t+1 | point and centroid words at the RAM outputs |
| t+2 | operands registered in `km_edc` |
| t+3 | `dx = xa − xb`, `dy = ya − yb` registered (17 bits) |
| t+4 | `dx²`, `dy²` registered (34 bits, DSP multipliers) |
| t+5 | `dist = dx² + dy²` registered (35 bits); the alignment line delivers the same pair's valid / `pid` / `cid` in this cycle |
| t+6 | if this was centroid 3: the selector's output register holds the nearest index, `best_valid` = 1 |
| t+7 | the result is in the assignment RAM (written at the edge ending t+6) |

A point's four pairs are issued at t … t+3, so its result is in `best_idx`
at t+9. This is the 9-cycle latency per point. Results come out every 4
cycles. The alignment depth (5) is the RAM latency (1) plus the distance
latency (4). The published design also uses a 5-deep alignment line with three
computing stages. The operand register in front of the subtractors is what
makes the two figures agree. If you change the RAM or the distance latency,
set `ALIGN` on `kmeans_top` to match. The controller's flush length follows it
as `ALIGN − 1`.

## Controller

```
IDLE ──start──► ASSIGN ──last pair──► UPDATE ──4 cycles──► CHECK ──iterations left──► ASSIGN
                                                             └──── 5th iteration ───► IDLE (done)
```

* **ASSIGN** issues the pairs point-major: (0,0) (0,1) (0,2) (0,3) (1,0) … It
  takes 256 × 4 = 1024 cycles.
* **UPDATE** waits `ALIGN − 1 = 4` cycles. By then the last distance has
  reached the selector. This state does not update the centroids (see above).
* **CHECK** increments the iteration counter. It loops back to ASSIGN or
  finishes.

One iteration is 1024 + 4 + 1 = **1029 cycles**, which is 10.29 µs at
100 MHz. Five take 5145 cycles. The last point's result reaches the selector
output in the cycle after CHECK and is written into the RAM at the end of that
cycle. The writes at the end of one iteration overlap the first cycles
of the next. This is safe because nothing reads the assignment RAM during a
run. The top-level `done` waits for the pipeline to drain. It rises in the first
cycle in which the final result is in the RAM, 5146 cycles after the first
pair is issued, and stays high until the next `start`.
`start` is only sampled in IDLE.

## Nearest-centroid selection

`km_min_selector` sees the 4 distances of a point on consecutive valid cycles.
The first one (`start_point`, centroid index 0) loads the running-minimum
register unconditionally. Each later one replaces it only if it is strictly
smaller. **Ties therefore go to the lower centroid index.** When the distance
of centroid K−1 has been compared, the winner is copied to the output register
(`min_dist`, `best_idx`) and `best_valid` pulses. The top delays the point
index by one register so that it lines up with that pulse as the write
address.

## Number format and sizes

* Coordinates are 16-bit signed two's complement (`km_pkg::COORD_W`). The
  binary point does not matter, because only the order of distances is used.
  The published design says only "fixed point". 16 bits is inferred from its
  reported memory size of about 1.08 KB: 256 × 32 + 4 × 32 + 256 × 2 bits =
  1104 bytes.
* Distances are kept at full precision (35 bits) and are never rounded, so
  the index chosen is exactly the true nearest centroid. The square root is
  never taken.
* `N_POINTS = 256` is not stated as such in the published work. It is the
  count that makes both the memory size and the 1029-cycle iteration come out.
  The published debug capture shows a 5-bit point index, which would address
  only 32 points. This RTL uses an 8-bit index.
* `K = 4` and `ITERS = 5` are the published values. All three, and `ALIGN`,
  are parameters of `kmeans_top`. The coordinate width is a package constant.

## Using it

Ports of `kmeans_top` (all synchronous to `clk`; `rst` is synchronous and
active high):

| Port | Use |
|---|---|
| `pt_we`, `pt_waddr[7:0]`, `pt_wdata` | write a point (`km_pkg::point_t`, `{x, y}`) |
| `cen_we`, `cen_waddr[1:0]`, `cen_wdata` | write a centroid |
| `start` | one-cycle pulse while idle starts a run |
| `busy`, `done` | run in progress / run finished and every assignment written |
| `asg_raddr[7:0]` → `asg_rdata[1:0]` | read a point's cluster index, one cycle later |
| `dbg_state[3:0]`, `dbg_iter_count[7:0]`, `dbg_point_idx[7:0]` | controller state (IDLE 0, ASSIGN 1, UPDATE 2, CHECK 3), completed iterations, point being issued |
| `dbg_valid_pipe[4:0]`, `dbg_edc_dist`, `dbg_min_dist`, `dbg_best_idx`, `dbg_best_valid` | alignment valid bits, distance output, selector output |

The sequence is: load the points and centroids, pulse `start`, wait for
`done`, then read the assignment RAM. An assertion in `kmeans_top` flags a
RAM write while `busy`. The RAMs have no reset and no initial contents. The
`dbg_*` ports carry the signals that the published design watched with an
on-chip logic analyser, so an analyser core or a simulator can probe them.

## What is this design's own

The following follow the published design: the block structure, the four
controller states, the three-stage distance calculation with DSP squaring,
the 5-deep alignment registers, 1-cycle BRAM reads, K = 4, 5 fixed iterations,
and the rates. The following are choices made here:

* the write ports used to load the point and centroid RAMs, and the read port
  of the assignment RAM (the published design preloads its RAMs and gives no
  host interface);
* the operand register in front of the subtractors;
* the 4-cycle UPDATE length and the state encoding;
* the tie rule (lowest index) and the end-of-point test (`idx == K−1`);
* 16-bit signed coordinates and N = 256 (inferred, see above);
* the `busy`/`done` handshake and the load-while-busy assertion.

Not built: the centroid update and any convergence test (future work in the
published design), and the vendor logic-analyser core (replaced by the
`dbg_*` ports).

## Simulation

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| Testbench | Checks |
|---|---|
| `tb_km_point_mem`, `tb_km_centroid_mem`, `tb_km_assign_mem` | every word, 1-cycle read latency, read-during-write returns old data |
| `tb_km_edc` | 2000 random and extreme pairs against 64-bit arithmetic, 4-cycle latency at full rate |
| `tb_km_pipe_align` | 5-cycle delay of valid and indices, every stage's valid bit, reset |
| `tb_km_min_selector` | 2000 groups with gaps and ties against a reference minimum |
| `tb_km_fsm` | the full default schedule cycle by cycle (1029 cycles per iteration), start ignored while running, restart, reset mid-run |
| `tb_kmeans_top` | two complete runs at default sizes: every result, latency 9, 4-cycle spacing, 1029-cycle iterations, `done` at 5146, assignment RAM contents; counts replacements, ties, flush cycles, iterations and the drain wait |

With plain Verilator (5.x), from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv \
    rtl/km_pkg.sv tb/tb_kmeans_top.sv --top-module tb_kmeans_top
./obj_dir/Vtb_kmeans_top
```

Replace the testbench name to run another one. All of them finish in well
under a second. The default-size end-to-end run takes about 10,000 cycles.
