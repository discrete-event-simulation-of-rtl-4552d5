# A discrete-event molecular dynamics engine in SystemVerilog

Discrete molecular dynamics (DMD) replaces the smooth force fields of ordinary
molecular dynamics with step potentials. In the simplest case, which is the
one built here, every particle ("bead") is a hard sphere. Between events a
bead moves in a straight line at constant velocity. A simulation therefore
does not advance by fixed time steps. It jumps from one event to the next,
and there are two kinds of event:

* **collision**: two beads touch and exchange momentum along the line joining
  their centres;
* **cell crossing**: a bead leaves the cell of the spatial grid it was in.
  Cells exist only for bookkeeping. Each bead need only look at the 27 cells
  around its own to find its next collision partner.

The engine keeps every scheduled event in a hardware priority queue. It
repeatedly takes the earliest event and computes the new bead states
("collider"). It writes them back and cancels every other scheduled event
that names those beads. Finally it predicts the next events of the updated
beads and inserts them into the queue. Each bead has at most two scheduled
events, its next crossing and its next collision, so one event produces at
most four new ones.

The top module is `dmd_top`. Everything is synthesizable SystemVerilog with
a shared package `dmd_pkg`. One file holds one module.

## Data formats

| quantity | format |
|---|---|
| position | 32-bit unsigned per axis. The periodic box maps onto 0 .. 2^32-1, so wrap-around is free. |
| cell | top 5 bits of each position component, giving a 32 x 32 x 32 grid. `cell_of()` forms the 15-bit address `{z,y,x}`. |
| bead diameter sigma | one cell = 2^27 position units |
| velocity | 32-bit two's complement, in position units per tick |
| time | 32-bit tick count |
| bead tag | 10 bits (1024 beads) |
| `event_t` | time, bead tags a and b, kind (collide / cross), axis and direction of a crossing (56 bits) |
| `bead_t` | position, velocity, time of last update (224 bits) |
| `inval_t` | two bead tags broadcast for cancellation |

A bead's stored position is valid at its own time tag. Every unit that uses
a bead first advances it ballistically to the time it needs.

## Block map

```
            +--------------------- invalidation broadcast ----------------------+
            v                                  v                               |
  event_priority_queue --earliest event--> event_processor --new states--> commit_buffer --> bead memories
  (pq_router, 4 x pq_unit,                 (collider, 6 stages)                 |        (write-back)
   pq_dequeue)                                                                  v
            ^                                                       event_predictor
            +------------------ up to 4 new events ---------------- (8 x pair_predictor,
                                                                      wall_predictor)
  bead_state_memory   : state of each bead, by tag, plus the bead's slot in its cell
  bead_pointer_memory : 8 bead tags per cell, plus a free-slot vector per cell
  memory_controller   : sequences all of the above (contains commit_buffer)
```

## The event priority queue

The queue is the part that has to do the most work per clock. In every
cycle it must:

* deliver the earliest event;
* cancel any number of events that name the beads just updated;
* accept up to four new events.

It is made of four identical **shift-register units** (`pq_unit`), each a
sorted chain of `pq_cell`s (38 per unit, 152 in all).

**Insertion.** A unit accepts one insertion per clock. Every cell compares
its own time with the new event's time. The comparison result passes down the
chain, so each cell knows whether it is ahead of the insertion point, at it,
or behind it. From that, and from its neighbours, the cell picks one of four
actions: *stay*, *shift forward* (take the content of the cell behind),
*shift back* (take the content of the cell ahead) or *insert* (take the new
event). With a dequeue, the entries behind the insertion point move forward.
With an insertion alone, they move back. Ties keep the older entry ahead.

**Invalidation and "scrunching".** Every cell compares its bead tags with the
broadcast every cycle and drops its valid bit at once, which leaves a hole.
Holes are closed by upgrading actions: a cell at or behind a hole treats
*shift back* as *stay* and *stay* as *shift forward*. So the entries behind a
hole move up one place per clock, and an insertion behind a hole uses it
instead of pushing the tail back. The flag `pf` ("a hole exists at or ahead
of this cell") runs down the chain for this. The exact rule table is in the
header of `rtl/pq_cell.sv`.

**Routing.** `pq_router` spreads the up to four new events over the four
units using one of the 24 permutations. A 16-bit LFSR chooses the
permutation every cycle (index = LFSR mod 24, decoded in the factorial
number system). Spreading the load this way keeps the units equally full on
average.

**Dequeue.** `pq_dequeue` compares the four heads in a three-comparator
tree; ties go to the lower unit. It presents the earliest head and strobes
that unit's dequeue when the consumer takes it. If a unit has a hole at its
head, the true minimum is not known for one cycle, and the output is held
invalid until the hole moves out.

**Overflow.** A unit that is full and receives an insertion without a
dequeue pushes its latest event off the tail and raises `overflow`. In the
full-scale architecture such events would go to an off-chip event heap,
which is not part of this RTL. Models must fit in the 152 on-chip entries,
which is about 76 beads at two events per bead.

## The collider (`event_processor`)

A six-stage pipeline with full 32-bit precision:

1. time since each bead's last update;
2. advance both beads to the event time (`p += v*dt`, wrapping);
3. relative position `r` (32-bit signed, which is the minimum image in the
   periodic box) and relative velocity `v`;
4. `b = r . v`;
5. `q = b * r`;
6. `dv = q / sigma^2`. The beads always touch at exactly one diameter, so the
   division is a multiplication by the constant `2^-54`, written as
   `256 * 2^-62`. Then `v_a += dv` and `v_b -= dv` (equal masses, elastic).

For a crossing, bead a is advanced. If whole-tick rounding has left it just
short of the new cell, it is placed on the first position of the new cell,
so that the cell taken from its position always matches the event.

Each stage carries its event's bead tags and kills itself when the
invalidation broadcast names one of them. `hold` freezes the whole pipeline.

## The predictor (`event_predictor`, `pair_predictor`, `wall_predictor`)

For one bead that has just been updated, the predictor finds its earliest
collision among all beads in the 27 surrounding cells, and its next wall
crossing.

**Pair predictor.** This is a 23-stage pipeline that accepts one pair per
clock. It solves `|r + v*tau| = sigma` for the earlier root:

    tau = (-b - sqrt(b^2 - v^2 (r^2 - sigma^2))) / v^2 ,   b = r . v

A collision requires that the beads approach (`b < 0`) and that the root be
real. Inputs are reduced to 17 bits: 12 fraction bits plus the 5 cell bits,
i.e. units of 2^15 position LSBs, in which sigma = 4096. The square root and
the reciprocal `2^80 / v^2` are computed side by side and joined by one
multiplication at the end. The result is scaled back to 32-bit time and
added to the current time. Pairs already overlapping and approaching collide
at once (`tau = 0`). In this RTL the square root and reciprocal are
combinational loops in one stage each, followed by delay stages up to 23.
For a fast clock they would have to be spread over those stages.

**Wall predictor.** For each axis, the wall ahead depends on the sign of
the velocity. The crossing time is `ceil(distance / |v|)`, where the
distance is measured to the first position outside the cell; the earliest
of the three axes wins. Its result is delayed to the same 23-stage latency.

**Batching.** The neighbourhood arrives one cell per clock, as the eight
tags of a bead-pointer-memory row. Eight `pair_predictor` lanes take one
row per clock, and a running minimum keeps the earliest collision over the
27 rows. `done` pulses 24 clocks after the last row.

Reduced input precision means a predicted contact can be off by a fraction
of a tick. The collider always assumes a separation of exactly sigma, so a
collision can change the kinetic energy slightly. In the end-to-end test the
error stays below 1 %, and below 0.4 % in the cases observed.

## Bead memories and the one-cycle cell change

* `bead_state_memory`: bead states indexed by tag. It has eight synchronous
  read ports, enough to read a whole pointer row in one clock, and two
  write ports for the two beads of a collision. Reads are write-before-read.
  It also holds the **bead slot memory**: a one-hot vector per bead giving
  its slot within its cell.
* `bead_pointer_memory`: for every one of the 32768 cells, eight bead tags
  plus the **cell slot memory**, a free-slot bit vector per cell. Eight
  slots suffice because a cell one diameter wide holds at most eight bead
  centres. The module clears itself after reset, one cell per clock (32768
  clocks, `busy` high meanwhile).

A crossing is committed in a single cycle. While the event waits in
`commit_buffer`, the controller fetches three things: the free vectors of
the old and new cells and the bead's one-hot slot. In the commit cycle:

* the bead's tag is written into the lowest free slot of the new cell;
* a null pointer goes into its old slot;
* both free vectors and the bead slot are updated;
* the bead state is written;
* the tags are broadcast for cancellation.

A crossing into a cell with no free slot is flagged (`n_cell_full`).

## The controller and its timing

`memory_controller` runs one event at a time:

    POP -> READ (2) -> collider (6) -> FETCH -> COMMIT -> predict a [-> predict b] -> INSERT

Predicting one bead takes 2 clocks to read it, 27 row reads with their bead
reads pipelined behind them, and the predictor latency: about 35 clocks. A
crossing therefore takes about 75 clocks and a collision about 110. The
end-to-end test commits 400 events in about 29,000 clocks after loading.

Before the first event, the controller predicts every loaded bead once.
Loading: after reset, wait for `ld_ready`, then write beads
`0 .. n_beads-1` with `ld_v/ld_id/ld_b`. Each bead's tag is put into its
cell. Then pulse `start`. The run stops after `max_events` commits and
raises `done`. Every commit is visible on `c_v/c_ev/c_a/c_b`, and counters
report commits by kind, cancellations, overflows, hole-closing cycles and
cycles with three or four insertions.

## Where this design departs from the original architecture

* **No event overlap.** The original keeps many events in flight at once:
  queue, collider and predictors form one deep pipeline. An event's
  predictions may then depend on an event still ahead of it. The original
  resolves that with stalls: a newly inserted event that belongs inside the
  collider restarts the pipeline from shadow registers, and a coherence
  check stalls an event whose neighbourhood is being updated. It commits
  about one event per 1.5 clocks. This design processes one event at a time
  (about 75-110 clocks per event). The collider and predictors are fully
  pipelined and accept one input per clock, but the controller does not use
  that. The shadow registers and coherence stalls are therefore not built;
  `hold` on the collider is a plain freeze.
* **Eight predictor lanes**, matching the cell capacity, where the original
  sample system had 19 predictor units.
* **No off-chip event heap.** The on-chip queue of 152 entries is the whole
  queue.
* **Design choices where the architecture leaves details open.** These
  include the number formats above, the collider's stage split, the LFSR,
  the tie rules, the lowest-free-slot rule, the wall clamp, the
  tau = 0 rule for overlapping beads, and the self-clearing pointer memory.

## Size

The full default configuration synthesizes generically with yosys to about
19,000 cells, 35,000 flip-flop bits and 3.1 Mbit of memory. The memory is
mostly the pointer memory (32768 x 8 x 10 bits) and the bead memory
(1024 x 224 bits).

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_pq_cell` | next-state rule of a cell (and of a head cell) for random inputs, against the rule written out in the bench |
| `tb_pq_unit` | random insert/dequeue/invalidate against a reference multiset: head is earliest, count, overflow drops the latest, holes closed |
| `tb_pq_router` | outputs are the inputs under the permutation named by `perm_idx`; all 24 occur |
| `tb_pq_dequeue` | winner by linear scan, ties to the lower unit, no payload with a head hole, one-hot dequeue |
| `tb_event_priority_queue` | 4000 random cycles against a reference: order, membership, count, one-clock latency, drain; four-way insertion, kills and scrunching all occur |
| `tb_event_processor` | head-on exchange exact, 40 oblique collisions against floating point (2 LSB), crossings incl. wrap, kill, hold, latency 6; random junk on idle inputs |
| `tb_pair_predictor` | 3000 random pairs against a double-precision root: hits within 4 ticks + 0.2 %, misses, receding, contact, self; latency 23 |
| `tb_wall_predictor` | 3000 random beads against exact integer crossing times; latency 23 |
| `tb_event_predictor` | 300 beads with 1-4 batches: earliest collision and partner, crossing, `done` timing |
| `tb_bead_state_memory`, `tb_bead_pointer_memory` | random traffic against reference arrays, same-cycle write-before-read, self-clear time |
| `tb_commit_buffer` | prefetch addresses, writes and broadcast for collisions, crossings and full cells |
| `tb_memory_controller` | with the real neighbours: loading, initial sweep, cell membership of every bead after every commit, crossings move one cell, stop after `max_events` |
| `tb_dmd_top` | full default configuration, 26 beads, 400 events (below) |
| `tb_dmd_queue_load` | same checks with 82 beads and 600 events; the queue peaks at 113-122 of 152 entries (depending on the seed) without overflow |

`tb_dmd_top` runs the top with every parameter at its default. It loads an
isolated head-on pair and a 24-bead lattice gas with random velocities. Its
checks:

* every commit: time never decreases; the time tag is updated; energy is
  conserved within 1 %; the beads are at contact distance within 2 %;
* every crossing moves the bead exactly one cell on one axis;
* the head-on pair collides at t = 512 and swaps velocities exactly, as
  worked out by hand;
* collisions, crossings, cancellations, hole closing and three- or four-way
  insertions must each occur at least once, and there must be no overflow
  and no full cell.

It runs in about a second.

`tb_dmd_queue_load` fills the queue toward its capacity. A 102-bead version
of the same run peaks at 141 entries and overflows. Routing is random, so one
38-cell unit fills before the queue as a whole is full. Plan on roughly 130
live events for the default 4 x 38 queue, not 152.

To simulate a testbench with Verilator:

    verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/dmd_pkg.sv tb/tb_dmd_top.sv \
        --top-module tb_dmd_top -y rtl -y tb -o sim
    ./obj_dir/sim

The simulator used is two-state, so every register that is read is reset or
initialised. Only the memories have no reset: the pointer memory clears
itself, and the bead memory holds only beads the host has loaded.
