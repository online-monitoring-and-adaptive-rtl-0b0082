# Aging monitoring and aging-aware routing for a 4x4 mesh NoC

Transistor aging (BTI and HCI) slows a router's critical paths, and it does so
faster in routers that are hot and busy. In a mesh network-on-chip, routing
decides which routers are busy, so a few routers wear out much faster than the
rest. This design keeps a running estimate of every router's age and rebuilds
the routing tables from time to time. Traffic then moves onto shortest paths
that avoid the most worn router and pass through the least worn ones.

The estimate costs very little hardware. A router's aging over a short window
depends mainly on two things: how many flits passed through it (**fl**) and
how long they stayed (**rs**, the summed residence time). Both are bounded for
a window of fixed length, so the degradation for every (rs, fl) combination
can be worked out offline. The results go into one shared lookup table, the
**Centralized Aging Table (CAT)**. Each router then needs only two counters.
At the end of each window it reports its pair, and the central core adds the
looked-up degradation to that router's age.

## Organisation

```
 r0  r1  r2  r3        every router: aging_monitor (flit_counter + rs_counter)
 r4 [r5] r6  r7        core 5 (a middle node): eps_timer, cat_table, age_tracker,
 r8  r9  r10 r11                               route_selector
 r12 r13 r14 r15       every router: routing_table
```

| Module | Role |
|---|---|
| `noc_aging_pkg` | mesh size, widths, port encoding, report-flit layout, path helpers |
| `flit_counter` | counts flits entering the router (12 bit) |
| `rs_counter` | sums residence times of flits leaving the router (14 bit) |
| `aging_monitor` | both counters plus the end-of-window report flit |
| `eps_timer` | window (epsilon) timer, time stamp, period counter |
| `cat_table` | the aging table with its (rs, fl) quantiser |
| `age_tracker` | takes reports, looks them up, accumulates age tags |
| `route_selector` | chooses one shortest path per source–destination pair |
| `routing_table` | per-router path store and port decode |
| `aging_noc_top` | everything above, wired together |

Routers are numbered row by row from the top left: id = 4·y + x, with x
growing east and y growing south. Ports are 0 local, 1 north, 2 east,
3 south and 4 west.

## Time: windows and periods

`eps_timer` counts cycles 0 … `EPS_CYCLES`−1 (10,000 by default) and wraps.
Its value is the **time stamp** of the whole network. In the last cycle of
each window, `eps` pulses. This clears every router's counters and makes every
monitor send its report. A second counter groups `N_EPS` windows into a
**period P**, and the routing tables are rebuilt once per period. The period
is meant to be long, about a week: the default `N_EPS` = 6.048·10¹⁰ is one week
of 10,000-cycle windows at 1 GHz. Aging is slow, so the routes need to change
only that often.

## Monitoring inside a router

**fl.** On each of the five input ports a flit enters when valid (V) and
ready (R) are both high. A parallel counter adds the number of such ports (0–5)
each cycle.

**rs.** A flit carries the time stamp at which it was written into an input
buffer. When it leaves through an output port, a 14-bit subtractor computes
"now − en-queue time". A router holds a flit for at most 15 cycles, so the
result is cut to 4 bits. A multiplexer replaces the result by 0 in two cases:

* no flit leaves on that port (`ex_valid` low);
* the difference is negative.

A negative difference happens only when the flit entered before the time stamp
wrapped, that is, in the previous window. Such a flit is simply not counted.
The five 4-bit values are summed and accumulated.

Both counters saturate rather than wrap. fl cannot come near 4,095 in practice
(about 2,300 flits per window at most). rs can: 2,300 flits of up to 15 cycles
each exceed 14 bits. The saturated value then selects the table's top range,
which is the right answer anyway.

**Report.** In the `eps` cycle the monitor captures the counts, including that
cycle's flits. It packs them into a 128-bit report flit: `{pad, router_id[3:0],
fl[11:0], rs[13:0]}`. The report is held with `report_valid` until
`report_ack`. If the next window ends before the report is taken, the newer
report replaces it.

## The aging table

`cat_table` quantises each value into a range. Range 0 means exactly zero.
Ranges 1 … STEPS divide (0, MAX] into equal parts:

    bin(v) = 0                          if v = 0
           = min(STEPS, ceil(v·STEPS / MAX))   otherwise

In hardware this is a row of comparisons `v·STEPS > k·MAX` against constants,
with no divider. The maxima are RS_MAX = `EPS_CYCLES` and FL_MAX = 2,300. The
step counts default to 8 each, so the table has 9 × 9 = 81 signed 16-bit
entries, indexed by `rs_bin·9 + fl_bin`.

Entry (0,0) is the idle router. It should hold a **negative** value: with no
stress the BTI shift partly recovers. All other entries hold the degradation
for one window under that condition. They come from an offline flow:

1. estimate the router's power per condition;
2. derive its temperature;
3. compute the stress as `S = m1·Y + m2·α·f`, where m1 = 3·m2, the duty cycle
   Y is taken from rs and the activity α is taken from fl/FL_MAX;
4. apply the BTI and HCI delay models, both of which grow as exp(−Ea/kT).

That flow is not hardware. The table is written through `wr_en/wr_addr/wr_data`
after power-up and is not reset. The unit of an entry is for the user to
choose. Age tags are 64 bits wide. Three years contain about 9.3·10¹² windows,
and even the largest 16-bit entry added every window stays below 2⁶⁴.

## Age tags

`age_tracker` serves pending reports one at a time, lowest router first. Each
report takes three cycles:

1. take the report (one-hot `report_ack`);
2. send (rs, fl) to the table;
3. add the registered answer to `age[router_id]`.

An age is clamped at zero when recovery would take it below zero, and it
saturates at the top. When 16 reports have been absorbed, `round_done` pulses.
With 16 routers this happens 48 cycles after `eps`. In this RTL the reports
travel to core 5 over direct wires. In a chip they would be ordinary packets
in the network: one flit per router per window.

## Choosing paths (the hard part)

When a period ends, the top waits for that window's `round_done`, so the ages
are current. It then starts `route_selector`. The selector first takes a
snapshot of the 16 ages and finds the most aged router; on a tie, the lowest
id wins. It then visits every ordered pair (src, dst) with src ≠ dst.

**Candidate paths.** A pair dx hops apart in X and dy hops apart in Y has
C(dx+dy, dx) shortest paths. Each one is a string of dx+dy hops, of which
exactly dx are X hops. A path is stored as a mask: bit i is 1 if hop i is an
X hop. The direction of each hop needs no bits, because it is fixed by where
the destination lies. The selector counts m = 0 … 2^(dx+dy) − 1 and treats
every m with exactly dx one-bits as a candidate. That is one candidate per
cycle.

**Scoring a candidate.** For each candidate, combinational logic walks the
path through the snapshot ages. It computes two things:

* the **sum of ages** of all routers on the path;
* whether the path **passes through** the most aged router. The source and the
  destination do not count, because every candidate contains them.

**Choice.** Paths that avoid the most aged router beat paths that pass through
it. Within the same class, the lower age sum wins. On equal scores, the first
mask in counting order wins. The first valid mask has its low dx bits set,
which is the XY path, so with equal ages the result is ordinary XY routing.
Sometimes every candidate passes through the most aged router, for example on
a straight line, or in a 2-hop L whose corner is that router. The age sum alone
decides then.

The winner is written to the source router's `routing_table`. A pair at
distance L takes 2^L + 2 cycles; a pair with src = dst takes one. A full 4x4
update takes **2,785 cycles** from `start` to `done`, which is small against
one window.

**Why one path per pair.** Any other router on the path may be passed by
flits of many sources. Different sources may need different continuations
through it, so per-destination next-hop tables cannot express these choices.
The tables therefore hold whole paths at the source (source routing). A flit
carries its path mask and hop index, and each router decodes its output port
with `next_port` in `routing_table`.

## Routing tables

`routing_table #(SRC_ID)` holds 16 path masks. After reset each one is the XY
path, which is used until the first period ends. It has two read sides:

* `rd_dst` returns `rd_path` and the first-hop port `rd_port`, for injection.
* `fw_dst/fw_path/fw_hop` return `next_port`, for a flit in transit at this
  router (`PORT_LOCAL` once it has arrived).

## Top-level interface and timing

`aging_noc_top` has these parameters: `EPS_CYCLES`, `N_EPS`, `RS_STEPS`,
`FL_STEPS`, `DD_W` and `AGE_W`. Its ports are arrays indexed
`[router][port]`:

| Group | Ports |
|---|---|
| router side, inputs | `in_valid`, `in_ready`, `ex_valid`, `eq_t` |
| router side, outputs | `now_t` (to stamp flits on entry), `eps`, `p_end` |
| table load | `cat_wr_en`, `cat_wr_addr`, `cat_wr_data` |
| status | `age`, `ages_updated`, `routes_updated`, `route_busy`, `max_aged`, running `fl`/`rs` |
| route lookup | `rt_dst` → `rt_path`, `rt_port`; `fw_dst/fw_path/fw_hop` → `fw_port` |

The timing of one window:

| Cycle | Event |
|---|---|
| W−1 | `eps` |
| W | reports valid |
| W+48 | `ages_updated` |
| period end + 48 + 2,785 | `routes_updated` |

The reset is asynchronous and active low. Everything is one clock domain.

## What is this design's own choice

The monitoring hardware follows the original scheme closely: the AND of V and
R, the parallel counters, the 12- and 14-bit widths, the per-port subtractors
with a 4-bit multiplexer that drops negative results, and a counter reset every
window. The following are choices made here:

* the exit-valid bit per output port;
* clamping of residence above 15 cycles, and saturation of both counters;
* one central timer whose value is also the time stamp;
* the report-flit layout and its valid/ack handshake;
* the number and equal size of the table ranges, and the entry width;
* ages kept centrally, clamped at zero, 64 bits wide;
* the tie rules of the path choice;
* the fallback when no path avoids the most aged router;
* source routing by path mask;
* XY tables after reset.

The original method finds the "k best" shortest paths with a Dijkstra-style
search. Here all shortest paths of the mesh are candidates; on a mesh they all
have the same length. Reports reach the table over wires instead of through
the network.

The routers themselves are not part of this RTL: the buffers, virtual
channels, allocators and crossbar of a 5-port, 5-stage router with 4 virtual
channels of 4 flits. Neither are the cores, or the offline flow that fills the
table. The top takes the routers' handshakes and time stamps as inputs and
gives them the routing information as outputs.

## How far it is checked

Each module has a self-checking testbench in `tb/` that compares it with an
independently written reference model:

* the counters are checked cycle by cycle, including boundary drops and
  saturation;
* the table's quantiser is checked against division;
* the tracker is checked with a behavioural table;
* the path selector is checked against a depth-first search over all shortest
  paths, with random, tie-heavy and single-hot-spot age maps, and with the
  2,785-cycle update time.

`tb_aging_noc_top` runs the whole subsystem with 1,000-cycle windows and
4-window periods for 13 windows of random traffic. It has a hot column, an
idle router and time stamps that wrap. It compares all running counts, all
ages after every round, the 48-cycle reporting latency, and every routing-table
entry after three updates. It also counts each mechanism (dropped negatives,
clamped residences, recovery entries, ages held at zero, non-XY paths, the
fallback) and fails if one never happened.

`tb_aging_noc_top_full` runs the top at its default parameters for two full
10,000-cycle windows. It cannot reach a routing update, because the default
period is a week.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl \
    rtl/noc_aging_pkg.sv tb/tb_aging_noc_top.sv --top-module tb_aging_noc_top
./obj_dir/Vtb_aging_noc_top
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`. To test
another block, replace the testbench file and top name (for example
`tb_route_selector`). The mesh size is set by `MESH_X`/`MESH_Y` in
`noc_aging_pkg`. The 4x4 setting is the one simulated throughout; with a
2x2 setting the path selector also passes its reference checks.
