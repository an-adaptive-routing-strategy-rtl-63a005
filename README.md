# Traffic-aware output selection for a mesh network-on-chip

An adaptive routing function in a mesh network-on-chip often allows a packet
more than one output, for example "east or south" when the destination lies
to the south-east. A *selection function* then picks one of them. Which
congestion information works best depends on the traffic. With mostly
short-range traffic, the buffers one hop ahead matter most. With long-range
traffic, a wider regional view of congestion matters more.

This RTL implements a router that measures this at run time. Each router
classifies the packets it routes as *local* (destination less than two hops
away) or *non-local*. Every 32 cycles it switches its selection strategy:

* **Neighbors-on-Path (NoP)** while fewer than 30 % of the packets were
  non-local;
* **Regional Congestion Awareness (RCA)** otherwise.

The active strategy supplies the congestion term of a weighted score. That
score also includes a link-selection probability computed offline and the
neighbour's instantaneous power change:

    Score[d] = alpha * Psel[d] + beta * B[d] / max_buffer + gamma * dP[d] / max_power

The router sends the packet to the free admissible output with the highest
score.

The strategy comes from the paper "An Adaptive Routing Strategy to Reduce
Energy Consumption in Network on Chip". That paper evaluates it in a network
simulator and does not publish a hardware design. The router around the
strategy is written here from scratch. So are the exact arithmetic of the
NoP and RCA metrics and the power estimate. Each choice is listed below.

## Network

`noc_mesh` is a `ROWS x COLS` mesh, 8 x 8 by default, with one router per
node:

* Node `n = y*COLS + x`. Row 0 is the northern edge and column 0 the western
  edge.
* Neighbours are joined by a flit link in each direction and a credit wire
  running back along each link.
* Each router also drives a status bundle (`nbr_info_t`) that its four
  neighbours read.
* Every node's local port is a top-level port for a processing element:
  * `inj_flit`, `inj_valid`, `inj_ready` to inject;
  * `ej_flit`, `ej_valid`, `ej_ready` to eject.
  
  Both are valid/ready handshakes.

Packets use wormhole switching:

* The head flit carries the destination and source coordinates.
* Any number of body flits follow, then a tail flit. A one-flit packet sets
  both the head and the tail marker.

Flit layout (`noc_pkg::flit_t`, 34 bits):

| bits | head flit | other flits |
|---|---|---|
| 33 | head = 1 | head = 0 |
| 32 | tail | tail |
| 31:16 | free payload | payload |
| 15:12 | source y | payload |
| 11:8 | source x | payload |
| 7:4 | destination y | payload |
| 3:0 | destination x | payload |

Coordinates are 4 bits, so meshes up to 16 x 16 are possible.

Configuration inputs:

* `cfg_psel[n][d]` is the selection probability of router `n`'s link `d`,
  with 0..255 standing for 0..1.
* `cfg_w[n]` holds router `n`'s alpha, beta and gamma in tenths (0..10, summing
  to 10).

Both come from offline analysis and are meant to be held constant. The
offline analysis is not part of the RTL (see *What is not in the RTL*).

Status outputs, one bit per router:

* `mode`: the current strategy (1 = RCA).
* `ev_alloc`: a head flit was routed.
* `ev_choice`: the score decided between two free outputs.
* `ev_stall`: a head flit is blocked because all its outputs are reserved.
* `ev_bp`: a flit is waiting for a credit.

## Inside a router (`router`)

Five ports: N, E, S, W and L (local). Each input has a 4-flit FIFO
(`input_fifo`). A router works in three steps.

**1. Routing a head flit (one per cycle).** A round-robin pointer picks an
input whose oldest flit is a head flit that has no output yet. For that one
packet:

1. `oe_route` returns the admissible outputs. This is the minimal odd-even
   turn model, which avoids deadlock without virtual channels. There are at
   most two admissible outputs.
2. If the packet has arrived, it goes to L as soon as L is free.
3. Otherwise `score_select` scores each admissible output that is not
   reserved. The reservation table holds one owner register per output,
   set by a head flit and cleared by its tail flit.
4. The best output is reserved for this input. On equal scores, the first
   in N, E, S, W order wins.

If every admissible output is reserved, the head flit waits and is retried
when the pointer comes back to it. Routing one head flit per cycle means two
inputs can never claim the same output in one cycle.

**2. Moving flits.** Each reserved output forwards one flit per cycle from
its owner input:

* A mesh output needs a credit. Credit counters start at 4, one per free row
  of the downstream buffer.
* The local output needs `ej_ready`.

A flit leaving an input FIFO returns a credit upstream in the same cycle.

Timing:

* A head flit spends two cycles in a router, one to be routed and one to
  cross it.
* Body flits follow at one per cycle.

**3. Keeping the congestion view.** Each router shows its neighbours three
values, all as 8-bit fractions:

* `free_q[d]`: the free share of the buffer behind each of its outputs.
  These are the credit counters scaled to 0..255, i.e. `B[d]/max_buffer` of
  the score.
* `rca_q[d]`: its RCA aggregates.
* `dp_q`: its power change, normalised by `max_power`.

### The traffic analyzer and the switch

These two blocks decide the strategy.

`traffic_analyzer` counts each routed head flit:

* The hop distance `|dx|+|dy|` from this router to the destination decides
  the counter. Two or more hops count in N (non-local), fewer in L (local).
* Both counters are 5 bits wide and saturate.
* Every 32 cycles it hands both counts to the switch and clears them.

`strategy_switch` computes `x = N/(L+N)` without a divider:

* `10*N < 3*(L+N)`, i.e. `x < 0.3`, selects NoP; otherwise RCA is selected.
* A period with no packets keeps the current mode.
* Reset starts in NoP.

Because traffic is counted per router, neighbouring routers can be in
different modes at the same time.

### The score (`score_select`)

All inputs are already normalised:

* `Psel` is a fraction of 255.
* `B` is the active strategy's free-buffer value, a fraction of 255.
* `dP` is a signed fraction of 255.

The score is therefore `10 * 255` times the real-valued score. With
the 4-bit weights it fits in 16 signed bits. The worked example in
`tb_score_select` uses the published example weights for odd-even routing
(0.3, 0.4, 0.3).

### The two congestion metrics

Both metrics measure free buffer space, so a larger value means a more
attractive output.

* **NoP (`nop_metric`, one instance per direction)** looks at neighbour `d`.
  It evaluates the odd-even routing function *at that neighbour*, for the
  same packet. It averages the neighbour's free shares over the outputs the
  packet could take there; this term counts as full if the neighbour is the
  destination. The metric is the mean of that term and the free share
  toward the neighbour itself. The view reaches one hop past the
  neighbours.
* **RCA (`rca_aggregator`)** computes `rca_q[d] = (free_q[d] +
  neighbour_d.rca_q[d]) / 2` and registers it. So congestion information
  travels one hop per cycle along each row and column, weighted by half at
  each hop (one-dimensional aggregation).

### Power estimate (`power_monitor`)

The instantaneous power is `power(t) - power(t-1)`. For `power`, this design
uses the number of flits that crossed the crossbar in the cycle, 0..5, the
main part of a router's dynamic power. `max_power` is 5. Each router reports
its own change. The score for output `d` uses the change reported by the
neighbour behind `d`, so this term can differ between outputs.

## Choices made here and departures from the published strategy

* **The form of the score.** It is a weighted sum of three normalised terms.
  The printed formula groups the terms differently. Its text, however,
  describes alpha, beta and gamma as the weights of the three terms, and the
  sum follows that reading. The power term keeps the published `+` sign: a
  neighbour whose power is rising scores *higher*. Change the sign in
  `score_select` if you want the opposite.
* **How NoP/RCA and the score combine.** This is not specified. Here the
  active strategy provides the `B` term.
* **`dP` per direction.** It is defined for "the router". Here each output
  uses its neighbour's value, because the router's own value would add the
  same amount to every output and never change a decision.
* **Which strategy is used when.** The abstract says the opposite of this.
  The rule used here (NoP for local traffic, RCA for non-local) is the one
  in the detailed description and the switching pseudo-code.
* **The two-hop boundary.** The text says "two hops or more" is non-local.
  The pseudo-code can be read as "more than two". The text is followed.
  Change `LOCAL_HOPS` to 3 for the other reading.
* **Built here, not taken from the paper:**
  * the router microarchitecture: serial head routing, credit flow control,
    one-cycle links;
  * the header layout;
  * the NoP and RCA averaging;
  * the crossbar-activity power estimate;
  * the saturating counters;
  * the reset values.
* **Default mesh size.** The configuration table gives 8 x 8. The reported
  experiments also use 5 x 5 and 4 x 4; set `ROWS`/`COLS` for those.

## What is not in the RTL

* **Offline link-contention analysis.** The link contention is computed from
  the application's communication graph. An equivalent-resistance model
  then gives `Psel`. This is software run before the chip operates, and the
  step from resistance to probability is not specified. Its result enters
  through `cfg_psel`.
* **Weight search.** Alpha, beta and gamma are found by a sweep in steps of
  0.1. It enters through `cfg_w`.
* **Processing elements.** The IP cores are traffic sources and sinks. Their
  ports are brought out; the testbenches play their role.
* **The baseline strategies** (Random, buffer level) are not built.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `ROWS`, `COLS` | 8, 8 | mesh size |
| `DEPTH` | 4 | input FIFO rows, also the credit count |
| `T_PERIOD` | 32 | analyzer period in cycles |
| `CNT_W` | 5 | L and N counter width |
| `LOCAL_HOPS` | 2 | hop distance from which a packet is non-local |
| `THR_NUM`/`THR_DEN` | 3/10 | the 0.3 switching threshold |

Weights and `Psel` are inputs, not parameters.

## Files

* `rtl/noc_pkg.sv`: directions, flit and header structs, status bundle,
  widths.
* `rtl/noc_mesh.sv`: the top.
* `rtl/router.sv`: the router.
* Blocks used by the router, in `rtl/`: `oe_route.sv`, `input_fifo.sv`,
  `traffic_analyzer.sv`, `strategy_switch.sv`, `nop_metric.sv`,
  `rca_aggregator.sv`, `power_monitor.sv`, `score_select.sv`.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.
* `tb/tb_noc_workload.sv`: a 5 x 5 mesh with 6-flit packets, geometric
  inter-arrival gaps and three injection rates. It reports average and
  maximum delay.

What the main testbenches cover:

* `tb_noc_mesh` runs the full 8 x 8 mesh with 8-flit packets. It runs
  uniform traffic (routers switch to RCA), then neighbour-only traffic
  (routers switch back to NoP), then drains the network. It checks that
  every packet arrives once, intact and in order. It also counts routing,
  adaptive choices, blocked head flits, credit and ejection back-pressure,
  and mode switches in both directions.
* `tb_router` is a directed test of one router. It covers latency, NoP and
  Psel decisions, reservation, blocking, back-pressure, and the switch to
  RCA and back.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl \
        rtl/noc_pkg.sv tb/tb_noc_mesh.sv --top-module tb_noc_mesh
    ./obj_dir/Vtb_noc_mesh

Replace `tb_noc_mesh` with any other testbench name. Every testbench builds
in under a minute and runs in about a second. Each has a watchdog that ends
the run with a failure if it hangs.

Measured here:

* Full 8 x 8 mesh, uniform traffic, 0.05 packets/cycle/node of 8 flits
  (beyond saturation): all 10,000 packets delivered.
* 5 x 5 mesh with 6-flit packets: average head-to-tail delay of about 14,
  16 and 19 cycles at 0.010, 0.025 and 0.045 packets/cycle/node.

## Assertions

* `input_fifo` asserts no overflow and no underflow.
* `router` asserts that no credit counter exceeds `DEPTH` and that no flit
  is sent without a credit.
