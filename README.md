# Bellman-Ford arbitrage detector for currency exchange rates

A triangular (or longer) arbitrage exists when a loop of currency exchanges
returns more than it started with: the product of the rates around the loop
is above 1. Taking `w = -log(rate)` for every quoted pair turns that product
into a sum, and a profitable loop into a loop whose weights add up to less
than zero. Finding arbitrage is therefore finding a negative-weight cycle in
a directed graph, which the Bellman-Ford shortest-path algorithm does.

This RTL is the FPGA side of such a detector. A host CPU turns exchange
rates into integer weights and writes them over a memory-mapped bus into an
adjacency matrix. A run of Bellman-Ford then sweeps every edge of the graph,
four edges per clock. After `V-1` sweeps, one more sweep looks for an edge
that could still shorten a path. If it finds one, the design follows
predecessor pointers around the negative cycle and sends out the list of
trades that exploit it.

Default size: 66 currencies, so 66 x 66 = 4356 edge slots, handled as 1089
groups of four edges.

## From rate to weight (host side, not in this RTL)

The host computes `w(i,j) = round(-ln(rate_ij) * 10^k)` and sends it as a
signed 16-bit integer. Here `rate_ij` is the amount of currency j that one
unit of currency i buys. The RTL does not care which `k` the host picks, but
the weight must fit in 16 bits:

* With `k = 4` a weight can be up to 32767, so only rates between e^-3.27 and
  e^3.27 (0.038 to 26) fit. Pairs such as USD/JPY (about 110) or XAU/USD
  (about 1200) do not fit.
* With `k = 3` every usual pair fits. The cost is that loops whose profit is
  below about 0.1 % round away.
* The code `16'h8000` is reserved and means "no such pair".

Example with `k = 4`:

| pair    | rate   | edge        | weight |
|---------|--------|-------------|--------|
| EUR/USD | 1.1837 | USD -> EUR  | +1686  |
| EUR/GBP | 0.7231 | EUR -> GBP  | +3242  |
| GBP/USD | 1.6388 | GBP -> USD  | -4940  |

The loop USD -> EUR -> GBP -> USD sums to -12, a profit of about 0.11 %. The
full-size testbench uses exactly this loop.

## Block structure

```
 host bus --> update --+--> adjacency_matrix (4 lanes x 1089 words x 16 b)
   (slave)             |            | 4 weights / clock
                       |            v
 bf_controller --------+-->  stage 1: w(i) lookup, w(i)+w(i,j), update bit
  (sweeps, groups)                  | 4 candidate words (registered)
                                    v
                             stage 2: sorting_network -> filter
                                    |                     |
                                    v                     v
                               relaxation (4 lanes)  cycle_detector
                                    |   writes            | first relaxable edge
                                    v                     v
                               vertex_table  <----  decision_maker --> trades
                              (w(x), p(x))     predecessor walk
```

| module             | role |
|--------------------|------|
| `fx_pkg`           | Widths, sentinels and the edge-candidate word `edge_cand_t` = {update bit, j, i, w(i)+w(i,j)}. |
| `update`           | Bus slave. Loads edges, sets the source, starts a run and returns status. Clears the matrix after reset. |
| `adjacency_matrix` | w(i,j), read one group of four edges per clock. |
| `vertex_table`     | w(x) and p(x) for every vertex, in flip-flops: 4 + 4 reads and 4 writes per clock. |
| `comparator`       | Compare-exchange cell that also removes duplicate destinations. |
| `sorting_network`  | Six comparators in three columns over the four words. |
| `filter`           | Valid flag per word, plus how many relaxation lanes are used. |
| `relaxation`, `relax_lane` | Per lane: `w(i)+w(i,j) < w(j)`, a mux for the new weight, an AND with Valid for the write enable. |
| `cycle_detector`   | Last sweep: finds the first edge that could still relax. |
| `decision_maker`   | Walks predecessors into the cycle and emits trades in execution order. |
| `bf_controller`    | Sequences init, `V-1` relaxation sweeps, the detection sweep and the decision. |
| `forex_arb_top`    | Wires it all together and holds the pipeline registers. |

## The edge sweep

Edges are numbered `e = j*V + i`, so all edges into one destination are
consecutive. Group `g` holds edges `4g..4g+3`. A group can therefore hold
edges into one destination, or straddle two destinations. The matrix keeps
edge `e` in lane `e % 4` at word `e / 4`, so one synchronous read returns a
whole group.

The controller keeps the (i, j) of the group's first edge as a running
counter, so the datapath never divides by `V`.

The pipeline has three stages:

1. **Stage 0:** the group address goes to the matrix.
2. **Stage 1:**
   * The four weights arrive.
   * `w(i)` is read for each edge.
   * The update value `w(i) + w(i,j)` is formed.
   * The update bit is set when the edge exists and `w(i)` is finite.
   * The four candidate words are registered.
3. **Stage 2:** sort, filter and relax against the *current* `w(j)`. The
   vertex table is written at the end of this clock.

A sweep takes exactly 1089 clocks at `V = 66` (`V*V/4`). The controller then
idles 3 clocks, so that the last writes of a sweep land before the next
sweep reads them. A run without a cycle is busy for `1 + V*(1089 + 3)` =
72,073 clocks. With a cycle, the trace-back adds about `V + 2n + 4` clocks
for a loop of n trades: 74 more for a triangle.

**Why reading slightly old weights is safe.** Stage 1 can read a `w(i)`
that is one or two clocks old. Bellman-Ford only needs one property: what a
sweep reads is never worse than the value at the start of that sweep.
Weights only decrease, and the 3-clock gap finishes every sweep before the
next one starts, so the property holds. The value in stage 2 is always fresh,
because the relaxation lane compares against `w(j)` in the clock that writes
it. After `V-1` sweeps the weights are exact shortest paths. The testbenches
check this against a software Bellman-Ford.

## Sorting network: one candidate per destination

The hardest part of the datapath is how four parallel edge updates are kept
from colliding on the same vertex. Each compare-exchange cell looks at two
candidate words:

| both valid? | same destination? | upper output | lower output |
|---|---|---|---|
| yes | yes | the smaller update value (the second word on a tie) | the other word, **update bit cleared** |
| yes | no | the smaller destination | the other word |
| one | - | the valid word | the invalid word |
| none | - | first word | second word |

The network has six cells in three columns: pairs (0,1)(2,3), then
(0,3)(1,2), then (0,1)(2,3).

In any sorting network, two inputs with the same destination meet in some
cell. So only the cheapest candidate for each destination keeps its update
bit. The four relaxation writes therefore always go to distinct vertices, and
each one is atomic.

A dropped word changes its sort key partway through the network. As a
result the output is **not** always fully ordered: an invalid word can sit
between two valid ones. Nothing depends on the order, because the filter
checks every word's update bit. As a second guard, the filter also refuses a
word whose destination equals that of an earlier valid word, and reports this
on `dup_seen`. The testbenches check that this never fires.

## Detection and trade list

The last sweep sends the same filtered words to `cycle_detector` instead of
to the relaxation lanes. The lowest lane of the first group with
`w(i)+w(i,j) < w(j)` is latched.

That single relaxation is also written to the vertex table (`p(j) = i`).
Without this write, the predecessor chain from `j` might not yet close the
loop.

`decision_maker` then does the following:

1. It takes `V` predecessor steps from `j`, which lands it on the cycle.
2. It follows predecessors once around the cycle into a buffer.
3. It plays the buffer back in reverse. Predecessors point against the
   direction of trading, so the reversed buffer is in execution order.

Each `trade_valid` clock means "sell `trade_from`, buy `trade_to`", and
`trade_last` marks the trade that closes the loop. If the walk meets a NULL
predecessor or does not close within `V` steps, `done` rises with
`cycle_ok = 0` and no trade is sent. This cannot happen after a real
detection, and it was never seen in simulation.

Only negative cycles that can be reached from the chosen source currency are
found. Give every currency at least one quote against the source, or run once
per connected group.

## Host interface (`update`)

The interface is a word-addressed slave with `chipselect`, `write`, `read`,
a 3-bit `address`, 16-bit data and `waitrequest`.

| addr | write | read |
|---|---|---|
| 0 | source currency i of the next edge | status `{12'b0, cycle_ok, found, done, busy}` |
| 1 | destination currency j | detected edge `{0, i[6:0], 0, j[6:0]}` |
| 2 | weight w(i,j); this write stores the edge (`16'h8000` removes it) | number of trades in the cycle |
| 3 | Bellman-Ford source vertex | 0 |
| 4 | bit 0 = 1 starts a run | 0 |

Rules of the interface:

* **Writes:** `waitrequest` is high during a write while the matrix is being
  cleared (1089 clocks after reset) and while a run is busy. The host must
  hold the write until `waitrequest` falls. A write completes at the first
  rising edge where `waitrequest` is low.
* **Reads:** answered combinationally, in the same clock.
* **Trades:** they leave on the `trade_*` ports, one per clock, with no
  back-pressure.

## Sizes and parameters

Only `V` (number of currencies, default 66, at most 127) is a module
parameter. The fixed sizes live in `fx_pkg`:

| constant | value | note |
|---|---|---|
| `P` | 4 | edges per clock; the sorting network is written for 4 |
| `EDGE_W` | 16 | edge weight as sent by the host |
| `IDX_W` | 7 | vertex index; all-ones = NULL |
| `DIST_W` | 40 | path weight |

A path weight is a sum of many edge weights. Inside a negative cycle it keeps
falling from sweep to sweep, so 40 bits are used rather than anything close to
the edge width.

At `V = 66`:

* the matrix is 4 x 1089 x 16 bits = 69,696 bits of RAM;
* the vertex table is 66 x 47 flip-flops.

## Where this departs from the original proposal

* **Edge width.** The proposal streams 16-bit integers but sized its memory
  estimate with 10-bit edge and vertex weights. Here edges are 16 bits and
  vertex weights 40 bits. With 10 bits the stored weights would overflow.
* **Not described by the proposal, chosen here:**
  * the edge numbering and group order;
  * the pipeline cut;
  * the 3-clock gap between sweeps;
  * the "no edge" code;
  * the bus register map and stall;
  * clearing the matrix after reset;
  * applying the detected relaxation before the trace-back;
  * the trade stream format;
  * the duplicate guard in the filter.
* **Middle column of the sorting network.** The proposal shows six
  comparators in three columns. The exact pairing of the middle column is
  this design's choice: it is the standard same-direction 4-input bitonic
  pairing.
* **Ordering of the comparator.** The proposal's comparator returns one
  edge. Here the returned edge goes to the upper output and the other edge
  to the lower output.
* **Left out:**
  * the host software: CSV parsing, logarithms, the driver;
  * the on-screen display of the cycle.
* **No early stop.** Every run does all `V-1` sweeps, even when a sweep
  changes nothing.

## Simulating

Every module sits in `rtl/<name>.sv`, and `fx_pkg.sv` must be read first.
For example:

```
verilator --binary --timing --assert -Irtl rtl/fx_pkg.sv rtl/*.sv \
    tb/tb_forex_arb_top.sv --top-module tb_forex_arb_top -Mdir obj -o sim
./obj/sim
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if it hangs.

| testbench | what it checks |
|---|---|
| `tb_fx_pkg` | sentinel values, widths and the layout of the candidate word |
| `tb_comparator` | the selection and drop rule against a model, 4000 random pairs |
| `tb_sorting_network` | exactly the cheapest candidate per destination survives, 5000 groups with clashes |
| `tb_filter`, `tb_relaxation` | flags, counts and write requests against models |
| `tb_adjacency_matrix` | V = 7 (padded last group): clear, random writes, group read-back |
| `tb_vertex_table` | initial values for two sources, random 4-lane writes |
| `tb_cycle_detector` | first-edge latch, a single fix write, clear |
| `tb_decision_maker` | planted cycles with tails, and chains with no cycle: trade order, `trade_last`, length, latency |
| `tb_bf_controller` | group and (i,j) sequence, sweep count, handshake, exact run length |
| `tb_update` | clear walk and stall, register writes, start bit, stall while busy, status reads |
| `tb_forex_arb_top` | V = 8, 24 random graphs (arbitrage-free, planted loop, random) against a software Bellman-Ford. It checks detection, distances, trade loops and run length. It also counts every mechanism: clear, stall, duplicate drop, partly used groups, relaxations and rejections, detection, clean run, trades. |
| `tb_forex_arb_full` | default size V = 66, 519 edges including the EUR/USD/GBP loop. It checks the three trades, 1089-clock sweeps, and the exact 72,073-clock clean run against a software Bellman-Ford. |

`tb_forex_arb_full` finishes in well under a second of simulation time.
