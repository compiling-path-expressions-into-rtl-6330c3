# Path-expression synchronizer

A *path expression* states in which orders a set of events may happen.
`path a;(a+b);c end` means: `a`, then `a` or `b`, then `c`, over and over.
`;` is sequence, `+` is exclusive choice, `*` is repetition, and the
`path ... end` brackets repeat the whole expression forever. A *multiple* path
expression is a set of such paths. Every path must be obeyed. Events that
share no path are not ordered against each other and may run at the same time.
So `path R1+W end, path R2+W end` lets the two readers `R1` and `R2` read
together, but never while the writer `W` writes.

This RTL turns a multiple path expression into a *synchronizer*. Each event
has a request/acknowledge pair. A client raises `req[e]`. The synchronizer
raises `ack[e]` only when every path allows `e` next and no event that shares
a path with `e` is running. The client then performs the event and lowers
`req[e]`. The synchronizer records the event in every path that holds it and
lowers `ack[e]`. The circuit is built from the expression's syntax tree, so
its size grows linearly with the length of the expression. It does not grow
with the product of the paths' state counts.

The construction follows a published scheme for compiling path expressions
into self-timed VLSI circuits. Its structure is kept: sequencers built from
recognizer cells, a controller with two clock phases, C-elements, CLR
flip-flops and an arbiter with random priorities. The design departures are
listed in [Departures and limits](#departures-and-limits).

## The configuration built by default

`pathexpr_top` is the synchronizer compiled for

```
path (A+B+D) end
path (B;(C+D);E) end
path (E+F+G) end
```

with events A..G on bits 0..6 of `req`/`ack`. Path 1 lets at most one of A, B
and D run at a time. Path 2 forces the order B, then C or D, then E, and then
starts again. Path 3 lets at most one of E, F and G run at a time. Two events
*conflict* when some path holds both of them. The conflict graph here is
A–B, A–D, B–C, B–D, B–E, C–D, C–E, D–E, E–F, E–G and F–G. So A can run
alongside C, E, F or G, for example.

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1 | sampling clock (see [Clocked emulation](#clocked-emulation)) |
| `rst_n`     | in  | 1 | asynchronous active-low reset; same effect as `init` |
| `init`      | in  | 1 | synchronous re-initialisation: every path restarts, every CLR is set |
| `noise_bit` | in  | 1 | digitised output of an external random source, for the arbiter |
| `req`       | in  | 7 | requests, A..G |
| `ack`       | out | 7 | acknowledges, A..G |

| parameter   | default | meaning |
|-------------|---------|---------|
| `DELAY`     | 4 | controller delay in each sequencer, in clk cycles (TR→TA) |
| `ARB_DELAY` | 3 | length of the probabilistic arbiter's switchable delay, in clk cycles |
| `LRU`       | 0 | 1 selects the least-recently-served arbiter instead of the probabilistic one |

Client rules, for each event: raise `req` only while `ack` is low, and lower
`req` only after `ack` has risen. The event takes place while both are high.
A client may raise `req` for an event that no path allows yet. The request
then simply waits.

## How one path is recognised

A sequencer handles one path. It has a **recognizer**, which records the
events seen so far and derives the `DIS` (disable) lines, and a
**controller**, which runs the handshake with the rest of the circuit.

### ENB and RES

The recognizer has one cell per node of the path's syntax tree. Cells pass
two signals along the tree:

- **ENB** into a sub-expression means "a match of this sub-expression may
  start with the next event".
- **RES** out of a sub-expression means "a match of this sub-expression has
  just ended".

Each cell kind maps these signals in a fixed way:

| cell | module | behaviour |
|------|--------|-----------|
| event `e` | `event_cell` | During Start, a master latch takes ENB AND TR_e. During End, a slave latch passes it on to RES. RES is 1 exactly when this occurrence of `e` was enabled and has just happened. |
| `x;y` | `seq_cell` | ENB goes to `x`; RES of `x` is the ENB of `y`; RES of `y` is the cell's RES. |
| `x+y` | `union_cell` | ENB goes to both operands; the cell's RES is the OR of their RES. |
| `x*` | `star_cell` | The operand is enabled by ENB OR the operand's own RES, so one more repetition may follow. That same signal is the cell's RES, because zero or more repetitions have completed. |
| `path x end` | `recognizer` | The root's RES is fed back to its own ENB. During the first event cycle the root is also enabled by a flip-flop that INIT sets and End clears. |

An event `e` is allowed next when the ENB of at least one of its event cells
is 1. `dis[e]` is the NOR of those ENBs. Between handshakes, `dis[e]` is low
exactly for the events that may follow the sequence seen so far.

Example, `path a;(a+b);c end`. After reset only the first `a` cell is
enabled, so `dis = {c:1, b:1, a:0}`. After `a`, that cell's RES enables both
cells of `(a+b)`. After `b`, the `c` cell is enabled. After `c`, the root's
RES re-enables the first `a`.

### Splitting RES so that stars do not loop

A star's RES is a plain OR of its own ENB. Nest stars, as in `((a)*;(b)*)*`,
and the gates form a combinational loop. The published star cell breaks the
loop with an AND gate against End after every event. This design closes the
loop in logic instead. Every sub-circuit reports RES as two signals:

- `rlat`: the part of RES that comes from event-cell latches;
- `nul`: a constant that is 1 when the sub-expression can match the empty
  sequence. Such a sub-expression passes ENB straight through to RES.

The full RES is `rlat | (nul & ENB)`. The cells compute:

- event: `rlat` = its latch, `nul = 0`
- `x;y`: ENB(y) = `rlat_x | nul_x & ENB`, `rlat = rlat_y | nul_y & rlat_x`,
  `nul = nul_x & nul_y`
- `x+y`: `rlat = rlat_x | rlat_y`, `nul = nul_x | nul_y`
- `x*`: ENB(x) = `ENB | rlat_x`, `rlat = rlat_x`, `nul = 1`

The star's ENB(x) is the value the gated loop settles to. No feedback wire
is needed, so the recognizer has no combinational loops for any expression.

### Controller and the two phases

`seq_controller` ORs the TR lines of its path and delays the result by `DELAY`
clock cycles. One C-element per event combines `tr[e]` with the delayed
signal, so `ta[e]` is `tr[e]` delayed in both directions. Two gates compare
the undelayed and delayed signals:

- "some TR, no TA yet" requests the **Start** phase;
- "some TA, no TR any more" requests the **End** phase.

A mutual-exclusion element (`interlock`) keeps the two phases from
overlapping. Start loads the master latches and End loads the slave latches.
Each handshake therefore clocks every event cell exactly once.

## How the paths are coupled: the synchronizer

`synchronizer` holds one sequencer per path plus a small gate network per
event `e`:

```
g_e   = req_e AND NOT (DIS_e of any sequencer holding e)
o_e   = g_e OR ack_e                      -- keeps the request once granted
IN_e  = o_e AND NOT CLR_e AND NOT CLR_x for every x conflicting with e
ack   = arbiter(IN)                        -- no two conflicting acks
TR_e  = ack_e   (to every sequencer holding e)
C_e   = C-element of the TA_e of those sequencers
CLR_e = SR flip-flop: set by C_e AND NOT req_e, reset by NOT C_e (starts set)
```

One event goes through these steps:

1. `req_e` rises. If no path disables `e`, and neither `e` nor a conflicting
   event has CLR set, `IN_e` rises.
2. The arbiter raises `ack_e`. TR_e rises in every sequencer holding `e`. The
   OR keeps `IN_e` up even after those sequencers move on and disable `e`.
3. Each of those sequencers records `e` and raises TA_e. Their C-element
   output `C_e` rises.
4. The client lowers `req_e`. With `C_e` high, CLR_e is set. This pulls down
   `IN_e` and the IN of every conflicting event, and the arbiter lowers
   `ack_e`.
5. TR_e falls. The sequencers run their End phase, update their DIS lines and
   lower TA_e. `C_e` falls and CLR_e is cleared.

While CLR_e is high, no event that shares a path with `e` can start. That is
the window in which the sequencers settle their DIS lines. Events that share
no path with `e` carry on undisturbed.

## The arbiter and fairness

`path_arbiter` grants a set of IN requests in which no two conflict. It holds
each grant while its IN stays high. It never waits on purpose: a request that
is visible and meets no conflicting grant is granted at once.

Without random priorities, some requests can starve. For example, in
`path (A+B);C end, path D;(A+E) end`, B/D and C/E can alternate forever
while A waits. Fairness therefore comes from a switchable delay in front of
each input:

- When `IN_e` rises, a 1-bit priority register takes a fresh random bit.
- Priority 1 bypasses the delay.
- Priority 0 hides the request for `ARB_DELAY` cycles. Any conflicting request
  without the delay wins in that time.

The random bits come from `oracle_shift_register`. It shifts the external
`noise_bit` into an N-bit register every clock, so each input sees a
different, largely uncorrelated bit. Any maximal set of non-conflicting
requests is therefore chosen with non-zero probability.

Requests that become visible in the same cycle are resolved greedily in event
order, lowest number first. This stands in for the metastability resolution
of real mutual-exclusion gates.

What the simulations show about fairness:

- No event starves in any of the test expressions.
- `path (A+B);C end, path D;(A+E) end` with every event always requested:
  A runs about 40–60 times against about 750 for the others.
- Readers/writers with two eager readers: the writer runs about 60 times
  against about 2000 per reader.
- `path (A;C)+(B;A) end` and `path (A;C)+(B;(A+B)) end`, where a
  deterministic arbiter that ignores path state can starve C: C runs about
  800 times.
- Default top under random load: D runs about 55 times against about 400 for
  C. D belongs to two paths, and C, the other choice in path 2, wins
  same-cycle ties by index.

### The least-recently-served alternative

`lru_arbiter` is a deterministic arbiter with the same ports, minus
`noise_bit`. Set `LRU=1` on `synchronizer` or `pathexpr_top` to use it.

- Each event has a priority from 0 to K-1, where K is by default the number
  of events.
- The priority counts how often the event was *blocked*: a conflicting event
  was acknowledged while this one waited.
- An acknowledge resets the priority to 0.
- Each input has K delay lines of `LINE_DELAY` cycles in series. Each block
  bypasses one more line. A request with priority p is therefore seen after
  (K-p)·`LINE_DELAY` cycles, and the most-blocked of two conflicting requests
  wins.

The LRU arbiter spreads service more evenly over simple conflicts. Because
it ignores the path state, though, it can starve an event that the random
arbiter serves. The same workloads run with both arbiters (40 000 cycles,
all events always requested):

| expression | probabilistic | LRU |
|------------|---------------|-----|
| `path R1+W end, path R2+W end`: R1, R2, W | 2057, 2057, 56 | 1769, 1777, 200 |
| `path (A;C)+(B;(A+B)) end`: A, B, C | 1016, 343, 806 | 1025, 1024, 1 |

In the second expression, the LRU arbiter settles into B A B A … and C
never becomes allowed again.

## Clocked emulation

The published circuits are self-timed. This RTL is synchronous, so that it can
be synthesised with standard flows and simulated with a two-state simulator.
Every state-holding element samples on one clock `clk`:

- latches, C-elements, SR flip-flops and the interlock;
- the controller delay, a `DELAY`-stage shift register;
- the arbiter's delay elements, counters of `ARB_DELAY`.

Gates stay combinational. The handshakes keep their four-phase form and their
order of events. Only the delays become whole numbers of clock cycles.

Consequences:

- `req` must be synchronous to `clk`. An asynchronous client needs its own
  synchroniser in front of it.
- `DELAY` must cover the recognizer's settling time. One cycle is enough here,
  because DIS is combinational from the latches.
- The two delay assumptions of the self-timed design hold by construction:
  - the DIS gating beats the C-element plus flip-flop;
  - the skew of the gates in front of the arbiter is smaller than the
    arbiter's delay.

### Latencies (clock edges, default `DELAY=4`, `ARB_DELAY=3`)

| from → to | edges |
|-----------|-------|
| `req` rises → `ack` rises (event allowed, no conflict, CLR clear) | 2 with priority 1, `ARB_DELAY`+2 = 5 with priority 0 |
| `req` falls → `ack` falls (TA already up) | 2 |
| sequencer `tr` → `ta`, either edge | `DELAY`+1 = 5 |

## Describing another expression

Expressions are parameters, so no generator is involved. A path is an array
of `node_t` (see `pathexpr_pkg`) in post-order: every node's operands have
lower indices, and the root is the last node of the path. The helper
functions `ev_node(e)`, `seq_node(l,r)`, `union_node(l,r)` and `star_node(x)`
build the nodes. For a multiple path expression, all paths share one array.
`FIRST[p]` and `ROOT[p]` give each path's index range, and operand indices
are global. Example, readers/writers with R1=0, R2=1, W=2:

```systemverilog
localparam node_t NODES [6] = '{ev_node(0), ev_node(2), union_node(0, 1),
                                ev_node(1), ev_node(2), union_node(3, 4)};
synchronizer #(.N_EV(3), .N_PATH(2), .NN(6), .NODES(NODES),
               .FIRST('{0, 3}), .ROOT('{2, 5})) u_sync (...);
```

The synchronizer derives, at elaboration:

- which events each path holds;
- the conflict graph;
- the width of each event's C-element.

Node and event numbers are 8 bits wide, so up to 256 of each. Every event
must occur in at least one path.

## Modules

| module | role |
|--------|------|
| `pathexpr_pkg` | node type, helper functions, the default expression and its conflict graph |
| `pathexpr_top` | synchronizer compiled for the default three-path expression |
| `synchronizer` | per-event gate network, one sequencer per path, arbiter |
| `sequencer` | controller + recognizer for one path |
| `seq_controller` | TR→TA delay, Start/End phase generation |
| `recognizer` | cell tree of one path, root feedback, INIT enable, DIS NOR |
| `event_cell`, `seq_cell`, `union_cell`, `star_cell` | the four recognizer cells |
| `path_arbiter` | conflict-graph arbiter with random-priority delays |
| `lru_arbiter` | conflict-graph arbiter with least-recently-served priority delays |
| `oracle_shift_register` | serial random bit → parallel random bits |
| `interlock` | two-way mutual exclusion (Start/End separation) |
| `c_element` | Muller C-element |
| `sr_ff` | set/reset flip-flop with chosen reset value |

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`. A self-contained run with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pathexpr_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/pathexpr_pkg.sv tb/tb_pathexpr_top.sv
./obj_dir/Vtb_pathexpr_top
```

| testbench | what it establishes |
|-----------|---------------------|
| `tb_pathexpr_top` | The top at default parameters. First a directed round with latency checks, then about 60 000 cycles of random clients with two `init` restarts. Every ack is checked against hand-written automata of the three paths. It also checks: events of one path never overlap; the handshake rules hold; no allowed request starves. Each mechanism must occur: DIS wait, arbiter contest, CLR hold-off, withdrawn IN, concurrency, both priority settings, init. |
| `tb_synchronizer` | The same checks for `path (A+B);C end, path D;(A+E) end`. A shares two paths. |
| `tb_workloads` | Readers/writers; `path A;B end, path A;C end`; `path (A;C)+(B;A) end`; `path (A;C)+(B;(A+B)) end`. Readers and B/C must overlap, and C must not starve. Readers/writers and the last expression run again with `LRU=1`. |
| `tb_lru_arbiter` | Priority races with exact latencies. Then a cycle-by-cycle comparison with a model of the LRU rule under random requests. |
| `tb_sequencer` | Full TR/TA handshakes: TA latency, DIS against automata, DIS stable while idle. |
| `tb_recognizer` | Four recognizers, including nested stars, driven with explicit Start/End phases and checked against automata. |
| `tb_path_arbiter` | Mutual exclusion, grant holding, no deliberate wait, both delay settings. |
| `tb_seq_controller`, `tb_event_cell`, `tb_interlock`, `tb_c_element`, `tb_sr_ff`, `tb_oracle_shift_register` | Unit behaviour against reference models. |

All of them pass. Every module has been checked the other way round too: a
copy broken in one way (listed per module in the table below) makes its
testbench fail. The RTL also carries assertions for the handshake and
mutual-exclusion rules, which `--assert` enables.

## Departures and limits

- **Synchronous emulation** of a self-timed design (see above). The
  controller delay, the arbiter delay and the interlock tie-break are this
  design's choices; the source gives no numbers for them.
- **Star cell**: the extra AND gate, which drops the star's output for a
  moment after each event so that nested stars cannot form a latch, is
  replaced by the loop-free `rlat`/`nul` formulation. The values seen
  between handshakes are the same. The root star is not a separate cell:
  the recognizer feeds the root's RES back to its ENB.
- **Interlock**: active-high. Simultaneous requests alternate instead of
  being settled by metastability.
- **Arbiter core**: a one-cycle greedy choice in index order, shared by both
  arbiters. The random delay elements, the oracle shift register and the
  LRU delay lines follow the published arbiters. In the LRU arbiter, the
  line length, the saturation at K-1 and counting one block per cycle are
  this design's own choices.
- Arbiter designs that the source discusses only to reject are not built:
  the cross-coupled NMOS arbiter, the graph-colouring arbiter and the
  dynamically balanced CMOS arbiter.
- **Not covered**: the delay-insensitive sequencer, which was left to other
  work; the noise source itself, which is analog and off-chip; and layout,
  floorplan and area bounds.
- The expression is fixed at elaboration; there is no run-time programming.

| module | fault that its testbench detects |
|--------|----------------------------------|
| `c_element` | output falls without all inputs low |
| `sr_ff` | set dominates reset |
| `interlock` | tie-break never alternates |
| `seq_controller` | TA not delayed |
| `event_cell` | slave latch loaded during Start |
| `seq_cell` | empty left operand not passed through |
| `union_cell` | right operand's RES dropped |
| `star_cell` | no repetition |
| `recognizer` | root RES not fed back |
| `sequencer` | Start and End swapped |
| `oracle_shift_register` | shifts the wrong way |
| `path_arbiter` | grants not held |
| `lru_arbiter` | blocks do not raise the priority |
| `synchronizer` | conflicting CLR does not block IN |
| `pathexpr_top` | C and D request lines swapped |
