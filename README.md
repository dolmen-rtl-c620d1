# Dolmen: a swarm of hardware model checkers for safety and liveness

Liveness properties ("something good eventually happens") can only be refuted
by an infinite counter-example: a path from the initial state to a Büchi
*accepting* state that then loops back to that same state (a "lasso"). Safety
properties reduce to the same question. Exhaustive model checking of large
systems runs out of memory, so this engine gives up exhaustiveness instead:
many small verification cores each run a cheap, lossy depth-first search, each
with different hash seeds, so that together they cover most of the state space
and report a lasso as soon as any one of them meets it.

This SystemVerilog implements the Dolmen architecture: a verification core
(VCore) that detects acceptance cycles with two cooperating partial-reachability
engines in the manner of nested depth-first search, replicated into a swarm
(32 cores by default) driven through a registered n-ary distribution tree. The
model to be checked is not part of the RTL: each core talks to a model front
end (the model's next-state generator composed with the Büchi property
automaton) through a request/response port that is brought out of the top
level.

## How one core finds an acceptance cycle

A VCore contains two copies of the same search engine (`reach_core`), the
**prefix core** and the **cycle core**, and a task controller.

Each engine is a loop of four stages, passing composite states (model state
plus property state, 32 bits, with an "accepting" flag) under valid/ready
handshakes:

```
   model front end --successors--> Known Set --new states--> Frontier Stream
        ^                        (Bloom filter)              (bounded stack)
        |                                                          |
        +------- state to expand ------- Predicate Checker <--pop--+
```

* The **Known Set** drops states already seen.
* The **Frontier Stream** is a stack, so the search is depth first.
* The **Predicate Checker** looks at each state once, just before it is
  expanded. Because the Known Set already removed duplicates, every
  accepting state is reported only once.
* The **model front end** returns the successors of one state at a time.

The two engines differ only in how they start and in their predicate:

1. The prefix core starts from the model's initial state, which is pushed
   through its Known Set like any successor. When it pops an accepting state,
   its Predicate Checker hands the state to the cycle core and then **stalls**.
   It holds that state and expands nothing else until the cycle core answers.
2. The cycle core sends the accepting state straight to its model front end,
   bypassing its Known Set. When the search comes back to that state, the
   Known Set therefore sees it as new, and the cycle core's Predicate Checker,
   which compares every popped state with the seed, recognises it: an
   acceptance cycle has been found. The controller reports it, together with
   the accepting state.
3. If instead the cycle core's pipeline drains, there is no cycle through that
   state (as far as this lossy search can tell). The cycle core pulses `done`
   and clears itself. The prefix core resumes and expands the accepting state
   like any other.
4. When the prefix core's pipeline drains, the verification task is over
   without a counter-example.

The cycle core must start every search with an empty Known Set, because the
cycle may run through states the prefix already visited. It therefore clears
itself after every run. Clearing writes zero to every word of its Bloom filter
and every entry of its frontier, one address per cycle. With the default sizes
that takes 64 cycles for the Bloom filter and 1024 for the frontier, so
clearing the frontier dominates.

**Termination.** A search has drained when the frontier is empty and every
stage reports idle:
* the Known Set holds no state in its read/test pipeline or output register;
* the Predicate Checker holds no state;
* no model request is outstanding;
* no start state is waiting to be injected.

Every hand-over is a handshake, so nothing can be in flight between stages
when all of these hold. `termination_checker` registers the condition into a
one-cycle pulse.

**Partial search.** Two things make each search lossy, and both are on
purpose:
* The Bloom filter has false positives. A state never seen before can be taken
  for a visited one and dropped, which prunes part of the space.
* The frontier is a stack in a circular buffer. When it is full, a push
  overwrites the *oldest* entry. The search never stalls on memory; it forgets
  the states buried deepest.

Because every task uses new hash seeds, different tasks and different cores
prune different parts of the space. This is what makes a swarm of lossy
searches useful. A search also ends when the Bloom filter becomes nearly
saturated. This is why the cycle core gets a much smaller filter (2^12 bits
per bank against 2^19 for the prefix core): most cycle searches find nothing,
and a small filter makes them end sooner.

## Known Set and Frontier Stream in detail

`known_set` has `N_HASH` = 2 banks of 2^`AW` bits, stored as 64-bit words.
Bank *k* is indexed by `state_hash(state, seed[k])`, a seeded
multiply/xor-shift mix defined in `dolmen_pkg`. One test-and-insert takes two
cycles:
1. On the accepting edge, both words are read into registers.
2. The next cycle tests the addressed bits and writes the words back with
   those bits set. If any bit was clear, the state is new and goes to the
   output register.

An input is accepted every second cycle, as long as the output is being taken.

`frontier_stream` keeps a top pointer and a saturating count.
* A push writes at `top`.
* A pop reads `top-1`, combinationally.
* A push and a pop in the same cycle replace the top entry.
* A push while the stack is full advances `top` over the oldest entry and
  raises `overwrite`.
* `DEPTH` must be a power of two.

## Tasks, seeds and the VCore controller

`vcore_controller` runs up to `max_tasks` verification tasks per start order.
For each task it:
1. draws two seeds from its `seed_lfsr`;
2. clears both engines;
3. waits until both are ready;
4. starts the prefix core.

The LFSR is a 32-bit Galois register, x^32+x^22+x^2+x+1, loaded with
`CORE_INDEX + 1`, so every core draws its own sequence. Both engines of a core
use the same two seeds.
* When the prefix core finishes and tasks remain, the controller starts the
  next task. When no tasks remain, it reports `ended`.
* When the cycle core finds a cycle, the controller reports `found` with the
  accepting state, and stops.

A new start order aborts whatever is running.

Seeds depend only on the core index and the task number. A host can therefore
replay the task that found a cycle in software, with the same seeds, to
rebuild the full counter-example trace. The hardware keeps no trace, because
its stacks are lossy.

## The distribution tree

The cores are independent and all run the same tasks, so the swarm controller
never addresses a core. It sends one start order down and waits for one
combined answer. `swarm_tree` is a recursive module:
* A tree of at most `BRANCH` cores is one `tree_node` with the cores as its
  children.
* A larger tree is a node with `BRANCH` sub-trees. Each sub-tree hangs from a
  `link_shift_reg` of `LINK_REGS` stages and gets an equal share of the cores,
  give or take one.

With the defaults (32 cores, branching 3), the root has three sub-trees of 11,
11 and 10 cores, one for each die of a three-die FPGA. This keeps die-crossing
wiring to one channel per die and keeps the fan-out of the central controller
small.

Each `tree_node` registers in both directions:
* Downwards, it forwards the start order to all its children.
* Upwards, it reports `ended` when all children have ended, and `found` when
  any child has found a cycle. With `found` it passes the state of the
  lowest-numbered child that found one.

A status takes one cycle per node and `LINK_REGS` cycles per link to climb the
tree. So for a while after a start, the root still shows the previous run's
result. Each start order therefore carries a 1-bit **epoch**, which the swarm
controller toggles and the cores echo:
* A node whose children disagree on the epoch reports neither `ended` nor
  `found`.
* The controller accepts only results of the current epoch.

## Interfaces

### Host side (`dolmen_top`)

| signal | dir | meaning |
|---|---|---|
| `host_start` | in | start a run (ignored while `host_busy`) |
| `host_max_tasks[15:0]` | in | tasks per core for this run |
| `host_busy` | out | run in progress |
| `host_done` | out | run over; result valid until the next start |
| `host_ended` | out | every core ran all its tasks without a cycle |
| `host_found`, `host_acc_state[31:0]` | out | an acceptance cycle was found through this accepting state |

In the complete system these signals sit behind a UART link to control
software on a host PC. That link is not part of this RTL.

### Model front-end ports

Each core has two front-end ports: `pfx_*` for the prefix core and `cyc_*` for
the cycle core. The ports are packed arrays indexed by core number. The types
are in `dolmen_pkg`.

* `*_req_valid/ready`, `*_req_data` (`cstate_t`): a state to expand. At most
  one request per port is outstanding at a time.
* `*_rsp_valid/ready`, `*_rsp_data` (`model_rsp_t`): the answer, a stream of
  successors. Each successor is a `cstate_t`: the composite state and whether
  the Büchi property accepts it. `last` marks the final successor. A state
  with no successors gets a single answer with `none` and `last` set.
* `init_state`: the model's initial composite state, shared by all cores.

The front end composes the model's transition relation with the property
automaton. In the complete system it is VHDL or SystemVerilog generated for
each model. The testbenches use the behavioural `tb_model_frontend`, which
serves three small numeric models (`tb_model_pkg`).

## Parameters

| parameter | default | origin |
|---|---|---|
| `N_CORES` | 32 | evaluated configuration |
| `PREFIX_AW` / `CYCLE_AW` | 19 / 12 | evaluated "(19,12)" configuration; "(19,19)" is also valid |
| `BRANCH` | 3 | three-way tree of a three-die device |
| `LINK_REGS` | 1 | own choice (configurable, 0 allowed) |
| `FRONTIER_DEPTH` | 1024 | own choice (power of two) |
| `STATE_W`, `N_HASH`, `TASK_W` (package) | 32, 2, 16 | 32-bit pipeline as published; the rest own choices |

Memory per core at the defaults:
* prefix Bloom filter: 2 × 2^19 bits;
* cycle Bloom filter: 2 × 2^12 bits;
* two frontiers of 1024 × 33 bits.

That is about 1.1 Mbit per core and 35 Mbit for the 32-core swarm. The
published 32-core build reports 40 Mbit of on-chip memory.

## Departures from the published design, and choices made here

* **State width.** States are processed whole, at 32 bits. In the published
  design, wider model states are split into 32-bit chunks that take several
  cycles each, 6 to 11 for the benchmark models. That splitting is not built
  here. Those models need `STATE_W` in `dolmen_pkg` widened to the whole
  composite state; the hash already folds every 32-bit chunk.
* **Model front end.** It is a single port carrying composite successors. The
  published design has a separate next-state generator and Büchi property
  block inside each core; both are generated per model and are outside this
  RTL.
* **Throughput.** The published core is deeply pipelined. Here each stage
  takes one state at a time:
  * the Known Set handles one state per two cycles;
  * the Predicate Checker needs two cycles per state;
  * one model request is outstanding per core.

  The behaviour is correct, but the throughput is lower than the published
  core's.
* **Bloom filter.** Two hash banks, 64-bit words and the hash function are
  choices made here. The address width is read as the bit-address width of
  each bank.
* **Frontier.** The read is combinational (distributed-RAM style) and the
  depth is an assumption.
* **Verdict routing.** The cycle core's "no cycle" goes straight to the
  prefix core's Predicate Checker as `resume`, and its "cycle found" goes
  straight to the VCore controller. The published block diagram routes both
  through the two termination checkers. The resulting behaviour is the same.
* **Root link.** `LINK_REGS` link registers also sit between the swarm
  controller and the root node, not only between internal nodes.
* **Tree protocol.** The status combining rule, the epoch and the rule that a
  start aborts running tasks are additions made here. There is no stop order:
  after one core finds a cycle, the other cores keep working until the next
  start.
* **Seeds.** The LFSR polynomial and the `+1` on the core index are choices
  made here. An LFSR loaded with zero, as core 0 would be, never moves.
* **Not built:** the UART and host software, the generated model front ends,
  and the software replay of counter-examples.

## Simulating

All files are SystemVerilog 2017. Read `rtl/dolmen_pkg.sv` first. Every
testbench in `tb/` is self-checking, ends with a `TB_RESULT checks=N
failures=M` line and has a watchdog. For example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dolmen_top \
  rtl/dolmen_pkg.sv tb/tb_model_pkg.sv tb/tb_stats_pkg.sv \
  $(ls rtl/*.sv | grep -v _pkg) \
  tb/tb_model_frontend.sv tb/tb_probe.sv tb/tb_dolmen_top.sv
./obj_dir/Vtb_dolmen_top
```

* Each `tb_<module>` tests its module. The lower-level testbenches compare
  against independent reference models: a queue model of the bounded stack,
  a set of visited states, a bit-serial LFSR and breadth-first searches over
  the toy models.
* `tb_dolmen_top` runs the whole engine at reduced size: 4 cores, branching
  factor 2, two link registers, small filters and 16-entry frontiers. It
  makes four runs from the host side: the property holds; a lasso is found;
  the single accepting state of a ring is found; the property holds again. It
  binds probes into the design and fails unless each of these happens at
  least once:
  * frontier overwrite;
  * Known Set duplicate dropped;
  * prefix stall with hand-off to the cycle core;
  * cycle search without a cycle;
  * cycle found;
  * task end;
  * stale status ignored;
  * cycle-core self-clear.
* `tb_dolmen_top_full` runs the top with every parameter at its default:
  32 cores and (19,12) filters. It makes one run where the property holds and
  one where a lasso is found. Each run starts with 8192 cycles of zeroing the
  prefix filters. The test takes about a minute.
* `tb_workload_bakery` is a small version of the bakery benchmarks. The
  model is Lamport's bakery algorithm for two processes, composed with a
  two-state Büchi automaton for the negation of "process 0, once waiting,
  eventually enters its critical section". The product has about 400 states,
  in 15 bits. The test checks two properties on a 4-core swarm:
  * counted from the moment process 0 asks: an unfair schedule can starve
    it. The swarm must report an accepting state on a cycle;
  * counted once process 0 holds a ticket: the property holds. The swarm must
    end without a report.

  Before running each property, the testbench first works out the expected
  verdict by exhaustive search.

Every result a testbench accepts is checked against the model independently.
For example, a reported accepting state must really lie on a cycle, which the
testbench checks with a breadth-first search over the model. The test does not
rely on the engine's own verdict.

## Files

* `rtl/dolmen_pkg.sv`: types, tree messages, the state hash.
* `rtl/dolmen_top.sv`: swarm controller, root link and tree.
* `rtl/swarm_controller.sv`, `rtl/swarm_tree.sv`, `rtl/tree_node.sv`,
  `rtl/link_shift_reg.sv`: the distribution tree.
* `rtl/vcore.sv`, `rtl/vcore_controller.sv`, `rtl/seed_lfsr.sv`: one
  verification core.
* `rtl/reach_core.sv`, `rtl/known_set.sv`, `rtl/frontier_stream.sv`,
  `rtl/predicate_checker.sv`, `rtl/termination_checker.sv`: the search engine
  and its stages.
* `tb/`: one testbench per module, plus the toy models, the behavioural front
  end and the event probes.
