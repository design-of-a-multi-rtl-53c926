# Multi-thread ROM controller

A conventional ROM-based controller stores the current state as a binary number.
An address decoder turns that number into exactly one active ROM row, and the row's
word drives the datapath. Only one state can ever be active. An algorithm with
concurrent threads must therefore be flattened into a single state machine, which can
explode in size, or it must be split over several communicating controllers.

This controller removes the decoder. Every ROM row has its own latch, so the state is
held in a register one bit per state wide, and any number of rows can be active at
once. Each concurrent thread holds one active state (a *token*). The controller's
output is the OR of the ROM words of all active states. The next-state logic then
becomes very simple: it only has to move tokens from latch to latch.

The RTL here is generic. A concrete controller is given by three parameters:
- a transition table;
- the list of states that need a JOIN (see below);
- the ROM contents.

The default configuration is a small two-loop example machine.

## Token flow: how control structures become gates

A latch holds a one while its state has a token. At each rising clock edge every
latch loads whether a token arrives for it. The input of a latch is built from its
incoming edges:

| construct | logic at the latch input |
|---|---|
| sequence x → y | `d[y] = q[x]` (a wire) |
| branch on test t | `d[then] = q[x] & t`, `d[else] = q[x] & ~t` |
| multi-way branch | each edge ANDs `q[x]` with several tests, true or inverted |
| merge after an if, loop re-entry | OR of the incoming terms |
| fork into concurrent threads | one `q[x]` feeds several `d` |
| merge of threads whose lengths are fixed | plain wire from the slowest thread; tokens of the faster ones just die |
| merge of threads of unknown length | a JOIN block (`join_wait`) |
| start | the `start` input is ORed into the starting state |

The JOIN is the only part with memory besides the latches. Each input has a set/reset
cell, `x[i] = (in[i] | held[i]) & ~st & ~reset`. The cell remembers that its thread has
arrived. When all cells are set, the JOIN passes one token to the state after the
merge. In the next cycle that state is active (`st`), which clears every cell. A token
that arrives in the same cycle as the last missing one counts at once. So two threads
that arrive together pass through the JOIN with no extra cycle. An N-way JOIN is one
block with N inputs. In gates it would be a tree of two-input blocks that share the
same `st`, and that tree behaves the same way.

`state_control_logic` builds all of this from the table. After elaboration it is
exactly the AND/OR network and the JOIN blocks, with no table lookup left in the
hardware.

## One clock cycle

`clk` is the clock as the core sees it internally. On silicon this is the inverse of
the supplied clock, made by the clock regulation's input inverters. A cycle starts at
its rising edge.

- **Rising edge.** Every latch loads its D, and the JOIN cells update. From then on,
  `q` shows the new active states.
- **First half (clk high): precharge.** All ROM output lines are charged high. The
  row drivers are held low, so every output `out` is 0.
- **Second half (clk low): evaluate.** The rows of the active states are driven. Each
  row discharges the lines of the columns where it has a transistor. The inverting
  output buffers turn a discharged line into a 1. So `out` is the OR of the active
  rows' words. If two active states drive the same output, the line just discharges
  faster. The ROM therefore does not need the words of concurrent states to be
  disjoint, although the datapath usually does.
- **The next rising edge** is where the datapath should sample `out`. The tests for
  the next transition are sampled here as well.

`reset` forces every latch output low, but it does not clear the stored bits. With
every `q` low, the next-state logic feeds zeros everywhere, and the JOIN cells see
`reset` directly. Holding `reset` across one rising edge therefore clears the whole
controller. A `start` given during that edge still puts a token into the starting
state.

`ready` is high while the final state is active.

## Describing a controller

The types are in `mtrc_pkg`. One `transition_t` entry describes one edge:

```
tr(src, dst, care, val, jin)
```

- `src`, `dst`: state numbers, which are also the ROM row numbers. `src = SRC_START`
  means the edge comes from the `start` input.
- `care`, `val`: one bit per test signal, with up to 16 tests. The edge is taken when
  `((test ^ val) & care) == 0`. This is the 1/0/don't-care notation of a symbolic
  state table. `care = 0` means an unconditional edge.
- `jin`: the JOIN input this edge feeds, if the target state has a JOIN.

`JOIN_INPUTS[s]` is the number of JOIN inputs of state `s`. A value of 0 or 1 means no
JOIN: all incoming edges are ORed. `CONTENT[s]` is the ROM word of state `s`; bit `c`
drives output `c`.

The edges of the default machine are:

```
start → S
S → u0                 S → t0 if a            S → e0 if !a
u0 → u1                u1 → u0 if b           u1 → F if !b   (JOIN input 0)
e0 → e1 → e2           e2 → e0 if c           e2 → F if !c   (JOIN input 1)
t0 → F                                                         (JOIN input 1)
```

So the u-loop always runs in parallel with either t0 or the e-loop, and F waits for
both. The ROM words of the default machine are this design's own choice:
- output 0 is set by the u-thread;
- output 1 by the e-loop;
- output 2 by t0;
- output 3 by S and F.

The table must describe a well-formed machine. Every control structure must be
properly nested, and a JOIN must only be reached by threads that all arrive once per
activation. The hardware does not check this.

## Sizes and stacked cores

`rom_core` defaults to 52 states × 100 outputs. This is about the largest core that
keeps the row and column lines fast enough for a 40 ns (25 MHz) cycle.

Larger machines use several stacked cores. `mt_rom_controller #(.N_CORES(n))` spreads
the states over `n` cores, `ceil(N_STATES/n)` rows each. The output lines are chained:
the output of one core pulls down the output lines of the next one, and the last core
drives `out`. The result is the same as one large core. On silicon this costs about
1 ns of extra delay, which is not modelled.

The `cascade_in` port also lets you chain whole controllers.

A controller with too many outputs can instead be split into two controllers. Each one
gets half of the outputs, and both are fed the same inputs. That needs no extra RTL:
instantiate `mt_rom_controller` twice.

## Modules

| file | what it is |
|---|---|
| `rtl/mtrc_pkg.sv` | transition type, `tr()` helper, the default example machine |
| `rtl/state_latch.sv` | one row latch: register, `q` forced low by reset, row drive forced low in precharge |
| `rtl/rom_matrix.sv` | NOR matrix with precharged lines, inverting output buffers, cascade input |
| `rtl/rom_core.sv` | latches + matrix + precharge timing (`precharge = clk`) |
| `rtl/join_wait.sv` | JOIN wait logic, `N_IN` inputs |
| `rtl/state_control_logic.sv` | latch-input logic generated from the transition table |
| `rtl/mt_rom_controller.sv` | top: control logic + one or more ROM cores |
| `rtl/dynamic_flipflop_model.sv` | behavioural model of the two-phase dynamic row latch (not synthesizable, not used by the top) |

On silicon the row latch is a dynamic master-slave circuit. Its chain is:
1. a transmission gate on `clk1`;
2. an inverter that holds charge;
3. a transmission gate on `clk2`;
4. a NOR with reset, which gives Q;
5. an inverter;
6. a NOR with precharge, which drives the row.

The two clocks must not overlap. If they did, D would run straight through to Q and
a token could skip a state. `dynamic_flipflop_model` reproduces this circuit and its
hazard. The synthesizable RTL uses an ordinary edge-triggered register (`state_latch`)
with the same cycle behaviour.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl rtl/mtrc_pkg.sv tb/tb_mt_rom_controller.sv \
          --top-module tb_mt_rom_controller -Mdir obj -o sim && ./obj/sim
```

`-Irtl` lets verilator find the modules by file name.

| testbench | what it shows |
|---|---|
| `tb_state_latch` | latch timing, reset masking, precharge gating |
| `tb_rom_matrix` | OR of several active rows, precharge, cascade |
| `tb_join_wait` | JOIN fires exactly when the last token arrives, clears on `st`/reset |
| `tb_rom_core` | latches + matrix, random multi-state patterns |
| `tb_state_control_logic` | default machine's latch equations against hand-written ones |
| `tb_mt_rom_controller` | default controller end to end, unchanged parameters (see below) |
| `tb_rom_core_sizes` | the latch/ROM stimulus on cores of 28×50, 28×100, 52×50, 52×100 (default) and 100×200 states×outputs |
| `tb_example_two_threads` | 28-state, 15-output machine: fork, two branches, JOIN that always waits |
| `tb_example_flat` | 30-state, 15-output single-thread machine: nested branches and merges, one-hot every cycle |
| `tb_example_large` | 127-state, 137-output machine on three stacked cores: 4-way branch, 2- and 8-input JOINs |

`tb_mt_rom_controller` checks the following:
- the output word and `ready` in both halves of every cycle, against a separate
  reference model;
- that the shortest path (start, S, {u0, t0}, u1, F) reaches `ready` four edges after
  `start` is sampled;
- that each mechanism happened at least once. It counts forks, both arms of the
  if-construct, both loops, cycles with several active states, JOIN waits, JOIN
  firing on simultaneous arrival, reset in the middle of a run, and use of the
  cascade input.

The three example testbenches predict the active states from thread program counters
and arm lengths, not from the transition table. They also check the fixed latency of
their machines (15, 16 and 41 edges).

## How far to trust it, and what differs from the circuit

- **Cycle-level behaviour only.** The RTL reproduces the token flow, the JOIN and the
  precharge/evaluate timing of the outputs cycle by cycle. It does not reproduce:
  - the analog timing of the ROM lines, such as rise/fall times growing with size
    and load;
  - the minimum clock frequency that the dynamic nodes impose;
  - power.
- **Single clock.** The silicon latch runs on two non-overlapping phase clocks.
  The synthesizable RTL uses one edge-triggered register per row, plus `clk` itself
  as the precharge signal. For an FPGA or a standard-cell flow, precharge has no
  meaning: `out` is then valid only while `clk` is low. Sample it at the rising edge,
  or remove the gating.
- **The JOIN cell** is a gated NOR latch on silicon. Here it is a flip-flop updated
  at the cycle edge; the cycle-level behaviour is the same.
- **The next-state logic** comes from a table in this design. A generator derives
  which merges are ORs (end of an if) and which are JOINs (end of concurrent
  threads) from the graph structure. Here that choice is made by hand through
  `JOIN_INPUTS` and `jin`.
- **Not modelled at all:**
  - the layout (latches on both sides of the matrix, 2×2 transistor groups that need
    even row and column counts, padding);
  - the static-latch variant;
  - moving simple latch-to-latch chaining into the core, which only changes the
    layout.
- **Default ROM contents.** As first published, the example machine drives zeros on all
  outputs. The default words here are made up so that the outputs show the threads.
  The default content of a bare `rom_core`/`rom_matrix` (every second column set) is
  only a placeholder.
