# Test controller for grouped, partly compacted test plan tables

A data path built for *strong testability* can test each of its
combinational modules (multiplexers, adders, …) through a **test plan**: a
short sequence of values on the primary inputs and on the data-path control
signals that carries a gate-level test pattern from the inputs to the module
and its response back out to the outputs. The values in a plan are `0`, `1`,
`X` (don't care) and `b` — bits of the test pattern itself, which change
from pattern to pattern.

Testing one module at a time is slow: every pattern of every module costs a
full plan plus a load cycle. Compacting *all* plans into one table, so that
all modules are tested at once, is fast only when every module needs about
the same number of patterns, and the controller that replays one long table
on hundreds of control signals becomes too large to synthesise. The middle
way implemented here is to **partition the test plans into `m` groups** and
compact each group into its own *partly compacted test plan table* (PCTPT).
Modules with many patterns are kept apart from modules with few, so short
tables are not replayed needlessly, and each table can be decoded by its own
small piece of logic.

This repository holds the synthesizable **test controller** that supplies
such tables to the data-path control signals, plus the mode multiplexer that
hands those signals to it in test mode. The data path itself and its
functional controller are outside: their signals are ports.

## How a test session runs

```
             +------------------- test_controller -------------------+
  pi ------->| TPR  loads pi[TPR_W-1:0] on reset or reload           |
             | TMR  loads pi[TPR_W +: TMR_W] on reset                 |
  reset ---->| TPG  FSM --row--> Decoder-G1 .. Decoder-Gm --> MUX ----+--> ctrl_test
  t1 ------->|      (decoders also read TPR and pi; TMR sets the      |
             |       FSM's table length and selects the MUX input)   |
             +-------------------------------------------------------+
  ctrl_func ----------------------------> t1 mux <---- ctrl_test
                                            |
                                            +--------> ctrl_dp (to the data path)
```

* **TPR** (test pattern register) holds the `b` bits of the control signals
  for the current pattern. **TMR** (target module register) holds the index
  of the group under test, `ceil(log2 m)` bits.
* One test pattern of group `j` takes `GL_j + 1` clock cycles:
  1. **Load cycle** — the tester raises `reset` (the controller Reset) with
     `t1 = 1` and puts the TPR bits on `pi[TPR_W-1:0]` and the group index on
     `pi[TPR_W +: TMR_W]`. The TPR and TMR load; the FSM restarts.
  2. **Rows 0 … GL_j−1** — on each following cycle the FSM advances one row
     and `ctrl_dp` carries that row of PCTPT_j. The tester meanwhile drives
     the data inputs of the test pattern on `pi`.
  3. After the last row the FSM goes idle (`test_active = 0`) and drives
     zeros until the next load cycle.
* Group `j` is applied `MAXTP_j` times, the largest pattern count among its
  modules, so the whole session lasts

  `L = Σ_j MAXTP_j × (GL_j + 1)` cycles.

* With `t1 = 0` the functional controller's `ctrl_func` reaches the data
  path and the FSM stays idle; dropping `t1` in the middle of a table stops
  it at the next clock.

## Inside the test plan generator

The TPG is split the way it is so that each part stays small:

* **FSM** (`tpg_fsm`) — its state is just the row number. It has as many
  states as the longest table (`GL_MAX`), and stops after the length of the
  group held in the TMR (`GL_LEN[tmr]`).
* **Decoder-G_j** (`tpg_decoder`), one per group — combinational logic that
  maps (row, TPR, pi) to the values of PCTPT_j. Its size grows with how many
  specified cells the table has.
* **MUX** (`tpg_mux`) — per control signal, a multiplexer over the groups
  that drive that signal at all, selected by the TMR. Its size grows with
  the number of control signals each group drives (`GNC_j`).

Choosing the grouping trades these sizes against test length: longer tables
grow the FSM, denser tables grow the decoders, and groups touching many
control signals grow the MUX. The grouping itself (an integer program over
the test plans) is done offline; its result enters the RTL only as the
`PCTPT`, `GL_LEN` and `RELOAD` parameters.

### Table encoding

`PCTPT` is a packed array `tc_pkg::cell_t [M][GL_MAX][U]`, indexed
`[group][row][control signal]`, control signal `c1` at index 0. Each cell
is one of

| kind        | drives                                                   |
|-------------|----------------------------------------------------------|
| `CELL_X`    | don't care — driven as 0                                 |
| `CELL_0/1`  | constant                                                 |
| `CELL_TPR`  | TPR bit `idx`                                            |
| `CELL_PI`   | primary-input bit `idx`, for a pattern bit the tester can apply through an input the data path does not use in that row |

`tc_pkg` has constructors `cx() c0() c1() cb(i) cp(i)` to write tables.
`RELOAD[g][r] = 1` makes the TPR reload from `pi[TPR_W-1:0]` at the end of
row `r`, so one TPR bit can serve several pattern bits of a long table when
the TPR's inputs are free in between. `GL_LEN[g]` is the number of rows of
group `g`; rows past it are ignored.

### Default configuration

The defaults are a four-module example data path with one primary input
and control signals `c1…c4`, grouped as {T1, T3} and {T2, T4}:

```
group 0 (4 rows)            group 1 (3 rows)
row  c1  c2  c3  c4         row  c1  c2  c3  c4
 0   b0  0   1   X           0   0   0   1   b0
 1   0   1   X   X           1   X   X   X   X
 2   X   X   b1  X           2   X   b1  X   0
 3   X   X   0   X
```

(`b0`, `b1` = TPR bits). With 8, 3, 7 and 2 patterns for modules 1–4 the
session takes 8×(4+1) + 3×(3+1) = **52** cycles. `tc_pkg::EX_TABLE_B` is the
other grouping, {T1, T2} / {T3, T4}, two 4-row tables, 8×5 + 7×5 = **75**
cycles. The 8-bit primary input is an arbitrary choice for the example.

## Files

| file | contents |
|------|----------|
| `rtl/tc_pkg.sv` | cell type, example tables, constructors |
| `rtl/tpg_fsm.sv` | row-counting FSM |
| `rtl/tpg_decoder.sv` | Decoder-G_j for one table |
| `rtl/tpg_mux.sv` | multiplexer array selected by the TMR |
| `rtl/tpg.sv` | FSM + M decoders + MUX |
| `rtl/tpr.sv`, `rtl/tmr.sv` | test pattern / target module registers |
| `rtl/test_controller.sv` | TPR, TMR, TPG, load rule (Reset or reload) |
| `rtl/ctrl_sel_mux.sv` | `t1` selector for the data-path control signals |
| `rtl/dft_test_top.sv` | top level |
| `tb/*_tb.sv` | self-checking testbench per module (`tc_pkg_tb` checks the example tables) |
| `tb/tc_scenario.sv` | reusable driver: full session of one configuration, checked against a text table |

The testbenches write the expected tables as text (`"a01X"` = c1 from TPR
bit 0, c2 = 0, c3 = 1, c4 unchecked) so that the expected values do not come
from the RTL's own encoding.

* `dft_test_top_full_tb` — the top at its defaults, one complete session,
  checks every specified cell and the 52-cycle length.
* `dft_test_top_tb` — the {T1,T2}/{T3,T4} grouping (75 cycles) and a
  configuration with a reload row and a `CELL_PI` cell, plus normal mode,
  abort and idle; it counts each mechanism and fails if one never occurs.
* `tc_workloads_tb` — the same hardware holding one test plan per group
  (one module at a time, 75 cycles) and all plans in one table (56 cycles).

Run one with plain Verilator from the repository root, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/tc_pkg.sv tb/dft_test_top_tb.sv --top-module dft_test_top_tb
./obj_dir/Vdft_test_top_tb
```

Each prints `TB_RESULT checks=N failures=0` on success.

## Changing the configuration

Set `M`, `U`, `GL_MAX`, `TPR_W`, `PI_W` and supply `PCTPT`, `GL_LEN` and
`RELOAD` with matching sizes (the defaults only fit the example). The same
RTL covers both extremes: `M` equal to the number of modules gives the
one-module-at-a-time controller, `M = 1` a single fully compacted table
(`tc_workloads_tb` runs both). The tables are parameters, so the decoders
reduce to plain logic in synthesis.

Elaboration stops if `PI_W < TPR_W + ceil(log2 M)`, if a cell names a TPR
or primary-input bit that does not exist (cell indices reach 255), or if a
`GL_LEN` entry is 0 or larger than `GL_MAX`. In simulation with assertions
on, `tpg_fsm` checks that the row never passes the end of the selected
table.

## Where this departs from, or goes beyond, the method it implements

* The method describes the blocks and their roles; their insides here
  (row-number FSM, table-lookup decoders, zeros for don't-cares, FSM idle
  state, use of the TMR to stop the FSM early) are this design's choices.
* The reload function was introduced for the single-table controller; here
  it is a per-row option of every group's table. The example tables do not
  use it.
* Which primary-input bits load the TPR and TMR, the polarity of `t1`
  (1 = test), and the synchronous Reset used as the load strobe are choices
  made here.
* Not included: the data path and its functional (testable) controller, the
  multiplexers on status signals and primary outputs used for controller
  testing, and the grouping optimiser. The larger benchmark data paths the
  method was evaluated on (up to 589 control signals and about 1500 FSM
  states) fit the parameters in principle, but their tables are not
  available, so they have not been built or simulated.
