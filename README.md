# Timing-aware logic models of RSFQ cells

Rapid Single Flux Quantum (RSFQ) logic does not use voltage levels. A
signal is a train of picosecond pulses, and a clocked cell reports a logic
one by emitting a pulse when it is clocked if a data pulse reached it
during the clock period that just ended. Circuit-level (junction) simulation
of such cells is accurate but far too slow for circuits of thousands of
junctions, while level-based logic simulation cannot express pulses or
the cells' timing rules. These SystemVerilog models close that gap. Each
cell is an event-driven behavioural model that produces the right logic
function, the right clock-to-output delay and, when its inputs break the
cell's setup, hold or separation rules, an *undetermined* output. A whole
circuit built from these cells can then be simulated at the logic level
with a standard simulator, and its timing problems show up as marked
pulses and warnings.

The central idea is that every clocked cell, whatever its hold time,
setup time and delay, is modelled as a simpler idealised cell with zero
delay and zero hold time, wrapped in three delay lines. Only that
idealised cell needs timing checks, and they reduce to one rule: a data
pulse is trusted once a setup interval has passed without a clock pulse.

The models are simulation models, not synthesizable hardware: they use
delays and react to pulse edges in simulated time (unit 1 ps).

## Pulses and undetermined pulses

Every pulse line is an `sfq_pkg::sfq_t`, a packed struct of two bits:

| field | meaning |
|-------|---------|
| `p`   | the pulse: high for a short time (2 ps on cell outputs) |
| `unk` | set together with `p` when the pulse is *undetermined* ("shaded"): it may or may not be there, or its timing cannot be trusted |

A four-state simulator could carry this information in the value x; the
separate flag makes the models work in a two-state simulator such as
Verilator and keeps the meaning explicit. Drive a line by raising `p` for
a couple of time units; set `unk` as well to inject an undetermined pulse.
An undetermined pulse that reaches a cell makes the cell's output
undetermined, so timing faults propagate through a circuit as shaded
pulses instead of being silently lost.

## The idealised core cell

`sfq_clocked_core` is the idealised cell (called DRO' in comments, after
the destructive read-out cell it generalises). It has zero clock-to-output
delay, zero hold time and a setup time `T_SETUP_P`. For each data input
it keeps a three-valued state, 0, 1 or undetermined, and it works as
follows.

1. **A data pulse arrives.** The state becomes undetermined, unless it is
   already 1, in which case it stays 1. The pulse is not trusted yet.
2. **`T_SETUP_P` after the pulse**, the core checks whether a clock pulse
   arrived in between. If none did, the state becomes 1. If one did, the
   setup time was violated: the state becomes undetermined and a warning
   ("Violation of timing in module ...") is printed and counted in
   `n_viol`. An undetermined data pulse is never confirmed this way.
3. **A clock pulse arrives.** The core applies its function (`FN`) to
   the stored states. A 1 gives an output pulse, an undetermined result a
   shaded pulse, and a 0 nothing. A shaded clock pulse always gives a
   shaded output. Then all states are cleared.

Because the check in step 2 happens after the clock when the data pulse
was too late, a badly placed pulse spoils two clock periods. The clock
that came too soon reads an undetermined state. The check then leaves the
state undetermined for the next clock as well. This is the intended
behaviour: from the cell's point of view, missing the setup time of one
clock and missing the hold time of the next cannot be told apart.

Three situations on a store/read-out core with `T_SETUP_P` = 9 and clocks
at 100, 200, 300, …:

| data pulses       | outputs                              | why |
|-------------------|--------------------------------------|-----|
| 142               | clean at 200                         | confirmed at 151, long before the clock |
| 294               | shaded at 300, shaded at 400         | the clock at 300 comes before the check at 303 |
| 522 and 594       | clean at 600, shaded at 700          | 522 is confirmed at 531; 594 is checked at 603, after the clock |

In the last case the second pulse cannot spoil the first period: once a
state is confirmed as 1, it stays 1 until the clock reads it.

**Coincident events.** When a check, a clock pulse and a data pulse fall
on the same instant, the core handles them in that order: first the check,
then the clock, then the new data. A data pulse at the very instant of a
clock therefore belongs to the following period, which is what a zero hold
time means. With `T_SETUP_P` = 0 a data pulse is confirmed as soon as it
arrives.

## From the core to a real cell: the three delay lines

`sfq_clocked_cell` gives the core the timing of a real cell with hold time
`T_HOLD`, setup time `T_SETUP` and clock-to-output delay `DELAY`. The core's
setup time is `T_HOLD + T_SETUP`. Delay lines (`sfq_delay_line`, a
transport delay that keeps every pulse) in the data, clock and output paths
shift the core's window into place:

| hold time     | data delay | clock delay | output delay     |
|---------------|------------|-------------|------------------|
| `T_HOLD >= 0` | 0          | `T_HOLD`    | `DELAY - T_HOLD` |
| `T_HOLD < 0`  | `-T_HOLD`  | 0           | `DELAY`          |

In both cases the clock-to-output delay is `DELAY`, and the data pulse
reaches the core `T_HOLD` earlier, relative to the clock, than it does the
pins. Seen from the pins of the cell, the result is the usual rule for a
data pulse at position *t* in a period that starts with a clock pulse at
*c* and ends with one at *c'*:

    c + T_HOLD  <=  t  <=  c' - T_SETUP      (pulse counts for clock c', clean)

A pulse between `c' - T_SETUP` and `c' + T_HOLD` is in the forbidden
interval around `c'`. It makes the output at `c'` undetermined, and at
the following clock too. A negative hold time is allowed and common: with
the default `T_HOLD = -3`, a pulse up to 3 ps *before* a clock already
counts for the next period. The cell refuses, at elaboration, parameter
sets that break `DELAY >= 0`, `T_HOLD + T_SETUP >= 0` or `T_HOLD <= DELAY`.

## Minimum separation between data pulses

Some cells also need two data pulses, on the same input or on related
inputs, to be at least a minimum time apart. The core checks this when
`T_SEP > 0`. All data inputs of a cell count as related. A data pulse
less than `T_SEP` after an earlier one makes the next output of the cell
undetermined, and prints and counts (`n_sep`) a warning. This check is
this design's own addition. The original model names the separation
requirement but does not say how a model enforces it. It is off (`T_SEP =
0`) in the single cells and set to 5 ps in the half adder.

## The cells

All cells take their timing as parameters, so each instance can carry the
values measured for its own layout. The defaults are those of the
reference DRO: hold −3, setup 8, delay 9 (ps), output pulse 2 ps wide. For
the other cells no values are published; they use the DRO's until real
values are known.

| module       | pins                          | on each clock pulse |
|--------------|-------------------------------|---------------------|
| `dro_cell`   | `d`, `clk` → `out`            | pulse if `d` had a pulse in the period (destructive read-out) |
| `inv_cell`   | `d`, `clk` → `out`            | pulse if `d` had *no* pulse in the period |
| `and_cell`   | `a`, `b`, `clk` → `out`       | pulse if both `a` and `b` had a pulse |
| `xor_cell`   | `a`, `b`, `clk` → `out`       | pulse if exactly one of `a`, `b` had a pulse |
| `half_adder` | `a`, `b`, `clk` → `sum`, `carry` | `sum` = a xor b, `carry` = a and b |

For undetermined inputs the functions follow the usual rules: 0 AND
undetermined is 0, and XOR with an undetermined input is undetermined. The
half adder is an XOR cell and an AND cell sharing inputs and clock. The
fan-out is ideal: no splitter cell or splitter delay is modelled.

`rsfq_cell_lib_top` places a DRO, an inverter, an AND cell and a half adder
side by side, each with its own pins (`dro_*`, `inv_*`, `and_*`, `ha_*`).
The cells are independent library elements, and the top wires them into
no larger circuit. It exists so that one simulation covers the whole
library.

Hierarchy:

    rsfq_cell_lib_top
      dro_cell, inv_cell, and_cell        -> sfq_clocked_cell
      half_adder -> xor_cell, and_cell     -> sfq_clocked_cell
    sfq_clocked_cell -> sfq_delay_line (data, clock, output) + sfq_clocked_core
    sfq_clocked_core -> sfq_delay_line (one per input, times the setup checks)

`sfq_pkg` holds the pulse type, the three-valued state type `tri_t`, the
function selector `gate_fn_t` and the three-valued operators.

## Adding a cell

A new clocked cell with one or two data inputs needs only a new value of
`gate_fn_t` and a line in `sfq_pkg::gate_eval`, plus a thin wrapper like
`and_cell` that gives the pins their names and the timing its defaults. A
cell with more inputs needs `sfq_clocked_core` extended beyond `N_IN = 2`.

## Simulating

The models need Verilator's timing support. Packages go first on the
command line. For example, to run the DRO testbench:

    verilator --binary --timing --assert -Wno-fatal \
      rtl/sfq_pkg.sv tb/sfq_tb_pkg.sv \
      rtl/sfq_delay_line.sv rtl/sfq_clocked_core.sv rtl/sfq_clocked_cell.sv \
      rtl/dro_cell.sv tb/tb_dro_cell.sv --top-module tb_dro_cell
    ./obj_dir/Vtb_dro_cell

For any other testbench, add the cell files it uses, or pass
`-y rtl +libext+.sv` after the two package files and let Verilator find
the modules. Every testbench ends with a line `TB_RESULT checks=N
failures=M`. Timing warnings from the cells are printed as the simulation
runs. Many are expected, because the random tests break the timing rules
on purpose.

## Testbenches

`tb/sfq_tb_pkg.sv` contains a reference model that predicts a cell's
output pulses from its input pulse times. It is written from the pin-level
rule above: which period a pulse belongs to, whether it is clean, whether
a violation spills into the next period, and the separation rule. It does
not reuse the core-and-delay-line structure of the models, so it checks
that structure. Stimulus times are chosen so that no pulse falls exactly
on a window edge (clocks on multiples of 4 ps, data 2 ps above a multiple
of 4). The prediction therefore never depends on the order of coincident
events.

| testbench              | what it covers |
|------------------------|----------------|
| `tb_sfq_delay_line`    | every edge of overlapping pulse trains delayed exactly, zero-delay case |
| `tb_sfq_clocked_core`  | the three cases in the table above with hand-written expectations and warning count; random trains into store, inverter, AND (with separation) and XOR cores |
| `tb_sfq_clocked_cell`  | positive and negative hold time, hold-side and setup-side violations, output delay; random trains |
| `tb_dro_cell`, `tb_inv_cell`, `tb_and_cell`, `tb_xor_cell`, `tb_half_adder` | directed cases with hand-computed pulse times (including shaded data and clock pulses and, for the half adder, a separation violation), then random trains against the reference |
| `tb_rsfq_cell_lib_top` | the whole top at default parameters, about 3000 clock periods per cell; also counts each behaviour (clean outputs, violations, two-period shading, negative-hold capture, shaded data and clock, inverter firing, separation) and fails if one never occurs |

## Where the models depart from the original formulation

- Undetermined pulses are a flag on a two-state line, not the value x.
- Warnings are printed with `$display` and counted in the core (`n_viol`,
  `n_sep`), instead of being written to a chosen output channel.
- The order of coincident events is fixed (check, clock, data). The
  original leaves it to the simulator's scheduling.
- The separation check, the XOR cell, the two-cell half adder and all
  timing values other than the DRO's are this design's choices.
- The time unit (1 ps) is a choice. The original timing values are plain
  numbers.
- The original library has more than fifteen cells. Only the DRO, the
  inverter and the AND gate are defined closely enough to model here, plus
  the XOR and half adder needed for the half-adder example. Larger
  circuits built with the library, such as a four-bit
  multiplier-accumulator, are not included.
