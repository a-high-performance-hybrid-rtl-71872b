# Hybrid wave-pipelined LFSR with a skew-tolerant clock

A linear feedback shift register (LFSR) has a clock-skew problem. Its feedback
gate combines outputs from stages that can be far apart in the chain, such as
stage 4 and stage 16 of a 16-stage register. Each new value is only correct if
those stages switch on the same clock edge. A globally buffered clock gives
every stage a different arrival time.

This design does not distribute the clock as an independent tree. It makes
the clock *travel with the data*. The wave-pipelined clock `wp_clk` comes
from the system clock `ref_clk`, passed through a copy of the register
cell's own data path. So the clock driving the cells has the same delay as
the data they shift. Two more choices support this:

- The register cell is two-phase. It accepts new data on one level of the
  clock while it still holds the old value on its output. At some moments one
  cell therefore holds two unrelated data values.
- The XOR feedback is a balanced tree, not a chain of gates in series. The
  feedback delay then grows with log2 of the number of taps.

This is a Fibonacci LFSR: all feedback logic sits in one path, into stage 1.
The main configuration has 16 stages with taps at stages 4, 13, 15 and 16.
That is the polynomial x^16 + x^15 + x^13 + x^4 + 1, with period 65535.

The RTL models the logic and the clocking structure. The timing advantages of
the transistor-level design, its skew and frequency, are analog properties.
No RTL simulation reproduces them (see *Limits*).

## Structure

```
            clk_en
              |
ref_clk --> clock_gate --gclk--> wp_clk_gen --wp_clk--+------+------ ... ---+
                                                      |      |              |
           seed[0]  fb                              cell 1  cell 2  ...  cell N
              \    /                                  |      |              |
      prog --> mux --> d[0] --> [Q1] --> mux --> [Q2] --> ... --> [QN]
                                  |               |                |
                                  +----- tap_sel mask, balanced XOR tree ----> fb
```

| File | Role |
|---|---|
| `rtl/lfsr_pkg.sv` | Stage count (16), the main tap mask `16'hD008`, the 3-stage example mask, `max_period()` |
| `rtl/register_cell.sv` | Two-latch register cell |
| `rtl/wp_clk_gen.sv` | Wave-pipelined clock generator (behavioural model with delays) |
| `rtl/feedback_xor_tree.sv` | Masked, balanced XOR feedback tree |
| `rtl/clock_gate.sv` | Glitch-free clock disable |
| `rtl/hwp_lfsr.sv` | Top level: N cells, load multiplexers, feedback, clocking |

## The register cell

The cell is, in transistor terms, an NMOS pass gate, an inverter, a PMOS pass
gate and a second inverter, in series. Both pass gates are on `wp_clk`:

- **Input stage:** transparent while `wp_clk` is high. It takes in the next
  value.
- **Output stage:** transparent while `wp_clk` is low. It passes the stored
  value to `Q`.

The two inversions cancel. Overall, `q` takes the value `d` had when `wp_clk`
fell, and `q` holds while `wp_clk` is high. The two stages are never open at
the same time, so a chain of cells shifts by exactly one place per `wp_clk`
low phase. The RTL writes each stage as an `always_latch`. The real cell
stores charge on dynamic nodes; the model treats that as ideal storage.

Closing the chain into a ring through the feedback tree creates a loop through
latches. Lint and synthesis tools report it as a combinational loop. The loop
is never transparent end to end, because the input and output stages of every
cell open on opposite clock levels. Both tools' warnings about it are
expected.

## The wave-pipelined clock generator

The generator is a small transistor circuit with these parts:

- An inverter (P0/N0) turns `ref_clk` into node `A`.
- A second inverter turns `A` into `A_bar`. `A_bar` is `ref_clk` delayed by
  two gate delays, matching the two inversions of a cell.
- P1, gated by `A_bar`, pulls `wp_clk` up while `A_bar` is low.
- N1 (gate `ref_clk`) in series with N2 (gate `A_bar`) pulls `wp_clk` down
  while both are high.
- When `ref_clk` is low and `A_bar` is still high, nothing drives `wp_clk`.
  The node floats and keeps its charge.

The resulting `wp_clk` is as follows:

| `ref_clk` event | `wp_clk` |
|---|---|
| rises | stays high for `T_A + T_ABAR`, then falls: cells shift |
| falls | stays low (floating) for `T_A + T_ABAR`, then rises: cells take new input |

So the register shifts once per rising edge of `ref_clk`, `T_A + T_ABAR`
later. This delay is 40 ps with the default parameters. `wp_clk_gen` is a
behavioural model with `#` delays and is not synthesizable. A real
implementation is the sized transistor circuit above. In silicon its sizing
also sets the pulse width and amplitude of `wp_clk`; the model has neither.
In the original circuit the floating window is a known weakness, and a
production version would add a keeper.

## Feedback tree, taps and sequence length

`feedback_xor_tree` ANDs each stage output with its bit of `tap_sel`. It then
reduces the masked bits with a heap-ordered binary tree of two-input XOR
gates, `node[i] = node[2i] ^ node[2i+1]`, with the leaves at `node[P..P+N-1]`.
For the four taps of the main configuration, this is two levels of XOR gates.

Bit `k-1` of `tap_sel` selects stage Qk. The same mask also sets the sequence
length. The highest selected tap closes the loop, and any stages above it
only delay the sequence. Examples:

- `tap_sel = 16'hD008` gives the 16-stage maximal sequence (65535 states).
- `tap_sel = 16'h0006` gives the 3-stage example. Its states are Q1 Q2 Q3 =
  100, 010, 101, 110, 111, 011, 001, then back to 100.
- `tap_sel = 0` turns the register into a plain shift register. A single 1
  then walks through all stages.

Whether the sequence is maximal depends on the mask. A poorly chosen mask
gives a short cycle.

## Initialization, clock disable, lock-up

- **`prog`:** held high for one `ref_clk` cycle, it loads `seed` into all
  stages at once. A 2:1 multiplexer in front of each cell chooses between
  `seed[i]` and the shift input.
- **`clk_en`:** set low to stop the register. `clock_gate` latches the enable
  while `ref_clk` is low and ANDs it with `ref_clk`, so a pulse is never cut
  short. With the gated clock held low, the generator holds `wp_clk` high, and
  every cell's output stage stays closed.
- **Lock-up:** the all-zero state maps to itself, because the feedback uses
  XOR. Seed the register with at least one 1 within the tapped stages. There
  is no reset: the register starts at whatever it holds until the first load.

Change `prog`, `seed`, `tap_sel` and `clk_en` while `ref_clk` is low.

## Interface of `hwp_lfsr`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `ref_clk` | in | 1 | System clock; one shift per rising edge |
| `clk_en` | in | 1 | 1 = run, 0 = hold state |
| `prog` | in | 1 | 1 = load `seed` at the next rising edge |
| `seed` | in | N | Load value, bit 0 = Q1 |
| `tap_sel` | in | N | Tap mask, bit k-1 = Qk |
| `q` | out | N | Stage outputs, bit 0 = Q1 |
| `fb` | out | 1 | Feedback bit entering Q1 |
| `wp_clk` | out | 1 | Wave-pipelined clock |

Parameter: `N` (default 16).

## What follows the original design, and what was chosen here

These follow the original design:

- the Fibonacci form, with feedback into stage 1 and shifting toward stage N
- the two-latch cell on both levels of `wp_clk`
- the clock generator topology
- the parallel (tree) feedback
- 16 stages with taps 4, 13, 15, 16
- the 3-stage example
- the existence of user controls for taps, sequence length, clock disable and
  single-cycle initialization

These were chosen here:

- how those controls work: a tap mask that also sets the length, per-stage
  load multiplexers, and a latch-based clock gate
- one clock generator shared by all cells
- the generator delays (20 ps each)
- no reset
- the port names

## Limits

- **Skew and frequency are not modelled.** The point of the technique is a
  timing one. At transistor level, the wave-pipelined clock reaches stages 4
  and 16 about 8 ps apart, against about 67 ps for a buffered clock, and runs
  about 1.2 times faster. A zero-delay RTL model keeps the structure that
  produces this, not the numbers.
- **The clock generator is behavioural.** It needs `--timing` in Verilator
  and is not meant for synthesis.
- **The latch ring is not standard-cell logic.** A standard-cell flow must
  treat the ring as a latch-based design, with two-phase timing constraints.
  It is not flip-flop logic.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=<n> failures=<m>`.

| Testbench | What it checks |
|---|---|
| `tb_register_cell` | Capture at the falling edge; hold in both phases; 500 random cycles |
| `tb_feedback_xor_tree` | 16-, 3- and 5-input trees against bit-serial parity; the 3-stage sequence |
| `tb_wp_clk_gen` | `A_bar` and `wp_clk` edges at exactly 40 ps after each `ref_clk` edge; the floating hold |
| `tb_clock_gate` | Random enable changes, including during the high phase; no shortened pulses |
| `tb_hwp_lfsr` | End to end at the default size, described below |

`tb_hwp_lfsr` runs the top level at its default size. It checks:

- the single-cycle load
- the 3-stage table
- a walking 1 through all 16 stages
- shift latency: unchanged 1 ps after the edge, shifted 60 ps after
- clock disable and resume
- shorter loops closed by the tap mask: 3 stages with 2 taps, 4 stages with 2
  taps (x^4 + x^3 + 1) and 8 stages with 4 taps (x^8 + x^6 + x^5 + x^4 + 1),
  each reaching its maximal period
- the full 65535-step period of the main configuration, with every state
  compared to a software model and the first return to the seed at exactly
  step 65535
- the lock-up state

It runs in well under a second.

To simulate with Verilator (5.x), from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/lfsr_pkg.sv tb/tb_hwp_lfsr.sv --top-module tb_hwp_lfsr
./obj_dir/Vtb_hwp_lfsr
```

`-Wno-fatal` keeps the expected latch-ring warnings (above) from stopping the
build. Replace `tb_hwp_lfsr` with any other testbench name to run that one.
