# Functional model of dual-rail, 4-phase adiabatic logic

Adiabatic logic does not switch from a fixed supply. Each gate is powered by a
trapezoidal *power-clock* (PC) that ramps up, holds, ramps down and idles. The
gate's outputs follow that clock, so the charge put on a node is recovered
instead of being dumped to ground. Logic values are carried in dual-rail form,
as a pair of rails of which exactly one follows the power-clock. In a 4-phase
system, four power-clocks PC1..PC4 are each a quarter period apart. A gate on PCk
evaluates while the gate feeding it (on PCk-1) holds.

Checking such a design at transistor level is slow. Errors of phase (an input
that arrives a quarter period early or late) or of encoding (both rails active)
are hard to find in waveforms. This RTL is a cycle-based functional model of
such circuits. Signals are multi-level: idle `0`, hold `1`, a ramp `X` and an
invalid state `Z`. Each gate checks at every step that its input makes the
transition the current power-clock period allows, and it marks a violation by
driving `Z`. Wrong timing or encoding therefore shows up as `Z` in a digital
simulation. The model is plain synthesizable SystemVerilog, so it also runs in
Verilator.

The model reproduces a published VHDL modelling approach for adiabatic cell
libraries. The sections below say what it takes from that approach and what it
adds.

## Signal levels and the four power-clock periods

Every adiabatic node is an `alevel_t` (package `adiabatic_pkg`), a two-bit enum:

| code | name | meaning |
|------|------|---------|
| `A0` | `'0'` | idle period, or a rail that stays low |
| `A1` | `'1'` | hold period |
| `AX` | `'X'` | a ramp: evaluation (0→1) or recovery (1→0) |
| `AZ` | `'Z'` | invalid: the dual-rail or timing rules were broken |

One power-clock period is four steps: Evaluation (`X`), Hold (`1`),
Recovery (`X`), Idle (`0`). A period is recognised by how a signal changes
from one step to the next:

* evaluate edge: 0 → X
* hold edge: X → 1
* recovery edge: 1 → X
* idle edge: X → 0

When an edge is judged, a `Z` counts as an `X`.

The evaluation ramp and the recovery ramp share the code `X`. A gate tells
them apart only by the edge that led there. As a side effect, a late input can
produce a short `Z` glitch that later stages absorb.

## Time: steps and settle cycles

This is the part of the model that is least like ordinary RTL.

A **step** is one quarter of the 4-phase period. The VHDL original is event
driven: a gate's process runs when PC or an input changes. Within one
simulation time, a gate then reacts to changes made by the gate before it, in
delta cycles. This model runs each step for `DELTAS` clock cycles (6 by
default), which `a_timebase` counts. The last cycle of each step is marked by
`commit`.

* Power-clock generators and input converters change only on `commit`.
* Each cell keeps the levels of `pc`, `in_p` and `in_n` from the end of the
  previous step. In every clock cycle it re-runs its decision, comparing the
  present levels against those saved levels. The outputs are registered.
* A change therefore ripples down a chain one cell per clock cycle and has
  settled by the end of the step. `DELTAS` must exceed the longest chain of
  cells that change in one step:
  * In a 4-phase pipeline that is 4, because the cell in idle breaks every
    path.
  * In the Bennett chain it is 3.
* Because outputs are registered, feedback loops (the CRC register) contain
  no combinational cycle.
* A cell's decision only takes effect in a step where its `pc` or one of its
  inputs changed. Otherwise it keeps its outputs, like the latch formed by the
  cross-coupled pair in a real gate.

Read adiabatic outputs at the end of a step, when `commit` is high. The values
in the other clock cycles of a step are still settling.

## The NOT/BUF cell (`a_notbuf`)

This is the only cell with timing behaviour. `q` is the buffer output and `qb`
the inverter output. The decision, in priority order, with `PC` the cell's
power-clock and `IN`/`INb` its rails:

| period | condition | q, qb |
|--------|-----------|-------|
| idle | PC = 0 | 0, 0 |
| evaluation | PC = X, hold edge on both rails | Z, Z |
| | PC = X, hold edge on IN | PC, 0 |
| | PC = X, hold edge on INb | 0, PC |
| | PC = X, recovery edge on either rail | Z, Z |
| hold | PC = 1, recovery edge on both rails | Z, Z |
| | PC = 1, recovery edge on IN | PC, 0 |
| | PC = 1, recovery edge on INb | 0, PC |
| | PC = 1, idle edge on either rail | Z, Z |
| recovery | PC = X, idle edge on both rails | Z, Z |
| | PC = X, idle edge on IN | PC, 0 |
| | PC = X, idle edge on INb | 0, PC |
| | PC = X, evaluate edge on either rail | Z, Z |
| cascade | IN = Z and INb = Z | Z, Z |
| otherwise | | keep |

The input leads the power-clock by a quarter period. So a valid input is
expected to hold while PC evaluates, recover while PC holds, and go idle while
PC recovers. This gives the following results:

* **Valid 1:** q follows PC through X, 1, X, then 0. qb stays 0.
* **Both rails 1:** Z on both outputs through E, H and R, then 0 in idle.
  This models the coupled output nodes of the real gate, which settle at an
  intermediate voltage.
* **Both rails 0:** both outputs stay 0. No rail carries a value, and an
  output with both rails at 0 is itself invalid. `a_to_bin` flags it.
* **Input one step late or early:** the first cell shows `Z` (invalid state),
  which then travels down the chain.

With `BENNETT = 1` the evaluation and hold conditions on the single rails also
accept a rail that is *steady* at `1`. Under Bennett clocking the input has
settled before the gate's clock ramps, so no edge coincides with the ramp.

## Gates

Every other gate is a combinational *functional part* followed by one NOT/BUF
cell. So every gate has the same one-quarter-period latency, whatever its
fan-in. The functional parts use adiabatic AND and OR tables over the four
levels (rows are the first operand, columns the second):

| Aand | 0 | 1 | x | z |
|---|---|---|---|---|
| **0** | 0 | 0 | 0 | z |
| **1** | 0 | 1 | z | z |
| **x** | 0 | z | x | z |
| **z** | z | z | z | z |

| Aor | 0 | 1 | x | z |
|---|---|---|---|---|
| **0** | 0 | 1 | x | z |
| **1** | 1 | 1 | z | z |
| **x** | x | z | x | z |
| **z** | z | z | z | z |

Mixing a `1` with a ramp means two signals are out of phase, so the result is
`Z`.

| module | q / qb | functional part |
|--------|--------|-----------------|
| `a_and #(N)` | AND / NAND | Aand of true rails, Aor of complement rails |
| `a_or #(N)` | OR / NOR | Aor of true rails, Aand of complement rails |
| `a_xor #(N=10)` | XOR / XNOR | pairwise fold `x = Aor(Aand(x,b_n),Aand(x_n,b))`, `xn = Aor(Aand(x,b),Aand(x_n,b_n))` |
| `a_mux2` | `s ? d1 : d0` | `Aor(Aand(s,d1),Aand(s_n,d0))` and the same on complements |
| `a_demux2` | y0 = `!s & d`, y1 = `s & d` | one NOT/BUF cell per output |

All inputs of a gate must be in the phase just ahead of the gate's power-clock.

## Power-clocks and inputs

* **`pc4_gen`:** a two-bit counter advanced on `commit`. State 00 is idle,
  01 evaluation, 10 hold and 11 recovery. PC1 is the decoded counter, and
  PC2..PC4 decode the count minus 1..3 steps. PC4 therefore leads PC1 by a
  quarter period.
* **`bennett_clk_gen`:** a BCD counter (0..9) that produces an input
  reference waveform and three nested clocks. Signal *j* (0 is the input,
  1..3 are PC1..PC3):
  * ramps up at count *j*;
  * holds until count 7−*j*;
  * ramps down at count 8−*j*.

  Each stage evaluates one step after the one before it and recovers one step
  earlier, so inputs are always steady when a clock ramps.
* **`a_input_conv`:** turns two ordinary pulse inputs `inp`/`inpb` into
  adiabatic rails. A rail copies the reference clock `pc_ref` when its pulse
  is 1 and is 0 otherwise. The pulses are sampled at the end of each step in
  which `pc_ref` is idle, so a rail always makes whole cycles. Drive
  `inpb = ~inp` for a valid input. The other two combinations make the
  invalid inputs.
* **`a_to_bin`:** the way back to ordinary logic. At the end of each hold
  step of the signals' power-clock it stores the true-rail bit. It flags
  every rail pair other than (1,0) or (0,1) as invalid.

## CRC-16 (ISO/IEC 14443, CRC_A)

`a_crc16` is the benchmark circuit: a bit-serial CRC register CR0..CR15.

* **Generator:** x^16 + x^12 + x^5 + 1, with preset 0x6363. The feedback
  `fb = M xor CR15` enters CR0, CR5 and CR12.
* **Register value:** read with CR0 as the most significant bit. This is the
  same number as the reflected software form of CRC_A:
  `c ^= bit; c = (c>>1) ^ (c_lsb ? 0x8408 : 0)`.
* **Timing:** each register bit is four cells on PC1..PC4, so the register
  shifts once per power-clock period. The PC1 cell of each stage contains the
  stage logic:
  * the XOR (2-input for CR0; 3-input of CR(i−1), CR15 and M at a tap);
  * the preset load under RES. A preset 1 is the RES rail itself and a
    preset 0 is the RESb rail, so no constant-1 clock signal is needed.
* **`crc_counter`:** ordinary logic. It is cleared to 0000 by RES and counts
  the 16 message bits. It raises `done` for the power-clock period in which
  the final CRC sits on the register (PC4 hold). That is one sampling point
  after the last bit has been taken.

For the 16-bit message `0100100000101100` (first bit first), the register goes
from 0x6363 to 0xCF26.

## The top: `adiabatic_top`

One `a_timebase` and one `pc4_gen` drive four circuits that sit side by side,
each with its own ports:

| ports | circuit |
|-------|---------|
| `chain_*` | converter → 4-stage buffer chain on PC1..PC4 → `chain_out`/`chain_err` (sampled Q0) |
| `gate_*` | 10 converters → XOR10, AND of inputs 0..3, OR of 4..7, MUX (select 8, d0 = 9, d1 = 0), DeMUX (select 8, data 9), all on PC1 → `gate_out[5:0]`/`gate_err` |
| `bennett_*` | BCD generator, converter, 3-stage Bennett chain → `bennett_out`/`bennett_err` |
| `crc_*` | RES and M converters → `a_crc16` → `crc_value` (CR0 = bit 15), `crc_err`, `crc_valid`, `crc_count` |

All adiabatic nodes are also brought out as `alevel_t` ports.

Pulse inputs may change at any time. The 4-phase circuits take them at the
end of the step in which PC4 is idle (`phase == 2'b11` and `commit`). The
Bennett input is taken at BCD count 9. Latencies, counted in those sampling
points:

* **Gate row:** valid in `gate_out` one sampling point later.
* **Chain and CRC register:** valid two sampling points later.
* **Final CRC:** `crc_valid` pulses one power-clock period after the 16th
  message bit was taken.

Parameters of the top: `DELTAS` (settle cycles per step, 6) and `XOR_N`
(10).

## Simulating

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. For
example:

```
verilator --binary --timing -Irtl -y rtl rtl/adiabatic_pkg.sv tb/adiabatic_top_tb.sv \
          --top-module adiabatic_top_tb -o sim
./obj_dir/sim
```

Compile `rtl/adiabatic_pkg.sv` first; `-y rtl` finds the rest.
`adiabatic_top_tb` runs the whole top at its default parameters. It covers:

* the chain with valid, both-rails-1 and both-rails-0 inputs;
* all gates, including an invalid input;
* the Bennett chain;
* the CRC preset, the register state against a software CRC_A model in every
  period, and four messages, the first of them the 0xCF26 example.

It counts each of these cases and fails if one never happened. Only
`a_buf_chain_tb` applies inputs a step late or early.

`benchmark_workloads_tb` replays the reference scenarios on the default top:

* the NOT/BUF sequence of valid 1, both rails 0, both rails 1 and valid 0;
* the 10-input XOR with its inputs switched on one per period;
* the Bennett chain with a constant 1 input;
* the CRC example from RES to 0xCF26, including the exact sampling point at
  which `crc_valid` comes.

## How far to trust it, and where it departs from the original

* **Semantics.** The four levels, the edge definitions, the Aand/Aor tables
  and the NOT/BUF decision table follow the original method. The two-bit
  encoding, the step/settle-cycle scheme, registered cell outputs and
  synchronous reset are this model's own. They reproduce an event
  simulator's delta-cycle order for chains where PC changes first and the
  inputs follow. They may differ from it when a signal glitches and returns
  to its old value within one step, because the model then sees no event.
* **Both-rails-0 input.** The model follows the original's choice and keeps
  the outputs at 0. A real gate instead keeps its last value.
* **Bennett clocking.** The steady-level conditions are read as accepting a
  rail that is steady at `1` wherever a hold, recovery or idle edge is asked
  for on a single rail. The 10-step waveform schedule of `bennett_clk_gen` is
  this model's own.
* **CRC.** The original gives only the preset (0x6363), the serial operation
  and the result 0xCF26. Three things here are this model's own:
  * the generator polynomial, taken from the ISO/IEC 14443 CRC_A definition;
  * the message used in the tests (the 16-bit word that gives 0xCF26);
  * the cell-level arrangement of the register.

  `crc_counter` beyond "cleared to 0000 by RES" is also this model's own.
* **MUX and DeMUX.** They are only named in the original; the equations are
  this model's own.
* **Time scale.** The model has no notion of nanoseconds. One power-clock
  period is four steps, whatever period (100 ns in the original benchmark)
  it stands for.
* **Ramp encoding.** Both ramps share the code `X`, as in the original. Giving
  the evaluation ramp a code of its own would remove the late-input glitch;
  that variant is not built.
* **Other clocking schemes.** Only the 4-phase scheme and the Bennett chain are
  built. Single-phase and 2-phase adiabatic families would need more levels
  for their variable hold and idle periods.
* **Not modelled.** Energy, leakage, non-adiabatic losses, floating nodes and
  anything analog. This is a functional and timing-order model only.
