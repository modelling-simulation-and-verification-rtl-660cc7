# A multi-level logic model of 4-phase adiabatic circuits

Adiabatic logic saves energy by powering each gate from a slowly ramping,
trapezoidal supply (the *power-clock*) instead of a constant rail. In the
4-phase scheme every power-clock cycle has four equal periods: **Evaluate**
(ramp up), **Hold** (high), **Recovery** (ramp down) and **Idle** (low). Four
power-clocks, PC1 to PC4, run 90 degrees apart. A gate on PC*k* evaluates while
its inputs, produced by gates on PC*k-1*, are in their Hold period. So every
gate is a pipeline stage one phase long, and a signal moves one phase forward
per gate.

A square-wave clock can stand in for the power-clock, but it merges Evaluate
with Hold and Recovery with Idle. Misplaced inputs then look correct. This RTL
gives each period its own encoding instead. Hold is level `1`, Idle is level
`0`, and both ramps are an intermediate level `X`. Every signal is dual rail
and has the same trapezoid shape. A logic 1 puts the trapezoid on the true
rail, and a logic 0 puts it on the complement rail. With this encoding a
plain digital simulator can check the adiabatic timing rule and show invalid
dual-rail inputs.

The model is written in synthesizable SystemVerilog. It contains:

* a power-clock generator;
* a converter from ordinary pulse inputs to adiabatic inputs;
* a behavioural PFAL NOT/BUF gate core;
* a small cell library (AND/NAND, OR/NOR, XOR/XNOR, MUX, DeMUX);
* an adiabatic D flip-flop;
* two test designs: a 2-bit twisted ring counter and a 3-bit up/down counter.

## Levels, periods and the one-phase rule

`adiabatic_pkg` defines all shared types:

| type | values | meaning |
|---|---|---|
| `level_t` | `L0`, `LX`, `L1`, `LZ` | level of one rail: ground, ramp, high, high impedance |
| `period_t` | `P_IDLE`, `P_EVALUATE`, `P_HOLD`, `P_RECOVERY` | period of a power-clock |
| `dr_t` | `{t, f}` | a dual-rail signal: `t` is the true rail (A, Out), `f` the complement (Ab, Outb) |

The simulator has only two states, so the four levels are an ordinary 2-bit
enum and never use the simulator's own `x`/`z`.

`LX` alone does not tell you whether a rail is ramping up or down. The level
before it does. The package therefore defines edge functions over a
(previous, present) pair of levels:

| edge | previous → present |
|---|---|
| Evaluate | `L0` → `LX` |
| Hold | `LX` → `L1` |
| Recovery | `L1` → `LX` |
| Idle | `LX` → `L0` |

`pc_period()` uses the same pairs to decode a power-clock level into its
period.

Every level in the model stays constant for a whole period. It changes on the
rising edge of the base clock `clk`, and one `clk` cycle is one period. A
well-formed adiabatic input to a gate on PC*k* runs exactly one period ahead of
PC*k*. Put another way, it has the waveform of PC*k-1*.

## The NOT/BUF core (`adb_notbuf`)

This is the cell that every other cell is built on. It takes a power-clock
level `pc` and a dual-rail input `a`, and drives `out`. `out.t` is the buffer
output and `out.f` the inverter output. The core applies these rules in each
period of its power-clock:

* **Idle:** both outputs are at `L0`.
* **Evaluate, Hold or Recovery:**
  * An output rail follows the power-clock only if its input rail has just
    entered the period the input should be in now. For example, while the
    power-clock evaluates, the input rail must have just made its Hold edge.
  * If **both** input rails made that edge (both inputs at logic 1), both
    outputs go to `LZ`.
  * If **neither** did (both inputs at 0, or an input a phase early or late),
    both outputs stay at `L0`. This is the *inactive* state.
  * An `LZ` on an input rail turns into `LZ` on both outputs.

The core only recognises an input by the exact edge sequence `0, X, 1, X, 0`
arriving one phase ahead of its power-clock. So wrong timing can never be
mistaken for a valid value.

**Registering.** The counters close loops through chains of gates. If each
gate output depended combinationally on its input, those loops would be
combinational. Instead, each core registers its output. The output for period
*n+1* is computed on the clock edge that ends period *n*, from two things:

* the power-clock period that follows the one decoded now;
* the input's transition into period *n*.

In a well-formed cycle that transition comes one period before the one a
same-period check would test, so the lookahead sees it in time. For
well-formed inputs, and for complementary inputs that are equal, the
waveforms are the same as a same-period check would give. The core also
keeps the previous power-clock level and the previous input levels in
registers, because the edge functions need them. After `rst_n`, the previous
power-clock level is "unknown" (`LZ`). A ramp seen first is then not
decoded, and the gate stays inactive for that one period.

**Timing check.** `timing_err` compares the present period with the
one-phase-ahead rule. It is 1 when an input rail is active but not in the
period it should be in.

**Invalid inputs.** `invalid_in` is 1 when both input rails are active, or when
one of them is `LZ`.

**Assertions.** Two assertions guard the dual-rail rule:

* the two output rails are never driven by the power-clock at the same time;
* an active true output rail always equals the power-clock level.

## Cells: a function part in front of the core

A cell with several inputs is a level-logic function followed by one
`adb_notbuf`. The function uses level AND = minimum and level OR = maximum of
`0 < X < 1`. On properly timed inputs these behave exactly like the
transistor network. `LZ` loses to a controlling value (`0` for AND, `1` for
OR) and wins otherwise.

| cell | true rail | complement rail |
|---|---|---|
| `adb_and #(N)` | AND of the true rails | OR of the complement rails |
| `adb_or #(N)` | OR of the true rails | AND of the complement rails |
| `adb_xor` | A·Bb + Ab·B | A·B + Ab·Bb |
| `adb_mux` | S·B + Sb·A (`s ? b : a`) | S·Bb + Sb·Ab |
| `adb_demux` | Y0 = Sb·D, Y1 = S·D | Y0b = S + Db, Y1b = Sb + Db |

The DeMUX has one core per output.

Dual-rail inversion costs nothing: it is a swap of the two rails
(`dr_not()`).

## Power-clock and inputs

**`adb_pcgen`.** Two flip-flops count `cnt` = 00, 01, 10, 11. PC1 is Idle,
Evaluate, Hold and Recovery at those counts. Each following power-clock shows
the same sequence one count later. With a 25 ns `clk`, a power-clock cycle
takes 100 ns.

**`adb_p2a #(PHASE)`.** This converts a dual-rail pulse pair (`in_p`, `in_n`)
into an adiabatic input for gates on PC(`PHASE`+1).

* The active rail traces the power-clock one phase earlier. For `PHASE` = 0,
  the rail reads `X 1 X 0` at counts 00 to 11.
* The pair is sampled once per cycle, on the edge that starts the ramp, so one
  trapezoid always carries one value.
* Equal pulse inputs are passed on unchanged, so the next gate can flag them.

## Sequential designs

### Adiabatic D flip-flop (`adb_dff`)

Four gates in a row, on PC1 to PC4, delay a value by exactly one power-clock
cycle, and that chain is the flip-flop:

* **Stage 1:** a 2-input AND whose second input is the reset. Reset at 0
  forces logic 0.
* **Stages 2 to 4:** buffers.

All four stage outputs are brought out. The last stage's output runs one phase
ahead of PC1, so it can feed a flip-flop input directly.

### 2-bit twisted ring counter (`adb_ring_counter`)

The counter is two flip-flops. Q1 takes Q0, and Q0 takes not Q1. Starting from
the all-zeros state it steps through (Q0,Q1) = 00, 10, 11, 01, one step per
power-clock cycle.

Its reset `res_step` is a plain level, not an adiabatic signal. The counter
registers it while PC4 is idle. The registered level then selects which rail
of the first-stage reset input carries the PC4 trapezoid. PC4 is exactly the
waveform of an adiabatic constant for a PC1 gate.

### 3-bit up/down counter (`adb_updown_counter`)

Each bit has its own flip-flop chain. Stage outputs are named after the bit
*b*: Q*b*1, Q*b*2, Q*b*3 and Q*b*. The direction is one dual-rail pair
(CU, CD): CU = 1 counts up and CD = 1 counts down. Each next-state gate takes
its inputs from the phase just before its own:

| bit | next state | gates (phase) |
|---|---|---|
| 0 | D0 = not Q0 | the rails of Q0 fed back swapped |
| 1 | D1 = Q1 ⊕ Q0 ⊕ CD | XOR(Q02, CU) on PC3; XOR(its complement, Q13) on PC4 |
| 2 | D2 = Q2 ⊕ (CU ? Q0·Q1 : ¬Q0·¬Q1) | see below |

Bit 2 is built in three layers:

1. **PC2:** a = Q0·CU, b = Q2⊕Q1, c = ¬Q0·CD, d = CU⊕Q0, all from Q01, Q11,
   Q21 and the direction.
2. **PC3:** t1 = a·b, t2 = c·¬b, t3 = Q22·d.
3. **PC4:** D2 = t1 + t2 + t3.

Gates on PC2 and gates on PC3 both use the direction. So it enters twice, as
`dir_pc2` and `dir_pc3`, converted for those two phases (in the top, two
`adb_p2a` with `PHASE` 1 and 2). `res` (RES/RESb) is an adiabatic input
converted for PC1. While RES = 0 the count is cleared.

## Latency, as seen at the outputs

All counter outputs are read in the Hold period of PC4. The library outputs of
the top are read in the Hold period of PC1.

| path | delay |
|---|---|
| gate input → gate output | one period (a quarter cycle) |
| flip-flop `d` → `q[3]` | one power-clock cycle |
| counter step | once per power-clock cycle (100 ns with a 25 ns `clk`) |
| ring counter reset step, or up/down RES | the reading two cycles later (when changed during the Hold period of PC1) |
| up/down direction | the reading three cycles later (when changed during the Hold period of PC1) |

The two direction converters sample on different edges. The one for the PC2
gates samples when the count goes from 00 to 01, and the one for the PC3 gate
when it goes from 01 to 10. A change made after the 01 to 10 edge and before
the next 00 to 01 edge reaches both in the same counter cycle. The
testbenches make their changes in the Hold period of PC1 (count 10).

## The top (`adiabatic_top`)

One `adb_pcgen` drives three designs that sit side by side:

* a cell bench: inputs A, B and S are converted for PC1 and drive the NOT/BUF,
  AND, OR, XOR, MUX and DeMUX cells on PC1;
* the ring counter;
* the up/down counter with its converters.

The top has no parameters. Every port is a plain signal or a packed array of
`dr_t` / `level_t`.

## Design choices and limits

* **Registered periods instead of event timing.** An event-driven model
  checks each edge at the instant it happens. Here each gate decides its
  next period one period early, from the edge one phase before (see the core
  section). The two give the same waveforms for well-formed inputs and for
  equal complementary inputs. They differ only for misplaced inputs (next
  point).
* **Inputs that arrive a phase early or late** produce no output here (both
  rails `0`) and raise `timing_err`. They are never passed on as a valid
  value.
* **The ring counter's gates** are this design's own: two flip-flop chains,
  a rail swap for the twist, and the step reset on the first AND stage.
* **The up/down counter's equations** were worked out here. The gate types,
  phases and input signals are fixed by the layered structure above. Which
  rail of each pair enters each gate was chosen so that the counter counts
  correctly.
* **Function parts.** The OR/NOR, XOR/XNOR, MUX and DeMUX function parts are
  built the same way as AND/NAND, from level AND/OR.
* **Interfacing choices:**
  * the converters sample their pulse inputs once per cycle, at the start of
    the ramp;
  * the up/down counter's direction is converted twice, once per phase that
    uses it;
  * the ring counter registers its step reset while PC4 is idle.
* **`LZ` handling.** `LZ` propagates through cells, and the power-clock
  decoder treats it as "unknown".
* **Not modelled.** The transistor-level PFAL buffer, the resonant or stepwise
  power-clock supply, voltages and energy.
* **Square-wave baseline.** The older two-level style, with a square-wave
  power-clock, is not built. This model is the alternative to it.

## Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_adiabatic_pkg` | all functions against written-out tables |
| `tb_adb_pcgen` | count sequence, PC1 levels, 90° shift |
| `tb_adb_p2a` | waveform per `PHASE`, one value per trapezoid |
| `tb_adb_notbuf` | one-period delay, `Z` for 11, inactive for 00, `timing_err` on early and late inputs |
| `tb_adb_and`, `tb_adb_or`, `tb_adb_xor`, `tb_adb_mux`, `tb_adb_demux` | random inputs against the Boolean function |
| `tb_adb_dff` | every stage output against a history of the inputs |
| `tb_adb_ring_counter` | Johnson sequence, reset, all four states |
| `tb_adb_updown_counter` | ±1 mod 8, reset, both wraps, direction changes |
| `tb_adiabatic_top` | the whole model end to end; counts every mechanism and fails if one never happens |
| `tb_workload_scenarios` | three demonstration runs on a 25 ns clock: NOT/BUF with valid and invalid input stretches over 2 µs, ring counter with a 400 ns reset, up/down counter reset–down–up over 2 µs, readings 100 ns apart |

Run one with plain Verilator, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  --top-module tb_adiabatic_top -y rtl -y tb +libext+.sv -Irtl \
  rtl/adiabatic_pkg.sv tb/tb_adiabatic_top.sv -o sim
./obj_dir/sim
```

Each simulation runs in well under a second. All files in `rtl/` pass
`verilator --lint-only -Wall`. Its only remarks are that some modules do
not use the package constant `NPHASE`, and that `rst_n` drives both the
asynchronous resets and the assertions' `disable iff` (`SYNCASYNCNET`). They also elaborate in Yosys's slang front
end and synthesize with no latches and no combinational loops. The whole top
comes to about 320 flip-flop bits.

## Changing it

* **New cell.** Write its function part with `level_and` / `level_or` and feed
  the result into an `adb_notbuf`. Its inputs must come from gates on the
  previous phase, or from an `adb_p2a` with the matching `PHASE`.
* **Deeper logic.** Add one phase per gate. A value that has to wait keeps
  going through buffers, as in the flip-flop chains.
* **Wider up/down counter.** The next-state network is written for exactly 3
  bits and would have to be extended by hand.
