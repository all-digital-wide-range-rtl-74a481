# MSAR-controlled duty-cycle corrector

A DDR memory interface samples data on both edges of its clock, so every
picosecond by which the clock's high phase differs from its low phase is taken
from one of the two data windows. Mismatched rise and fall times along a clock
path distort the duty cycle. This design puts it back to 50%.

It is a closed digital loop. A one-bit duty-rate comparator tells whether the
corrected clock is high for more than half its period. A controller turns that
bit into a 6-bit code, `Ctrl`, and a 1-bit `Sign`. These set an adjuster that
lengthens the high time of the clock by `Ctrl` delay-line steps.

The controller is a *modified successive-approximation register* (MSAR):
- First, it finds the code by binary search, one bit per controller clock, in
  7 clocks.
- Then each of its bits becomes a bit of an up/down counter, with no extra
  flip-flops.

A plain SAR would stop after the search and leave the loop open. The MSAR
keeps correcting by one step per clock, so it follows later drift of the input
duty cycle, supply or temperature.

This RTL follows the MSAR-DCC described in *All Digital Wide Range MSAR
Controlled Duty-Cycle Corrector*. The two analog blocks, the adjuster and the
comparator, are behavioural models. The divider and the controller are
synthesizable. The section "Where this RTL departs from the published design"
lists every choice made here that the published description leaves open.

## The loop

```
            CLK_IN ──┬────────────────► duty-cycle adjuster ──────────┬──► CLK_OUT
                     │                    ▲ Sign     ▲ Ctrl[5:0]      │
                     │                    │          │                ▼
                     │   Start ──► MSAR controller ◄── Comp ── duty-rate comparator
                     │                    ▲
                     └──► ÷2 ── CLK_2X ───┘
```

| signal | meaning |
|---|---|
| `start` | Low: reset (`Sign = 0`, `Ctrl = 0`; `CLK_OUT` is just the delayed `CLK_IN`). Rising: correction begins. |
| `comp` | 1 when the high time of `CLK_OUT` is more than half its period. 0 at exactly 50%. |
| `sign` | 1 when the input duty rate was found above 50%. `CLK_OUT` is then built from the inverted input clock. |
| `ctrl` | Extra high time, in delay-line steps, 0 … 63. |
| `clk_2x` | `CLK_IN / 2`. The controller takes one decision per `CLK_2X` cycle, which leaves a full input period for the comparator to see the effect of the last change. |
| `sar_start` | The binary search is running. |
| `stop` | The search is finished and the controller is counting. |
| `done` | End: `stop` delayed by one clock. It tells the DLL that uses the clock that correction has finished. |

## Duty-cycle adjuster and the Sign bit

The adjuster (`duty_cycle_adjuster`) can only **lengthen** the high time:
- The rising edge of the output passes through a fixed (dummy) delay line.
- The falling edge passes through the same fixed delay plus a programmable
  delay line of `Ctrl` steps.
- A latch combines the two edges.

A clock that is high for too long can still be corrected, because an input
multiplexer selects `~CLK_IN` when `Sign = 1`. The inverted clock's high phase
is the original's low phase, so it is now the short one. In both cases,

```
high(CLK_OUT) = Heff + Ctrl · STEP,   Heff = Sign ? (P − H) : H
```

where `P` is the input period and `H` its high time. Correcting only one edge
direction halves the delay line the adjuster needs. The price is that with
`Sign = 1` the output is in antiphase to the input. A DLL downstream must
therefore look at `sign` to know which output edge corresponds to the rising
edge of `CLK_IN`.

In the model, `FIXED_PS = 60` and `STEP_PS = 10` (package `msar_dcc_pkg`).
The range is therefore 63 × 10 ps = 630 ps of high time. These are example
values of the model, not process data. `Ctrl` is read when a falling edge
enters the delay line.

## The MSAR controller

The controller (`msar_controller`) has three parts.

### Start sequence and Sign (`start_sign`)

Three flip-flops clocked by `CLK_2X` form a chain whose first input is tied
high:

| `CLK_2X` edge after Start rises | event |
|---|---|
| 1 | `Init` goes high. |
| 2 | `Sign_CK` goes high. At this edge `Comp` is stored in `Sign`. Up to here `Ctrl = 0` and `Sign = 0`, so `Comp` describes the uncorrected input clock. |
| 3 | `SAR_Start` goes high and releases the MSAR array. |

### The MSAR bit (`msar_unit`)

Each bit has one flip-flop `Q` and two modes, chosen by `Enable`:

- **`Enable = 0`, search.**
  - A cleared bit whose `Shift` input is high loads 1: this is the trial value.
  - A bit that holds 1 while still in search mode is the bit under test. At
    the next clock it keeps the 1 if `Comp = 0` (output still at or below
    50%), and clears it if `Comp = 1`.
- **`Enable = 1`, counter.**
  - `Q` toggles when `U` (count up) or `D` (count down) is high.
  - The carry `UO = U & Q` and the borrow `DO = D & ~Q` ripple to the next
    higher bit.
  - With `U = D = 0` the bit simply holds its value.

### The 6-bit array (`msar_array`): how the search hands over to the counter

Six bits `D5` (MSB) … `D0`, six OR gates and two flip-flops, `Stop` and `End`.
This handover is the subtle part of the design.

- **Where the search stands.** During the search, the bit under test is
  always the lowest bit that holds a 1: every bit below it is still 0. So:
  - `Shift(i) = Q(i+1) & ~Enable(i+1)`: bit i is tried as soon as the bit
    above it is under test.
  - The MSB's `Shift` is tied to 1.
- **The OR chain.** `Enable(i) = Q(i−1) | Enable(i−1)`, and `Enable(0) =
  Stop`. As soon as the bit below has taken its trial 1, the bit above is
  decided. It is switched into counter mode, where it holds its value because
  nothing is counted yet. This uses five OR gates.
- **Stop.** When the LSB is the bit under test, the `Stop` flip-flop is set.
  Its input is `Stop | (Q0 & ~Enable0)`, the sixth OR gate, so it stays set.
  `Stop = 1` turns on every `Enable` through the chain, whatever the bits
  hold.
- **End.** A second flip-flop delays `Stop` by one clock to give `End`.
- **Rule for the counter inputs.** The LSB's up/down inputs must stay low
  until `Stop` and must never be high together. Two assertions in
  `msar_array` check this.

Worked example, `P = 1000 ps`, `H = 300 ps`: `Sign = 0`, and 200 ps (20 steps)
are missing.

| clock after SAR_Start | Ctrl | high time | Comp | action |
|---|---|---|---|---|
| 1 | 100000 | 620 ps | 1 | try D5 |
| 2 | 010000 | 460 ps | 0 | D5 cleared, try D4 |
| 3 | 011000 | 540 ps | 1 | D4 kept, try D3 |
| 4 | 010100 | 500 ps | 0 | D3 cleared, try D2 |
| 5 | 010110 | 520 ps | 1 | D2 kept, try D1 |
| 6 | 010101 | 510 ps | 1 | D1 cleared, try D0 |
| 7 | 010100 | 500 ps | 0 | D0 cleared, `Stop` = 1 |

The search ends on the largest code that does not exceed 50%. The comparator
tests one 10 ps step at a time, so the result is within one step of 50%. Stop
rises 7 `CLK_2X` cycles after `SAR_Start`, which is 10 cycles (20 input
cycles) after `Start`.

### Counter mode and the LSB decision

Once `Stop` is high:
- `up = ~Comp` and `down = Comp` drive the LSB's `U`/`D`.
- The code moves one step per `CLK_2X` cycle.
- At lock it dithers between the code found and the next one, so the output
  stays within one step (±10 ps here) of 50%.
- If the input duty cycle drifts, the counter walks the code to the new value.

The counter saturates: there is no count up at 63 and no count down at 0. If
the needed correction is outside the range, `Ctrl` stays at the end of the
range instead of wrapping round.

### Power-down

The code is stored in ordinary flip-flops. When the input clock stops, `Sign`
and `Ctrl` are held. When it returns, the loop goes on counting from the
stored code, with no new search.

A comparison still on its way when the clock stopped can move the code by one
step. The counter takes it back within a few cycles.

## Duty-rate comparator

The real part integrates the differential clock onto two capacitors and
resolves the result with a regenerative latch. The model
(`duty_cycle_detector`) instead measures each pulse of `CLK_OUT`. At every
falling edge it sets `Comp = (2 · high > period)`, where `period` is the
spacing of the last two rising edges.

This makes `Comp` valid within one output period of a change of `Ctrl`, ahead
of the next controller clock. After a stopped clock the model makes no
comparison until it has seen one full period. "Stopped" means a gap of more
than twice the period, or a pulse longer than the period.

## Parameters

| name | default | where | meaning |
|---|---|---|---|
| `CTRL_BITS` / `N` | 6 | `msar_dcc_pkg`, all controller modules, top | width of `Ctrl`, number of MSAR bits; the search takes N+1 clocks |
| `ADJ_FIXED_DELAY_PS` / `FIXED_PS` | 60 | `msar_dcc_pkg`, adjuster | fixed edge delay of the model |
| `ADJ_STEP_PS` / `STEP_PS` | 10 | `msar_dcc_pkg`, adjuster | delay per `Ctrl` step |

All files use `` `timescale 1ps/1ps ``.

## Simulating

Each testbench is self-checking. It ends with a line `TB_RESULT checks=N
failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --no-sched-zero-delay -y rtl rtl/msar_dcc_pkg.sv \
          tb/tb_msar_dcc.sv --top-module tb_msar_dcc
./obj_dir/Vtb_msar_dcc
```

Swap in any other `tb/tb_*.sv` and its module name for the other tests.
`--no-sched-zero-delay` is valid because every delay in the models is
nonzero. Verilator is two-state: every register that is read is reset or
initialised.

| testbench | what it checks |
|---|---|
| `tb_msar_unit` | Search and counter rules of one bit, and the asynchronous clear. Directed cases, then 2000 random cycles against a reference. |
| `tb_msar_array` | 200 searches against a target code. Each search step is checked, Stop at clock N+1, End at N+2. Random up/down/hold counting afterwards. |
| `tb_start_sign` | Init, Sign_CK and SAR_Start at clocks 1, 2 and 3. Sign is captured only at clock 2. |
| `tb_clk_div2` | `CLK_2X` toggles on every rising edge of `CLK_IN`, never on a falling edge. |
| `tb_msar_controller` | Controller in a loop with an ideal adjuster and comparator written in the bench, 400 random runs. Checks Sign, the exact search result, Stop at clock N+4, one-step tracking after drift, and saturation at 63 and at 0. |
| `tb_duty_cycle_adjuster` | Rising-edge delay, and high time `Heff + Ctrl·STEP`, for random periods, duty rates, Sign and Ctrl. |
| `tb_duty_cycle_detector` | Comp for random pulses, including exactly 50% and ±1 ps around it. Also the stopped-clock cases. |
| `tb_msar_dcc` | The whole loop at default parameters, 400 runs of random period and duty rate. Checks Sign, clocks to SAR_Start (3) and to Stop (7), the search result, and a measured output duty within one step of 50%. Also checks drift tracking, saturation and power-down. Counts each mechanism and fails if one never happens. |

## Where this RTL departs from the published design

The published design gives its block diagram, the start circuit and the
structure of the MSAR circuit, but not every connection or value. Choices made
here:

- **MSAR bit.** The gate-level bit is not reproduced. `msar_unit` is written
  from its two modes. Its search rule ("cleared bit loads `Shift`, set bit
  loads `~Comp`") and its counter equations are this design's own.
- **OR chain and Shift.** The published text describes the OR gates only in
  words. Their wiring is this design's reading of that description: Enable of
  a bit from the bit below, Stop feeding the LSB, and `Shift` from the bit
  above. The second flip-flop after Stop is taken as `End`.
- **Counter direction.** The source of the LSB's up/down inputs is only named
  in the original. Here they come straight from `Comp`, gated by Stop.
- **Saturation.** The counter's behaviour at 0 and 63 is not specified.
  Saturation is this design's choice.
- **Sign flip-flop.** In the original it is clocked by `Sign_CK`. Here it is
  clocked by `CLK_2X` with a load enable on the edge where `Sign_CK` rises,
  which stores the same value.
- **Polarities.** Start low as reset and `Sign = 1` as "invert the input" are
  choices, consistent with the described behaviour.
- **Controller clock.** `CLK_SAR` and `CLK_2X` are taken to be the same clock.
- **Comparator timing.** The real comparator integrates in phases set by
  `CLK_2X`. The model measures every output pulse and has no `CLK_2X` input.
- **Delay values.** The adjuster's delay values are example numbers.
- **Correction time.** The published results give a correction within 7
  clock cycles, which is what this RTL does (1 trial + 6 decisions). One
  summary sentence of the original says 5 cycles instead.
- **Out of scope.** Power, area and the 0.18 µm implementation figures of the
  original cannot be reproduced in RTL. The DLL that consumes `End` and the
  corrected clock is outside this design.

The synthesizable part (controller and divider) has 12 flip-flops: 6 code bits,
Stop, End, Init, Sign_CK, SAR_Start and Sign. The top contains the behavioural
models, so it simulates but does not synthesize as a whole. Synthesize
`msar_controller` and `clk_div2`, and replace the two models with the analog
macros.

## Files

| file | contents |
|---|---|
| `rtl/msar_dcc_pkg.sv` | Shared constants. |
| `rtl/msar_dcc.sv` | Top: the loop. |
| `rtl/msar_controller.sv` | Controller: start/Sign, MSAR array, counter direction and saturation. |
| `rtl/start_sign.sv` | Start sequencer and Sign register. |
| `rtl/msar_array.sv` | 6-bit MSAR circuit with OR chain, Stop and End. |
| `rtl/msar_unit.sv` | One MSAR bit. |
| `rtl/clk_div2.sv` | Divide-by-two. |
| `rtl/duty_cycle_adjuster.sv` | Behavioural model of the adjuster. |
| `rtl/duty_cycle_detector.sv` | Behavioural model of the comparator. |
| `tb/tb_*.sv` | One self-checking testbench per module. |
