# Quad-core QP sub-problem solver for branch-and-bound MIQP

Robot controllers built on hybrid (mixed logical dynamical) models must
solve a mixed-integer quadratic program (MIQP) every control period:

    minimise  1/2 x'Hx + g'x   subject to  A_E x = b_E,  A_I x <= b_I,
    with some entries of x restricted to integers.

Branch and bound turns one MIQP into a tree of ordinary QP sub-problems, and
each sub-problem fixes or bounds the integer variables in a different way.
Sub-problems in different branches do not depend on each other. So the
solver here is a chip with several independent QP solver cores, four in the
main configuration. An external control processor keeps the search tree,
the best solution so far and the pending sub-problems in DRAM. It streams
one sub-problem at a time into the chip. The chip places each sub-problem
on a free core and returns each solution tagged with the sub-problem's
index. Several chips can share one control processor.

The main configuration is sized for the original 65 nm chip's target
problem:

| quantity | value |
|---|---|
| variables `N` | 50 |
| equality constraints `ME` | 10 |
| inequality constraints `MI` | 100 |
| cores per chip `NC` | 4 |
| local SRAM per core | 204 kb + 109 kb + 109 kb = 422 kb |
| number format | 40-bit signed fixed point: 14 integer bits, 26 fraction bits |
| divider | multi-cycle, 5 clock cycles per quotient |

This RTL covers the data movement and control of the chip and the cores,
the SRAMs, and all of the cores' arithmetic units. It also covers the
constraint check that a dual active-set QP method runs in every iteration.
Two units are **not** included: the ones that take a dual active-set step
(choosing the new active set and computing the step). Without them a core
cannot move its point toward the optimum by itself. Their place is left
open as ports, described under
[The missing step units](#the-missing-step-units).

## Number format

All data are `fx_t`: signed 40-bit words with 26 fraction bits
(`miqp_pkg::FX_ONE = 2^26`). The range is −8192 to +8192 − 2^-26. Units
keep full precision internally: the MAC keeps 52 fraction bits, the divider
a 65-bit dividend, and the distance unit an 81-bit sum of squares. Each
unit rounds once, toward −∞, except the divider, which rounds toward zero.
Results that do not fit saturate to the largest or smallest word.

## How a sub-problem travels through the chip

```
 idx ──────────────► sequence_control ──(up_sel, dn_sel, tags)──┐
 prob words ─► problem FIFO ─► local_bus ─► qp_core 0..3 ─► local_bus ─► solution FIFO ─► sol_word
```

1. The control processor offers the sub-problem's 16-bit index on
   `idx_valid/idx`. `sequence_control` accepts it only when no upload is in
   progress and at least one core is free. A free core is idle and holds
   no sub-problem. The lowest-numbered free core is chosen, and the index
   is stored for it.
2. The control processor then sends the sub-problem's `PROB_WORDS` words
   on `prob_valid/prob_data`. The 16-entry problem FIFO decouples it from
   the cores. `local_bus` steers the words to the chosen core until
   `PROB_WORDS` of them have passed. The next index is accepted only after
   that.
3. The core works on its own: it checks its point and asks for steps.
4. A core with a finished solution offers it. Cores are served in
   round-robin order. Each of the `N` solution words leaves through the
   solution FIFO as a `sol_word_t`. The word carries the index, a `last`
   flag, the core's status (`feasible`, the most violated row `p_row` and
   its slack `p_slack`) and one element of x. The core becomes free when
   its last word has been taken.

While all four cores hold sub-problems, `idx_ready` stays low and the
control processor waits. If nobody reads solutions, the solution FIFO
fills, the finished cores keep their solutions, and the chip stalls from
the output back to the input. Nothing is lost.

A sub-problem is streamed in this order, as 40-bit words. The order is this
design's choice, and it also fixes each part's address in the core's memory:

| part | words | flat address (defaults) | SRAM |
|---|---|---|---|
| A_I, row major | MI·N = 5000 | 0 – 4999 | SRAM0 |
| b_I | MI = 100 | 5000 – 5099 | SRAM0 |
| H, row major | N·N = 2500 | 5100 – 7599 | SRAM1 |
| g | N = 50 | 7600 – 7649 | SRAM1 |
| A_E | ME·N = 500 | 7650 – 8149 | SRAM1/2 |
| b_E | ME = 10 | 8150 – 8159 | SRAM2 |
| x0 (starting point) | N = 50 | 8160 – 8209 | SRAM2 |

That is 8210 words (328.4 kb). The original chip quotes 327.2 kb per
sub-problem, so its own layout differs slightly. A_I and b_I fill SRAM0
exactly, and x lies in SRAM2. Because of that, the constraint check reads
one matrix word and one x word in every cycle without contention. The
solution is the 50 words of x, which is 2 kb. The starting point x0 is the
control processor's job ("first point calculator").

## Inside a core (`qp_core`)

```
            ┌──────────── core_sequencer ─────────────┐
 words ─► io_control   compute_inequality   (step units: outside, via ext_req/ext_rsp)
              │           │lane A  │lane X      │
              └──────── memory_bus (4 masters, 3 SRAMs) ────────┘
                      SRAM0 5100w  SRAM1 2725w  SRAM2 2725w
 shared: mac_unit · fixed_divider (ports 0, 1) · sqrt_unit · distance_calc
```

**Memory.** The three SRAMs (`sram_sp`) hold 5100, 2725 and 2725 words of
40 bits. Each has one port and a read latency of 1 cycle. `memory_bus` puts
them into one flat word space (SRAM0, then SRAM1, then SRAM2). Each SRAM
serves one master per cycle, and masters that use different SRAMs are
served in the same cycle. The fixed priority, highest first, is
`io_control`, the constraint check's lane A, its lane X, and the external
step units. `gnt` is combinational, so a master holds its request until
granted. Read data come back with `rvalid` one cycle later.

**Sequencer.** `core_sequencer` runs a loop:

```
LOAD ──loaded──► CHECK ──feasible, or check limit──► SEND ──sent──► LOAD
                   ▲  └──violated──► STEP ──step_ok=0──► SEND
                   └──────step_ok=1────┘
```

Each pass through CHECK evaluates all inequality constraints at the current
x. If one is violated, the sequencer raises `step_req` and presents the
most violated row and its slack. The step units are expected to add that
constraint to the active set, move x, and answer `step_ack` with
`step_ok = 1`. The sequencer then checks again. `step_ok = 0` means no step
is possible, so the sub-problem has no feasible point and the core reports
it with `feasible = 0`. After `MAX_CHECKS` checks (2N + MI = 200 by
default) the point is sent as it is, marked not feasible.

**Constraint check (`compute_inequality`).** For each row i it feeds the
shared MAC N+1 pairs: (A_I[i][j], x[j]) for j < N, then (b_I[i], −1.0).
The MAC returns A_I[i]·x − b_I[i], and the slack is its negative. The unit
tracks the smallest slack and its row; if equal slacks tie, the first row
wins. The point is feasible if the smallest slack is ≥ −TOL (TOL = 0).
One pair is issued per cycle, so a full check takes
**MI·(N+1) + 4 = 5104 cycles** from `start` to `done` when the bus is not
contended. A pair whose lane is not granted is issued again. The MAC
belongs to the check while it runs, and to the external step units
otherwise.

**I/O control (`io_control`).** While the sequencer is in LOAD, it writes
the incoming words to addresses 0, 1, 2, …. It accepts a word in the cycle
its write is granted and pulses `loaded` after the last word. On `send` it
reads x word by word, holds each word on the output until it is taken, and
pulses `sent` after the last one. Sending takes about 3 cycles per word.

## The multi-cycle divider (`fixed_divider`)

Fixed-point division is the slowest logic in the core. Rather than
pipelining it, or letting it limit the clock, the divider is a single
combinational block that is given five clock cycles. In this design it
has these parts:

| part | width | role |
|---|---|---|
| operand select (port 0 or port 1) | 40 + 40 | picks (a0, b0) or (a1, b1) |
| divisor register | 40 bits | holds a |
| dividend register | 65 bits | holds \|b\| shifted left by 26 |
| divide logic | 65 / 40 | one combinational quotient, a 5-cycle path |
| result register | 40 bits | loaded once per request |
| 1/5 counter | 3 bits | starts on a request, enables the result register, drives `finish` |

- Two units share the divider. Port 0 is meant for determine s-pair and
  port 1 for compute step. A request on `c0` loads (a0, b0) and a request
  on `c1` loads (a1, b1). If both ask in the same cycle, port 0 wins. A
  request while `busy` is ignored.
- The operand registers hold the divisor `a` (40 bits) and the dividend's
  magnitude shifted left by 26 fraction bits (39 + 26 = 65 bits). The
  sign of the quotient goes into a separate flop.
- A 1/5 counter stands in for the original chip's divided clock. It
  enables the result register once, five cycles after the request, and
  raises `finish` for one cycle. The operands are sampled at edge E0;
  `result` is valid and `finish` is high in the cycle after edge E5.
- The quotient is rounded toward zero and saturates. Division by zero
  gives the largest word, with the quotient's sign.

Here the divided clock is a clock enable on the one clock. Timing analysis
must therefore be told that the paths from the two operand registers to
the result register are **5-cycle multicycle paths**. Without that
constraint the design will not reach the clock rate it was meant for. The
original chip runs at up to 120 MHz.

## Other arithmetic units

| unit | does | latency | rate |
|---|---|---|---|
| `mac_unit` | Σ a·b over `in_first … in_last` | 2 cycles after last pair | 1 pair/cycle |
| `sqrt_unit` | √x, 0 with `out_neg` for x < 0 | 33 cycles | 1/cycle |
| `distance_calc` | √(a² + b²), the length a plane rotation needs | 42 cycles | 1/cycle |
| `isqrt_pipe` | helper: integer root, one bit per stage | width/2 stages | 1/cycle |

The square root computes the integer root of x·2^26, so the result has 26
fraction bits again. The distance unit squares its inputs at full
precision, so the integer root of the sum is directly the result with 26
fraction bits.

## The missing step units

In a dual active-set QP method (Goldfarb–Idnani style), each iteration
works as follows. It picks a violated constraint, which this RTL does. It
computes a step direction from the current factorisation of H and the
active constraints, and a step length; this needs divisions. It then adds
the constraint to the active set, or drops one, and updates the
factorisation with plane rotations; this needs the distance unit. The
original core has two units for this, "determine s-pair" and "compute
step". In the original chip the active set holds up to 50 constraints.
The units' data layout, their order of operations and the number format
of their factor matrices are not known, so they are not written here.

Each core brings out everything those units need, and `miqp_chip` repeats
it per core:

- `step_req` (the core is waiting), `step_row` and `step_slack` (the
  constraint to add);
- `step_ack`, `step_ok` (the answer: done, or no step possible);
- `ext_req` / `ext_rsp` (`unit_req_t` / `unit_rsp_t` in `miqp_pkg`): a
  memory-bus master of the lowest priority, the MAC while the check is
  idle, divider ports 0 and 1, the square root and the distance unit.

The testbenches use `tb/step_unit_model.sv`, a behavioural stand-in. On
each request it exercises every unit port and checks the answers, then
moves x to the origin. On a second request for the same sub-problem it
answers "no step possible". It is a test fixture, not a solver.

Also outside the RTL: the PLL (`clk` is a port), the control processor
with its branch-and-bound logic and first-point calculation, the DRAM,
and the board-level bus that joins several chips.

## Where this design makes its own choices

The original design fixes the sizes, the number format, the SRAM
capacities, the four cores and the 5-cycle divider with its operand widths.
It also fixes the list of units and buses. The following are choices made
here:

- The 40-bit word organisation of the SRAMs, with 1 kb read as 1000 bits,
  and the sub-problem's word order and memory layout.
- All handshakes (valid/ready streams, request/grant bus), bus priorities,
  the lowest-free-core choice and round-robin return, and FIFO depths (16).
- Which divider operand is the divisor. The 65-bit register is read as the
  shifted dividend.
- Sign handling, rounding and saturation in every unit.
- The constraint check's method, its tolerance (0), and its first-row tie
  break. Equality constraints are stored but not checked.
- The sequencer's states, the step hand-off and the check limit.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. The package must come first. For
example, for the full chip at its default size:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/miqp_pkg.sv tb/tb_miqp_chip.sv --top-module tb_miqp_chip -o sim
./obj_dir/sim
```

To test another block, swap in `tb/tb_<block>.sv` and its top module.

| testbench | what it shows |
|---|---|
| `tb_miqp_chip` | 9 sub-problems of full size through 4 cores with step models. Every core is used, the control processor stalls while all cores are busy, the solution FIFO fills, and all three outcomes occur (feasible at once, after a step, no step possible). Solutions and status are checked against a reference. About 1 minute. |
| `tb_qp_core` | one core, full size, all three outcomes; time of one check |
| `tb_compute_inequality` | full size, all slacks and the result vs. 128-bit reference, stalls, 5104-cycle check |
| `tb_fixed_divider` | ~400 random quotients on both ports, the 5-cycle latency, divide by zero, priority, requests while busy |
| `tb_mac_unit`, `tb_sqrt_unit`, `tb_distance_calc` | random operands against integer references, latency |
| `tb_sram_sp`, `tb_memory_bus`, `tb_io_control`, `tb_stream_fifo` | memory, arbitration, loading/sending, FIFO order |
| `tb_core_sequencer`, `tb_sequence_control`, `tb_local_bus` | control flow and routing |

To change the problem size, set `N`, `ME` and `MI` on `miqp_chip` (or
`qp_core`). `PROB_WORDS`, the addresses and the counters follow from them.
The SRAM sizes `S0..S2` must still hold the layout above. The
`miqp_pkg::prob_words` and `base_x` functions give the sizes.

## Files

`rtl/miqp_pkg.sv` holds the types, constants and address functions. It is
followed by one module per file: `miqp_chip`, `sequence_control`,
`local_bus`, `stream_fifo`, `qp_core`, `core_sequencer`, `io_control`,
`compute_inequality`, `memory_bus`, `sram_sp`, `mac_unit`,
`fixed_divider`, `sqrt_unit`, `distance_calc` and `isqrt_pipe`. `tb/` holds
one testbench per module and the step-unit model.
