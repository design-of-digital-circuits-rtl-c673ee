# Three sequential ASMD circuits: restoring divider, shift-and-add multiplier, bit counter

Each circuit here does an arithmetic job that could be one large block of
combinational logic. Instead it reuses one small datapath over several clock
cycles, and a finite-state controller decides what that datapath does in each
cycle. Each design is specified as an ASMD chart (algorithmic state machine
with datapath). The chart's states become the controller's states. Its
decisions test status signals coming back from the datapath. Its outputs are
control signals, and each one names a register transfer in the datapath.
All three circuits are written that way:

| circuit | operation | default width | cycles from start to done |
|---|---|---|---|
| `divider` | n-bit / n-bit → quotient, remainder | 4 | n + 2 |
| `seq_multiplier` | n-bit × n-bit → 2n-bit product (unsigned) | 8 | 2n + 1 |
| `bit_counter` | number of ones in an n-bit word | 8 | (index of highest one) + 3, or 2 for zero |

`asmd_top` puts the three circuits side by side. They share only the clock
and reset.

## Common conventions

- **Handshake.** `ready` is high while the controller is idle. A `start`
  seen on a rising edge while `ready` is high loads the operands. Only that
  edge samples them, so they may change afterwards. `done` is high for
  exactly one cycle. The results stay in the datapath registers until the
  next accepted `start`. `start` is ignored while a circuit is busy.
- **Reset.** `reset` is synchronous and active high. It puts the controller
  in its idle state. The divider and multiplier datapath registers have no
  reset because they are always loaded before use. Their outputs are
  meaningless until the first `done`. The bit counter's count register is
  reset to zero.
- **Control bundles.** `asmd_pkg` defines the state enums and one packed
  struct per circuit holding its control signals (`div_ctrl_t`,
  `mul_ctrl_t`). The controller drives the struct and the datapath reads it.
  The state encodings are plain binary. Each datapath asserts that at most
  one register operation on its shift register is active in any cycle.

## Restoring divider (`divider`)

This is the long-division method done by hand. Line up the divisor under
the leftmost dividend bits. If those bits are at least the divisor, subtract
and write a quotient bit of 1; otherwise write 0 and keep them. Then bring
down the next dividend bit and repeat.

The hardware turns this around. The divisor `B` stays fixed and the
dividend moves left, one bit per cycle, through a 2n-bit register. The upper
half `R` is the current *dividend window*: the partial remainder. The lower
half `Q` starts as the dividend. As dividend bits leave the top of `Q` and
enter `R`, the freed positions at the bottom of `Q` collect the quotient
bits. One register therefore holds the unused dividend bits and the quotient
bits found so far.

Datapath (`div_datapath`):

```
           B ─────────┐
   R ──► div_cmp_sub ─┴─► r_tmp = (R>=B) ? R-B : R,   q_bit = (R>=B)
                │
   {r_tmp,Q,q_bit} ──► div_shifter ──► r_nxt = shift_r ? {r_tmp[n-2:0], Q[n-1]} : r_tmp
                                       q_nxt = {Q[n-2:0], q_bit}
```

`shift_r` is driven by `enable_rq`. The last step loads R from `r_tmp`
without shifting it. That select is placed inside the shifter, so R and Q
are always loaded from the shifter's outputs.

The registers are `B`, `R`, `Q` and a down counter `P` of
⌈log2(n+1)⌉ bits. There are four control signals:

| signal | register transfer |
|---|---|
| `load_regs` | B ← divisor, R ← 0, Q ← dividend, P ← n |
| `enable_rq` | R ← r_nxt, Q ← q_nxt (subtract if possible, then shift) |
| `finish_rq` | R ← r_tmp, Q ← q_nxt (subtract if possible; R is not shifted) |
| `decr_p` | P ← P − 1 |

Controller (`div_controller`), with status `p_zero = (P == 0)`:

- **S_idle:** `ready`. On `start`, assert `load_regs` (a Mealy output) and
  go to S_comp.
- **S_comp:** `decr_p` every cycle. If `p_zero` is low, assert `enable_rq`
  and stay. If it is high, assert `finish_rq` and go to S_done.
- **S_done:** `done`, then go back to S_idle.

**Why n + 1 compute cycles.** S_comp runs while P steps through n, n−1, …,
0. That gives n shifting steps and one final step that does not shift R.
The first step compares `R = 0` with B, so its quotient bit is 0 for any
non-zero divisor. That bit is shifted out of the top of `Q` by the end. The
final step must not shift R, because R has to end as the remainder and not
as twice the remainder.

**Why R needs only n bits.** Before the k-th shift, R holds only k−1
dividend bits, so `r_tmp < 2^(n−1)`. The bit that the shift drops from
`r_tmp` is therefore always 0. Lint reports it as an unused input bit of
`div_shifter`. That warning is expected.

Trace of 15 / 2 at n = 4. Each row shows the registers at the start of a
cycle and the values loaded at its end:

| cycle | P | R | Q | q_bit | R, Q after the edge |
|---|---|---|---|---|---|
| 1 (enable) | 4 | 0000 | 1111 | 0 | 0001, 1110 |
| 2 (enable) | 3 | 0001 | 1110 | 0 | 0011, 1100 |
| 3 (enable) | 2 | 0011 | 1100 | 1 | 0011, 1001 |
| 4 (enable) | 1 | 0011 | 1001 | 1 | 0011, 0011 |
| 5 (finish) | 0 | 0011 | 0011 | 1 | 0001, 0111 |

Result: quotient 7, remainder 1.

**Divide by zero.** No special case is added. With B = 0 every step
"subtracts" zero. The quotient comes out all ones and the remainder equals
the dividend. The testbenches check that result.

## Shift-and-add multiplier (`seq_multiplier`)

This is the pencil-and-paper method. For each multiplier bit, starting
from the least significant, add the multiplicand into a running sum if the
bit is 1, then move on one position. Here too the sum moves, not the
multiplicand. A carry flip-flop `C`, the sum register `A` and the
multiplier register `Q` form one (2n+1)-bit register `{C, A, Q}` that
shifts right once per step. The adder result goes into `{C, A}`. The
multiplier bit just used drops out of the bottom of `Q`. Low product bits
move from `A` into the top of `Q`. After n steps `{A, Q}` is the product and
`C` is 0.

Datapath (`mul_datapath`):

| signal | register transfer |
|---|---|
| `load_regs` | C ← 0, A ← 0, B ← multiplicand, Q ← multiplier, P ← n |
| `add_regs` | {C, A} ← A + B (n+1-bit sum) |
| `shift_regs` | {C, A, Q} ← {C, A, Q} >> 1, with 0 entering C |
| `decr_p` | P ← P − 1 |

The status signals are `q0 = Q[0]` and `p_zero`.

Controller (`mul_controller`):

- **S_idle:** `ready`. On `start`, assert `load_regs` and go to S_add.
- **S_add:** `decr_p`. Also `add_regs` if `q0` is 1. Go to S_shift.
- **S_shift:** `shift_regs`. Go back to S_add if `p_zero` is low, or on to
  S_done if it is high.
- **S_done:** `done`, then go back to S_idle.

P is decremented in S_add, so the `p_zero` test in S_shift sees the
already-decremented count. That gives exactly n add/shift pairs, or 2n
cycles. Some tables of this algorithm show P changing on the shift instead.
That moves only the bookkeeping: the values of C, A and Q are the same.

Example 215 × 23, that is `11010111 × 00010111`:

| step | C | A | Q |
|---|---|---|---|
| load | 0 | 00000000 | 00010111 |
| add | 0 | 11010111 | 00010111 |
| shift | 0 | 01101011 | 10001011 |
| add | 1 | 01000010 | 10001011 |
| shift | 0 | 10100001 | 01000101 |
| add | 1 | 01111000 | 01000101 |
| shift | 0 | 10111100 | 00100010 |
| … five more pairs | | | |

The final `{A, Q}` is 4945.

## Bit counter (`bit_counter`)

This circuit runs the loop `B = 0; while (A != 0) { B += A[0]; A >>= 1; }`
at one iteration per clock. It stops as soon as A is zero, so its run time
depends on the data: a value whose highest one is at index k needs k+1
iterations plus one cycle to see A = 0. The loop is specified; the ASMD
is this design's own, in the divider's style:

- **S_idle:** on `start`, load A and clear B.
- **S_count:** loop while `A != 0`.
- **S_done:** one cycle.

Controller and datapath are in a single module. `count` is
⌈log2(n+1)⌉ bits wide.

## Top level (`asmd_top`)

| parameter | default | meaning |
|---|---|---|
| `DIV_WIDTH` | 4 | divider operand width |
| `MUL_WIDTH` | 8 | multiplier operand width (the product is twice as wide) |
| `BC_WIDTH` | 8 | bit counter input width (chosen here; no width is specified for it) |

Ports are grouped by prefix. `div_*` is start/divisor/dividend → ready,
done, quotient, remainder. `mul_*` is start/multiplicand/multiplier →
ready, done, product. `bc_*` is start/a → ready, done, count. `clk` and
`reset` are shared.

Every width parameter can be changed. The widths of `P` and `count` follow
from it. `WIDTH` must be at least 2 for the divider.

## What is specified and what is chosen here

These follow the specification: the register transfers, the state charts,
the controller output equations and the datapath structure of the divider
and the multiplier; the default widths of 4 (divider) and 8 (multiplier);
and the bit-counting algorithm.

These are choices made here:

- synchronous active-high reset, and no reset on the datapath registers;
- binary state encoding, and control signals bundled in packed structs;
- signal names in lower case (`load_regs` for Load_regs, and so on);
- no special handling of division by zero;
- the bit counter's states, its single-module structure and its 8-bit
  default width;
- combining the three circuits in one top level.

## Files

- `rtl/asmd_pkg.sv`: shared state enums and control structs.
- Divider: `rtl/div_cmp_sub.sv`, `rtl/div_shifter.sv`,
  `rtl/div_datapath.sv`, `rtl/div_controller.sv`, `rtl/divider.sv`.
- Multiplier: `rtl/mul_datapath.sv`, `rtl/mul_controller.sv`,
  `rtl/seq_multiplier.sv`.
- Bit counter: `rtl/bit_counter.sv`.
- Top level: `rtl/asmd_top.sv`.
- `tb/<module>_tb.sv`: one self-checking testbench per module.

## Verification

Every testbench computes its expected values independently, using integer
`/`, `%`, `*`, a loop over the bits, or direct bit arithmetic. Each one
checks cycle counts as well as values. It ends by printing
`TB_RESULT checks=N failures=M`, and has a watchdog that fails the run if
it hangs.

- The unit benches are exhaustive where that is cheap. That covers all
  4-bit operand pairs for the divider pieces, the divider and the 4-bit
  multiplier, and all 8-bit inputs of the bit counter. They add random
  8- and 16-bit cases.
- The datapath benches step through the two worked examples above register
  by register.
- The controller benches check every output in every cycle against the
  state charts, including `start` pulses while busy and a reset in the
  middle of a run.
- `asmd_top_tb` runs all three circuits at once at the default widths. It
  counts how often each mechanism happens: subtract taken and skipped, the
  final non-shifting step, divide by zero, add taken and skipped, carry out
  of the adder, the bit counter stopping early, a zero input, and all three
  circuits busy together. It fails if any count is zero.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/asmd_pkg.sv \
    tb/asmd_top_tb.sv --top-module asmd_top_tb -o sim
./obj_dir/sim
```

Replace `asmd_top_tb` with any other `*_tb` to run that bench. Lint a
module with:

```
verilator --lint-only -Wall -Irtl rtl/asmd_pkg.sv rtl/<module>.sv
```

The simulator is two-state. Add `+verilator+rand+reset+2` to the run to
randomise uninitialised state; all benches pass with it.
