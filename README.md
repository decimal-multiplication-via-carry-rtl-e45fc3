# BCD multiplier with decimal carry-save accumulation

This is a fixed-point decimal multiplier for binary-coded decimal (BCD)
operands. It multiplies two N-digit numbers (N = 34 by default) into a
2N-digit product, one multiplier digit per clock cycle.

A plain BCD accumulator has to run a full decimal carry-propagate addition
every cycle, and that addition limits the clock. This design avoids it. The
running partial product is kept in a redundant form: each position holds a
BCD digit plus one carry bit. Each cycle's work is then a fixed, carry-free
compression. Only one carry-propagate addition is done, at the end, and it is
split over two pipeline stages.

The architecture follows M. A. Erle and M. J. Schulte, "Decimal Multiplication
Via Carry-Save Addition" (the "improved" design in that work, together with its
early-exit optimization). Where this RTL departs from that description, or
fills in something it leaves open, the sections below say so.

## The algorithm

The multiplier B is consumed from its least significant digit upward. With a
partial product P that starts at 0, each step is

    P <- (P + A * b_i) / 10

Each step retires one finished product digit, the one that falls off the right
when P is divided by 10. After N steps, the N retired digits are the low half
of the product and P is the high half.

Forming A * b_i for any digit 0..9 would need ten stored multiples. Instead,
every digit is written as the sum of two *secondary multiples*: one taken
from {0, A, 4A, 5A} and one from {0, 2A, 4A}.

| b | first (0/A/4A/5A) | second (0/2A/4A) |
|---|---|---|
| 0 | 0  | 0  |
| 1 | A  | 0  |
| 2 | 0  | 2A |
| 3 | A  | 2A |
| 4 | 4A | 0  |
| 5 | 5A | 0  |
| 6 | 4A | 2A |
| 7 | 5A | 2A |
| 8 | 4A | 4A |
| 9 | 5A | 4A |

The multiplexor contents are fixed by the architecture. The particular splits
of 4 and 8 are this implementation's choice (`dec_pkg::recode_digit`).

Doubling or quintupling a BCD number never carries more than one digit:

- A doubled digit is even, so the incoming carry of 1 always lands on a 0 in
  the lowest bit.
- A quintupled digit is 0 or 5, and the incoming carry is at most 4.

So 2A, 5A and 4A (2A doubled) each come from a few gates per digit of A. Each
digit of the result depends only on the same digit of the source and the one
below it. As a result, the multiples are **never stored**. They are
regenerated from the multiplicand register every cycle, in about six gate
levels.

## Number formats inside the datapath

Understanding the design mostly means understanding these words. Digit 0 is
always the least significant digit, in bits 3:0.

| word | width | meaning |
|---|---|---|
| `a_q` | N digits | multiplicand register |
| `a2`, `a4`, `a5` | N+1 digits | multiples; the top digit is at most 1, 3 and 4 |
| `ts_q`, `tc_q` | N+1 digits, N+1 bits | the digit's multiple in carry-save form: value = TS + Σ tc[i]·10^i, with tc[0] = 0 |
| `ps_q`, `pc_q` | N digits, N bits | partial product: value = PS + Σ pc[i]·10^i |
| `fpsr` | N digits | retired digits; the newest enters at the top |
| `p` | 2N digits | product register |

In the 4:2 compression, each digit column adds two BCD digits (TS, PS) and two
carry bits (TC, PC), so the column total is at most 9+9+1+1 = 20. The
compressor turns that into one BCD digit and one carry out. Three facts keep
the widths above exact, and each one has an assertion or a test behind it:

- The multiples' top digits are at most 4 + 3 = 7, so the 3:2 counter never
  carries out of digit N.
- The partial product value is always below 10^N, so after the one-digit right
  shift it fits N digits and N carry bits. `a_no_overflow` asserts that the
  compressor's top carry is zero.
- A retired digit is final. Nothing more is ever added at its weight, and its
  carry has already moved up into PC.

## Blocks

```
dec_multiplier                    top: registers, wiring, final alignment
├─ dec_mult_ctrl                  digit sequencing, multiplexor control register, early exit
├─ dec_multiple_gen               2A, 4A, 5A
├─ dec_multiple_mux               4:1 (0,A,4A,5A) and 3:1 (0,2A,4A) selection
├─ dec_counter32                  decimal (3:2) counter row:   TS,TC = m1 + m2
│   └─ dec_digit_add              direct decimal addition of one digit
├─ dec_compressor42               decimal (4:2) compressor row: TS+TC+PS+PC
│   └─ dec_digit_add (x2 per digit)
└─ dec_cpa_simplified             two-stage adder PS+PC -> BCD, holds the intermediate register
dec_pkg                           digit type, select enums, recoding function
```

### Direct decimal digit adder (`dec_digit_add`)

This block adds two BCD digits and a carry without forming a binary sum and
then correcting it by +6. Every sum bit comes directly from a few signals:

- the per-bit generate, propagate and half-sum signals;
- two group terms, k (the two digits alone reach 10) and l (they reach 8);
- the carry c1 out of the ones bit.

The published sum equations for bits 2 and 3 are exact only when every
complement applies to a single variable:

    s2 = p2'·g1 + p3'·h2·p1' + (g3 + h2·h1)·c1' + (p3'·p2'·p1 + g2·g1 + p3·p2)·c1
    s3 = k'·l·c1' + (g3·h3' + h3'·h2·h1)·c1

That is what the RTL uses. The testbench checks all 200 input cases.

The same cell does two jobs:

- With the carry-in tied to 0, it is the digit slice of the 3:2 counter.
- With one operand reduced to a single bit, it is the "simplified" second
  adder in the 4:2 compressor.

The tools remove the unused logic.

### Decimal (4:2) compressor (`dec_compressor42`)

Each digit runs two adders in series:

1. `(c2[i+1], s1) = TS + PS + TC`
2. `(co[i], s) = s1 + c2[i] + PC`

The intermediate carry c2 moves exactly one digit, so no carry ripples along
the row. The delay of this block does not depend on N, and it is the only
logic inside the feedback loop.

### Simplified carry-propagate adder (`dec_cpa_simplified`)

Each position adds only a digit and a single bit, so:

- a position *generates* a carry when it holds 9 with its carry bit set;
- a position *propagates* a carry when its total is 9.

The first stage forms each digit "assuming no incoming carry" and computes the
carry into every digit with a Kogge-Stone prefix network. Both are stored in
the intermediate register. The second stage increments the digits that
receive a carry. The prefix network and the split point between the stages
are this implementation's choice.

## Timing

One rising clock edge drives the whole design. Here n = N multiplier digits,
and E0 is the edge that takes `start`.

| edge | event |
|---|---|
| E0 | A into the multiplicand register; selects for b0 into the multiplexor control register |
| E1 | first multiple (A·b0 as TS/TC) into the primary multiple register; partial product reset |
| E2 … E(n+1) | n iterations: compress, shift, retire one digit; multiples for b1…b(n−1) follow one edge ahead |
| E(n+2) | first adder stage into the intermediate register |
| E(n+3) | product register written (both halves); `done` is high in the following cycle |

Counting the cycle in which the operands are presented, the latency is
**n + 4 cycles**. For the default N = 34 that is 38 cycles.

`ready` returns in time for a new start at E(n+1), so the **initiation
interval is n + 1 cycles**. A new operation's multiple generation overlaps the
previous operation's last iteration, and its first iterations overlap the
previous operation's final addition. This is why the product register copies
the low half from `fpsr` at the same edge that it takes the high half.

### Handshake

- `start` is a request. Hold it, with `a` and `b` steady, until `ready` is
  high. The operands are captured at the edge where both are high.
- `done` pulses for one cycle.
- `p` holds the product until the next product is written.
- `rst_n` is an active-low, synchronous reset. It only clears the control
  state: datapath registers are always loaded before they are read.
- Assertions check two rules: `start` and the operands must not change while
  waiting, and the partial product is never reset and iterated in the same
  cycle.

## Early exit and operand swap

These are two parameters of `dec_multiplier`. Both are off by default.

**`EARLY_EXIT`** shortens the operation to the significant digits of B:

1. At start, the control finds the most significant non-zero digit of B and
   overwrites the digit above it with the invalid code `1100`.
2. The sequencer stops when the next digit has the form `11xx`. After k
   iterations, latency is k + 4 and the initiation interval is k + 1.
3. The partial product has then been shifted only k times. So when the product
   register is written, the adder's output is shifted up by k digits and the k
   retired digits are moved down to the bottom.

The original description does not cover that final alignment, so this barrel
shift is this implementation's own. A zero multiplier still takes one
iteration.

**`SWAP_OPERANDS`** exchanges A and B when A has more leading zero digits, so
the shorter operand drives the iterations. It is only useful together with
`EARLY_EXIT`. The comparison and the swap sit in front of the operand
registers and add no cycle here. In a fast implementation they would likely
need one, since the multiples cannot be formed until the multiplier has been
chosen.

## Departures from the original description

- **Clocking.** The original uses a two-phase clock with master/slave latches.
  Data selection into the registers is done by gating their clocks. Here each
  register is one edge-triggered register with a load enable.
- **Low half of the product.** The original takes it straight from the final
  product shift register. Here the product register holds both halves, so that
  they stay valid together while the next operation is already shifting.
- **Not built:**
  - *Skipping zero digits* and *double-digit multiplication* (two digits per
    iteration). These were described as optional optimizations: a
    multiplexor shifts one multiple left by a digit for one iteration. As
    described, that leaves the partial product misaligned with every later
    multiple and with the final product. The missing correction is not
    specified, so it would have to be designed from scratch.
  - The earlier *initial design* from the same work: 3:2 counters in series
    and stored multiples 2A, 3A, 4A, 8A. It only serves as the comparison
    baseline.
- **Operand length.** N = 34 is the largest operand length the design is
  aimed at: 34 digits, the coefficient of quadruple-precision decimal floating
  point. Shorter operands work zero-extended. Any N ≥ 2 elaborates.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and stops on its own watchdog. The
reference arithmetic is in `tb/tb_bcd_pkg.sv`. It does schoolbook BCD
multiplication and ripple addition on integer digits, independently of the
hardware.

| testbench | covers |
|---|---|
| `tb_dec_digit_add` | all 200 digit/carry combinations |
| `tb_dec_multiple_gen` | 2A, 4A, 5A for all two-digit values and random, all-nines and mostly-zero 34-digit values |
| `tb_dec_multiple_mux` | routing for every digit 0..9 |
| `tb_dec_counter32`, `tb_dec_compressor42` | value identities on random, nine-heavy and zero-heavy words, with all carries set |
| `tb_dec_cpa_simplified` | sums with long carry chains; result exactly one cycle after `load` |
| `tb_dec_mult_ctrl` | recoded digit sequence, digit count, `done` timing and `ready` timing, with and without early exit |
| `tb_dec_multiplier` | 40 operations each in three configurations (default, early exit, early exit plus swap): products, n + 4 latency, n + 1 initiation interval |
| `tb_dec_multiplier_full` | default parameters, including 99…9 × 99…9 |

`tb_dec_multiplier` also counts back-to-back starts, the use of every digit
value, early exits and swaps. It fails if any of them never happens.

To run one, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dec_pkg.sv tb/tb_bcd_pkg.sv \
    tb/tb_dec_multiplier.sv --top-module tb_dec_multiplier
./obj_dir/Vtb_dec_multiplier
```

All testbenches pass and each finishes in well under a second. The RTL lints
with `verilator --lint-only -Wall`. Four warnings about unused bits remain:

- the top carries of the counter and compressor rows, which are zero by
  construction;
- inputs that the quintupling equations do not need.

At N = 34, generic synthesis gives about 8,100 word-level cells and 1,205
flip-flop bits.
