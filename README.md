# Self-checking decimal adder for ten numbers in Diamond Code

This is combinational SystemVerilog for an adder that sums ten signed decimal
numbers at once. Each number has ten digits after the point plus a sign digit.
The adder is built so that a single stuck-at fault inside a column adder
produces an invalid code word at the output instead of a wrong but
plausible-looking digit. The limits of this are listed at the end.

Two choices make this possible:

* **Diamond Code.** Each decimal digit `d` is carried on five wires as the
  binary number `F = 3d + 2`. The valid words are 2, 5, 8, …, 29, so every
  valid word satisfies `F mod 3 = 2`.
* **Full adders only.** Every adder is a network of full adders in which each
  net drives exactly one input. A stuck-at fault in such a network changes the
  binary total by `±2^h`. That is never a multiple of 3, so the remainder
  mod 3 of the result is no longer 2, and the result leaves the code.

The rest of the design exists so that column sums, carries and the final
total stay in Diamond Code, where a small checker can test them.

## What is computed

Each operand has a sign digit in front of the point and ten digits after it.
It uses tens-complement: sign 0 means the value is `D` (0 ≤ N < 1), and sign 9
means `D − 10` (−1 ≤ N < 0). The total of ten such numbers lies in [−10, 10),
so the result has twelve digits:

```
x11 x10 . x9 x8 ... x0        x11 = sign digit (0 or 9), x10 significant
```

Arithmetic is modulo 10^12 units of 10^−10. An operand's sign column is simply
repeated as column 11.

Addition takes two steps, and every step stays in Diamond Code:

1. **All columns at once.** Column adder Σ^i sums the ten digits of column `i`.
   It also adds a BIAS digit 9, explained below. The sum (at most 99) comes out
   as a digit `A^i` and a carry `C^i`, both in Diamond Code.
2. **One decimal addition.** A ripple-carry adder computes
   `X = A + 10·C + 10^−10`. Section `AD^j` adds `A^j`, the carry word `B^(j−1)`
   of the column to its right, and the ripple carry `c^(j−1)`. Column 10's
   digit `A^10` is used twice, at positions 10 and 11, because the sign column
   repeats column 10.

**The BIAS.** Adding 9 to every column is the same as adding the number
99.99…9, which is −10^−10. Section `AD^0` takes the code word of digit 1 in
place of a carry, so the correction adds 10^−10 back. The bias exists because
it simplifies the column adder, as shown next.

## The column adder: carry by feedback

This is the least obvious part of the design (`column_adder.sv`).

A binary sum of Diamond words cannot simply be split into a decimal digit and
a carry. The column adder gets around this by feeding its own high bits back
in. Its full-adder network forms the 9-bit total

```
T = F_1 + … + F_10 + 9 + 2·L          where L = T[8:5], R = T[4:0]
```

The four top bits `L` return to the network one place higher, so `L_t` enters
at weight `2^(t+1)`. In the settled state `T = 32L + R`, which gives

```
9 + ΣF_k = 30·L + R,    0 ≤ R ≤ 29
```

Since `ΣF_k = 3·Σd_k + 20`, this reduces to `3·(Σd_k + 9) + 2 = 30·L + R`. So
`L` is the decimal carry `C`, already in binary, and `R = 3A + 2` is the digit
`A`, already in Diamond Code. No conversion is needed.

| step | value |
|---|---|
| digits 0,1,…,9 | Σd = 45, ΣF = 155 |
| biased total | 45 + 9 = 54 |
| settled network | T = 155 + 9 + 2·5 = 174 = 32·5 + 14 |
| outputs | L = 5 = C, R = 14 = 3·4 + 2 → A = 4 |

The constant 9 has a reason. The first form of this algorithm works for 16
digits with `C = L − 1`:

* Ten used inputs leave six idle inputs, frozen at `F = 2`. They add 12.
* The BIAS digit 9 adds `F = 29`.
* That makes 41 = 32 + 9. Dropping 32 lowers `L` by exactly one, so `C = L`.

The two HIGH inputs at weights 1 and 8 hold that 9. In general the constant is
`29 − 2·N_NUMBERS`. With the bias digit, a column sum can reach 10·9 + 9 = 99,
so `C` never exceeds 9 and `L` fits in four bits.

**Why the loop settles.** Raising `L` by one adds 2 to `T`, but a step of `L`
is worth 32 in `T`. Iterating the network from any starting `L` therefore
reaches the single solution in at most three passes. The loop is a true
combinational loop, and lint tools report it as one. In the RTL the feedback
wires carry a unit transport delay (`assign #1`), which synthesis ignores. In
simulation the delay makes each pass round the loop a fully settled evaluation
of the network. Without it, Verilator's zero-delay ordering of this loop did
not converge. Outputs are valid three time units after an input change. The
testbenches wait ten.

**Fault argument.** A stuck-at fault on any net of the network, or on a
feedback tap, moves `T` by `±2^h`. `R` then leaves the code, because
`R ≡ 2 + 2^h ≢ 2 (mod 3)`. The network used here is a carry-save array plus a
final ripple row:

* Row 1 adds three operands. Each later row adds one more operand to the sum
  and carry vectors.
* Unused full-adder inputs are tied LOW.

This differs from the hand-drawn tree of the original design, but the argument
holds for any full-adder network in which each net feeds one input.

## Carry circuit and the feedback taps

The ripple-carry adder needs the carry in Diamond Code: `B = 3L + 2`. The
carry circuit (`carry_circuit.sv`) computes `L + 2L + 2`:

* `b0 = L0`.
* Four full adders in a chain add `L_t`, `2L_(t−1)` and the `+2` constant.
* The carry out of the top cell is `flt`. It goes high only when `L > 9`,
  which only a faulty column adder can produce.

Wiring both copies of `L` from the same wire would defeat the check. A fault
on `L_t` would move `B` by a multiple of 3, and `B` would still be a valid
word. Therefore the `2L` copy (`l_fb`) comes from the feedback taps M0–M3
inside the column adder, and the direct copy (`l`) comes from the output
wires. A fault on a tap also disturbs the column sum, where the code check
catches it.

## Ripple-carry section in Diamond Code

`rca_section.sv` adds two code words and a binary carry without decoding
them:

```
S = a + b + cin                    (six bits, first row of 5 full adders)
cout = S[5]
x = S[4:0] + 2·cin + (cout ? 0 : 30)  mod 32   (second row of 4 full adders)
```

`S = 3·(A + C + cin) + 4 − 2·cin`, and the correction brings it back to
`3·((A+C+cin) mod 10) + 2`. `cout` is known as soon as `cin` is, so the
ripple path is one full-adder row per digit.

## Checkers

`diamond_checker.sv` (Q) inverts `f3` and `f1`. The word is valid exactly
when the result has one or four ones. Two full adders count the ones, and a
small product term forms `ok`. Every total digit has its own checker. `ok[j]`
and the per-column `flt[i]` are brought out unmerged.

## Modules and interfaces

All modules are combinational. They have no clock and no reset.

| module | role | ports |
|---|---|---|
| `decimal_adder` (top) | whole adder | `d[k][i]` digit `i` of number `k` (5 bits, `i = N_DIGITS` is the sign); `x[j]` total digits; `ok[j]`; `flt[i]` |
| `column_adder` | Σ^i plus CC | `f[k]`; `a` = 3A+2; `l` = C; `b` = 3C+2; `flt` |
| `carry_circuit` | CC | `l`, `l_fb` → `b`, `flt` |
| `rca_section` | AD^i | `a`, `b`, `cin` → `x`, `cout` |
| `diamond_checker` | Q | `f` → `ok` |
| `full_adder` | the single cell everything is built from | `c, d, e` → `a` (sum), `b` (carry) |
| `diamond_pkg` | `diamond_t`, `encode`, `decode`, `is_code` | |

| parameter | default | meaning |
|---|---|---|
| `N_NUMBERS` | 10 | operands per addition (1..10; the column sum must stay ≤ 99) |
| `N_DIGITS` | 10 | digits after the point |

Size after coarse synthesis at the defaults is about 5,800 gate-level cells,
with no flip-flops.

## Full-adder cell

The cell (`full_adder.sv`) uses this gate structure:

* `h = NAND(c, d)` and `f = XOR(c, d)`
* `g = NAND(f, e)`, `b = NAND(h, g)` and `a = XOR(f, e)`

With this structure, a stuck-at fault on any one of its nets never changes
`2b + a` by ±3. The testbench checks this property exhaustively for faults on
`f`, `g`, `h`, `a` and `b`. The original drawing names only the NAND and the
first XOR. The other three gates are the standard choice.

## Testbenches and simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. They use plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/diamond_pkg.sv tb/decimal_adder_tb.sv --top-module decimal_adder_tb
./obj_dir/Vdecimal_adder_tb
```

`-Wno-fatal` is needed because Verilator warns about the intended feedback
loop.

* `decimal_adder_tb` runs the full-size design, with no parameter overrides.
  * It applies directed sets (all zero, all 0.99…9, all −1, carries through
    every digit) and 2300 random sets. Totals are checked against a reference
    computed from the signed integer values.
  * It then injects single stuck-at faults with `force` on eight nets of one
    column adder: carry-save nets, a final-row carry, tap M0, an `R` output
    bit, a weight-128 carry that drives `L` above 9, and the direct `L3` wire.
  * Every wrong total must come with a low `ok` or a high `flt`. All of them
    do. It also checks that negative operands, negative and positive totals,
    ripple carries, column carries of 9, the bias carry and `flt` each occurred.
* `column_adder_tb` checks every digit sum 0..90 plus random columns, and
  that the outputs have stopped changing.
* `column_adder_fault_tb` forces every net of one column adder's network
  stuck LOW and then stuck HIGH, one at a time. That covers all carry-save sum
  and carry nets, the final-row carries, the nine output bits of `T` and the
  four feedback taps: 402 single faults in all. Each fault gets 40 random
  columns.
  * In a typical run, 338 faults produce wrong settled outputs at least once.
    Every wrong settled output has `a` outside the Diamond Code or `flt` set.
  * 64 faults can never show: they sit on nets that are constant or unused.
  * A few dozen sets under faults on the `L` path never settle (see below).
* `carry_circuit_tb`, `rca_section_tb`, `diamond_checker_tb` and
  `full_adder_tb` are exhaustive.
* `rca_section_fault_tb` injects single stuck-at faults into one
  ripple-carry section (see the limits below).

## Limits and departures

* **Faults on the L wires can prevent settling.** With some stuck-at faults
  on the nets that form `L` (the top bits of `T` and the last carries of the
  final row), the feedback loop has no stable state for some inputs. In
  simulation it then oscillates. While it oscillates, the checkers can show a valid word at the moment they
  are sampled. The detection argument assumes a settled loop, so these faults
  are covered only in the sense that the adder never settles. The end-to-end
  test avoids them.
* **The ripple-carry sections are only partly self-checking.** Each section
  is built from its arithmetic alone. The original drawing of the section
  also shows a small extra input network for the ripple carry, which is not
  reproduced here because its wiring is not specified. `rca_section_fault_tb`
  measures what the section catches, over all 200 code inputs:
  * A stuck fault on a first-row net, an output bit or the inverted carry
    always yields a non-code digit.
  * A stuck carry between the second-row cells of weight 4 and 8 gives 100
    wrong results. Four of them are valid words and pass unnoticed.
  * A stuck fault on the incoming ripple carry `cin` is never detected. That
    wire feeds both rows, so the digit moves by exactly ±3 in value and stays
    a valid word.
* **The column adder's tree shape is this design's own.** It is a carry-save
  array, not the original tree. The column width is limited to 10 operands,
  so the 16-digit illustration of the algorithm (column sums up to 144) does
  not fit.
* **The multiplier is not included.** A decimal multiplier that reuses this
  adder on the multiples 0·D … 9·D is only suggested as an application.
* **Encoding is left to the user.** Inputs must already be in Diamond Code,
  and outputs stay in Diamond Code.
