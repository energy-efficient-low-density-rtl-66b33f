# Hybrid reverse-carry / carry-select adder

An adder is normally only as fast as its longest carry chain. When it is
clocked faster than that chain, or its supply is lowered until the chain
sometimes misses its deadline, an ordinary ripple-carry adder fails in its
most significant bits. Each such error is large. This design makes two
changes to the adder for error-tolerant DSP datapaths (filters, image and
video processing):

* **Reverse carry propagation on the low bits.** The carry runs from the most
  significant bit *down* to the least significant one. The cells are slightly
  inexact. But a carry that arrives late now corrupts the least significant
  bits, so a timing error stays small.
* **An exact square-root carry select adder on the high bits.** It uses binary
  to excess-1 converters (BEC) where a classic carry select adder has a second
  ripple adder, which saves area and power.

Both parts meet in `hybrid_rcpa_adder`. The number of approximate low bits,
and the kind of cell used for them, set the accuracy.

All blocks are combinational. There are no clocks, registers or reset.

## 1. The reverse carry propagate full adder (`rcpfa`)

An exact full adder computes `2*C(i+1) + S(i) = A(i) + B(i) + C(i)`. Moving
the carries to the other side gives

    S(i) - C(i) = A(i) + B(i) - 2*C(i+1)

and it is read as a cell that *receives* `C(i+1)` from its more significant
neighbour and *sends* `C(i)` to its less significant neighbour. `S(i)` and
`C(i)` now have the same weight, so the pair can only express -1, 0 or +1.
The right-hand side spans -2..+2:

| A+B-2·C(i+1) | (S, C) | exact? |
|---|---|---|
| +2 (A=B=1, C(i+1)=0) | (1, 0) | no, saturated |
| +1 | (1, 0) | yes |
| 0 | (F, F) | yes, either pair is correct |
| -1 | (0, 1) | yes |
| -2 (A=B=0, C(i+1)=1) | (0, 1) | no, saturated |

When the value is 0, both (0,0) and (1,1) are correct. A fourth input, the
**forecast** `F(i)`, picks one. It comes from the operand bits of the cell
below, so each cell also produces `F(i+1)` for the cell above. Three
forecast generators give three cell types (parameter `TYPE`):

| type | `F(i+1)` | meaning |
|---|---|---|
| `RCPFA_I` (default) | `A(i)` | one operand bit |
| `RCPFA_II` | `A(i) & B(i)` | carry generate |
| `RCPFA_III` | `A(i) \| B(i)` | carry alive |

The gate form shares two terms between the sum and the carry:

    X = ~C(i+1) | A&B        Y = ~C(i+1) & (A | B)
    S = F&X | Y              C = F&~Y | ~X

In silicon this maps onto AOI21/OAI21 gates. The RTL describes only the logic
function, and all three types use these same sum and carry equations.

## 2. The reverse carry propagate adder (`rcpa`)

`WIDTH` cells are chained. Carries run downward and forecasts run upward. The
two open ends are closed like this:

* The carry into the top cell, `C(n)`, is the top cell's own forecast output
  `F(n)`. This is also the adder's carry toward higher bits (`cout`), so
  `cout` depends only on the top operand bits: `A(n-1)`, `A&B` or `A|B`.
* The forecast into the bottom cell, `F(0)`, is the adder's carry input `c0`.
* The carry that leaves the bottom cell, `C(0)`, has weight -1 and is dropped.

If every cell is exact, `a + b = {cout, sum} - C(0)`. The errors come from
three sources: saturated cells, the guessed `C(n)`, and the dropped `C(0)`.
The critical path runs from the top operand bits, through the carry chain, to
`sum[0]`. If that path is cut short, the error lands in the least
significant bits.

## 3. The exact part: square-root carry select adder with BEC (`sqrt_csla_bec`, `bec`, `rca`)

The 16 bits are cut into groups of 2, 2, 3, 4 and 5 bits. The layout comes
from `rcpa_pkg::csla_group_*`: group 0 is 2 bits, group g is g+1 bits, and
the last group is cut short for other widths.

* Group 0 is a ripple-carry adder fed by the carry input.
* Each later group of k bits has:
  * one k-bit ripple adder with carry input 0, giving `r0 = {c, s}`;
  * a (k+1)-bit BEC computing `r1 = r0 + 1`, which is the result for carry
    input 1;
  * a 2:1 multiplexer that picks `r1` or `r0` when the carry from the group
    below arrives. The result is the group's sum bits and its carry out.

Groups grow in width because each select carry arrives later than the one
before it. This gives every group more time for its local sum.

The BEC sets `x[0] = ~b[0]` and `x[i] = b[i] ^ (b[0] & ... & b[i-1])`. At 4
bits these are the usual four equations, and 1111 wraps to 0000.

## 4. The hybrid adder (`hybrid_rcpa_adder`, top)

    a[15:4], b[15:4] ──► sqrt_csla_bec (12 bits, groups 2,2,3,4,1) ──► cout, sum[15:4]
                               ▲ cin
                               │ forecast carry F(4)
    a[3:0],  b[3:0]  ──► rcpa (4 bits, TYPE) ──────────────────────► sum[3:0]
                               ▲ F(0)
    cin ───────────────────────┘

| parameter | default | meaning |
|---|---|---|
| `WIDTH` | 16 | total operand width |
| `APPROX_W` | 4 | low bits added by the RCPA (1 .. WIDTH-1) |
| `TYPE` | `RCPFA_I` | RCPFA forecast type |

The carry handed to the exact part is the RCPA's forecast guess. The error
therefore never reaches above the approximate part plus one carry. Over
random operands the testbenches measured:

| approximate bits | mean \|error\| | max \|error\| |
|---|---|---|
| 2 | ≈0.44 | 2 |
| 4 | ≈1.30 | 8 |
| 8 | ≈18.2–18.6 | 128 |

The three cell types differ by about 2% in mean error. Their real differences
are in delay, power and transistor count, which RTL simulation cannot show.

## 5. What follows the original description and what is chosen here

These follow the original description of the design:

* the cell equations and the closing of both chain ends;
* the three forecast types;
* the 4-bit BEC, and replacing each carry-in-1 ripple adder with a BEC one bit
  wider;
* a 16-bit carry select adder;
* pairing an RCPA with an exact adder.

These are choices made here:

* **Group widths.** The square-root layout is 2, 2, 3, 4, 5.
* **The hybrid's shape.** The carry select adder is the hybrid's exact part,
  the total width is 16 bits and `APPROX_W = 4`. The original gives no split.
* **Default cell type.** Type I is the default.
* **RCPA ends.** `cout` of an RCPA is `F(n)`, and `C(0)` is dropped.
* **Type III gates.** No gate-level simplification of type III is attempted.
  It has the same logic function as the general form.
* **Not built.** The conventional carry select adder with two ripple adders
  per group is a baseline, not part of this design, and has no RTL here.
* **Not modelled.** Transistor-level cells, delay variation and the effect
  of voltage scaling are beyond RTL.

## 6. Files

| file | contents |
|---|---|
| `rtl/rcpa_pkg.sv` | `rcpfa_type_e`, carry-select group layout functions |
| `rtl/rcpfa.sv` | reverse carry propagate full-adder cell |
| `rtl/rcpa.sv` | n-bit reverse carry propagate adder |
| `rtl/full_adder.sv`, `rtl/rca.sv` | exact full adder, ripple-carry adder |
| `rtl/bec.sv` | binary to excess-1 converter |
| `rtl/sqrt_csla_bec.sv` | square-root carry select adder with BEC |
| `rtl/hybrid_rcpa_adder.sv` | top: RCPA low part plus carry-select high part |
| `tb/rcpa_ref_pkg.sv` | arithmetic reference models used by the testbenches |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `hybrid_accuracy_tb` |

## 7. Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
The reference models compute each cell from `A+B-2C` and the table above,
not from the gate equations.

* `rcpfa_tb`: all 16 input combinations of all three types. It also checks
  that exactly the two saturating cases are inexact.
* `rcpa_tb`: all 2^17 input combinations of an 8-bit RCPA, for each type.
* `bec_tb`: the 4-bit function table and a 6-bit converter.
* `rca_tb`: an exhaustive 4-bit adder, plus directed and random 16-bit cases.
* `sqrt_csla_bec_tb`: directed and random 16-bit cases and an exhaustive
  8-bit adder. It checks that every group took both its BEC path and its
  plain path.
* `hybrid_rcpa_adder_tb`: the top at its default parameters, with 2 million
  random operations plus directed cases. It fails if any of these never
  happened:
  * a cell saturated;
  * a cell resolved its outputs with the forecast;
  * the forecast carried 1 into the exact part;
  * each group took its BEC path and its plain path;
  * a result was exact, and a result was inexact.
* `hybrid_accuracy_tb`: three cell types times 2, 4 or 8 approximate bits. It
  checks every result, and that mean error grows with `APPROX_W`.

To run one testbench with Verilator 5:

    verilator --binary --timing -Wall -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/rcpa_pkg.sv tb/rcpa_ref_pkg.sv tb/hybrid_rcpa_adder_tb.sv \
        --top-module hybrid_rcpa_adder_tb -o sim
    ./obj_dir/sim

Each testbench finishes in well under a second.
