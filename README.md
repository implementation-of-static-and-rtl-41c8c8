# Quad-rail NULL Convention Logic multiply-accumulate unit (24 + 8×8)

This is a clockless, delay-insensitive multiply-accumulate (MAC) unit. Each operation
computes

    ACC := (ACC + X·Y) mod 2^24,     OV := (ACC + X·Y ≥ 2^24)

for unsigned 8-bit `X` and `Y` and a 24-bit accumulator. It is written in NULL Convention
Logic (NCL), an asynchronous style with no clock and no timing assumptions. Every value
carries its own validity: a result is complete when every output signal shows a legal
code word. The logic is built from threshold gates with hysteresis. Data are
**quad-rail**: one signal is four wires, one-hot, and carries two bits (one radix-4
digit). So X and Y are 4 digits each and the accumulator is 12 digits.

The RTL is synthesizable SystemVerilog. It models the logic function and the state
holding of every NCL gate, with zero delay. It does not model transistor sizing or
layout.

## Encoding and wavefronts

| kind | wires | values | used for |
|---|---|---|---|
| quad-rail (`qr_t`) | 4 | DATA0..DATA3 (rail *k* high = value *k*) | operands, sums, accumulator |
| 3-rail MEAG (`m3_t`) | 3 | 0..2 | high digit of a digit product, some carries |
| dual-rail (`dr_t`) | 2 | 0..1 | most carries, overflow flag |

If all rails of a signal are low, the signal is NULL. If two rails are high, the code
word is illegal. "MEAG" means a mutually exclusive assertion group. It is used where a
value can never reach 3: the high digit of a digit product is at most 2, because
3·3 = 9 = 21₄. This saves a wire.

Operation alternates between two kinds of wavefront. In a DATA wavefront every signal
goes from NULL to a value. In the NULL wavefront that follows, every signal returns to
NULL. Every NCL block is **input-complete**:

- its outputs become DATA only after all its inputs are DATA;
- its outputs become NULL only after all its inputs are NULL.

Because of this, completion can be read at the outputs alone.

## Threshold gates (`ncl_gate`, `ncl_th22r`)

A TH*mn* gate has *n* inputs. Its output goes high when at least *m* of them are high.
It then stays high until **all** inputs are low; this is called hysteresis. A weighted
gate TH*mn*w*w₁…* counts the first inputs *w₁, …* times. So each gate is

    Z = set(inputs) + Z_prev · (A + B + C + D)

`ncl_gate` implements all 27 fundamental gates; the `GATE` parameter (`ncl_pkg::gate_e`)
chooses one:

- the threshold gates TH12 … TH54w322;
- THxor0, THand0 and TH24comp, which have the same hysteresis but other set functions.

A few special cases:

- TH*nn* is an *n*-input C-element.
- TH1*n* is a plain OR.
- `ncl_th22r` is the resettable TH22 used in registers. It is TH22n (resets to 0) or
  TH22d (resets to 1).

The hysteresis is a level-sensitive latch (`always_latch`). Synthesis therefore sees one
latch per gate, and lint reports the combinational feedback through those latches. This
is expected: a gate with state is exactly what an NCL gate is.

## Digit arithmetic

### The partial-product cell and the eleven digit adders

`q33mul` multiplies two quad-rail digits. It returns the low digit `ppl` (quad-rail) and
the high digit `pph` (3-rail).

The adders are named after their operands. `Q` is the quad-rail sum output. Then comes
one figure per operand: `3` = quad-rail digit (0..3), `2` = 3-rail MEAG (0..2),
`D` = dual-rail (0..1).

| module | operands | carry out |
|---|---|---|
| `q3dadd` | quad + dual | dual |
| `q32add` | quad + MEAG | dual |
| `q33add` | quad + quad | dual |
| `q22dadd` | MEAG + MEAG + dual | dual |
| `q32dadd` | quad + MEAG + dual | dual |
| `q33dadd` | quad + quad + dual | dual |
| `q322add` | quad + 2 MEAG | dual |
| `q332add` | 2 quad + MEAG | MEAG |
| `q322dadd` | quad + 2 MEAG + dual | MEAG |
| `q3222add` | quad + 3 MEAG | MEAG |
| `q3322add` | 2 quad + 2 MEAG | MEAG |

Each adder returns sum mod 4 as a quad-rail digit and sum div 4 as the carry. The carry
is dual-rail when the largest possible sum is 7 or less, and 3-rail otherwise.

All twelve cells share one core, `ncl_digit_fn`. It has one C-element (TH22/TH33/TH44)
for every combination of operand values, and each output rail is the OR (TH1n) of the
combinations that produce it. For example, `q3322add` has 4·4·3·3 = 144 TH44 gates.
This two-level form is input-complete by construction and easy to check. An optimised
gate netlist would have the same function with far fewer gates. If area matters, replace
the body of a cell and keep its ports.

### The 8×8 multiplier array (`ncl_mul_array`)

The digit products `x[i]·y[j]` contribute two terms:

- `ppl[i][j]` at digit position i+j;
- `pph[i][j]` at digit position i+j+1.

They are summed by a regular array. Rows 1-3 are carry-save rows: each adder takes

- the sum of the adder above it;
- the carry of the adder above and to the right (carries run diagonally down to the next
  row, never along a row);
- the partial products of its own digit that are not yet used.

Row 4 is a short ripple-carry adder.

| row | digit 1 | digit 2 | digit 3 | digit 4 | digit 5 | digit 6 | digit 7 |
|---|---|---|---|---|---|---|---|
| 1 | Q332 | Q3322 | Q3322 | Q322 | | | |
| 2 | | Q332 | Q3322 | Q3322 | Q322D | | |
| 3 | | | Q332 | Q3322 | Q3322 | Q3222 | |
| 4 (ripple) | | | | Q32 | Q32D | Q32D | Q22D |

The product digits come from these places:

- digit 0 is `ppl[0][0]`;
- digits 1, 2 and 3 leave from the rightmost adder of rows 1, 2 and 3;
- digits 4-7 come from row 4.

The instance connections in `ncl_mul_array.sv` show which partial product enters each adder.
The carry out of the last Q22D is always zero and is left open.

### The accumulate adder (`ncl_acc_rca`)

A 12-digit ripple-carry adder adds the accumulator value and the product:

- digit 0 is a Q33;
- digits 1-7 are Q33D;
- digits 8-11 are Q3D, because there is no product digit above digit 7.

The dual-rail carry out of digit 11 is the overflow flag.

## The accumulator loop and the handshake (`ncl_mac`)

```
 x_in,y_in ─► X/Y registers ─► 16×Q33mul + adder array ─► 12-digit RCA ─► output reg ─► result
                 ▲  │ko                                       ▲          + OV reg ─► ov
                 │  ▼                                         │             │
              comp(8) ─► ko                        accumulator reg ◄── feedback reg ◄─┘
```

Register stages (`ncl_register`) pass DATA only while their request `ki` is 1
("request for data", rfd). They pass NULL only while it is 0 ("request for null", rfn).
Every signal reports `ko` = NOR of its rails. `ncl_completion` is a TH44 tree, so ⌈log₄ N⌉
levels. It combines these `ko` lines into the request for the previous stage:

| request | made from |
|---|---|
| `ko` (to the producer) | `ko` of the X and Y registers (8 lines) |
| request of the X, Y and accumulator registers | output register + OV register (13 lines) |
| request of the output and OV registers | feedback register (12 lines) + consumer `ki` |
| request of the feedback register | accumulator register (12 lines) |

A feedback ring in NCL must hold one DATA wavefront, one NULL wavefront and a free stage
between them. That is why the loop has three registers: output, feedback and
accumulator. At reset:

- the feedback register holds DATA0, so the accumulator starts at 0;
- every other register is NULL.

After reset, the value in the feedback register moves into the accumulator register and
the loop is ready.

One operation, seen from outside:

1. Wait for `ko = 1`. Drive X and Y as DATA on `x_in`/`y_in`.
2. `ko` falls once the inputs are latched. Return `x_in`/`y_in` to NULL.
3. `result` (12 digits) and `ov` become complete DATA. They hold until the consumer
   answers with `ki = 0`.
4. `result`/`ov` return to NULL. The consumer sets `ki = 1`. By then the new sum has
   moved through the feedback register into the accumulator register.

`rst` is active high and asynchronous. Hold `x_in`, `y_in` NULL and `ki = 1` while it is
asserted. `ov` is DATA1 for exactly the one operation whose sum overflowed. The stored
result then wraps modulo 2^24.

## Where this RTL makes its own choices

- **Adder and multiplier cell insides.** The cells' operands, encodings and functions
  are as published. Their gate netlists were area-optimised threshold-gate reductions
  that are not available; the minterm form above replaces them.
- **Row 3, digit 6 of the multiplier is a Q3222.** With the partial-product assignment
  used here, that position receives one quad-rail and three 3-rail inputs. The published
  component set includes Q3222add. The published block diagram, however, appears to show
  a Q322D at that position, with a different assignment of partial products that is not
  recoverable. The product is exact either way: the multiplier is tested exhaustively.
- **Request of the accumulator register.** It shares the request of the X/Y registers,
  because all three feed the same adder.
- **Reset states.** The choice of which loop register starts as DATA0 is this design's own.
- **Timing.** There are no delays. Static and semi-static gate versions differ only at
  transistor level and are the same RTL here.

## Files

| file | contents |
|---|---|
| `rtl/ncl_pkg.sv` | encodings, gate enum, encode/decode helpers |
| `rtl/ncl_gate.sv`, `rtl/ncl_th22r.sv` | threshold gates |
| `rtl/ncl_register.sv`, `rtl/ncl_completion.sv` | register stage, completion tree |
| `rtl/ncl_digit_fn.sv` | shared minterm core of the digit cells |
| `rtl/q33mul.sv`, `rtl/q*add.sv` | partial-product cell and the eleven digit adders |
| `rtl/ncl_mul_array.sv`, `rtl/ncl_acc_rca.sv` | multiplier array, accumulate adder |
| `rtl/ncl_mac.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench for each module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each one has a
watchdog. For example:

```
verilator --binary --timing --assert -Irtl rtl/ncl_pkg.sv tb/tb_ncl_mac.sv --top-module tb_ncl_mac
./obj_dir/Vtb_ncl_mac
```

Verilator reports circular logic (UNOPTFLAT) for the handshake loops and latch
warnings for the gates. Use `-Wno-fatal`, or accept the warnings: they describe the
intended asynchronous structure.

What the testbenches cover:

- **Digit cells:** each is tested exhaustively. The test checks NULL behaviour, that no
  output appears while any operand is still NULL, the value, and that the output holds
  until all operands return to NULL.
- **`tb_ncl_mul_array`:** all 65,536 products.
- **`tb_ncl_acc_rca`:** random sums and the overflow corners.
- **`tb_ncl_mac`:** 565 full handshake operations against an integer model. These
  include 260 products of 255·255, which wrap the accumulator and raise OV once, and
  results that the consumer holds back. The test counts each of these mechanisms.
- **Gates and registers:** compared against independent threshold, C-element and
  register models.

The top has no parameters, so `tb_ncl_mac` runs the full-size design.
