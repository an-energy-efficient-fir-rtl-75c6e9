# RoBA FIR filter and rounding-based approximate multiplier

A multiplier array is the slowest and largest part of a direct-form FIR
filter. This design replaces it with a RoBA (rounding-based approximate)
multiplier. In a RoBA multiplier each operand is rounded to the nearest power
of two, so every product that is left becomes a shift. The design has two
parts:

* `roba_fir`: a 5-tap FIR filter on 8-bit samples. Each tap weight is a power
  of two, `2^-h[i]`, so each tap's "RoBA multiplier" is a right shift. The
  five tap products are summed by a chain of adders built from 4:2
  compressor cells.
* `roba_mult`: the general signed 8x8 RoBA multiplier, for operands that are
  not powers of two. It is a separate, combinational unit.

`roba_fir_top` puts the two side by side. They share no signals.

## The RoBA approximation

Write `A_r` and `B_r` for A and B rounded to powers of two. Then, exactly:

    A*B = (A_r - A)(B_r - B) + A_r*B + B_r*A - A_r*B_r

The first term is the only one that needs a real multiplier. It is small when
A and B are close to `A_r` and `B_r`, so RoBA drops it:

    A*B ~ B_r*A + A_r*B - A_r*B_r

The three terms that remain are all shifts. The result can land above or
below the exact product. It lands above when one operand was rounded up and
the other down, and below when both were rounded the same way. Example:
-17 x -28 gives 480 (the exact product is 476), and 24 x 16 gives exactly 384.

The scheme only works on non-negative numbers, because a negative
two's-complement value is never of the form 2^n. So the multiplier works on
magnitudes and applies the sign at the end.

### Rounding rule (`rounding.sv`)

This is the part that takes the most care. Let k be the position of the
leading one of the magnitude a, so `2^k <= a < 2^(k+1)`. The midpoint
`3*2^(k-1)` is exactly the point where bit `k-1` becomes 1. So:

* if `a[k-1]` is 1, round up to `2^(k+1)`; midpoints such as 6, 12, 24 and 96
  also round up, which needs the least logic;
* otherwise, round down to `2^k`;
* the one exception is `a = 3`, which rounds down to 2;
* `a = 0` gives 0 and sets the `zero` flag, so every RoBA term is 0.

The module outputs the rounded value (one-hot), its exponent (what the
shifters use) and `zero`. The rule is written as a leading-one search
followed by one bit test. No gate-level equations are given for it.

Because `a/A_r` always lies in [3/4, 3/2], the RoBA magnitude
`A_r*B_r*(a/A_r + b/B_r - 1)` is always positive. For 8-bit operands it never
exceeds 2^14, so a 16-bit signed product cannot overflow.

## Multiplier datapath (`roba_mult.sv`)

This is a purely combinational chain. The submodules carry the names of the
blocks in the reference block diagram:

| stage | module | does |
|---|---|---|
| 1 | `sign_detection` | `|A|`, `|B|` (W bits; `|-128|` = 128 fits), sign = `A[W-1] ^ B[W-1]` |
| 2 | `rounding` x2 | exponents of `A_r` and `B_r`, zero flags |
| 3 | `shifter` x3 | `|A| << e_B`, `|B| << e_A`, `A_r << e_B` (2W bits each; 0 if the power of two is 0) |
| 4 | `adder` | `B_r*|A| + A_r*|B|`, 2W+1 bits |
| 5 | `subtractor` | minus `A_r*B_r`; never negative |
| 6 | `sign_set` | two's complement negation when the sign is 1 -> `p[2W-1:0]` |

Ports: `a[7:0]` and `b[7:0]` in two's complement, and `p[15:0]` out. There is
no clock.

## FIR filter (`roba_fir.sv`)

    dataout(n) = ( sum_{i=0..4} x(n-i) >> h[i] ) mod 256

* **Delay line.** Tap 0 is the input `x` itself. Taps 1 to 4 come from a
  chain of four 8-bit registers (`lut`), which is 32 flip-flops in total. The
  name `lut` is the cell name used in the reference netlist. The cell is a
  plain register.
* **Tap multipliers** (`roba_shift`). When a coefficient is already a power
  of two, `B_r = B` and the RoBA expression reduces to `B*A`, which is one
  shift. Each coefficient is given as a 3-bit exponent `h[i]`, and the tap
  computes `x(n-i) >> h[i]` with zero fill. Samples are unsigned.
* **Accumulation** (`compressor4_2_tree`). The products are added in a
  linear chain: `((p0 + p1) + p2) + p3) + p4`. Every adder is 8 bits wide, so
  the sum wraps modulo 256.

Timing: the registers shift on the rising edge of `clk`. `rst` is active
high and synchronous, and clears them. `dataout` is combinational from `x`,
`h` and the registers, so there is no output register. An input sample
appears at tap i exactly i clocks later. The longest path runs from `x`
through a shifter and all four adders to `dataout`.

Ports: `clk`, `rst`, `x[7:0]`, `h[4:0][2:0]` (packed, with `h[i]` for tap i)
and `dataout[7:0]`. Together these are 33 port bits.

### 4:2 compressor adder (`compressor4_2.sv`, `compressor4_2_tree.sv`, `xor_xnor.sv`)

The 4:2 compressor cell takes x1 to x4 and cin, and gives sum (weight 1) plus
carry and cout (weight 2 each). It is built in XOR-XNOR/multiplexer style:

    cout  = (x1^x2)       ? x3  : x1
    carry = (x1^x2^x3^x4) ? cin : x4
    sum   = x1^x2^x3^x4^cin

`xor_xnor` supplies each complementary select pair. Only the logic function
of that gate is modelled; its transistor circuit is a cell-library matter.

`compressor4_2_tree` adds two 8-bit operands with one cell per bit:

* `x1 = a[i]` and `x2 = b[i]`;
* `x3` is the previous bit's `cout`;
* `cin` is the previous bit's `carry`;
* `x4 = 0`.

Both double-weight outputs of a bit go into the next bit, so each cell's
`sum` output is already a final result bit. With `x4 = 0`, the carry chain
runs through `cout`. The carries out of bit 7 are dropped.

## Where this departs from the reference design, or fills gaps

* **Product values.** The reference simulation of the multiplier lists
  -17x-28 = 476, -18x27 = -486, -15x30 = -450 and 24x16 = 384. Those are the
  exact products. The RoBA formula, which this RTL follows, gives 480, -496,
  -448 and 384. The testbenches check the RoBA values.
* **Block order.** The reference netlist draws rounding ahead of sign
  detection. Here the sign is stripped first, as the method requires.
* **FIR coefficients.** The block diagram of the filter shows a general RoBA
  multiplier for each coefficient `b_i`. The implemented filter (5 taps,
  3-bit `h`, right shifters) uses power-of-two weights `2^-h`, and that
  filter is what is built here. For general coefficients, `roba_mult` is
  available.
* **Own choices** (widths and behaviour that the reference does not give):
  * synchronous active-high reset;
  * unsigned samples with modulo-256 wrap;
  * no output register;
  * the internal structure of `compressor4_2_tree` and the gate form of the
    4:2 cell;
  * the 17-bit width of the adder and subtractor in the multiplier;
  * rounding of 0 to 0.
* **Not reproduced.** The transistor-level XOR-XNOR cell, and all area,
  power and delay figures (the reference reports 84 LUTs and 32 FFs for the
  filter on an FPGA). The conventional FIR filter is a comparison baseline
  only and is not included.

## Parameters

| module | parameter | default |
|---|---|---|
| `roba_fir_top`, `roba_fir` | `TAPS`, `DATA_W`, `COEF_W` | 5, 8, 3 |
| `roba_fir_top`, `roba_mult` | `MUL_W` / `W` | 8 |

The defaults are in `rtl/roba_pkg.sv`. `roba_mult` works for any W. The
overflow bound given above holds for W = 8 and, by the same argument, for
any W.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M`, and each has a watchdog. The
reference models are written independently of the RTL. For example, the
multiplier reference rounds by searching for the nearest power of two
instead of testing bits.

* `tb_roba_mult` tries all 65,536 operand pairs, plus hand-worked cases.
* `tb_rounding`, `tb_sign_detection`, `tb_compressor4_2_tree`,
  `tb_roba_shift` and `tb_compressor4_2` are exhaustive.
* `tb_roba_fir` checks:
  * that reset clears the delay line;
  * the impulse response, including that tap i responds exactly i clocks
    later;
  * 400 random samples with changing coefficients;
  * the modulo-256 wrap.
* `tb_roba_fir_top` runs the whole top at its default sizes. It runs both
  units and counts each mechanism (reset, response at each tap, sum wrap,
  rounding up, rounding down, midpoint ties, the 3 -> 2 case, negative
  products, zero operands). A mechanism that never occurs counts as a
  failure.

To run one testbench with Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/roba_pkg.sv tb/tb_roba_fir_top.sv --top-module tb_roba_fir_top
    ./obj_dir/Vtb_roba_fir_top

All files lint cleanly with `verilator --lint-only -Wall`. The only warnings
left are for bits that are unused by construction: the carry-outs of the top
bit, and the always-zero top bit of the multiplier's difference.
