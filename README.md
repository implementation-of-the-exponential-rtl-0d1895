# exp(X) on a pipelined double-precision multiplier

This is an IEEE-754 double-precision multiplier that also computes the
exponential function. The multiplier is a conventional four-stage pipeline:
operand selection, a 64x64 Booth array to carry-save, a 128-bit
carry-lookahead adder, and rounding. Three small units are added to its first
stage, together with two feedback paths. With them, the same array forms
exp(X) in **9 cycles** using five passes. A new exponential can start every
**6 cycles**. Plain multiplications still take **3 cycles** and can be issued
every cycle.

The idea is to avoid a long iterative algorithm and a large table. The
exponential of the fractional part is split into three factors:

* one factor comes from a small table;
* one is a product of about ten factors of the form (1 + 2^-j), which are
  multiplied out into two words with AND gates and counters;
* one is so close to 1 that a quadratic polynomial is enough.

The existing multiplier array then combines them.

## The arithmetic

**Splitting the argument.** X is written in two's complement as X = z + x.
Here z is an integer and x is a fraction in [0,1) with 63 bits, x = 0.x_1 x_2
... x_63. Then exp(X) = exp(z) * exp(x). The factor exp(z) = y * 2^e comes
from outside the unit (see *The integer part* below). The unit computes
y * exp(x). The bits of x are split into three fields:

| field | bits       | how exp() of it is formed |
|-------|------------|---------------------------|
| A     | x_1..x_7   | 128-entry table |
| B     | x_8..x_18  | exp(D), a product of factors (1 + d_j u_j) with d_j = x_j |
| C     | x_19..x_63 | part of K (next paragraph) |

**Why the middle field needs no table.** Take D = sum of d_j ln(1 + u_j), with
u_j = 2^-j, and choose every digit d_j equal to the bit x_j. Then D is close
to B but not equal to it. The difference B - D is a sum of gated constants
x_j (2^-j - ln(1 + 2^-j)), each about 2^-(2j+1). This difference is moved into
the last argument:

    exp(x) = exp(A) * exp(D) * exp(K),   K = C + (B - D)

K stays below 2^-16, so exp(K) = 1 + K + K^2/2 to within 2^-50. It is
evaluated as 1 + K(1 + K/2).

The first digit, j = 8, uses u_8 = 2^-8 + 2^-17 instead of 2^-8. This
"double shift" makes the first factor shrink K enough for the quadratic to
suffice at q = 18.

**Grouping of the factors.** The eleven factors of exp(D) are multiplied out
in hardware into two words. Each word is a sum of AND terms of digits at
fixed bit positions, truncated below 2^-63:

    P1 = (1 + d_8 (2^-8 + 2^-17)) (1 + d_10 2^-10) (1 + d_11 2^-11) (1 + d_12 2^-12) (1 + d_16 2^-16)
    P2 = (1 + d_9 2^-9) (1 + d_13 2^-13) (1 + d_14 2^-14) (1 + d_15 2^-15) (1 + d_17 2^-17) (1 + d_18 2^-18)

The array then forms exp(D) = P1 x P2.

**Negative arguments.** A negative X is complemented bit by bit during
denormalization. The +1 that completes the two's complement is not added
there. It enters the carry-in of the predictor's final adder, which is also
where bit x_63 lives. Cycle 1 therefore has no long carry chain.

**Number format.** Every datapath word is unsigned fixed point with 1 integer
bit and 63 fraction bits (1.63), so every value is in [1,2) or smaller.
Products are 2.126 numbers in [1,4). When an intermediate product is 2 or
more, it is shifted right by one before it re-enters the array, and the
exponent grows by one. Table entries for A >= ln 2 (addresses 89-127) are
stored halved, with a flag that adds one to the exponent.

## The nine-cycle schedule

This is the part that needs the most care. The array (stage 2), the adder
(stage 3) and the rounder (stage 4) each hold a different product in the same
cycle. The operand registers are loaded at the end of the cycle shown in the
"loaded" column.

| cycle | first stage (loads operand regs)        | array (M)   | adder (A)   | rounder |
|-------|-----------------------------------------|-------------|-------------|---------|
| 1     | denormalize X; P1, P2 loaded            |             |             |         |
| 2     | table exp(A); y = exp(z) arrives; both loaded | P1 x P2 |           |         |
| 3     | predictor forms K; K and 1 + K/2 loaded | y x exp(A)  | P1 x P2     |         |
| 4     | R1 = P1P2, R2 = y exp(A) fed back       | K (1 + K/2) | y x exp(A)  |         |
| 5     | (idle)                                  | R1 x R2     | K (1 + K/2) |         |
| 6     | R3 = 1 + K(1 + K/2), R4 = R1R2 fed back |             | R1 x R2     |         |
| 7     |                                         | R3 x R4     |             |         |
| 8     |                                         |             | R3 x R4     |         |
| 9     |                                         |             |             | round R3 x R4 |

The operand multiplexers of the array have these extra inputs:

* **Multiplicand side:** P1, the table entry, K, and the left feedback line.
  The left line comes from the product register after the adder and carries
  R1 and R3. The AND gate that forces R3's integer bit to 1 sits on this
  line, turning K(1 + K/2) into 1 + K(1 + K/2).
* **Multiplier side:** P2, y, 1 + K/2 = {1, K >> 1}, and the right feedback
  line. The right line comes from the adder output and carries R2 and R4. It
  shifts them right by one when they are 2 or more.

Because R2 and R4 are taken from the adder output in the cycle they are
resolved, no cycle is lost waiting for a register.

The exponent is carried in a separate register. It is set in cycle 2 from
the exponent of exp(z) and the table's halving flag. One is added for every
right shift of R2 or R4.

## Sharing the array with multiplications

The only shared resource is the array. An exponential uses it in its cycles
2, 3, 4, 5 and 7, so the issue control (`exp_issue_ctrl`) allows:

* a multiplication in the exponential's cycle 1 or cycle 6, or when no
  exponential is running. This includes the same cycle an exponential is
  accepted, since the two ops have separate ports;
* a new exponential in the previous one's cycle 7. Its first three cycles
  overlap the last three of its predecessor, which gives one exponential
  every 6 cycles.

The rates this gives are all checked exactly by the end-to-end testbench:

| traffic | rate |
|---------|------|
| multiplications only | 1 per cycle, latency 3 |
| exponentials back to back | 1 per 6 cycles, latency 9 |
| exponentials back to back plus multiplications | 1 exponential and 1 multiplication per 6 cycles |
| one exponential inside a chain of multiplications | the chain waits 5 cycles |

The method this design follows states two figures that are more optimistic:

* two multiplications per 6-cycle exponential period;
* a 4-cycle stall.

Its own cycle diagram does not allow either. Five array cycles per
exponential plus two multiplications would need 7 array cycles in every 6.
This design follows the cycle diagram. An exponential every 7 cycles leaves
room for two multiplications (in its cycles 1 and 6).

Results leave in completion order, not issue order. Each op carries an 8-bit
tag that comes back with its result, along with `out_is_exp`.

## The integer part

exp(z) for the integer part |z| < 4096 is not built here. The unit asks for
it in cycle 2:

* it drives `expz_valid` and the signed 13-bit `expz_z`;
* in the same cycle, it expects `expz_sig`, a 1.52 significand y in [1,2),
  and `expz_exp`, a signed 16-bit exponent.

Any table or unit that answers combinationally will do. For an integer-part
result beyond the double range, return a very large or very small exponent
(the test model uses ±4000). The result then overflows or underflows
correctly in the rounder. The testbench's `tb/expz_model.sv` is a behavioral
stand-in built on the simulator's `$exp`.

## Rounding, exceptions and special arguments

Stage 4 normalizes the product and rounds it to 53 bits. It supports the four
IEEE modes, which `rm_e` encodes as RNE, RTZ, RUP and RDN. It raises the
flags invalid, overflow, underflow and inexact (`fflags_t`). Multiplications
are IEEE-exact apart from subnormals.

Subnormals:

* Subnormal inputs are read as zero.
* Results below the normal range are flushed to a signed zero, with underflow
  and inexact raised.

Special arguments of the exponential are detected in cycle 1. The result is
still delivered in cycle 9.

| argument X | result |
|------------|--------|
| NaN | quiet NaN (invalid for a signaling NaN) |
| +inf | +inf |
| -inf | +0 |
| \|X\| >= 2^12 (above parameter `E_M` = 11) | +inf (largest finite number rounding toward zero or down) with overflow, or +0 with underflow |
| 0 < \|X\| < 2^-63 (vanishes in the truncation) | 1, or its neighbour 1 + 2^-52 / 1 - 2^-53 as the rounding mode requires, inexact |
| zero or subnormal | 1 |

## Accuracy

The target is 1 ulp, which means an error below 2^-52 before the final
rounding. The error budget:

* the 63-bit truncation of x;
* the rounding of the table entries and the eleven predictor constants to
  2^-63;
* the truncation of the terms of P1 and P2;
* the neglected term K^3/6, below 2^-50 for K < 2^-16;
* the final rounding.

Against the simulator's `exp()`, the end-to-end testbench measures at most 1
ulp over about 360 arguments. These include directed values such as ±0, ±1,
ln 2, ±707 and 708. The comparison allows 2 ulp, because the test model
delivers exp(z) already rounded to 53 bits.

## Files

All RTL is synthesizable SystemVerilog in `rtl/`, one unit per file:

| file | role |
|------|------|
| `exp_pkg.sv` | widths, rounding modes, phase encoding, flag and context structs; elaboration-time functions that compute the table entries exp(i/128) and the predictor constants 2^-j - ln(1+u_j) with 160-bit fixed-point series |
| `fp_exp_mul_unit.sv` | top: four pipeline stages, operand multiplexers, feedback lines, exponent and context pipeline |
| `exp_issue_ctrl.sv` | phase counter of the exponential, ready signals, array-sharing assertion |
| `exp_denormalizer.sv` | IEEE X to z + x, deferred +1, special arguments |
| `exp_table.sv` | 128 x 64-bit table of exp(A), with halving flags |
| `product_generator.sv` | P1 and P2 from the digits x_8..x_18 |
| `predictor.sv` | K from x_8..x_63 and the deferred +1 |
| `booth_multiplier.sv` | radix-4 Booth array (33 digits) reduced to carry-save |
| `csa_tree.sv` | generic 3:2 counter tree used by the three units above |
| `cla_adder.sv` | 128-bit Kogge-Stone carry-lookahead adder |
| `fp_round.sv` | normalization, rounding, flags, special values |

Reset (`rst_n`) is asynchronous and active low. It clears the phase and all
valid bits.

## Verification

Each unit has a self-checking testbench in `tb/`, named `tb_<module>.sv`.
Each one compares against a reference computed independently, mostly with
`real` arithmetic:

* `tb_booth_multiplier`: random and corner operands against the exact 128-bit
  product.
* `tb_cla_adder`: random and carry-chain cases.
* `tb_exp_table`: every entry against `$exp`.
* `tb_product_generator`: every one of the 2048 digit patterns against the
  product of the factors.
* `tb_predictor`: K against the series, and exactly when no digit of B is
  set.
* `tb_exp_denormalizer`: reconstruction of X from z, x and the deferred +1,
  plus special arguments.
* `tb_fp_round`: all rounding modes against the simulator's rounding, plus
  overflow and underflow.
* `tb_exp_issue_ctrl`: random handshakes against a model of the schedule,
  and the 5-cycle stall.

`tb_fp_exp_mul_unit` runs the whole unit at its default parameters:

* directed and random exponentials;
* IEEE multiplications including specials;
* a simultaneous issue;
* a burst of multiplications;
* an exponential inside a chain of multiplications;
* a stream of 300 exponentials with multiplications competing for the free
  slots.

It checks every result, every latency (9 and 3 cycles) and the rates in the
table above. It also requires each mechanism to occur at least once: a
multiplication stall, an overlapped exponential, a multiplication in cycle 1
and in cycle 6, R2 and R4 taking the shifted line, a halved table entry, a
negative argument, special results, overflow, and underflow.

To run one testbench with plain Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/exp_pkg.sv \
        tb/tb_fp_exp_mul_unit.sv --top-module tb_fp_exp_mul_unit
    ./obj_dir/Vtb_fp_exp_mul_unit

Replace the testbench name for the others. Verilator finds the other modules
through `-Irtl -Itb`. Each testbench ends with a line
`TB_RESULT checks=N failures=M`, and a watchdog ends a hung run.

## Where this design departs from the method, or fills a gap

* **Feedback routing.** R1 and R3 come from the product register (left line,
  unshifted, with the gate that forces R3's leading one). R2 and R4 come from
  the adder output (right line, optionally shifted). The method describes R3
  as passing through the unshifted line one cycle earlier. Here it is taken
  in cycle 6, when R4 is also ready; the array uses it in cycle 7 either way.
* **Factor index sets.** The factor index sets are the ones above, covering
  every digit 8..18 exactly once (j = 14 sits in P2).
* **Issue rates.** Multiplication issue rates are as in *Sharing the array*.
  With exponentials back to back, this gives one free slot per period, not
  two, and a 5-cycle stall, not 4.
* **Widths.** The Booth recoding uses 33 digits so that unsigned 64-bit
  operands are recoded correctly. The product register is 128 bits wide,
  since the product of two 64-bit operands fits in 128 bits.
* **Structural choices made here:**
  * table entries of 2 or more are stored halved;
  * constants are rounded to nearest;
  * P1, P2 and K use generic counter trees plus an adder rather than
    hand-optimized gate arrays, so gate counts will differ from a
    hand-optimized layout;
  * Kogge-Stone adder;
  * valid/ready issue ports with tags;
  * flush-to-zero for subnormals.
* **Not built.** exp(z) for the integer part is an external input.
