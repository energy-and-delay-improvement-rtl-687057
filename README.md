# Decimal floating-point units for decimal64

Money, tax and billing software works in decimal. Doing that arithmetic in
software on a binary processor is slow, so this design puts it in hardware:
IEEE 754-2008 decimal64 (16 decimal digits) addition, subtraction,
multiplication, fused multiply-add, division and square root. Every unit supports all
seven rounding directions and raises the five standard exception flags. The
units sit behind a small 32-bit memory-mapped slave port, so a host
processor can use them as an accelerator.

The main idea is that one fast carry-propagate decimal adder sits on every
critical path. Generate and propagate signals come from excess-3 digits. A
Kogge-Stone prefix tree finds all digit carries in log2(N) levels. Each
digit computes its sum and its sum-plus-one in parallel, and the carry picks
one. This adder finishes the aligned sum in the adder. It adds the
carry-save vectors in the multiplier and builds the multiples 2A to 9A. It
applies the rounding increment. In the divider and the square root it
takes the fixed addend of every Newton-Raphson step.

## Number representation

Inside the design a decimal64 value is a `dfp_t` struct (`rtl/dfp_pkg.sv`):

| field   | meaning                                                   |
|---------|-----------------------------------------------------------|
| `cls`   | finite, infinity, quiet NaN, signalling NaN                |
| `sign`  | sign bit                                                  |
| `exp`   | signed 14-bit exponent of the last digit, -398 .. 369      |
| `coeff` | 16 BCD digits, not normalised (cohorts are kept)          |

The value is (-1)^sign × coeff × 10^exp. Flags are a `dfp_flags_t`:
{invalid, divzero, overflow, underflow, inexact}. Rounding directions are
`rmode_e`: 0 RNE (ties to even), 1 RNA (ties away), 2 RNZ (ties toward
zero), 3 RZ (truncate), 4 RA (away from zero), 5 RP (toward +inf), 6 RM
(toward -inf).

On the bus, values use the standard's 64-bit DPD ("densely packed decimal")
interchange format. `dpd_unpack64` and `dpd_pack64` convert between the two.
They handle the combination field, the 10-bit declets and the special
encodings. A NaN payload is kept only as far as it fits.

Results follow the standard's preferred-exponent rule. An exact result keeps
the ideal exponent: the minimum of the operand exponents for a sum, their
sum for a product, their difference for a quotient, half the exponent
rounded down for a square root. Only results that need
more than 16 digits are rounded. Underflow means the result is tiny before
rounding and also inexact.

## The fast decimal adder (`bcd_cpa`)

`bcd_cpa #(ND)` adds two ND-digit BCD numbers plus a carry in. It is
combinational. For each digit i:

1. Add 3 to each input digit to get excess-3 digits, then add the two in
   4 bits. The 4-bit carry out is the digit's **generate**, because the
   excess-3 sum overflows exactly when the decimal sum is 10 or more. A 4-bit
   sum of 1111 is the digit's **propagate**, because the decimal sum is
   then exactly 9.
2. A Kogge-Stone prefix tree over (g, p) gives the carry into every digit.
   The carry in is folded into digit 0.
3. In parallel, each digit forms its decimal sum and sum + 1 (both
   corrected back to BCD). The carry from the tree picks one of them.

The carry in is what lets one adder also subtract (with the 9's complement)
and round (by incrementing).

## Multiplication (`dec_mult_core`, `dfp_mul`)

`dec_mult_core #(P)` gives the exact 2P-digit product, fully in parallel:

* **Multiples.** Eight fast adders build 2A to 9A from A (2A=A+A, 3A=2A+A,
  4A=2A+2A, 5A=4A+A, 6A=3A+3A, 7A=6A+A, 8A=4A+4A, 9A=8A+A).
* **Partial products.** Each digit of B selects one multiple, shifted by
  its position. That gives P partial products at once.
* **Carry-save tree.** Decimal 3:2 compressors cut the partial products
  down to two vectors. For every digit position a compressor adds three
  digits (0 to 27). It keeps the units digit as the sum digit and passes the
  tens digit (0 to 2) to the next position as the carry digit. With P=16 the
  tree has 6 levels.
* **Final addition.** A 2P-digit `bcd_cpa` adds the sum and carry vectors.

`dfp_mul` adds the exponents and XORs the signs. It hands the 32-digit
product to `dfp_round`, which uses the leading-zero count to decide the
shift.

## Addition and subtraction (`dfp_addcore`, `dfp_add`)

Alignment is the hard part of decimal addition. Neither operand is
normalised, and the exponent gap can be anything from 0 to almost 800.

`dfp_addcore #(N)` works in a window of 2N+3 digits:

* The operand with the larger exponent (A) moves left by
  dA = min(d, N+2) digits, where d is the exponent difference. This uses up
  its leading zeros and the spare digits.
* The other operand (B) moves right by d - dA. Digits pushed off the right
  end are lost. The **sticky bit** is found in parallel with the shifter:
  B's trailing zeros are counted, and sticky is set when the right shift is
  larger than that count.
* **Subtraction** computes A + 9's complement(B) with carry in = not
  sticky. This is the correct borrow when nonzero digits of B were dropped.
  With no carry out, B was larger (this can only happen without sticky). A
  second adder then gives the 9's complement of the sum, which is B - A,
  and the result takes B's sign.
* An exactly zero result is +0, or -0 when rounding toward minus infinity.

N+2 digits of left shift are enough for correct rounding. Whenever sticky
is set, the exact result has at least N+2 significant digits in the
window, so `dfp_round` sees the true round digit, and the sticky bit stands
only for what lies further down.

`dfp_add` adds the rules for special values (NaN propagation, inf - inf is
invalid) and the final rounding.

## Rounding (`dfp_round`)

`dfp_round #(W)` takes an exact W-digit significand, an exponent and a
sticky bit. It returns the 16-digit result and its flags:

1. Count the significant digits. The right shift is the larger of "digits
   beyond 16" and "distance below the smallest exponent" (the subnormal
   range). The digit just below the cut is the round digit. Everything below
   it ORs into sticky.
2. The direction, sign, round digit, sticky bit and the parity of the last
   kept digit decide whether to add one unit in the last place. The
   increment enters a `bcd_cpa` as its carry in. A carry out of 16 digits
   gives 1000…0 and exponent + 1.
3. Overflow gives infinity or the largest finite number, depending on the
   direction. A large exponent with few digits is clamped by appending
   zeros.

The adder uses W = 2·16+3, the multiplier W = 32 and the FMA W = 67.

## Fused multiply-add (`dfp_fma`)

`dfp_fma` computes ±(x·y) ± z with a single rounding. The 32-digit product
leaves `dec_mult_core` exact. It then goes to a `dfp_addcore` with N = 32 (a
67-digit window), and then to `dfp_round`. The product is never rounded, so
only the final result can raise overflow, underflow or inexact. `neg_p` and
`neg_c` select the four sign variants. 0 × inf is invalid.

## Division (`dfp_div`)

The divider is one of the two sequential units. It finds the reciprocal of the
divisor by Newton-Raphson and gets a correctly rounded quotient from an
exact remainder.

1. **Normalise.** Both significands are shifted left to 16 significant
   digits, A' and B'.
2. **Start value.** The three leading digits d of B' index a 900-entry
   table T(d) = floor(2·10^7 / (2d+1)). This is a 5-digit approximation of
   1/b taken at the middle of the interval. The table is computed by a
   constant function at elaboration, so no data file is needed.
3. **Iterations.** x(i+1) = x(i) · (2 - b·x(i)), NIT = 3 times. One
   21-digit `dec_mult_core` is shared. Each iteration takes two cycles: first
   b·x, from which a fast adder subtracts the fixed addend 2, then
   x·(2 - b·x). The reciprocal is kept as an integer with F = 20 fraction
   digits and truncated after every step. It therefore approaches 1/b from
   below, and after three steps it is accurate far beyond 16 digits.
4. **Quotient and remainder.** Qt = a·x is truncated to 16 digits. One more
   multiplication gives the exact remainder R = A'·10^k - Qt·B'. Qt is either
   right or one too small. If R ≥ B', Qt is incremented and B' is
   subtracted from R.
5. **Rounding.** Comparing 2R with B' tells whether the discarded part is
   zero, below half, exactly half or above half. That becomes a round
   digit (0, 2, 5 or 7) plus sticky for `dfp_round`, which handles all
   seven directions and the subnormal range. An exact quotient has its
   trailing zeros removed, down to the ideal exponent ea - eb.

**Timing.** `start` is accepted at a clock edge while `busy` is low. A
finite division keeps `busy` high for 2·NIT + 2 = 8 cycles. `done` pulses
for one cycle at the end, and `res`/`flags` hold until the next start.
Special cases (NaN, 0/0, inf/inf, x/0, 0/x, inf/x, x/inf) finish at the
edge that takes `start`.

Example: 8080699100134968 / 910809186219000 returns 8872E-3 (exactly
8.872) in every rounding direction, with no flags.

## Square root (`dfp_sqrt`)

The square root follows the divider's plan. It computes a reciprocal square
root by Newton-Raphson and then corrects the root with an exact remainder.

1. **Scale.** The significand is normalised to 16 digits, A', with
   exponent e'. M = A'·10^t uses t = 15 or 16, whichever makes e' - t even.
   M then has 31 or 32 digits. Its integer square root Q has exactly 16
   digits, and the result is Q·10^((e'-t)/2). Write m = M/10^30, so m is in
   [1, 100).
2. **Start value.** There are two 900-entry tables, one for each t. Each is
   indexed by the three leading digits and holds floor(10^5/sqrt(m)) at the
   middle of the interval. Both are computed at elaboration.
3. **Iterations.** y(i+1) = y(i)·(1.5 - (m/2)·y(i)²), NIT = 3 times. This
   is the usual y(3 - m·y²)/2, rearranged so that 1.5 is a fixed addend.
   m/2 = 5·A' (shifted) is formed once. Each iteration is three
   multiplications on one 22-digit `dec_mult_core`: y², (m/2)·y², and
   y·(1.5 - …). Each step is rounded toward the safe side (y² and
   (m/2)·y² up, the new y down). Since the iteration never overshoots
   1/sqrt(m), y therefore stays just below it.
4. **Root and remainder.** Q = m·y is truncated to 16 digits. This is the
   true integer root or one less. One more multiplication gives
   R = M - Q². If R > 2Q, Q is incremented and R reduced by 2Q + 1.
5. **Rounding.** R = 0 means the root is exact. In that case trailing zeros
   are removed toward the ideal exponent floor(e/2). Otherwise R > Q means
   the dropped part is above one half, and anything else means below.
   Exactly one half cannot happen. `dfp_round` applies the direction.

**Timing.** A finite positive operand keeps `busy` high for 3·NIT + 3 = 12
cycles. Zeros (sqrt(-0) = -0), +inf, NaNs and negative operands (invalid)
finish at the edge that takes `start`.

## The accelerator (`dfp_accel`, top)

`dfp_accel` is a 32-bit Avalon-MM slave with zero wait states. Read data is
valid in the same cycle as the read. Reset is asynchronous and active low.

| word | name    | access | contents |
|------|---------|--------|----------|
| 0/1  | A lo/hi | r/w    | operand A, DPD |
| 2/3  | B lo/hi | r/w    | operand B, DPD |
| 4/5  | C lo/hi | r/w    | operand C (FMA addend), DPD |
| 6    | CTRL    | r/w    | [2:0] op (0 add, 1 sub, 2 mul, 3 fma, 4 div, 5 sqrt of A), [5:3] rounding direction, [6] negate product, [7] negate C |
| 7    | STATUS  | r      | [0] busy, [1] done, [6:2] flags {invalid, divzero, overflow, underflow, inexact} |
| 8/9  | R lo/hi | r      | result, DPD |

A write to CTRL starts the operation. A write to CTRL is ignored while
busy, and done is cleared by the next accepted CTRL write. Add, subtract,
multiply and FMA are combinational. Their result is registered at the
edge after the CTRL write, so a host polling STATUS sees done two cycles
after the write. A division shows done 2·NIT + 5 cycles after the write, and a square root
3·NIT + 6 cycles after it.
Two assertions check the bus rules: no read and write in the same cycle,
and the divider or the square root is never started while busy.

All five units see the same decoded operands at the same time. There is
no resource sharing between them.

## Files

| file | contents |
|------|----------|
| `rtl/dfp_pkg.sv` | constants (P=16, exponent limits), `dfp_t`, flags, rounding and opcode enums, DPD declet functions |
| `rtl/bcd_cpa.sv` | fast decimal carry-propagate adder |
| `rtl/dec_mult_core.sv` | parallel BCD significand multiplier |
| `rtl/dfp_round.sv` | rounding, subnormals, overflow, flags |
| `rtl/dfp_addcore.sv` | alignment with parallel sticky, add/subtract |
| `rtl/dfp_add.sv`, `dfp_mul.sv`, `dfp_fma.sv`, `dfp_div.sv`, `dfp_sqrt.sv` | the arithmetic units |
| `rtl/dpd_unpack64.sv`, `dpd_pack64.sv` | DPD interchange codec |
| `rtl/dfp_accel.sv` | top: bus slave with the units |
| `tb/dfp_ref_pkg.sv` | reference model on 288-bit integers |
| `tb/tb_*.sv` | one self-checking testbench per unit, plus `tb_dfp_accel` end to end |

## Verification

Each testbench compares the unit with `dfp_ref_pkg`. This is an independent
model that works on exact wide integers, with no BCD and no shifting
windows. It rounds by integer division and remainder. Random operands
cover full and short significands, equal significands (for cancellation),
exponents near each other, far apart and at both ends of the range, and
all seven directions. Directed cases add special values, overflow,
underflow, sticky borrows and the division example above.

| testbench | checks | covers |
|-----------|--------|--------|
| `tb_bcd_cpa` | 4000 | random and all-nines carry chains, ND = 16 and 3 |
| `tb_dfp_add` | 30016 | add/sub; counts inexact, overflow and the B > A path |
| `tb_dfp_mul` | 20286 | multiply, with exact ties in every direction; counts inexact, overflow, underflow |
| `tb_dfp_fma` | 20006 | FMA with all sign options |
| `tb_dfp_div` | 7644 | divide, latency, the correction step, specials |
| `tb_dfp_sqrt` | 7549 | square root, exact squares, latency, the correction step, specials |
| `tb_dpd_codec` | 4044 | round trips and known decimal64 bit patterns |
| `tb_dfp_accel` | 1414 | the whole accelerator over the bus |

`tb_dfp_accel` runs at default parameters. It acts as the host: it writes
operands, starts an operation, polls STATUS, and reads the result. It
checks the result, the flags and the latency of each operation. It fails
if any operation, rounding direction or flag never occurs, if busy is
never seen, or if an ignored CTRL write during a division or root never
happens.

To simulate with Verilator, for example:

    verilator --binary --top-module tb_dfp_accel -Irtl \
        rtl/dfp_pkg.sv rtl/*.sv tb/dfp_ref_pkg.sv tb/tb_dfp_accel.sv
    ./obj_dir/Vtb_dfp_accel

The package files must come first. The design needs no memory files.

## Where this design departs from the published units

* **Format.** Only decimal64 is built. The published work also has
  decimal128 (34 digits) adders, multipliers, dividers and square root.
  `bcd_cpa`, `dec_mult_core`, `dfp_addcore` and `dfp_round` take a digit
  count as a parameter. The package constants and the codec are fixed to
  decimal64.
* **Low-area adder.** The published work also has a second, low-area
  adder, but how it saves area is not described. Only the high-speed adder
  is here.
* **Rounding by injection.** The published adder injects a rounding value
  before the final addition. Here the result is shifted first and then
  incremented by a second fast adder. The results are the same, but the
  path is longer.
* **FMA structure.** The published FMA feeds the aligned addend into the
  multiplier's reduction tree and uses one 3p-digit final adder. Here the
  exact product is formed first and then added in a 2p-digit adder core.
  The results are the same, but the delay is higher.
* **Divider and square root details.** The published divider keeps intermediate values in
  redundant form and gets its start value by a modified Newton-Raphson
  step. Here intermediate values are plain BCD, and the start value comes
  from a 3-digit-indexed table (so three iterations are needed, not two).
  The divider and the square root each have their own multiplier. The
  fixed-addend multiply-add, truncation to 16 digits and the
  remainder-based rounding are as published. The published text describes
  the remainder check for the quotient only; here the root uses it too.
* **Pipelining and timing.** The add, multiply and FMA units here are
  single combinational blocks with no pipeline registers. Any pipelining
  of the published units is not reproduced. Add registers before
  targeting a fast clock.
* **Bus and host.** The register map, 32-bit width and polling protocol
  were chosen for this design. The host processor and the bus interconnect
  are not included. Their signals are the ports of `dfp_accel`.
