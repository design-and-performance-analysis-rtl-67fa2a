# Pipelined double-precision FPU with a table-and-multiplier divider

This is a fully pipelined IEEE-754 binary64 arithmetic unit that adds, subtracts, multiplies
and divides. Its distinctive part is the divider. Most dividers iterate, producing a few
quotient bits per cycle, or run Newton-Raphson steps one after another. This one finds the
quotient in a fixed, short pipeline:

- a small reciprocal table gives a first approximation of 1/R;
- one or two multiplier levels then correct that approximation;
- the table look-up runs in parallel with the first multiplications instead of before them.

A new operation of any kind can enter every cycle. Every result leaves a fixed number of
cycles later: 4 with the default divider, 5 with the alternative.

The design is synthesizable SystemVerilog (IEEE 1800-2017). It passes lint with Verilator and
elaborates with slang. Every module has a self-checking testbench.

## The division algorithm

Take the divisor significand R in [1,2). Split it into a high part Rh and a low part Rl:

- Rh is R truncated to its first `LUT_BITS` fraction bits;
- Rl = R − Rh, so 0 ≤ Rl < 2^-LUT_BITS.

Define

    A = (Rh − Rl) / Rh²

Since (Rh − Rl)(Rh + Rl) = Rh² − Rl², we get

    A·R = 1 − e,   with e = (Rl/Rh)² < 2^-(2·LUT_BITS)

So A is a reciprocal of R with a relative error of e. It costs a table of 1/Rh² indexed by
`LUT_BITS` bits, plus one multiplication by (Rh − Rl). The multiplication by (Rh − Rl) is
applied to the dividend P and to the divisor R separately, in parallel with the table
look-up:

- M1 = P·(Rh − Rl)
- M2 = R·(Rh − Rl)
- LUT = 1/Rh²

One more multiplier level then gives A·P (M3) and A·R (M4). A·P is the quotient with relative
error e. The two variants differ in how they remove that error:

| | Case 1 (default, `DIV_CASE = 1`) | Case 2 (`DIV_CASE = 2`) |
|---|---|---|
| formula | Q = (2 − A·R) · A·P | Q = ((2 − A·R)² − (1 − A·R)) · A·P |
| value | (1 + e)(1 − e) · P/R = (1 − e²) · P/R | (1 + e + e²)(1 − e) · P/R = (1 − e³) · P/R |
| relative error | e² < 2^-(4·LUT_BITS) | e³ < 2^-(6·LUT_BITS) |
| table for binary64 | `LUT_BITS = 14`: 16384 × 60 bits | `LUT_BITS = 10`: 1024 × 60 bits |
| multipliers | M1 to M5 | M1 to M6 |
| multiplier levels (latency) | 3 | 4 |

So Case 1 is faster, and Case 2 trades one more pipeline stage and one more multiplier for a
table 16 times smaller. The table sizes follow from the error bounds, not from any
published figure:

- Case 1: 4·14 = 56 bits of algorithmic accuracy;
- Case 2: 6·10 = 60 bits.

### Pipeline stages of the significand divider

| stage | Case 1 (`div_core_c1`) | Case 2 (`div_core_c2`) |
|---|---|---|
| before 1 | Rh − Rl (small subtractor) | same |
| 1 | M1 = P(Rh−Rl), M2 = R(Rh−Rl), table read of 1/Rh² | same |
| 2 | M3 = A·P, M4 = A·R | same |
| 3 | bit inversion → 2 − A·R; M5 = (2 − A·R)·A·P | bit inversion → 2 − A·R; M5 = (2 − A·R)²; A·P and 1 − A·R registered |
| 4 | — | add logic: M5 − (1 − A·R); M6 = that · A·P |

Each multiplier box is a registered `fix_mul`, and the table is a registered ROM
(`recip_lut`). A stage is therefore one clock cycle.

### Fixed-point formats and the bit inversion

Every intermediate value is unsigned fixed point with 2 integer bits and `F = 58` fraction
bits, 60 bits in all. All values stay below 4. Each product is truncated back to 58 fraction
bits.

The table stores 1/Rh² rounded down. Together with the truncations, this keeps A·R at or
below 1. That makes "2 − A·R" cheap: write 1 as the integer part and invert the fraction bits
of A·R. The result is exact to one unit of 2^-58. The single case A·R = 1 (R = 1.0) is
recognised and gives exactly 1.

In Case 2, 1 − A·R is simply the fraction field of that same inverted value.

### Accuracy

The approximate quotient q lies within about 2^-54 of P/R:

- the algorithmic error is below 2^-55 in absolute terms;
- the truncations add a few units of 2^-58 on either side.

The error can have either sign, because a truncated A·R makes 2 − A·R slightly too large.

`fp_div` normalises q, which lies in (0.5, 2), and rounds it to nearest-even. Because the
error is well under a quarter of a unit in the last place (ulp):

- every result is one of the two binary64 numbers around the exact quotient (faithful
  rounding);
- exactly representable quotients always come out exact;
- in random tests about 96% of results are the correctly rounded value (3835 of 4001 for
  Case 1, 3808 of 4001 for Case 2).

There is no remainder check to make every result correctly rounded. For the same reason the
inexact flag of a division describes the approximation: it is also raised for some exact
quotients.

## The rest of the ALU

- **`fp_addsub`** handles both addition and subtraction; `in_sub` negates B. It works in two
  stages:
  1. order the operands by magnitude, shift the smaller significand right into guard and
     round bits plus a sticky bit, then add or subtract;
  2. normalise with a leading-zero count, then round to nearest-even.

  Exact cancellation gives +0.
- **`fp_mul`** also works in two stages:
  1. form the 53×53-bit significand product, the exponent sum and the sign;
  2. normalise by at most one position, then round to nearest-even.
- **`fp_div`** sits around the significand divider. It computes the sign and the exponent
  difference and handles special operands. Its side information travels in a `pipe_delay`
  chain alongside the core. Normalisation and rounding take one more stage after the core.

### Number format policy (all units)

- Rounding is to nearest, ties to even.
- Subnormal operands are read as zero (*denormals-are-zero*). Results that would be
  subnormal become a signed zero, with the underflow and inexact flags set (*flush-to-zero*).
  Tininess is judged on the rounded exponent, so a value that rounds up to the smallest normal
  number is kept.
- NaN inputs give the quiet NaN `7FF8_0000_0000_0000`.
- These raise *invalid*: 0·∞, ∞ − ∞, 0/0, ∞/∞ and signalling NaNs.
- x/0 with a finite, non-zero x gives a signed infinity and raises *divide-by-zero*.
- Overflow gives a signed infinity.
- Flags are `{nv, dz, of, uf, nx}` (`fpu_pkg::fp_flags_t`).

## The top: `fpu_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | asynchronous active-low reset (clears the valid bits only) |
| `in_valid` | in | 1 | issue an operation this cycle |
| `in_op` | in | 2 | `OP_ADD`=0, `OP_SUB`=1, `OP_MUL`=2, `OP_DIV`=3 |
| `in_a`, `in_b` | in | 64 | operands; for division A is the dividend |
| `out_valid` | out | 1 | result valid |
| `out_op` | out | 2 | the operation this result belongs to |
| `out_result` | out | 64 | binary64 result |
| `out_flags` | out | 5 | `{nv, dz, of, uf, nx}` |

The add/subtract unit and the multiplier take 2 cycles each. Their results are padded with
registers to the divider's latency: `LATENCY` = 4 for Case 1 and 5 for Case 2. Results
therefore leave in issue order, exactly `LATENCY` cycles after `in_valid`, and never collide.
There is no back-pressure: the pipeline never stalls.

Three concurrent assertions check that each unit's output lines up with the tracked opcode.

Parameters:

- `DIV_CASE` (1 or 2) chooses the divider variant.
- `LUT_BITS` defaults to 14 for Case 1 and 10 for Case 2. A smaller value shrinks the table
  but costs accuracy. Below those defaults, results are no longer guaranteed to be faithful.

## How far this follows the source design

This RTL is written from a published description of a "ternary-logic based" double-precision
ALU.

Taken from that description:

- the set of four operations;
- the pipelined organisation;
- the two divider algorithms, and which multiplier forms which product;
- the table of 1/Rh², read in parallel with the first multipliers;
- the bit inversion and the "add logic";
- the latencies of 3 and 4 multiplier levels;
- the 58-bit width of the add logic.

Chosen here, because the description does not give them:

- the table sizes (derived from the error bounds above);
- truncation in the multipliers;
- where Rh − Rl is computed;
- everything outside the significand divider: exponents, special values, rounding mode,
  flush-to-zero, flags;
- the algorithms of the adder/subtractor and the multiplier, which are described only by
  their FPGA results;
- the issue interface and the padding to a common latency;
- the opcode encoding and the reset.

Not built:

- **Ternary logic.** The description names ternary inverter types (negative, positive,
  standard and decrement-cycling) but never says which signals are ternary or how the
  inverters enter the arithmetic. Everything here is ordinary binary logic.
- **The clock-efficient distribution system.** It is named as part of the design but not
  described. The RTL has one ordinary clock.

## Files

| file | contents |
|---|---|
| `rtl/fpu_pkg.sv` | `fp64_t`, `fpu_op_e`, `fp_flags_t`, special-value helpers, shared round-and-pack function |
| `rtl/fpu_top.sv` | the ALU top |
| `rtl/fp_addsub.sv` | adder/subtractor |
| `rtl/fp_mul.sv` | multiplier |
| `rtl/fp_div.sv` | divider: exponent, specials, normalise and round, selects the core |
| `rtl/div_core_c1.sv`, `rtl/div_core_c2.sv` | significand dividers, Case 1 and Case 2 |
| `rtl/recip_lut.sv` | 1/Rh² table, computed at ROM initialisation by an `initial` loop |
| `rtl/fix_mul.sv` | registered truncating fixed-point multiplier (M1 to M6) |
| `rtl/pipe_delay.sv` | register chain for side information and latency padding |
| `tb/tb_fp_ref_pkg.sv` | reference model: the simulator's IEEE `real` arithmetic with the flush-to-zero policy applied |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_fpu_top_case2` |

The table is built by evaluating

    entry[i] = floor(2^(58 + 2·LUT_BITS) / (2^LUT_BITS + i)²)

in an `initial` block. FPGA flows turn that into an initialised ROM. An ASIC flow would need
the table synthesised as logic or supplied as a ROM macro.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/fpu_pkg.sv tb/tb_fp_ref_pkg.sv tb/tb_fpu_top.sv --top-module tb_fpu_top
    ./obj_dir/Vtb_fpu_top

Swap in any other testbench name. Each testbench prints `TB_RESULT checks=N failures=M` and
stops itself; a watchdog ends a hung run with a failure.

| testbench | what it checks |
|---|---|
| `tb_fpu_top` | 6000 mixed operations at the default parameters, mostly back to back, with idle gaps and special operands. Checks result, opcode and the 4-cycle latency. Counts each mechanism (each operation, specials, divide-by-zero, overflow, underflow, cancellation, a divide right after another unit's operation, idle cycles) and fails if one never occurs. |
| `tb_fpu_top_case2` | the same with `DIV_CASE = 2` and a 5-cycle latency |
| `tb_fp_addsub`, `tb_fp_mul` | directed cases with flags, plus 4000 random operations each, bit-exact against IEEE double arithmetic; latency 2 |
| `tb_fp_div` | both divider variants side by side: specials and exact quotients bit-exact, random quotients within 1 ulp; reports the correctly rounded share; latencies 4 and 5 |
| `tb_div_core_c1`, `tb_div_core_c2` | raw significand quotients against exact integer division. The error must be at most 16 units of 2^-58 below and 4 above; latencies 3 and 4 |
| `tb_recip_lut` | table entries checked without division: q·Rh² ≤ 1 < (q+1)·Rh² |

The whole set runs in seconds.

## Cost

With default parameters, a generic synthesis of the top gives:

- about 900 flip-flop bits;
- a ROM of 16384 entries, about 0.97 Mbit (synthesis keeps 59 of the 60 bits of each entry: 1/Rh² ≤ 1, so the top bit is always zero);
- six wide multipliers: five 60×60 in the divider and one 53×53.

With `DIV_CASE = 2` the ROM drops to 1024 entries (about 60 kbit), while the divider gains a sixth 60×60
multiplier and one more stage.
