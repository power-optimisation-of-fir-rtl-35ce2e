# An 8-tap FIR filter that multiplies by adding exponents, with DBNS map arithmetic

The top level, `dbns_top`, holds four independent units that share only a
clock and a reset:

* `dbns_fir`, the filter described first below;
* `dbnr_index_calc`, which multiplies or divides two double-base digits;
* `dbns_greedy_conv`, `dbns_map_add` and `dbns_map_mul`, which convert an
  integer to a two-dimensional double-base *map* and add or multiply such
  maps (see [Map arithmetic](#map-arithmetic)).

The filter does not use the map units; they are the number system's general
arithmetic, built alongside it.

## The filter

A fixed-coefficient FIR filter spends most of its area and switching power in
its multipliers. This design removes them. Every sample and every coefficient
is held as one *double-base* digit

    x  ~  s * 2^b * 3^t        (s = +-1, b and t signed integers)

and the product of two such digits needs no multiplier at all: the signs
multiply and the exponents add,

    (s1, b1, t1) * (s2, b2, t2) = (s1*s2, b1+b2, t1+t2).

This is *index calculus* in the double-base number system (DBNS). Only one
step is left before the products can be summed in ordinary binary: turning
`2^(b1+b2) * 3^(t1+t2)` back into a fixed-point number. A small ROM gives
`3^t` as a floating-point value `m * 2^n`, an adder folds `n` into the binary
exponent, and a barrel shifter places the mantissa `m` at the right binary
position. The filter is a chain of eight such *Inner Product Step Processors*
(IPSPs), each computing `a_out = a_in + d * c`.

Because the exponents may be negative, one digit can come close to any value.
It is exact only for 2-integers (1, 2, 3, 4, 6, 8, 9, 12, 16, 18, ...); every
other sample is replaced by the nearest digit, so the filter output is a close
approximation of the exact convolution, not a bit-exact copy of it (see
[Accuracy](#accuracy)).

## Block structure

```
            +---------------+   dbnr_t   +------+
 x[7:0] --->| dbnr_conv_rom |----------->| d_reg|---+---------+--- ... ---+
            +---------------+            +------+   |         |           |
                                                    v         v           v
                               0 --> [ipsp 7] --> [ipsp 6] --> ... --> [ipsp 0] --> y, y_int
                                       c7           c6                   c0
```

| Module | Role |
|---|---|
| `dbns_pkg` | Widths, the operand type `dbnr_t`, and the elaboration-time functions that build both ROMs and convert the coefficients. |
| `dbnr_conv_rom` | Data-conversion ROM: 8-bit sample to its nearest double-base digit. 256 entries, combinational. |
| `ter_rom` | Ternary ROM: exponent sum `t` to `3^t = m * 2^(n-15)`. 128 entries, combinational. |
| `barrel_shifter` | `p = floor(m * 2^sh)` for `sh` in -16..+16; logarithmic, combinational. |
| `ipsp` | One tap: exponent adders, ternary ROM, exponent-sum adder, barrel shifter, sign, accumulate adder, register. |
| `dbns_fir` | The filter: one conversion ROM, a data register broadcast to all taps, eight IPSPs in a chain. |
| `dbnr_index_calc` | Product or quotient of two digits: exponents added or subtracted, signs combined; combinational. |
| `dbns_map_pkg`, `dbns_reduce_step`, `dbns_greedy_conv`, `dbns_map_add`, `dbns_map_mul` | Map arithmetic, next section but one. |
| `dbns_top` | Top: all of the above side by side, ports prefixed `fir_`, `calc_`, `conv_`, `add_`, `mul_`. |

### The operand: `dbnr_t`

| Field | Bits | Meaning |
|---|---|---|
| `zero` | 1 | value is 0 (the other fields are then 0) |
| `neg`  | 1 | sign |
| `b`    | 8 | binary exponent, two's complement |
| `t`    | 6 | ternary exponent, two's complement, -32..31 |

The digit for an integer `v` is the pair `(b, t)` that minimises
`|log2|v| - b - t*log2(3)|` over the ternary range, with ties resolved toward
the smallest `|t|`; for a given `t`, `b` is the integer nearest to
`log2|v| - t*log2(3)`. 2-integers therefore get their natural exponents
(12 -> b=2, t=1). Both ROMs are computed by constant functions in `dbns_pkg`
when the design is elaborated; there are no data files.

### Inside one IPSP

All of this is combinational except the final register:

1. `bsum = d.b + c.b` (9 bits) and `tsum = d.t + c.t` (7 bits, -64..62).
2. `ter_rom(tsum)` gives the 16-bit mantissa `m` (1.15 format, top bit set,
   rounded to nearest) and the binary exponent `n` with
   `3^tsum ~ m * 2^(n - 15)`.
3. `esum = bsum + n` (10 bits).
4. `barrel_shifter(m, esum)` gives `|d*c|` in fixed point with 15 fraction
   bits: `floor(m * 2^esum)`. Right shifts truncate.
5. The product is negated if exactly one operand is negative and forced to
   zero if either operand is zero.
6. `a_out <= a_in + product` at the rising clock edge.

For 8-bit operands `esum` stays between -1 and +15, well inside the shifter's
+-16 places. An amount beyond +16 would saturate the product and raise `ovf`;
it cannot occur with 8-bit data and coefficients but is flagged for safety if
the widths are changed.

### The filter chain and its timing

The taps form a transposed direct-form FIR. The converted sample is registered
once (`d_reg`) and broadcast to every tap; tap `k` multiplies it by
`COEFFS[k]`, adds the partial sum registered by tap `k+1`, and registers the
result. Tap 7 starts from zero and tap 0's register is the output:

    y[i] = sum_{k=0..7} COEFFS[k] * x[i-k]        (approximately, see below)

* One sample per clock, no handshake.
* Latency 2 clocks: a sample applied before rising edge `i` appears in `y`
  after edge `i+1`.
* `y` is 36-bit two's-complement fixed point with 15 fraction bits;
  `y_int` (21 bits) is `y` rounded to the nearest integer, halves up.
* `rst` is synchronous and active high; it clears `d_reg` (to the zero digit)
  and every tap.
* The coefficients are a parameter (`COEFFS`, default `1 2 3 4 4 3 2 1`) and are
  converted to digits at elaboration by the same function that fills the
  conversion ROM, so only the input samples go through the ROM at run time.

## Accuracy

* One digit with `t` in -32..31 is within 0.67 % of any integer up to 128
  (0.0097 in log2). Coefficients and samples that are 2-integers are exact.
* A product is therefore within about 1.4 % of the true product, plus the
  ternary ROM's rounding (at most 2^-16 relative) and the shifter's truncation
  (less than 2^-15 absolute).
* When every sample in the 8-sample window is a 2-integer or zero, and the
  coefficients are 2-integers (as the defaults are), `y` is exact. The impulse
  response reproduces the coefficients exactly, and the ramp 1..10 gives
  `130 139 136 120 90 56 29 10` as the window drains, the first value being the
  exact `1*10 + 2*9 + 3*8 + 4*7 + 4*6 + 3*5 + 2*4 + 1*3 = 130`.
* For arbitrary samples `y_int` stays within 2 % of `sum |c_k x_k|` (plus one)
  of the exact convolution; the testbench checks this on 4000 random samples.

The ternary range (`TEXP_W` in `dbns_pkg`) is the knob: each extra bit doubles
the ternary ROM and roughly halves the worst-case error of a digit.

## Index calculus on single digits

`dbnr_index_calc` applies the two rules directly:

    a * b = (s_a*s_b, b_a + b_b, t_a + t_b)
    a / b = (s_a*s_b, b_a - b_b, t_a - t_b)

so `32 * 27 = (2^5 3^0) * (2^0 3^3) = 2^5 3^3 = 864` and
`54 / 27 = (2^1 3^3) / (2^0 3^3) = 2^1 = 2`. `div` selects division. The
result stays a `dbnr_t` (no conversion to binary). A zero operand gives a zero
result; a zero divisor raises `div0`; `ovf` is raised when a result exponent
does not fit the 8-bit binary or 6-bit ternary field. Combinational.

## Map arithmetic

A number can also be written as a sum of several 2-integers and drawn as a map:
cell `[j][i]` (row `j`, column `i`) stands for `2^i * 3^j`, and the number is
the sum of the active cells. On a 4 x 4 map the columns are 1, 2, 4, 8 and the
rows 1, 3, 9, 27; for example `88 = 72 + 12 + 4` sets cells `[2][3]`, `[1][2]`
and `[0][2]`.

**Reduction.** Inside the adder and multiplier a cell holds a count 0..3, and
`dbns_reduce_step` applies one value-preserving rewrite per call:

| Rewrite | Identity | Effect |
|---|---|---|
| carry | `2 * 2^i 3^j = 2^(i+1) 3^j` | a count of 2 becomes one cell to its right |
| rule I | `2^i 3^j + 2^(i+1) 3^j = 2^i 3^(j+1)` | 1 + 2 = 3 |
| rule II | `2^i 3^j + 2^i 3^(j+1) = 2^(i+2) 3^j` | 1 + 3 = 4 |
| rule III | `2^i 3^j + 2^(i+1) 3^j + 2^i 3^(j+1) = 2^(i+1) 3^(j+1)` | 1 + 2 + 3 = 6 |

Carries come first, then III, I, II, each at the first matching cell in
row-major order, and a rule is only applied where its result cell is inside
the map. A carry out of the last column cannot be held: the operation reports
overflow. The map is *reduced* when no rewrite applies.

**Conversion** (`dbns_greedy_conv`). Repeatedly take the largest 2-integer
that does not exceed the remainder. One cell per clock; `done` pulses after
(number of cells + 1) clocks. On the 4 x 4 map every value below 432 converts;
at 432 the search would pick an already-used cell and `err` is raised.

**Addition** (`dbns_map_add`). The two 4 x 4 maps are laid over each other
(overlapping cells count 2) in a 5 x 5 result map -- one extra row and column
for reductions that run past the edge -- and reduced one rewrite per clock.
Sums of dense maps can still overflow (a carry out of the last column);
`ovf` then marks `sum` as invalid.

**Multiplication** (`dbns_map_mul`). The product of two cells adds their
indices. For each active cell of `a`, `b` shifted by that cell's row and
column is laid over an 8 x 8 product map, which is then reduced before the
next cell. Overflow is again flagged.

All three units use the same handshake: pulse `start` while `busy` is low;
the operands are sampled at that edge; `done` pulses for one cycle when the
result and its flags are valid, and they hold until the next `start`. Reset
is synchronous and active high.

## What follows the source design and what is chosen here

Taken from the published design: the single-digit DBNS operands with signed
exponents and index-calculus products; one data-conversion ROM; the IPSP
datapath (binary adder, ternary adder, ternary ROM to `m * 2^n`, exponent-sum
adder, barrel shifter with a +-16 place range, accumulate adder); eight IPSPs
fed by one broadcast input and chained, all clocked; 8 taps, 8-bit data and
8-bit fixed coefficients; the index-calculus product and quotient rules; the
map orientation, greedy conversion, overlay addition, cell-by-cell
multiplication, reduction rules I-III, the right shift of overlapping cells
and the extra row and column.

Chosen here, because the source leaves it open:

* all widths other than 8-bit data and coefficients: 8-bit binary and 6-bit
  ternary exponents, 16-bit mantissa, 15 fraction bits, 36-bit accumulator;
* the rule that picks a digit for an integer (nearest in log2) and the zero flag;
* two's-complement data and coefficients;
* the coefficient values, which the source does not list;
* the data register, the register in every IPSP, the chain's direction, the
  latency of 2 and the synchronous active-high reset;
* the logarithmic shifter, truncation of right shifts and saturation;
* the zero, overflow and divide-by-zero flags of the index-calculus unit;
* for the maps: 4 x 4 operands, counts per cell, the order in which rewrites
  are applied, reducing until nothing applies, one rewrite per clock, the
  8 x 8 product map and the start/busy/done handshake;
* putting all units side by side in one top, since the source does not
  connect the map arithmetic to the filter.

Known departures and gaps:

* The source reports that its filter's outputs match a conventional
  multiplier-based filter. With one digit per operand that holds only when
  the operands are 2-integers; in general the outputs here are close
  approximations (see above).
* The synthesised hierarchy of the source shows nine IPSP instances for an
  8-tap filter; eight are built here, one per tap.
* The conventional multiplier filter that the source compares against is not
  included; the testbench computes the exact convolution instead.
* Power and delay numbers cannot be reproduced in RTL simulation.
* The source draws its representation map (the map of 88) with five columns,
  1..16, and its arithmetic maps with four; all maps here default to 4 x 4
  (`ROWS`, `COLS`). 88 fits either way.
* The source's prose says rule I removes two cells in one column and rule II
  two in one row; with columns as powers of two its formulas say the reverse.
  The formulas are followed.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/dbns_ref_pkg.sv` holds the real-number
reference (nearest-digit search, digit values) and `tb/dbns_map_ref_pkg.sv`
the map reference (map value, "is reduced"), shared by the testbenches.
Packages must come first. For the whole design, at its default size:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dbns_top \
  rtl/dbns_pkg.sv rtl/dbns_map_pkg.sv tb/dbns_ref_pkg.sv tb/dbns_map_ref_pkg.sv \
  $(ls rtl/*.sv | grep -v _pkg) tb/tb_dbns_top.sv
./obj_dir/Vtb_dbns_top
```

Replace `tb_dbns_top` by any other testbench name to run one block.

| Testbench | What it checks |
|---|---|
| `tb_dbnr_conv_rom` | all 256 samples: flags, range, optimality of the digit, exact 2-integers |
| `tb_ter_rom` | all 128 exponent sums: normalisation and error of `m * 2^n` against `3^t` |
| `tb_barrel_shifter` | every amount -20..20 with random mantissas, saturation, underflow |
| `tb_ipsp` | 3000 random products against real arithmetic, exact products bit for bit, signs, zeros, overflow flag, reset |
| `tb_dbns_fir` | the filter at default size: impulse, ramp, 4000 random samples, mid-stream resets, latency, three output checks per cycle |
| `tb_dbnr_index_calc` | 32 * 27 and 54 / 27, random products and quotients against real arithmetic, zero, div0 and overflow flags |
| `tb_dbns_reduce_step` | directed maps: the cell each rewrite writes; random count maps: value kept, count falls, carry before rules, overflow leaves the map unchanged, no rule missed |
| `tb_dbns_greedy_conv` | every 8-bit value: map equals the greedy reference, value, digit count, latency; 88; a 10-bit instance: 431 converts, 432 raises err |
| `tb_dbns_map_add` | one-rewrite sums (1+1, 1+2, 1+3, 1+2+3); random map pairs of every density: sum value and reduced result whenever ovf is low, timing |
| `tb_dbns_map_mul` | small products (3*4, 2*27, 3*3, 0*3); random map pairs: product value and reduced result whenever ovf is low, timing |
| `tb_dbns_top` | everything through the top: the filter stream, converted integers added and multiplied, dense maps, index calculus |

`tb_dbns_fir` counts how often exact windows, approximated samples, negative
products, zero samples and resets occur; `tb_dbns_top` additionally counts each
rewrite kind and overflow in the adder and multiplier and each index-calculus
case. Both fail if any of them never occurs.

## Changing the design

* Map size: `ROWS`, `COLS` on `dbns_top` (and the map units). The converter's
  input width is `X_W` on `dbns_greedy_conv`.

* Coefficients: override `COEFFS` on `dbns_fir` (eight signed 8-bit values).
  The testbench's reference uses its own copy of the defaults; change both.
* Number of taps: `TAPS`; the accumulator widens by `$clog2(TAPS)`.
* Exponent and mantissa widths live in `dbns_pkg`. If you widen the data
  beyond 8 bits, check that `b1+b2+n` stays within the shifter's +-16
  places (or raise `SHIFT_MAX`), since products grow past 2^16.
