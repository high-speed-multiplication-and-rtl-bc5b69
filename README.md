# Direct-form FIR filter with a carry-select based MAC

Every tap of a direct-form FIR filter is a multiply-and-accumulate (MAC)
operation. The filter's speed and size therefore come down to one multiplier
and one adder, repeated. This design makes both from one adder, a
*modified square-root carry select adder (SQRT CSLA)*:

- it is the accumulation adder of every tap;
- it is the final adder of a *reduced complexity Wallace multiplier*.

The modified adder does not use the usual pair of ripple carry adders, or
the binary-to-excess-1 converter, to build the "carry in = 1" result.
Instead, each carry-select group computes two carry chains and selects
between them with one small AND-OR cell, `ab+c`. That cell is used everywhere
in the group.

The filter computes

    y(n) = sum_{k=0}^{N-1} C_k * x(n-k)

It has 8 taps by default. Samples and coefficients are unsigned 8 bits, and
each product is 16 bits. The output is 16 bits, with an overflow flag.

## Files

| file | module | what it is |
|---|---|---|
| `rtl/arith_pkg.sv` | package | elaboration-time functions: adder partition, Wallace reduction plan |
| `rtl/ab_plus_c.sv` | `ab_plus_c` | `x = a&b | c` carry cell |
| `rtl/half_adder.sv` | `half_adder` | half sum / generate |
| `rtl/full_adder.sv` | `full_adder` | 3:2 counter |
| `rtl/rca2.sv` | `rca2` | 2-bit ripple carry adder, bits [1:0] of the SQRT CSLA |
| `rtl/mod_csla_group.sv` | `mod_csla_group` | one modified carry-select group (W bits) |
| `rtl/mod_sqrt_csla.sv` | `mod_sqrt_csla` | 16-bit square-root carry select adder |
| `rtl/rc_wallace_mult.sv` | `rc_wallace_mult` | 8x8 reduced complexity Wallace multiplier |
| `rtl/mac_unit.sv` | `mac_unit` | `acc_out = acc_in + x*c` |
| `rtl/fir_direct.sv` | `fir_direct` | the filter, top level |

Each module has a self-checking testbench `tb/<module>_tb.sv`.

## The modified carry-select group

A group of W bits with operands `a`, `b` and group carry `cin` has five
parts. All of them are combinational.

| unit | per bit | equation |
|---|---|---|
| HSG, half sum generation | one half adder | `h[i] = a[i]^b[i]`, `g[i] = a[i]&b[i]` |
| CG0, carries if cin = 0 | `ab+c` cells, bits 1..W-1 | `c0[0] = g[0]`; `c0[i] = h[i]&c0[i-1] | g[i]` |
| CG1, carries if cin = 1 | `ab+c` cells, bits 1..W-1 | `c1[0] = h[0] | g[0]` (= a0|b0); `c1[i] = h[i]&c1[i-1] | g[i]` |
| CS, carry selection | one `ab+c` cell per bit | `c[i] = c1[i]&cin | c0[i]` |
| FSG, full sum generation | XOR | `s[0] = h[0]^cin`; `s[i] = h[i]^c[i-1]`; `cout = c[W-1]` |

The selection is a single AND-OR, not a multiplexer. It is exact because
`c0[i] = 1` always implies `c1[i] = 1`. Both carry chains depend only on `a`
and `b`. So when `cin` arrives late, every carry and sum bit of the group is
at most one `ab+c` cell plus one XOR away from it. For W = 4 this gives
3 + 3 chain cells, 4 selection cells, 4 half adders and 4 XORs.

## The 16-bit square-root partition

```
 [15:11]      [10:7]      [6:4]      [3:2]      [1:0]
 group 5 bit <- group 4 <- group 3 <- group 2 <- 2-bit RCA <- cin
 cout
```

Only the selection carries ripple from group to group, one `ab+c` cell per
group. Each group's two carry chains run in parallel with those of every
other group. A group's own chain delay grows with its width, and it has to
be ready by the time its carry in arrives. That is why the groups get wider
towards the top.

`mod_sqrt_csla` takes a `WIDTH` parameter, 16 by default. Other widths keep
the same rule: a 2-bit RCA, then groups of 2, 3, 4, 5, 6, ... bits, with the
last group cut short. `arith_pkg::csla_lo/csla_size/csla_ngroups` compute
the partition. Only the 16-bit case is the documented configuration.

## The reduced complexity Wallace multiplier

`rc_wallace_mult` computes `p = a * b`, unsigned, with `W = 8` by default. It
works in three steps.

1. **Partial products.** There are W² AND gates. Row `i` is `b & {W{a[i]}}`,
   shifted left by `i`, which gives the triangular dot matrix.
2. **Reduction.** Each stage splits the rows into groups of three. Each
   column of a group is then handled by how many bits it holds:
   - three bits go into a full adder; the sum goes to the group's sum row in
     the same column, and the carry goes to its carry row one column up;
   - one or two bits move to the next stage unchanged;
   - a pair is the exception. If the carry row's slot in that column is
     already taken by the carry from the column below, the pair cannot move
     on unchanged, and a half adder takes it instead.

   Rows left over after grouping (one or two) pass unchanged. Every group of
   three rows becomes two, so 8 rows go 8 → 6 → 4 → 3 → 2 in four stages.
   The 8x8 multiplier uses 38 full adders and 8 half adders.
3. **Final addition.** The two remaining 16-bit rows go into the 16-bit
   modified SQRT CSLA, with carry in 0.

The layout of each stage (which column of which group gets a full adder,
half adder or pass-through) is not written out by hand. The functions
`rcw_rows`, `rcw_mask`, `rcw_group_ops` and `rcw_op` in `arith_pkg` work it
out at elaboration. They replay the rule above on the valid-bit mask of
every row. The generate loops in `rc_wallace_mult` then place one cell per
column from the result, so any `W` gives a consistent netlist. The testbench
checks 4x4, 5x5 and 8x8 exhaustively. The carries out of the top column
cannot be 1, because the product fits in 2W bits, so they are left
unconnected.

## MAC unit and filter

`mac_unit` puts the multiplier in front of a `mod_sqrt_csla` of `ACC_W` = 16
bits:

    {acc_cout, acc_out} = acc_in + x*c

It holds no state.

`fir_direct` is the direct form:

- `x_in` is the current sample x(n);
- registers `xd[1..N-1]` form the z⁻¹ chain, holding x(n-1) .. x(n-N+1);
- tap k is a `mac_unit` that adds `coef[k] * x(n-k)` to the partial sum from
  tap k-1;
- tap 0 starts from zero, and the last tap's sum is `y`.

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `rst_n` | in | 1 | asynchronous, active low; clears the delay line |
| `en` | in | 1 | on a rising edge with `en` = 1 the delay line shifts in `x_in` |
| `x_in` | in | 8 | x(n) |
| `coef` | in | 8 × N_TAPS | C_0 .. C_{N-1}; may change at any time |
| `y` | out | 16 | y(n) mod 2¹⁶ |
| `ovf` | out | 1 | some accumulation adder carried out, so y has wrapped |

**Timing.** `y` is combinational from `x_in`, `coef` and the delay line, so
there is no output register. An impulse on `x_in` shows `C_0` at once and
`C_k` after k enabled clock edges. The critical path runs through one
multiplier and N_TAPS chained 16-bit adders. Nothing is pipelined.

**Parameters.**

| parameter | default | notes |
|---|---|---|
| `N_TAPS` | 8 | |
| `W` | 8 | sample and coefficient width |
| `ACC_W` | 16 | must be ≥ 2W; an assertion checks this |

The coefficients are ports rather than constants because the multipliers
are general-purpose.

## What is taken from the design and what is chosen here

These follow the original architecture:

- the `ab+c` cell;
- the HSG / CG0 / CG1 / CS / FSG structure of a 4-bit group;
- the 16-bit partition [1:0] RCA, [3:2], [6:4], [10:7], [15:11];
- AND-gate partial products reduced in three-row groups with full adders,
  single bits and pairs passed on, and four stages for 8 rows;
- the modified SQRT CSLA as the multiplier's final adder and as the
  accumulation adder;
- the direct-form filter with 8-bit coefficients and 16-bit products.

These are this implementation's own choices:

- **Half adders.** They are placed only where a passed pair meets an
  occupied carry slot. The original says only that few half adders are used.
- **Extension to W ≠ 4.** Group widths other than 4 repeat the same bit
  slice. The reduction plan is computed for any multiplier width.
- **Filter details:**
  - unsigned arithmetic;
  - 8 taps;
  - an 8-bit sample width, inferred from the 16-bit product;
  - a 16-bit accumulation chain that wraps, with an `ovf` flag, because no
    wider adder is specified;
  - the sample enable;
  - the asynchronous reset;
  - no output register.
- **Comparison baselines are not included.** These are the BEC-based
  carry-select adder and the Wallace multiplier with a modified carry-save
  final adder.
- **Results are not reproduced.** The published area, delay and power
  figures (slices, LUTs, ns, mW on an FPGA) are not reproduced here.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`, and each has a
watchdog. They check:

- the `ab+c` cell, half adder, full adder and 2-bit RCA: exhaustive;
- `mod_csla_group`: widths 2, 3, 4 and 5, exhaustive;
- `mod_sqrt_csla`: 16 bits and 13 bits, with directed carry-ripple cases
  and 20 000 random vectors;
- `rc_wallace_mult`: 8x8 (all 65 536 pairs), 4x4 and 5x5, plus the row count
  of every stage;
- `mac_unit`: corner cases around 2¹⁶ and 20 000 random vectors;
- `fir_direct`, at its default size, against an integer model:
  - the impulse response and the delay of each tap;
  - small in-range data and full-range data with overflow;
  - the enable held low;
  - coefficients changed mid-stream;
  - reset mid-stream.

  The testbench counts each of these and fails if one never happened.

Run a testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/arith_pkg.sv tb/fir_direct_tb.sv --top-module fir_direct_tb
./obj_dir/Vfir_direct_tb
```

Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/arith_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are about unused bits: the top-column carries
and row bits above the matrix in the multiplier, and the final adder's
carry out.
