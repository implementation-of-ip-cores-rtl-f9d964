# Bit-serial modular multipliers for public-key cryptography

RSA, Diffie-Hellman and elliptic-curve cryptography all spend nearly all
their time computing `X * Y mod M` on numbers hundreds to thousands of bits
long. A full multiply followed by a division is far too expensive in
hardware at those widths. This RTL uses the other approach: it takes one bit
of `X` per clock cycle and reduces modulo `M` as it goes, so no division is
ever done and no intermediate value grows much beyond `M`.

Three such multiplier cores are provided. They have the same pins and the
same timing:

| core | computes | loop datapath | output stage |
|---|---|---|---|
| `mont_fast`: faster Montgomery | `X*Y*2^-N mod M` | one carry-save adder, operand chosen from {0, M, Y, Y+M} | one carry-propagate add, then a conditional subtract |
| `mont_std`: standard Montgomery | `X*Y*2^-N mod M` | two carry-propagate adders | conditional subtract |
| `interleaved_mm`: interleaved (Blakley) | `X*Y mod M` | one adder and two compare/subtract stages | none |

A fourth unit, `modexp_rl`, computes `base^e mod n` with two `mont_fast`
cores, which is the operation the multipliers are meant to serve.
`modmul_top` places all four side by side.

All widths are parameters. The default is `N = 1024` bits, the size of an
RSA modulus.

## Montgomery multiplication in one page

A Montgomery core does not return `X*Y mod M`. It returns
`Mont(X, Y) = X * Y * 2^-N mod M`, which needs an odd `M`. The trick is
simple. In each of the `N` iterations the partial result `P` first gets
`x_i * Y` added to it. If `P` is then odd, `M` is added, which does not
change `P mod M` but makes `P` even. Now `P` can be halved exactly. `X` is
scanned LSB first, so after `N` halvings the result has been divided by
`2^N`. `P` stays below `2M` throughout, so a single conditional subtraction
at the end gives the reduced result.

To get an ordinary product, take one operand into the "Montgomery domain"
first:

```
Xm = Mont(X, 2^(2N) mod M)   = X * 2^N mod M
P  = Mont(Xm, Y)             = X * Y mod M
```

So a single modular multiplication costs two passes through a Montgomery
core. A long chain of multiplications, as in exponentiation, stays in the
domain and pays the conversion only once at each end. The constant
`2^(2N) mod M` depends only on the modulus. The user computes it once per
key and supplies it. No unit here computes it.

The interleaved core needs no conversion. It scans `X` from the MSB and
computes `P := 2P + x_i*Y`. Then it subtracts `M` up to twice, because
`2P + Y < 3M`. The price is two full-width comparisons and subtractions
inside every iteration. Each of these is a carry chain `N` bits long.

## The faster Montgomery loop (`mont_fast`)

This core is the most involved, and the fastest: its loop contains no carry
chain at all.

**Carry-save state.** The partial result is held as two words, `S` and `C`,
with value `S + C`. Each iteration adds a third word `I` using one row of
independent full adders (`csa.sv`). That row returns a new sum word and a
carry word, and its delay is one full adder whatever `N` is.

**One operand per iteration.** The standard method adds `x_i*Y`, then looks
at the parity of the result and possibly adds `M`. The faster method
decides both additions at once. It uses the parity of `S + C`, which is
`s_0 xor c_0`, the bit `x_i`, and `y_0`. Together these pick the single
operand that makes `S + C + I` even:

| `x_i` | condition | operand `I` |
|---|---|---|
| 0 | `s_0 == c_0` (sum even) | 0 |
| 0 | `s_0 != c_0` (sum odd) | `M` |
| 1 | `s_0 ^ c_0 ^ y_0 == 0` | `Y` |
| 1 | `s_0 ^ c_0 ^ y_0 == 1` | `Y + M` |

The table is addressed by `{x_i, y_0, c_0, s_0}` (`lut_addr_t` in
`modmul_pkg.sv`). `Y + M` is computed once, while the operands are loaded,
and kept in a register. This keeps the wide adder out of the loop.

**Halving two words separately.** The carry word from the CSA is always
even, because it is a majority vector shifted up one place. `S + C + I` is
even by the table's choice. So the sum word is even too, and each word can
be halved by dropping its LSB. This is wiring only. An assertion
(`a_even`) checks that the sum word's LSB is always zero.

**Widths.** `S + C < Y + M < 2M` holds before and after each iteration. So
`S` and `C` are `N+1` bits and the CSA works on `N+2` bits.

**Output.** After `N` iterations a single `N+1`-bit addition forms `S + C`.
A comparator then selects `S + C - M` if it is `>= M`. This carry-propagate
path sits outside the loop and is combinational on the `p` output. In an
implementation that needs `p` at the loop's clock rate, register it or
allow it several cycles.

## Pins and timing (all three multipliers)

| pin | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `reset` | in | 1 | synchronous, active high: load operands and restart |
| `x`, `y` | in | N | operands, `0 <= x, y < m` |
| `m` | in | N | modulus (must be odd for the Montgomery cores) |
| `p` | out | N | result, valid while `done` is high |
| `done` | out | 1 | high from the end of the last iteration until the next `reset` |

There is no separate start pin. Holding `reset` high for one or more clocks
captures `x`, `y` and `m` and clears the loop. The loop then runs on the
`N` clock edges after `reset` falls, one bit of `x` per edge. `done` rises
on the `N`-th edge. Latency is therefore exactly `N` clock cycles. `p`
holds until the next `reset`, and a `reset` during an operation abandons it
cleanly. The operands are registered, so the inputs may change once
`reset` has fallen.

`loop_ctrl.sv` is the shared iteration counter that produces the
per-iteration enable and `done`. `final_reduce.sv` is the shared
compare/subtract/select stage.

## Modular exponentiation (`modexp_rl`)

`base^e mod n` uses the right-to-left binary method. The exponent is
scanned from its LSB. A running power `P = base^(2^i)` is squared in every
pass, and the result `C` is multiplied by `P` when `e_i = 1`. Both products
of a pass depend only on the previous pass, so a multiplier core and a
squarer core (both `mont_fast`) run them at the same time:

```
conversion : C := Mont(1, r2)   P := Mont(base, r2)        r2 = 2^(2N) mod n
pass i     : C := Mont(C, P) if e_i = 1;   P := Mont(P, P)   (i = 0 .. H-1)
output     : c := Mont(C, 1)
```

There are `H + 2` passes of `N + 2` cycles each. Each pass spends one
cycle loading the cores, `N` cycles iterating and one cycle taking the
products. A full exponentiation thus takes `(H + 2)(N + 2)` cycles after
`reset` falls: 1,052,676 cycles for 1024-bit operands. When `e_i = 0` the
multiplier still runs and its product is dropped, which keeps the two
cores in lock step. The pins are `reset`, `base`, `e` (H bits), `n`, `r2`,
`c` and `done`, with the same reset/done protocol as the multipliers.
`base` must be below `n`, and `n` must be odd and greater than 1.

## Size

Yosys coarse synthesis at the default `N = 1024` gives these flip-flop
counts:

| unit | flip-flop bits |
|---|---|
| `mont_fast` | 6158 |
| `mont_std` | 4109 |
| `interleaved_mm` | 4108 |
| `modexp_rl` | 17452 |

Most of this is the operand registers. `X`, `Y` and `M` are captured, and
`mont_fast` also holds `Y+M`, `S` and `C`.

The loop's critical path differs between the cores:

- `mont_fast`: one full adder plus a 4-way multiplexer, whatever `N` is.
- `mont_std`: two `N`-bit carry chains.
- `interleaved_mm`: one `N`-bit addition followed by two `N`-bit compare/subtract stages.

On FPGAs the first reaches clock rates several times higher than the other
two at 1024 bits. The interleaved core needs one pass per product instead
of two, but its loop is slower still.

## Where this RTL departs from or adds to the original cores

- **Scan order of the interleaved core.** The core scans `X` MSB first, as
  its algorithm requires (`P := 2P + x_i*Y`). The original block diagram
  labels the shift-register tap "Lsb". Taken literally, that label would
  give a wrong product, and an LSB-first version fails `tb_interleaved_mm`.
- **Faster Montgomery comparator.** Its final comparison is `>=`, matching
  the algorithm, so a loop result equal to `M` reduces to 0. The original
  diagram's comparator is marked `>`.
- **Operand registers.** `Y` and `M` are captured at `reset`. The original
  diagrams feed them straight into the loop, and the register counts
  published for the interleaved core suggest they were not registered. To
  save about `2N` flip-flops per core, drive the loop from the ports
  instead and hold the inputs stable for the whole operation.
- **Control.** The start protocol (reset-as-start, sticky `done`), the one
  iteration per clock, the iteration counter and the word widths are this
  design's choices. The original gives only the pins `RESET` and `DONE`
  and a "loop controller" box.
- **Exponentiator.** `modexp_rl` goes beyond the three published cores.
  The right-to-left method and the parallel multiplier/squarer follow the
  description of modular exponentiation. Building it on the faster core,
  the controller, the extra final squaring (harmless) and the
  user-supplied `r2` are this design's own.
- **Not included.** The on-chip logic analyser used for in-circuit
  debugging and the FPGA development board are vendor parts with no role
  in the arithmetic.

## Verification

Each unit has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`. Results are compared with references
computed in the testbench with wide integer `*` and `%`. For the Montgomery
cores the check is `p * 2^N mod M == X*Y mod M` with `p < M`. Latencies are
checked to the cycle.

- `tb_mont_fast`, `tb_mont_std`, `tb_interleaved_mm` run a 16-bit worked
  example on each core. The Montgomery cores get `X = 46098` (234 already
  in the domain), `Y = 167`, `M = 293` and must return 109. The interleaved
  core gets `234 * 167 mod 293 = 109`. The same testbenches also run a
  mid-operation restart, 64-bit edge cases and 300 random 64-bit cases.
- `tb_full_adder` checks the cell's truth table. `tb_csa` checks all 2^18 input triples of a 6-bit CSA, including the
  example 40 + 25 + 20 giving S = 37 and C' = 48. `tb_final_reduce` is
  exhaustive at 8 bits and checks boundaries at 1025 bits. `tb_loop_ctrl`
  checks step counts and restart.
- `tb_modexp_rl` checks `base^55 mod 293`, exponent 0 and 1, `base = 0`,
  `base = n - 1`, and random 64-bit cases.
- `tb_modmul_top` runs at `N = 32`. It performs 200 full modular
  multiplications on every core, with domain conversion for the Montgomery
  cores, while exponentiations run alongside. It fails unless every
  mechanism was exercised: all four table choices, the final subtraction
  both taken and skipped, both interleaved subtraction stages, a restart,
  and exponent bits of both values.
- `tb_modmul_widths` builds each core at 64, 128, 160, 256, 512, 1024 and
  2048 bits. At each width it performs one full modular multiplication on
  random operands and checks the result and the cycle count.
- `tb_modmul_full` runs the top at its defaults (1024 bits). It performs
  one complete multiplication on each core and one full 1024-bit
  exponentiation, and simulates in a few seconds.

Assertions in `mont_fast`, `interleaved_mm` and `modexp_rl` check loop
invariants during simulation.

## Simulating

Files are one module or package per file. `modmul_pkg.sv` must be read
first. For example:

```
verilator --binary --timing --assert -Irtl -y rtl \
    rtl/modmul_pkg.sv tb/tb_modmul_full.sv --top-module tb_modmul_full
./obj_dir/Vtb_modmul_full
```

Replace `tb_modmul_full` with any other testbench name. To change the
width, set `N` (and `H` for the exponentiator) on the instance. Nothing in
the RTL depends on a particular width except that `N >= 2`.

## Files

- `rtl/modmul_pkg.sv`: operand-table types and function, exponentiator states
- `rtl/full_adder.sv`: full-adder cell
- `rtl/csa.sv`: carry-save adder row built from `full_adder` cells
- `rtl/final_reduce.sv`: compare, subtract, select
- `rtl/loop_ctrl.sv`: iteration counter and `done`
- `rtl/mont_fast.sv`, `rtl/mont_std.sv`, `rtl/interleaved_mm.sv`: the multipliers
- `rtl/modexp_rl.sv`: right-to-left exponentiator
- `rtl/modmul_top.sv`: everything side by side
- `tb/tb_*.sv`: one testbench per unit, plus `tb_modmul_full`
