# Pipelined signed division in residue arithmetic

Division is the awkward operation of a residue number system (RNS). Addition,
subtraction and multiplication split into small independent rings, one per
modulus. Division does not, because it needs magnitude information. This
design turns division into multiplication. It looks up a scaled reciprocal of
the divisor, already in residue form, multiplies it by the dividend channel by
channel, and scales the product back down at the end. Every step is a small
table or a 5-bit modular operation. The whole divider is a pipeline that
accepts one division per clock and has a fixed latency of 8 cycles.

- Dividend `X`: residues in the base {32, 31, 29, 23, 21}. The range is
  M = 13 894 944, and the intended values are in [-2048, 2047].
- Divisor `Y`: a 12-bit two's complement word.
- Quotient `Q ≈ X / Y`: residues in the same base, rounded to nearest.

## The reciprocal from two short tables

Addressing one table with all 12 bits of the divisor would need 4096 entries
per modulus. Instead, the magnitude |Y| (11 bits) is split into two parts:

    a = |Y| with its 6 low bits cleared    (a = 64·aseg, aseg = |Y|[10:6])
    b = |Y| mod 64                          (b = |Y|[5:0])

This gives the identity 1/(a+b) = 1/a − b/(a(a+b)). The correction term
still depends on all of Y. Replacing the `b` inside the bracket with a fixed
constant K gives a good approximation:

    {Ks/Y} ≈ {Ks/a} − b · {Ks/(a(a+K))}

Here `{·}` means rounding to nearest, with halves rounded up. The constants
are:

| constant | value | role |
|---|---|---|
| Ks | 159 712 = 32·31·23·7 | scale that turns the reciprocal into an integer |
| K  | 49.07 | chosen so the approximation error at the worst b and at b = 63 is equal and opposite |

Both tables are addressed by the 5-bit `aseg` plus the sign bit of Y. That is
a 6-bit address, which fits one 6-input FPGA LUT per output bit. Some first
entries, before reduction to residues:

| aseg | a | {Ks/a} (ROM1) | {Ks/(a(a+K))} (ROM2) |
|---|---|---|---|
| 1 | 64 | 2496 | 22 |
| 2 | 128 | 1248 | 7 |
| 4 | 256 | 624 | 2 |
| ≥ 9 | ≥ 576 | 277 … 80 | 0 |

For example, Y = 127 gives a = 64 and b = 63, so the reciprocal is
2496 − 63·22 = 1110. With X = 4095 the quotient is 1110·4095/159712 = 28.46,
which rounds to 28. The exact value is 32.24. The test bench checks this case,
and the cases Y = 191 → 21 and Y = 319 → 13.

**Sign handling.** The tables do not store the reciprocal itself. They store
the residue of `±{·}`, with the sign of Y folded in. So `X · (sign·R)`
becomes the signed product without any sign logic in the datapath. The
segment `b` is unsigned (ROM3 holds |b|_m).

**Small divisors.** When |Y| < 64, `a` is zero and the formula breaks down.
A fourth table, ROM4, then supplies `±{Ks/b}` directly. A single one-bit
decoder (ROM5) detects `a = 0` and steers every channel's multiplexer.

All tables are computed at elaboration time from the constants in
`rns_div_pkg`. K is held as the integer 100·K = 4907, so every entry is exact
integer arithmetic:

    ROM1[s, aseg] = | s · floor((2·Ks + a) / (2a)) |_m
    ROM2[s, aseg] = | s · floor((200·Ks + D) / (2D)) |_m ,  D = a·(100a + 4907)
    ROM3[b]       = | b |_m
    ROM4[s, b]    = | s · floor((2·Ks + b) / (2b)) |_m ,    0 for b = 0

## One residue channel

There are five identical channels, one per modulus (`rns_channel`). Each
channel has one register after each step:

| stage | operation |
|---|---|
| 1 | ROM1 {Ks/a}, ROM2 {Ks/(a(a+K))}, ROM3 \|b\|, ROM4 {Ks/b} |
| 2 | MULT1: t = \|b · ROM2\|_m |
| 3 | BA: r = \|ROM1 − t\|_m |
| 4 | MUX: r' = (a = 0) ? ROM4 : r, then MULT2: p = \|r' · x\|_m |

The dividend residue `x` is delayed alongside the data until stage 4. The
output `p` is the residue of `X·{Ks/Y}`, which is the quotient scaled up by
Ks. The multiplexer sits in front of MULT2, so one multiplier serves both
reciprocal sources. This is equivalent to multiplexing after the multiplier,
and it saves one multiplier per channel.

## Scaling by Ks

The scaler (`rns_scaler`) divides the residue product by Ks. Residues alone
cannot do this, so the scaler passes through binary for a moment:

1. **Chinese-remainder reconstruction.** Each channel's residue addresses a
   32-entry table of |x_i·w_i|_M, where w_i = M_i·|M_i⁻¹|_{m_i}. The five terms
   are added. The sum is below 5M, and it is reduced modulo M by comparing
   with M, 2M, 3M and 4M.
2. **Signed division.** If N ≥ M/2, the value is read as N − M. The magnitude
   is divided by Ks, rounding to nearest with halves away from zero, so that
   Q(−X) = −Q(X). The quotient magnitude is at most 43 and fits in 6 bits.
3. **Forward conversion.** The signed quotient is converted back to the five
   residues.

This is the plain, exact method. Ks was chosen as a product of factors of the
moduli so that a scaler could work mostly in residue arithmetic. This scaler
does not use that property. A leaner scaler based on base extension could
replace it without changing its ports or its 3-cycle latency.

## Valid operand range and accuracy

The design is exact only while the signed product `X·{Ks/Y}` stays inside
(−M/2, M/2), where M/2 = 6 947 472. The product's residues then determine it
uniquely.

- **|Y| ≥ 64.** The largest product is 2048·2496 = 5 111 808. Every dividend
  in [-2048, 2047] is safe. A residue vector for X = 4095 also works when
  |Y| ≥ 127.
- **|Y| < 64.** The ROM4 reciprocal is large: Ks itself when |Y| = 1. The
  dividend must satisfy |X|·{Ks/|Y|} < M/2, which means the quotient can be at
  most about 43. For example, |X| ≤ 43 when |Y| = 1, |X| ≤ 217 when |Y| = 5,
  and every X works when |Y| ≥ 48. Outside this range the product wraps
  modulo M and the quotient is wrong. Nothing flags it.
- **Y = 0** is not detected and gives Q = 0.
- **Y = −2048** is clamped to magnitude 2047, so the sign/magnitude word stays
  at 1 + 11 bits.

The approximation error of the two-term reciprocal peaks at ±1.96 for
|X| ≤ 2048. The final rounding adds up to 0.5. Over 6000 random divisions with
|Y| ≥ 64, the largest error measured was |Q − X/Y| = 2.39. For |Y| < 64 the
reciprocal is looked up whole, so only rounding error remains.

## Interface and timing

`rns_divider` (top):

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock |
| rst_n | in | 1 | synchronous, active low; clears the valid pipe only |
| in_valid | in | 1 | `x` and `y` hold a division this cycle |
| y | in | 12 | divisor, two's complement |
| x | in | 5×5 | dividend residues; `x[0]` mod 32, `x[1]` mod 31, `x[2]` mod 29, `x[3]` mod 23, `x[4]` mod 21 |
| out_valid | out | 1 | `q` holds a result |
| q | out | 5×5 | quotient residues, same order |

- The pipeline never stalls.
- A division presented in cycle t appears in cycle t + 8 with `out_valid`
  set.
- Results keep their order.
- The 8 cycles are: 1 for the scaling converter and ROM5, 4 for the channel,
  and 3 for the scaler.
- Only the valid bits are reset. Data registers simply carry whatever flows
  through them.

## Where this RTL makes its own choices

Everything above the "Scaling by Ks" section follows the divider's published
structure: the base, Ks, K, the 1 + 5 + 6 bit divisor split, the tables, the
order ROM → MULT1 → BA → MULT2, the a = 0 bypass and the scaling by Ks. The
following are choices of this implementation:

- **Scaler internals.** CRT reconstruction and binary division, as described
  above.
- **Quotient rounding.** Halves round away from zero.
- **Pipeline depth.** One register per step, 8 cycles in all. The published
  design reaches a 2.75 ns clock on a Virtex-6 FPGA, but its stage count is
  not known.
- **Signs in the tables.** The sign of Y is in the address of ROM4, as it is
  for ROM1 and ROM2. ROM4 therefore has a 7-bit address.
- **Multiplexer position.** The multiplexer sits before MULT2 rather than
  after it.
- **Divisor clamp.** Y = −2048 is clamped.
- **Handshake and reset.** The `in_valid`/`out_valid` pair and the reset of
  the valid pipe are additions.
- **Constant K.** Published values of K differ in the second decimal place
  (49.07 and 49.03). This design uses 49.07. It reproduces the published
  reciprocals 1110, 807 and 498 for Y = 127, 191 and 319.

## Files

| file | content |
|---|---|
| `rtl/rns_div_pkg.sv` | base, Ks, K, widths, divisor struct, table and CRT functions |
| `rtl/rns_divider.sv` | top level |
| `rtl/scaling_converter.sv` | Y → sign, aseg, b |
| `rtl/rom5_sign.sv` | a = 0 select |
| `rtl/rns_channel.sv` | one residue channel with its ROMs, multipliers, subtractor, mux |
| `rtl/rom1_recip_a.sv`, `rom2_recip_aak.sv`, `rom3_b_residue.sv`, `rom4_recip_b.sv` | per-modulus tables |
| `rtl/mod_mult.sv`, `rtl/mod_sub.sv` | modulo-m multiplier and subtractor |
| `rtl/rns_scaler.sv` | division by Ks |
| `tb/div_ref_pkg.sv` | floating-point reference model used by the test benches |
| `tb/*_tb.sv` | one self-checking test bench per module |
| `tb/example1_mult_tb.sv` | signed multiplication in the six-modulus base {32, 31, 29, 27, 25, 23} with `mod_mult`: 35 · (−70) → (14, 30, 15, 7, 0, 11) |

To change the base, edit `MODULI`, `M_RANGE` and `KS` in the package. Then
check the widths in `rns_scaler` (`NW` must hold 5·M, and `QW` must hold
M/(2·Ks)). Every table follows automatically.

## Simulation

Each test bench prints `TB_RESULT checks=N failures=F` and stops itself. Run
the end-to-end test with:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/rns_div_pkg.sv tb/div_ref_pkg.sv tb/rns_divider_tb.sv \
        --top-module rns_divider_tb
    ./obj_dir/Vrns_divider_tb

Use the same command with another `tb/<module>_tb.sv` and `--top-module` for
a unit test. The unit tests cover:

- the converter, over all 4096 divisors;
- every table and both modular operators, for each modulus;
- the channel and the scaler, with random streams checked at their latency.

The end-to-end test also checks:

- the latency of 8 cycles and the emptying of the valid pipe at reset;
- the three worked divisions above;
- the |Q − X/Y| ≤ 2.5 bound.

It counts how often each path was taken: the two-term reciprocal, the a = 0
bypass, negative X and Y, the Y = −2048 clamp and idle cycles. It fails if
any of them was never taken.
