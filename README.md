# Posit arithmetic in SystemVerilog: PIF operators, in-place rounding and a segmented quire

Posits are an alternative to IEEE-754 floating point: an N-bit word holds a
sign, a variable-length *regime*, up to WES exponent-scale bits and a fraction
whose length shrinks as the regime grows. There are no subnormals and no
infinities. There is one zero and one NaR ("not a real"). Overflow and
underflow saturate to ±maxpos and ±minpos.

Because every field has a variable position, the hard part of posit hardware
is not the arithmetic. It is converting to and from the variable-width
encoding, and rounding at a bit position that depends on the exponent. This
RTL implements a complete set of posit operators for that job:

* a decoder and two encoders between posits and a fixed-width internal
  format, the **Posit Intermediate Format (PIF)**;
* a PIF adder/subtracter and a PIF multiplier. Both produce an
  **Unrounded PIF (UPIF)**, a PIF with a round bit and a sticky bit;
* **in-place rounding**, which rounds a UPIF to the PIF of the posit it would
  encode to, without ever building that posit;
* an exact accumulator, the **quire** (N²/2 bits, segmented carry-save), and
  its conversion back to a rounded value.

These blocks are combined in two ways:

1. **Posit-to-posit operators** (`posit_adder`, `posit_multiplier`). Each one
   decodes its operands, computes, then rounds and encodes, for every
   operation.
2. **A posit arithmetic unit with PIF registers** (`posit_pau`, the top).
   Posits exist only on the load/store path, the registers hold decoded PIF
   values, and each result is rounded in place. Decoding and encoding leave
   the arithmetic path. Rounding stays exact: a result is bit-for-bit the
   posit that the posit-to-posit operator would give.

All parameters default to the standard 32-bit posit, posit<32,2>. They follow
the architecture published in *Comparing posit and IEEE-754 hardware costs*
(MArTo library). The sections below point out where this RTL makes its own
choices.

## Formats and widths

For a posit<N,WES>, every value is a *normal* floating-point number of one
fixed format, the smallest one that contains all posits:

| quantity | formula | posit<8,0> | posit<16,1> | posit<32,2> | posit<64,3> |
|---|---|---|---|---|---|
| fraction bits WF | N − 3 − WES | 5 | 12 | 27 | 58 |
| exponent bits WE (two's complement) | 1 + WES + ⌈log2(N−2)⌉ | 4 | 6 | 8 | 10 |
| EMAX (maxpos = 2^EMAX) | (N−2)·2^WES | 6 | 28 | 120 | 496 |
| PIF width | WE + WF + 3 | 12 | 21 | 38 | 71 |
| UPIF width | PIF + 2 | 14 | 23 | 40 | 73 |
| quire width WQ | N²/2 | 32 | 128 | 512 | 2048 |

A PIF vector is packed as `{isNaR, s, e[WE-1:0], i, f[WF-1:0]}` and its value is

    value = (-2·s + i + 0.f) · 2^e

So `{s,i,f}` is a two's complement significand with two integer bits. For a
positive number it lies in [1,2) (s=0, i=1). For a negative number it lies in
[−2,−1) (s=1, i=0). Zero is the only value with s = i = 0. A negative power of
two such as −1 is therefore stored as −2·2^(e−1). Two's complement exponent
and significand avoid any sign-magnitude conversion. A UPIF appends
`{round, sticky}`: the round bit is the next fraction bit. The sticky bit is
set when the exact value is strictly above the value given by the fraction and
round bit. Both refer to the two's complement value, so for negative numbers
"above" means "towards zero".

`posit_pkg` computes all of these widths as functions of N and WES. It also
holds the opcode enum of the top level.

## Reading and writing posits without negation

A negative posit is the two's complement of the positive one. The decoder
(`posit_to_pif`) does **not** negate it. It reads the word as it is:

* s is the MSB. The regime is the run of bits equal to the bit after s.
* If the run bits equal s, the regime exponent is e_h = −l; otherwise it is
  e_h = l − 1.
* The exponent-scale bits are XORed with s to give the low exponent bits e_l.
* The remaining bits are used unchanged as the two's complement fraction, with
  i = not s.

For example, −40 in posit<8,2> is `1 001 10 11`. The run `00` ends at the `1`,
so l = 2 and e_h = 1. e_l = `10` xor `11` = 1, so e = 5. The fraction is .11.
The value is 2^5·(0.75 − 2) = −40.

A single leading-zero/one count combined with a left shift (`lzoc_shift`)
removes the regime. The count starts after the first regime bit and returns
l' = l − 1. This gives e_h = ¬l' or e_h = l' directly, with no adder. An OR
reduction of the N−1 bits below the sign detects zero and NaR.

The encoders go the other way. The regime run bit b and its length l follow
from e_h = e >>> WES. The word `{N−1 copies of b, ¬b, e_l xor s, f [, round]}`
is shifted right by l:

* `pif_to_posit` is the exact encoder used for stores. It keeps the low N−1
  bits.
* `upif_to_posit` is the rounding encoder. It also takes the last bit shifted
  out as the guard bit and ORs everything below it, together with the UPIF
  sticky bit, into a sticky bit. It then adds `guard & (lsb | sticky)`, which
  is round to nearest, ties to even, on the posit bit string.

Rounding a two's complement bit string this way is correct for negative values
as well, so the encoders need no negation either.

## Rounding in place (the subtle part)

In the PIF-register unit, every result must be rounded as if it were encoded
to a posit and decoded again, but without paying for that shift and shift
back. `upif_inplace_round` moves the rounding position instead of the
significand:

1. Form the integer `Z = {e xor s, f, round}`. In it, the bits appear in the
   same order, and with the same carry behaviour, as the posit body
   `{regime, es xor s, fraction}`. A carry out of the fraction increments
   e_h (for s = 0) or decrements it (for s = 1). That is exactly how a carry
   out of the es field changes the regime length.
2. The regime length l is a function of the exponent alone. It fixes how many
   bits survive: the kept LSB of Z is bit l. From l the block builds four
   masks: *round* (bit l), *guard* (bit l−1), *sticky* (below the guard bit)
   and *keep* (bit l and above).
3. Compute `up = guard & (lsb | sticky | UPIF sticky)`, clear the bits below
   the round bit, and add `up` at the round-mask position. Split the result
   back into e and f.

Two cases need care. Both are found by the exhaustive and random comparisons
against the reference model.

* **l = N−2**: the posit keeps no es or fraction bit, so its last bit is the
  regime *terminator*. For a tie, the parity that matters is the terminator's
  (¬b), not the exponent LSB found at bit l of Z. The block uses the regime
  value for `lsb` in that case.
* **l = N−1**: the regime fills the word. The guard bit is then the missing
  terminator, which never causes rounding up, so the fraction is cleared.

The masks are built with shifters here. A lookup table indexed by the exponent
is an equivalent choice and maps well onto FPGA LUTs.

## Saturation

Posit arithmetic never overflows to infinity and never underflows to zero.
Each PIF operator saturates its UPIF output through the shared
`upif_normalize`:

* positive results are clamped to exponents [−EMAX, EMAX];
* negative results are clamped to [−EMAX−1, EMAX−1];
* a clamped result has a zero fraction and zero round/sticky bits, so it is
  exactly ±maxpos or ±minpos.

With this rule, neither encoder nor the in-place rounding can round a non-zero
value to 0 or wrap it into NaR. This includes the WES = 0 tie case just below
minpos. The clamp bounds are this design's formulation.

## PIF operators

`pif_adder` is a single-path floating-point adder on two's complement
significands:

1. For a subtraction, negate b's significand.
2. Compare the exponents. A zero operand never wins the comparison.
3. Arithmetic-shift the smaller operand right by the exponent difference,
   ORing the shifted-out bits into a sticky bit.
4. Add the two operands on WF+7 bits: 3 integer bits and WF+4 fraction bits.
5. Normalise with one LZOC+shift.

The narrow datapath is enough because a long alignment shift, which produces
sticky bits, and a long normalisation shift, which happens after cancellation,
never occur together.

`pif_multiplier` adds the exponents and multiplies the (WF+2)-bit signed
significands into a (2WF+4)-bit exact product in [−4, 4]. It then normalises,
which takes a shift of at most two places. The exact product
`{prod_nar, prod_exp, prod_sig}` is also an output: it is the quire's input
format.

`upif_normalize` (shared) finds the first bit that differs from the sign. It
places that bit at the implicit-bit position, extracts f, the round bit and the
sticky bit, and applies saturation.

## Quire

The quire is an N²/2-bit two's complement fixed-point accumulator. Bit j has
weight 2^(j − 2·EMAX). From the top, it is made of these zones:

| zone | width | posit<32,2> |
|---|---|---|
| sign | 1 | 1 |
| overflow zone, C = N−2 carry guard bits included | EMAX + C | 150 |
| range zone (2^−EMAX … 2^EMAX) | 2·EMAX + 1 | 241 |
| underflow zone | EMAX | 120 |

`quire` accepts one exact product per cycle. A sign-extending left shifter
places the product at its position. For a subtraction the product is inverted,
and the +1 enters as the carry into the lowest segment. The quire is split
into SEG-bit segments, each with its own adder. The carry out of segment k is
registered and added into segment k+1 on the next cycle, so no carry chain is
longer than SEG bits. The value is therefore held in a redundant radix-2^SEG
carry-save form. Carries drain by themselves whenever the summand is zero.
`resolve` reserves WQ/SEG such cycles; during them `busy` is high and products
are ignored. Afterwards no carry is pending (`q_clean`, which an assertion
checks). SEG = WQ gives the unsegmented quire, with a single resolve cycle.
A NaR product sets a NaR flag that only `clear` resets.

`quire_to_upif` reads the zones:

* NaR flag set → NaR.
* Any overflow-zone bit differs from the sign → ±maxpos.
* Otherwise `{sign, range zone}` is normalised by an LZOC+shift:
  * The top WF+2 underflow bits join the normalised word, because a value near
    minpos in a format with few exponent bits (posit<8,0>) can keep fraction
    bits there.
  * The rest of the underflow zone is ORed into the sticky bit.
  * A positive value whose range zone is zero becomes minpos, or zero if the
    whole quire is zero.

## The posit arithmetic unit (`posit_pau`, top)

Parameters: `N = 32`, `WES = 2`, `SEG = 32`, `NREG = 16`.

| `in_op` | name | effect |
|---|---|---|
| 1 | LOAD | `rd ← decode(in_data)` |
| 2 | STORE | `out_data ← encode(rs1)`, `out_valid` one cycle later |
| 3 / 4 / 5 | ADD / SUB / MUL | `rd ← round_in_place(rs1 op rs2)` |
| 6 | QCLR | quire ← 0 |
| 7 / 8 | QMADD / QMSUB | quire ± exact(rs1·rs2) |
| 9 | QADD | quire + rs1 (the PIF cast to the product format) |
| 10 | QROUND | `rd ← round_in_place(quire_to_upif(quire))` |

Handshake and timing:

* An instruction is taken on a rising edge with `in_valid && in_ready`. It
  must be held stable while `in_ready` is low; an assertion checks this.
* Every instruction except QROUND completes in the cycle it is presented. Its
  register write happens at that edge.
* QROUND first starts the quire's carry resolution and keeps `in_ready` low
  for WQ/SEG + 1 cycles (17 at the defaults). It completes in the following
  cycle.
* A stream of QMADD instructions runs at one product per cycle.
* The reset is asynchronous and active low. It zeroes the registers and the
  quire.

Beside this unit, the top also carries the two posit-to-posit operators on
their own ports (`p2p_a`, `p2p_b`, `p2p_sub` → `p2p_sum`, `p2p_prod`). They
are combinational.

The register count, the opcode set and the handshake are this design's
choices. The published architecture shows "PIF registers" and the operator
split, but not an instruction interface.

## Verifying and simulating

Every testbench in `tb/` is self-checking. Each one prints
`TB_RESULT checks=… failures=…` and has a watchdog. The reference model
(`tb/posit_ref.svh`) is written straight from the posit definition, with none
of the hardware's tricks:

* it negates negative posits to decode them;
* it rounds the magnitude's infinitely long bit string, then negates the
  result;
* it builds PIFs from their value formula.

| testbench | what it covers |
|---|---|
| `tb_posit_to_pif`, `tb_pif_to_posit` | every posit<16,1> and posit<8,0>, random posit<32,2> |
| `tb_upif_to_posit`, `tb_upif_inplace_round` | 100k random saturated UPIFs per format (posit<8,0> to posit<64,3>), biased to the exponent extremes |
| `tb_pif_adder`, `tb_posit_adder` | all posit<8,0> pairs (add and subtract), random posit<16,1>/<32,2> with near-cancellation |
| `tb_pif_multiplier`, `tb_posit_multiplier` | all posit<8,0> pairs, random posit<16,1>/<32,2>; exact product output |
| `tb_quire` | posit<16,1> segmented and unsegmented, posit<32,2> and posit<64,3> segmented: exact sums, resolve length, NaR |
| `tb_quire_to_upif` | overflow, underflow, in-range, zero and NaR quires for posit<8,0> to posit<64,3> |
| `tb_posit_pau` | top at default parameters: 4000 random instructions, each result read back. It counts stalls, segment carries, saturation to maxpos/minpos, quire overflow, NaR, sticky quire NaR, inexact results and subtractions, and fails if any of them never happens |
| `tb_posit64` | posit<64,3>: both organisations side by side (posit-to-posit adder and multiplier; decode, PIF operator, in-place rounding, store), 20k random pairs |
| `tb_sum1000` | sum of 1000 products rounded to a posit, quire16 (U, S32) and quire32 (U, S32, S64); checks the result and the 1000 + WQ/SEG + 2 cycle count |

To run one with Verilator 5, use the following (add `tb/quire_driver.sv` for
`tb_quire`, and `tb/pau_sum_driver.sv` for `tb_sum1000`):

    verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/posit_pkg.sv tb/tb_posit_pau.sv \
              --top-module tb_posit_pau -o sim && ./obj_dir/sim

To try another format, override `N` and `WES` (and `SEG` for the quire).
Standard formats (WES = log2(N) − 3) are required wherever a quire is used,
because its width is fixed to N²/2.

## Where this RTL departs from, or goes beyond, the published design

* **Pipelining.** The operators are combinational. The published pipelined
  versions came from a search for the smallest pipeline depth that meets a
  3 ns clock, run by the HLS tool. They are not modelled.
* **Negation for subtraction.** The subtrahend's significand is negated before
  alignment with a two's complement increment. The published scheme uses an
  inversion and an adder carry-in. Both give the same exact result.
* **Datapath widths.** Widths are kept simple rather than minimal. The adder
  carries WF+4 fraction bits. The multiplier normalises with the generic
  LZOC+shift rather than a dedicated one-bit shift.
* **Rounding masks.** The in-place rounding masks come from shifters, not
  lookup tables.
* **Carry resolution length.** The quire's resolve phase has the fixed length
  WQ/SEG given by the published formula, even when the carries drain earlier.
  The published detailed table reports shorter measured latencies for the
  segmented posit32 quire (8 cycles for S32), which this RTL does not try to
  reproduce.
* **Posits into the quire.** Adding a single posit to the quire (QADD) casts
  the PIF to the product format by shifting its significand by WF bits.
* **Tested sizes.** The operators have been simulated at posit<8,0>,
  posit<16,1>, posit<32,2> and posit<64,3>; the quire and its conversion
  at posit<16,1>, posit<32,2> and posit<64,3> (2048 bits). The
  non-standard formats posit<32,6> and posit<32,1> have not been simulated,
  and they cannot be used with the quire.
* **IEEE-754 comparison operators.** The IEEE-754 operators and the IEEE
  Kulisch accumulator that serve as comparison points are not part of this
  RTL.

## Files

`rtl/`: `posit_pkg` (widths, opcodes), `lzoc_shift`, `upif_normalize`,
`posit_to_pif`, `pif_to_posit`, `upif_to_posit`, `upif_inplace_round`,
`pif_adder`, `pif_multiplier`, `posit_adder`, `posit_multiplier`, `quire`,
`quire_to_upif`, `posit_pau` (top).

`tb/`: one testbench per block as listed above, plus `posit_ref.svh` (the
reference model), `upif_gen.svh` (random UPIF generator), `quire_driver.sv`
and `pau_sum_driver.sv`.
