# Double precision floating point divider

This is an IEEE 754 binary64 divider, `out = opa / opb`. It is written for an FPGA and
uses little area. It forms the quotient of the two significands by digit recurrence,
one quotient bit per clock. The result is rounded in any of the four standard rounding
modes. It covers the whole format: subnormal operands and results, signed zeros,
infinities and NaNs. It reports overflow, underflow, inexact, invalid and a summary
`exception` flag.

A division takes 60 clock edges from start to `ready`. The datapath is one 54-bit
subtractor and compare, used once per clock, plus the unpacking, rounding and
special-case logic around it. Generic synthesis gives about 400 flip-flop bits.

## Number format

    63   62 ........ 52   51 ................ 0
    S    E (11 bits)       M (52 bits)

A normal number (0 < E < 2047) has the value (-1)^S * 2^(E-1023) * 1.M. E = 0 is zero
(M = 0) or a subnormal, 2^-1022 * 0.M. E = 2047 is an infinity (M = 0) or a NaN. A NaN
with M[51] = 1 is quiet and one with M[51] = 0 is signalling.

## Structure

```
            opa, opb, rmode, enable
                 |
         +---------------+  exponent_out (12, signed)   +-----------+  exponent_final (12)  +--------------+
         |  fp_div_int   |----------------------------->|           |---------------------->|              |---> out
         | unpack, digit |  mantissa_7 (56)             | fp_round  |  round_out (64)       | fp_exception |---> flags
         | recurrence,   |----------------------------->| denorm,   |---------------------->| specials,    |
         | normalise     |  sign                        | round,    |  round_lost (2)       | overflow,    |
         |               |----------------------------->| pack      |---------------------->| flags        |
         +---------------+                              +-----------+                       +--------------+
                                                                 opa, opb, rmode also go straight to fp_exception
  fp_double_div: ready counter and the top-level ports
```

| Module | File | Role |
|---|---|---|
| `fp_double_div` | `rtl/fp_double_div.sv` | top: wires the three stages and generates `ready` |
| `fp_div_int` | `rtl/fp_div_int.sv` | operand unpacking, exponent, sign, radix-2 restoring division of the significands |
| `fp_round` | `rtl/fp_round.sv` | denormalisation of tiny results, rounding, packing |
| `fp_exception` | `rtl/fp_exception.sv` | NaN, infinity and zero operands, overflow, the flags |
| `fp_div_pkg` | `rtl/fp_div_pkg.sv` | widths, bias, latencies, the rounding-mode enum, the binary64 struct |

## Interface and handshake

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, all registers on the rising edge |
| `rst` | in | 1 | synchronous reset, active high |
| `enable` | in | 1 | start and hold (see below) |
| `rmode` | in | 2 | `00` nearest even, `01` toward zero, `10` toward +inf, `11` toward -inf |
| `opa`, `opb` | in | 64 | dividend and divisor |
| `out` | out | 64 | quotient |
| `ready` | out | 1 | `out` and the flags are valid |
| `overflow`, `underflow`, `inexact`, `invalid`, `exception` | out | 1 each | status of this result |

The host applies `opa`, `opb` and `rmode` and raises `enable`. It holds all four
unchanged until `ready` is high. `ready` rises 60 rising edges after the first edge that
sees `enable` high. It stays high, with `out` and the flags stable, for as long as
`enable` stays high. Dropping `enable` for at least one clock returns everything to idle.
The next rise starts a new division, so back-to-back divisions take 61 clocks each.
Dropping `enable` before `ready` abandons the division in flight.

The operands must be held because `fp_exception` reads them directly at the end of the
operation. An assertion in the top (`a_operands_held`) flags any change while `enable`
stays high.

Latency breakdown (edges counted from the first one with `enable` high):

| Edge | What happens |
|---|---|
| 1 | `fp_div_int` captures and unpacks the operands |
| 2 to 57 | 56 recurrence steps, one quotient bit each |
| 58 | quotient normalised; `mantissa_7`, `exponent_out` and `sign` registered |
| 59 | `fp_round` registers the rounded result |
| 60 | `fp_exception` registers `out` and the flags; `ready` rises |

`fp_round` and `fp_exception` register on every edge while `enable` is high. What they
hold before edges 59 and 60 is meaningless, and `ready` is what marks the valid result.

## The division core (`fp_div_int`)

**Unpacking.** A normal operand's significand is `{1, M}` and its exponent is E. A
subnormal's significand is `{0, M}` and its exponent is 1. A leading-zero count then
shifts the subnormal's significand left until bit 52 is set, and lowers the exponent by
the shift. After this both significands lie in [1, 2) and the quotient in (1/2, 2). The
result exponent is `ea - eb + 1023` and the sign is `sa ^ sb`.

**Recurrence.** The partial remainder `r` starts as the dividend significand and is
54 bits wide. Each step does:

    q_bit = (r >= d);   r = 2 * (q_bit ? r - d : r)

Here `d` is the divisor significand. The invariant `r < 2d` holds throughout, so no step
can overflow. After 56 steps the quotient register holds an integer bit and 55 fraction
bits. The final remainder is non-zero exactly when the true quotient has further ones.

**Normalisation.** If the integer bit is 1 the top 55 bits are kept. If it is 0, the
quotient is shifted left by one and the exponent lowered by one. In both cases the
dropped bit and the remainder test are ORed into a sticky bit.

### The mantissa and exponent terms

These two internal buses carry everything rounding needs to know. They are the key to
reading `fp_round`.

    mantissa_7 / mantissa_term (56 bits)
    55      54 ............... 3    2       1       0
    1       fraction (52)           guard   round   sticky

`exponent_out` is a 12-bit two's-complement biased exponent. Values from 1 to 2046 are
ordinary normal results. A value of 0 or below means the result lies below 2^-1022 and
must be denormalised. The lowest possible value is -1075, from the smallest subnormal
divided by the largest normal. The exact quotient exponent can reach 3120. Anything from
2047 up saturates at 2047 and overflows in any rounding mode, so 12 bits suffice.

## Rounding (`fp_round`)

1. **Denormalise.** If `exponent_term <= 0` the mantissa term is shifted right by
   `1 - exponent_term` places, at most 56. Every bit shifted out is ORed into bit 0. The
   value is now scaled to exponent 1 and the exponent field becomes 0.
2. **Round.** The kept bits are 55..3, with LSB = bit 3. Let G = bit 2 and
   S = bit 1 | bit 0. The increment is:

   | rmode | mode | increment when |
   |---|---|---|
   | 00 | nearest, ties to even | `G & (S | LSB)` |
   | 01 | toward zero | never |
   | 10 | toward +inf | `(G | S) & !sign` |
   | 11 | toward -inf | `(G | S) & sign` |

3. **Carry.** A normal result whose 53 bits overflow moves up one binade: the exponent
   rises by one. For division this can only happen with a subnormal result, never a
   normal one, but the path is kept general. A subnormal that rounds up into bit 52 has
   reached the smallest normal number, and its exponent field becomes 1.

`exponent_final` is the 12-bit exponent field after rounding. A value of 2047 or 2048
means overflow. `round_lost` carries `{G, S}` from after denormalisation on to
`fp_exception`.

## Special cases and flags (`fp_exception`)

Checked in this order:

| Operands | out | Flags |
|---|---|---|
| either NaN, 0/0, inf/inf | quiet NaN `7FF8_0000_0000_0000` | `exception`; `invalid` for 0/0, inf/inf or a signalling NaN |
| inf / finite, finite non-zero / 0 | signed infinity | `exception` |
| 0 / finite non-zero | signed zero | none |
| finite / inf | signed zero | `exception` |
| finite / finite, `exponent_final >= 2047` | overflow value (below) | `overflow`, `inexact` |
| finite / finite otherwise | rounded quotient | `inexact` if `round_lost != 0`; `underflow` if also exponent field 0 |

On overflow the result is +-infinity in nearest-even mode and the largest finite number
(`7FEF_FFFF_FFFF_FFFF` with the sign) in toward-zero mode. The directed modes give
infinity when rounding away from zero and the largest finite number otherwise.

Choices to be aware of:

- **`exception`** means the result came from the special-case table rather than from the
  divider. That is a NaN or infinite operand or a zero divisor. It is the only signal
  that reports division by zero.
- **`underflow`** is raised when the delivered result is subnormal or zero and inexact.
  IEEE 754 detects tininess before or after rounding with an unbounded exponent. This
  rule differs from the "after rounding" variant only at one boundary. A quotient just
  below 2^-1022 that rounds up to exactly 2^-1022 at subnormal precision, but not at
  full precision, raises underflow under IEEE's "after rounding" rule and does not
  raise it here.
- **NaNs** are not propagated: every NaN result is the canonical positive quiet NaN.

## How far it follows its source description

The original design is described only at block level. That description gives:

- the binary64 format
- the top-level ports
- the rounding-mode encoding
- the three sub-blocks with their port names and widths
- the statement that the significands are divided by digit recurrence

These are the port names and widths of the sub-blocks taken from it:

- `fp_div_int`: `opa`, `opb`, `rmode`, `exponent_out[11:0]`, `mantissa_7[55:0]`, `sign`
- `fp_round`: `exponent_term`, `mantissa_term`, `round_mode`, `sign_term`,
  `exponent_final`, `round_out`
- `fp_exception`: `exponent_in`, `in_except`, `mantissa_in[1:0]`, the flag outputs

Everything inside the blocks is this implementation's own:

- radix 2, restoring recurrence
- the meaning of the bits of the 56-bit and 12-bit buses
- subnormal handling
- the rounding logic
- the special-case table
- the meaning of `exception` and `underflow`
- the handshake and the 60-cycle latency
- synchronous reset

Known departures:

- **Throughput.** The original is reported at 344.89 MHz and "344.89 MFLOPS", which
  would be one division per clock. It is also reported at 1,980 flip-flops, too few for a
  fully pipelined 53-bit recurrence. This implementation is iterative: one division per
  61 clocks. Its clock speed has not been measured on an FPGA.
- **`round_lost`.** `fp_round` has an extra output, `round_lost`, which feeds
  `fp_exception`'s `mantissa_in`. The original shows `mantissa_in` with no visible
  source. The dropped bits after denormalisation are what the inexact and underflow
  flags need.
- **`En_enable`.** The original `fp_exception` has an output called `En_enable` whose
  purpose is not given. It is left out.
- **`rmode` in `fp_div_int`.** `fp_div_int` keeps an `rmode` input to match the
  original port list, but it does not use it.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

- **`tb_fp_double_div`** runs the full design at its only size. It covers:
  - directed special cases in all four modes
  - overflow and underflow boundaries
  - subnormal operands and results
  - an aborted division
  - 20,000 random divisions, biased toward extreme exponents

  Every result and flag is compared with `tb/fp_ref_pkg.sv`. That reference model uses
  exact 128-bit integer division and rounds by comparing the dropped part with half an
  ULP. In nearest-even mode every non-NaN result is also compared with the simulator's
  own `real` division. The test checks that the latency is exactly 60. It counts how often
  each mechanism occurs: every flag, division by zero, subnormal in and out, a rounding
  increment in each mode, rounding into the smallest normal, flush to zero and abort.
  Any mechanism that never occurs counts as a failure.
- **`tb_fp_div_int`** checks the 56-bit quotient, the exponent and the sign against one
  integer division per case. It checks the result at edge 58, and that the previous
  result is still held at edge 57.
- **`tb_fp_round`** checks denormalisation, all rounding modes, ties, carries and
  `round_lost` against an integer model.
- **`tb_fp_exception`** checks every pair of operand classes (zero, subnormal, normal,
  infinity, quiet NaN, signalling NaN) with random rounded inputs.

Each testbench has been shown to fail on a deliberately broken copy of its block:

- sticky bit lost
- ties always rounded up
- wrong overflow value in toward-zero mode
- `ready` one clock early

What is not verified: timing on a real FPGA, and behaviour when the operands change
while `enable` is high. The latter is a protocol violation that the assertion reports.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/fp_div_pkg.sv tb/fp_ref_pkg.sv tb/tb_fp_double_div.sv --top-module tb_fp_double_div
    ./obj_dir/Vtb_fp_double_div

Replace the testbench and top-module names to run the others. The whole suite runs in
seconds.

## Changing it

- The latencies are derived from `QUOT_BITS` in `fp_div_pkg`. `TOTAL_LATENCY` drives the
  ready counter, so a faster recurrence only needs its step count updated there.
- A higher-radix recurrence would replace the `q_bit`/`rem_next` logic in `fp_div_int`
  and the step count. The mantissa-term format seen by `fp_round` stays the same.
- To propagate NaN payloads, or to add a separate divide-by-zero flag, change only
  `fp_exception`.
