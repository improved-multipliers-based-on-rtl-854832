# Pre-encoded NR4SD multiplier

Many DSP kernels multiply by constants: filter taps, or the sine/cosine table
of an FFT. The constants are known before the hardware runs, so their
recoding into radix-4 digits can be done once, off-line, and the multiplier
can read them already recoded from a ROM. Such a multiplier needs no operand
recoder on its critical path.

This design stores each coefficient in a **non-redundant radix-4
signed-digit (NR4SD)** form. It does not use Modified Booth (MB) digits:

* An MB digit takes five values {-2,-1,0,+1,+2} and needs 3 bits. A pre-encoded
  MB coefficient of n bits therefore costs 3n/2 bits of ROM.
* An NR4SD digit takes only four values. It fits in 2 bits and has a simpler
  partial-product decode. Only the top digit stays in MB form, so that the
  whole two's complement range is covered. An n-bit coefficient costs
  2(n/2-1) + 3 = **n+1 bits**.

As with MB, there are n/2 partial-product rows instead of n. The RTL is
parameterised in the operand width `N`, default 8. It provides both NR4SD
variants:

| variant | digits (all but the top one) | top digit |
|---|---|---|
| NR4SD+ (default) | {-1, 0, +1, +2} | MB, {-2..+2} |
| NR4SD- | {-2, -1, 0, +1} | MB, {-2..+2} |

## The NR4SD recoding

A two's complement number `b` (n = 2k bits) is split into radix-4 positions
j = 0 … k-1. A carry `c` ripples upward from 0. Position j, for j < k-1,
takes its two bits and the incoming carry. It then emits one digit and a
carry such that

    b[2j] + 2*b[2j+1] + c[2j]  =  4*c[2j+2] + digit_j

The left-hand side ranges from 0 to 4. Each variant splits it in the only
way its digit set allows:

| v = b[2j]+2b[2j+1]+c | 0 | 1 | 2 | 3 | 4 |
|---|---|---|---|---|---|
| NR4SD+ (carry, digit) | 0, 0 | 0, +1 | 0, +2 | 1, -1 | 1, 0 |
| NR4SD- (carry, digit) | 0, 0 | 0, +1 | 1, -2 | 1, -1 | 1, 0 |

In gates this is two half adders in a row. One of them has a *negatively
signed* sum (written HA\*). It is defined by `b + c = 2*carry - sum`, which
gives `carry = b | c` and `sum = b ^ c`.

* **NR4SD+**: HA\* on `b[2j]` gives the negative bit n⁻(2j). A normal HA on
  `b[2j+1]` gives the positive bit n⁺(2j+1). The digit is `2·n⁺ − n⁻`.
* **NR4SD-**: a normal HA on `b[2j]` gives n⁺(2j). HA\* on `b[2j+1]` gives
  n⁻(2j+1). The digit is `n⁺ − 2·n⁻`.

The top position absorbs the last carry without producing one:
`msd = -2*b[n-1] + b[n-2] + c[n-2]`. This value is in {-2..+2}, so it is
stored as an MB digit.

Example, b = 91 = `01 01 10 11`, from the least significant pair upward:

| position | bits | v | NR4SD+ digit | NR4SD- digit |
|---|---|---|---|---|
| 0 | 11 | 3 | -1 (carry 1) | -1 (carry 1) |
| 1 | 10 | 3 | -1 (carry 1) | -1 (carry 1) |
| 2 | 01 | 2 | +2 (carry 0) | -2 (carry 1) |
| 3 (MB) | 01 | — | +1 | +2 |

NR4SD+ gives −1 − 4 + 32 + 64 = 91. NR4SD- gives −1 − 4 − 32 + 128 = 91.
The most negative value, −128, becomes three zero digits and an MB top digit
of −2.

### Encoded word layout (N+1 bits)

| bits | content |
|---|---|
| `[2j+1:2j]`, j = 0 … N/2-2 | NR4SD digit j. For NR4SD+ the bits are `{n⁺, n⁻}`, value 2n⁺−n⁻. For NR4SD- they are `{n⁻, n⁺}`, value n⁺−2n⁻. |
| `[N:N-2]` | MB top digit `{neg, one, two}`. The value is ±(one + 2·two), and `neg` is never set for zero. |

For N = 8, 91 is stored in NR4SD+ as `9'b010_10_01_01`. The same layout is
produced by the gate-level recoder (`nr4sd_encoder`) and by the elaboration-time
function inside `coeff_rom`.

## From digits to a product

`nr4sd_multiplier` is purely combinational. It computes `p = a * b` for
N-bit two's complement operands, with `b` given in the encoded form.

1. **Partial product generation** (`nr4sd_ppg`, one instance per digit).
   The stored bits are decoded into a `{neg, one, two}` select
   (`nr4sd_pkg::decode_nr`). The top digit already has this form. For NR4SD+
   the decode is `neg = n⁻·¬n⁺`, `one = n⁻`, `two = n⁺·¬n⁻`. The row is
   `pp[i] = ((a[i]·one) | (a[i-1]·two)) ^ neg` over N+1 bits, so it holds
   `digit·a − neg`.
2. **Rows**. Row j is sign-extended to 2N bits and shifted left by 2j. The
   `neg` bits of all rows are collected into one extra row, at bit 2j each.
   This gives N/2 + 1 rows in all.
3. **Reduction** (`csa_tree`). Layers of 3:2 carry-save adders reduce the rows
   to a sum vector and a carry vector. Each layer maps r rows to
   2⌊r/3⌋ + r mod 3.
4. **Final addition**. A single `+` is left for synthesis to map.

All of this is exact modulo 2^(2N). An N×N signed product always fits in 2N
bits, so `p` is the exact product.

## The system: `nr4sd_mult_top`

```
            y ──► nr4sd_encoder ──┐
                                  ├─(use_coef)─► nr4sd_multiplier ──► out register ──► out
coef_addr ──► coeff_rom ──────────┘                  ▲
            x ───────────────────────────────────────┘
```

| port | width | meaning |
|---|---|---|
| `clk`, `rst` | 1 | clock; synchronous, active-high reset that clears `out` |
| `x` | N | multiplicand, two's complement |
| `y` | N | multiplier operand, recoded on-line; used when `use_coef = 0` |
| `use_coef` | 1 | 1 selects the pre-encoded ROM word `coef_addr` |
| `coef_addr` | $clog2(DEPTH) | ROM index; addresses at or past DEPTH read word 0 |
| `out` | 2N | registered product |

**Timing.** There is one register, at the output. Inputs that are stable
before a rising edge of `clk` show their product on `out` right after that
edge, so the latency is 1 cycle and a new product can start every cycle.
With the defaults, for example, x = 11 and y = 6 give out = 66 on the next
edge.

**ROM contents.** `COEFFS` is an `int` array of two's complement values,
truncated to N bits. The ROM recodes it when the design is elaborated, and
the synthesised ROM holds only the recoded constants. The default table is
`round(127·sin(2πi/16))`, i = 0…15. This is a 16-point sine table for N = 8.
The read is asynchronous.

### Parameters

| parameter | default | where |
|---|---|---|
| `N` | 8 | all blocks; must be even and ≥ 4 (an elaboration error otherwise) |
| `VARIANT` | `NR4SD_PLUS` | `nr4sd_pkg::nr4sd_variant_e`; `NR4SD_MINUS` selects the other form |
| `DEPTH` | 16 | `coeff_rom`, `nr4sd_mult_top` |
| `COEFFS` | sine table above | `coeff_rom`, `nr4sd_mult_top` |

At the default size the top synthesises to about 200 word-level cells,
16 flip-flops and a 144-bit ROM. Widths of 16 and 24 bits are built by
setting `N` and are tested.

## What follows the source and what is this design's own

These parts follow the published scheme:

* the NR4SD+ and NR4SD- digit sets;
* the half adder / HA\* recoding cell and its carry chain with a 0 carry-in;
* the MB top digit;
* the n+1-bit ROM word;
* a ROM-fed multiplier with half as many rows as radix-2;
* the 8-bit default width and a product register with one cycle of latency.

These parts are this design's own choices:

* **Bit formats.** The order of the two bits in a stored pair and the
  `{neg, one, two}` top-digit format.
* **Row handling.** Full sign extension of the rows, rather than a
  sign-extension-prevention constant, and a separate row for the `neg` bits.
* **Adders.** The 3:2 reduction tree and the behavioural final adder.
* **ROM.** Its depth, default contents and asynchronous read.
* **The `use_coef` select.** This lets one multiplier take its operand either
  from the ROM or from the on-line recoder of the `y` port. The source builds
  both configurations but never combines them this way. With
  `use_coef` tied to 1, the design is the pure pre-encoded multiplier, and
  synthesis removes the recoder.
* **Reset.** Synchronous and active-high.

Some reported results are not reproduced. All 2N product bits are
registered, whereas an 8-bit FPGA build of the scheme reports only 8 slice
flip-flops. Area, power and timing comparisons with MB multipliers are
synthesis results and are outside the RTL. The baseline multipliers used in
those comparisons (a conventional MB multiplier and a pre-encoded MB one) are
not included.

## Files

| file | content |
|---|---|
| `rtl/nr4sd_pkg.sv` | variant enum, `pp_sel_t`, digit decode |
| `rtl/nr4sd_digit_enc.sv` | one recoding cell (HA + HA\*) |
| `rtl/mb_msd_enc.sv` | MB encoding of the top digit |
| `rtl/nr4sd_encoder.sv` | N-bit recoder: cell chain + top digit |
| `rtl/coeff_rom.sv` | pre-encoded coefficient ROM |
| `rtl/nr4sd_ppg.sv` | partial product generator for one digit |
| `rtl/csa_tree.sv` | 3:2 carry-save reduction tree |
| `rtl/nr4sd_multiplier.sv` | combinational multiplier with encoded operand |
| `rtl/nr4sd_mult_top.sv` | top: ROM / recoder, multiplier, output register |
| `tb/tb_nr4sd_ref_pkg.sv` | arithmetic reference of the recoding (up to 64 bits) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_nr4sd_widths` |

## Verification

Every testbench checks its outputs against a reference. The reference is
worked out from arithmetic, not from the RTL. Each testbench prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog.

* `tb_nr4sd_digit_enc` and `tb_mb_msd_enc` are exhaustive.
* `tb_nr4sd_encoder` is exhaustive at N = 8 and N = 12, in both variants.
* `tb_coeff_rom` checks every word of the default table in both variants.
  It also checks a 12-bit table of extreme values and an out-of-range
  address.
* `tb_nr4sd_ppg` checks every multiplicand against every digit code.
* `tb_csa_tree` runs random rows for 1, 2, 3, 5, 9 and 17 rows.
* `tb_nr4sd_multiplier` is exhaustive at N = 8 (65 536 products per variant)
  and runs random and extreme operands at N = 16.
* `tb_nr4sd_mult_top` is the end-to-end test at the default parameters. It
  runs:
  * the example products 11·6, 3·7 and 11·5;
  * every x·y pair through the recoder;
  * every x times every ROM word;
  * two resets.

  It checks the one-cycle latency on each operation. It also counts that
  every NR4SD+ digit value, every MB top-digit value, a carry into the top
  digit, both operand paths and reset were all exercised.
* `tb_nr4sd_widths` runs the top at N = 16 and N = 24, in both variants.

To simulate with Verilator 5 (any testbench; replace the name):

```sh
verilator --binary --timing --assert -Irtl -Itb \
  rtl/nr4sd_pkg.sv tb/tb_nr4sd_ref_pkg.sv tb/tb_nr4sd_mult_top.sv \
  --top-module tb_nr4sd_mult_top -o sim
./obj_dir/sim
```

Each run takes well under a second. To lint a module:
`verilator --lint-only -Wall -Irtl rtl/nr4sd_pkg.sv rtl/nr4sd_mult_top.sv`.
