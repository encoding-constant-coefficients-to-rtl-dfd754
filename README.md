# Pre-encoded NR4SD multiplier for constant coefficients

Many DSP kernels (FFT butterflies, FIR filter banks, codecs) multiply a
changing operand by coefficients drawn from a fixed set that never changes
while the application runs. Because the coefficients are known ahead of time,
the multiplier does not need to recode them on the fly, as a Modified Booth
(MB) multiplier would. Instead each coefficient is recoded once, off-line, and
stored in its recoded form in the coefficient ROM. The multiplier then takes
the digits straight from the ROM.

This design stores the coefficients in a **non-redundant radix-4 signed-digit
(NR4SD)** form:

* An N-bit coefficient becomes N/2 radix-4 digits, so there are N/2 partial
  products. That is the same count as radix-4 Booth.
* Each digit except the top one takes only **four** values, so it fits in
  **2 bits**. An MB digit takes five values and needs 3 bits.
* The top digit is an ordinary MB digit (3 bits). It carries the sign weight,
  so every N-bit two's complement value can be represented.
* A stored word is therefore **N+1 bits**. A table pre-encoded in MB form would
  need 3N/2 bits per word.

With N = 16, that is 17 bits per word instead of 24. Fewer digit values also
means that decoding a digit into a partial product takes fewer gates.

## The coefficient word

Two variants of NR4SD exist. They differ only in which four digit values the
low digits use. The `VARIANT` parameter selects one; `NR4SD_MINUS` is the
default.

| variant | low digit set | 2-bit code `{x1,x0}` | value of the code |
|---|---|---|---|
| NR4SD- | {-2, -1, 0, +1} | 00=0, 01=+1, 10=-2, 11=-1 | -2·x1 + x0 |
| NR4SD+ | {-1, 0, +1, +2} | 00=0, 01=-1, 10=+2, 11=+1 | +2·x1 - x0 |

The top digit, in {-2..+2}, is stored as `{s, two, one}`. Its value is
`(s ? -1 : +1) · (2·two + one)`, and zero is always `000`.

Layout: `enc[2j+1:2j]` holds digit j for j = 0 … N/2-2, and `enc[N:N-2]` holds
the MB top digit.

**Encoding rule** (`nr4sd_encoder`). The encoder walks the coefficient two
bits at a time, starting at the least significant end. For each slice it forms
`d = 2·b[2j+1] + b[2j] + carry`, a value from 0 to 4:

* **NR4SD-:** values 0 and 1 are kept as they are. Values 2, 3 and 4 become
  -2, -1 and 0, and a carry of 1 goes to the next slice.
* **NR4SD+:** values 0, 1 and 2 are kept as they are. Values 3 and 4 become
  -1 and 0, with a carry of 1.
* **Top slice:** it has sign weight, so `d = -2·b[N-1] + b[N-2] + carry`. This
  value always lies in -2 … +2, so it fits in an MB digit.

Each digit set is a complete set of residues mod 4, so every coefficient has
exactly one encoding.

Example with N = 8 and B = -86 (`1010_1010`):

| variant | digits, most significant first | check |
|---|---|---|
| NR4SD- | -1, -1, -1, -2 | -64 - 16 - 4 - 2 = -86 |
| NR4SD+ | -2, +2, +2, +2 | -128 + 32 + 8 + 2 = -86 |

The encoder is a combinational module, but it is only ever used on constants.
`coef_rom` creates one encoder per table entry and ties its input to the
coefficient. Synthesis therefore reduces each encoder to the bits it would
store. No encoding logic remains on the datapath, and changing the coefficient
table needs no hand-computed bit patterns.

## Datapath

```
 coef_addr ─► coef_rom (N+1-bit words) ─┐ (registered read)
                                        ▼
 a ─────────► [reg] ─────────► nr4sd_multiplier ─► [reg] ─► p (2N bits)
                                 │ nr4sd_ppg : K = N/2 rows  d_j·A
                                 └ pp_tree   : 3:2 tree + adder
```

**Partial product generation** (`nr4sd_ppg`). Each digit is decoded into three
controls. `one` selects A, `two` selects 2A and `neg` inverts the row. The
decoding is in `nr4sd_pkg::decode_nr4sd` / `decode_mb`:

* NR4SD-: `neg = x1`, `two = x1 & ~x0`, `one = x0`.
* NR4SD+: `neg = x0 & ~x1`, `two = x1 & ~x0`, `one = x0`.

A row is N+1 bits wide and holds the selected multiple XORed with `neg`. Its
value is therefore `d_j·A - neg_j`. The missing +1 is passed on separately as
`negc[j]`.

**Accumulation** (`pp_tree`):

1. Each row is sign-extended to 2N bits and shifted left by 2j.
2. The correction bits sit at bit 2j of one extra row. No two of them share a
   position.
3. The K+1 rows are reduced by levels of 3:2 carry-save adders (Wallace style)
   down to two rows.
4. One carry-propagate `+` adds the last two rows.

All arithmetic is modulo 2^(2N). The exact product of two N-bit operands
always fits in 2N bits. Number of reduction levels: N = 16 gives 9 rows and 4
levels; N = 32 gives 17 rows and 6 levels.

**System timing** (`nr4sd_premult_system`). The system is a two-stage
pipeline that accepts one request per cycle. There is no back-pressure.

* Cycle 0: with `in_valid` high, the ROM read and the register for `a`
  capture the request at the clock edge.
* Cycle 1: the multiplier works on the registered pair.
* Cycle 2: `out_valid` is high and `p = a · COEF[coef_addr]`.

`rst_n` is an asynchronous, active-low reset. It clears `out_valid` and drops
any request in flight. While `in_valid` is low, `a` and `coef_addr` are
ignored and `p` holds its last value.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 16 | operand width, even, ≥ 4; the product is 2N bits |
| `DEPTH` | 64 | number of ROM words (`coef_rom`, top) |
| `VARIANT` | `NR4SD_MINUS` | digit set of the low digits (`NR4SD_PLUS` is the other) |

The method is evaluated at input widths of 16, 24 and 32 bits. All three are
simulated here, in both variants.

### Coefficient table

The ROM holds a quarter-wave sine, as an FFT twiddle table would. Entry k is:

`round((2^(N-1) - 1) · sin(2π·k / (4·DEPTH)))`

The formula is in `nr4sd_pkg::sine_coef`. To use other coefficients (filter
taps, for instance), change that function. Everything downstream adapts,
because the encoding is computed from it.

## Files

| file | contents |
|---|---|
| `rtl/nr4sd_pkg.sv` | variant enum, decoded-digit struct, digit decoders, sine table function |
| `rtl/nr4sd_encoder.sv` | coefficient → N+1-bit pre-encoded word |
| `rtl/coef_rom.sv` | table of encoded coefficients, registered read |
| `rtl/nr4sd_ppg.sv` | digit decoding and partial product rows |
| `rtl/pp_tree.sv` | carry-save reduction tree and final adder |
| `rtl/nr4sd_multiplier.sv` | ppg + tree |
| `rtl/nr4sd_premult_system.sv` | top: ROM + multiplier + pipeline registers |
| `tb/nr4sd_ref_pkg.sv` | integer reference model used by all testbenches |
| `tb/tb_*.sv`, `tb/system_checker.sv` | self-checking testbenches |

## Verification

Every testbench checks its results against `nr4sd_ref_pkg`, which is written
independently of the RTL:

* It encodes by repeated division: it takes the residue mod 4, picks the digit
  of the variant's set that matches, subtracts it and divides by 4.
* It decodes with explicit tables.
* It compares products with integer multiplication.

Each testbench prints `TB_RESULT checks=… failures=…`.

| testbench | what it covers |
|---|---|
| `tb_nr4sd_encoder` | Both variants, exhaustive at N = 8 and 16, random at N = 32. The word must equal the reference, decode back to B and use only valid codes. |
| `tb_coef_rom` | Every word of an NR4SD- and an NR4SD+ ROM, the reset value, the 1-cycle read latency, and that the output holds while `en` is low. |
| `tb_nr4sd_ppg` | Every row satisfies `row + negc = d_j·a` for random words and extreme multiplicands, in both variants. |
| `tb_pp_tree` | Random rows, plus all-ones and all-zero rows, at N = 8, 16 and 32. |
| `tb_nr4sd_multiplier` | Both variants: exhaustive at N = 8, random plus extreme operands at N = 16, 24 and 32. |
| `tb_nr4sd_premult_system` | End to end at the default parameters (full size). See below. |
| `tb_nr4sd_widths` | The whole system at N = 16, 24 and 32 in both variants. Every coefficient is multiplied by the extreme multiplicands and by random ones. |

`tb_nr4sd_premult_system` drives 20 000 random requests with idle cycles and a
reset while a request is in flight. It checks each product and its exact
two-cycle latency. It also counts how often each mechanism was used and fails
if any count stays at zero. The mechanisms are:

* a negative digit
* a 2A row
* each nonzero value of the MB top digit
* a zero coefficient
* a negative multiplicand
* back-to-back requests
* idle cycles
* a reset while a request is in flight

The sine table holds no negative coefficient, so a negative top digit does not
occur in this testbench. The unit testbenches cover it.

To simulate with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/nr4sd_pkg.sv tb/nr4sd_ref_pkg.sv tb/tb_nr4sd_premult_system.sv \
    --top-module tb_nr4sd_premult_system
./obj_dir/Vtb_nr4sd_premult_system
```

Lint any module the same way with `verilator --lint-only -Wall`, listing
`rtl/nr4sd_pkg.sv` first.

## What follows the method and what is this design's own choice

These parts follow the method:

* pre-encoding the coefficients off-line into a ROM
* the NR4SD- and NR4SD+ digit sets, four values each
* 2 bits per low digit and an MB top digit
* N+1 bits per coefficient
* N/2 partial products
* the evaluated widths: 16, 24 and 32 bits

These parts are choices made here:

* the bit codes of the digits
* the ripple-carry form of the encoder
* the coefficient table (a quarter-wave sine), its size (64) and its scaling
* the registered ROM read, the two-stage pipeline and the valid handshake
* the reset behaviour
* the decoding gates
* the single correction row and full sign extension in the accumulator
  (instead of sign-extension-prevention constants)
* the Wallace-style 3:2 tree and the plain final adder

No timing target is built into the RTL. The method's area and power figures
come from sweeping the clock period, in 0.2 ns steps up to 4 ns, when
synthesizing for a 90 nm standard-cell library. A synthesis flow reproduces
that sweep by setting the clock constraint; the RTL does not change.

The baselines the method is compared with are not included:

* a conventional MB multiplier fed from a two's complement ROM
* an MB multiplier whose ROM stores 3-bit MB digits
