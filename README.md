# Decimal Matrix Code (DMC) protected memory, 64-bit word

Radiation can flip several neighbouring memory cells in one strike (a
*multiple cell upset*, MCU). Single-error-correcting codes cannot repair
such clusters, and stronger codes (BCH, Reed-Solomon) need large, slow
decoders. The Decimal Matrix Code trades check bits for a very simple
decoder. It arranges the data word as a small matrix and protects it twice:

* each **row** is protected by *integer sums* of its symbols (the "decimal"
  part);
* each **column** is protected by an ordinary parity bit.

The column parity says *which bit position* went wrong. The row sums say *in
which row*. Together they locate, and so correct, every flipped cell of a
cluster that stays inside one row: up to 32 cells of a 64-bit word.

A second idea keeps the hardware small. The decoder has to recompute the
check bits from the data it reads, and that is exactly what the encoder does.
So a single encoder serves both directions: it encodes on a write and
recomputes the check bits on a read. This is called the *encoder-reuse
technique* (ERT).

This repository holds synthesizable SystemVerilog for the code and for a small
memory built around it, plus a self-checking testbench for every module.

## The matrix and the check bits

The 64 data bits `D63..D0` are cut into sixteen 4-bit symbols. Symbol `s`
holds bits `4s+3..4s`. The symbols form a 2 x 8 matrix:

```
            column of symbols:  0    1    2    3    4    5    6    7
row 0  (D31..D0)      symbol    0    1    2    3    4    5    6    7
row 1  (D63..D32)     symbol    8    9   10   11   12   13   14   15
```

**Horizontal check bits H (40 bits).** In each row, symbol `j` is paired
with symbol `j+4`. The pair's unsigned sum (0..30) is kept as one 5-bit group.
That gives 8 groups of 5 bits:

| group | H bits  | sum of            |
|-------|---------|-------------------|
| 0     | H4..H0  | D3..D0 + D19..D16 |
| 1     | H9..H5  | D7..D4 + D23..D20 |
| 2     | H14..H10| D11..D8 + D27..D24|
| 3     | H19..H15| D15..D12 + D31..D28|
| 4     | H24..H20| D35..D32 + D51..D48|
| 5     | H29..H25| D39..D36 + D55..D52|
| 6     | H34..H30| D43..D40 + D59..D56|
| 7     | H39..H35| D47..D44 + D63..D60|

**Vertical check bits V (32 bits).** `V_i = D_i xor D_(i+32)`, i.e. the
parity of bit column `i` across the two rows.

Each word therefore needs 72 check bits: 40 H bits and 32 V bits. A stored
word is 136 bits.

## Decoding: how a cluster is located

On a read, the encoder recomputes `H'` and `V'` from the data actually read,
`D'`. Two syndromes follow:

* `dH[g] = H'[g] - H[g]`: an integer difference per group, 6 bits signed;
* `S = V' xor V`: one bit per column.

Data bit `i` lies in column `c = i mod 32`. It belongs to group
`g = 4*row + (symbol mod 4)`, with `row = i / 32`. The locator flags it when

```
err[i] = S[c]  AND  (dH[g] != 0)
```

and the corrector inverts every flagged bit: `D_correct = D' xor err`.

**Why this works.** Take an upset confined to one row. Each column then holds
at most one flipped cell, so `S` marks exactly the flipped bit positions. A
set `S[c]` could mean the cell in row 0 or the cell in row 1. The group sums
decide: only the row that was hit has groups whose sum changed. A burst of
any length up to 32 cells inside one row is repaired this way.

**Why integer sums and not parity.** A parity bit misses any even number of
flips, and an odd number of flips looks like a single one. An integer sum
changes on almost any pattern of flips inside a symbol pair. Example: symbol
0 holds `1001b` and cells 0, 2 and 3 flip, giving `0100b`. The sum of the
pair drops from 9 to 4. One parity bit over those four cells would see three
flips as one.

**Limits.** These follow from the rule above, not from this implementation:

* **Cancelling pair.** Flips in both symbols of a pair can leave the sum
  unchanged, for example +2 in one symbol and -2 in the other. The located
  columns are then not corrected. The word is still *detected*, because `S`
  is non-zero, so `err_detect` is set while `dout` is wrong. A few percent
  (3-4%) of the random bursts in the tests hit this case.
* **Both rows in one column.** Flips in the same column of both rows cancel in
  `S` and are neither located nor corrected.
* **Upset check bits.** Upsets in only `V`, or only in `H`, are harmless: one
  of the two conditions stays false, so no data bit is touched.
  Simultaneous upsets of a `V` bit and of the `H` group sharing a data bit
  invert that data bit wrongly.
* **No "uncorrectable" flag.** `err_detect` means only that some syndrome is
  non-zero, whether the word was repaired or not.

## Encoder reuse (ERT)

`dmc_codec_ert` contains one `dmc_encoder`, with a 2:1 multiplexer in front
of it driven by `en`:

| en | operation | encoder input | useful outputs |
|----|-----------|---------------|----------------|
| 0  | write: encode | `d_wr` | `h_wr`, `v_wr` (check bits to store) |
| 1  | read: syndromes and correction | `d_rx` | `d_corr`, `err_mask`, `err_detect` |

The syndrome subtracters and XORs, the locator and the corrector hang off the
same encoder outputs. Because of the sharing, one cycle can hold either a
write or a read, never both. In the memory, `en` is driven by the read
request.

## The memory (`topdecimal`)

```
 din ─┬─────────────────────────────► info memory   (16 x 64) ──┐ D'
      └─► [ mux ]─► encoder ─H,V───► redundancy mem (16 x 72) ──┤ H,V
            ▲  en = re                     │                    │
            └─────── D' ───────────────────┼────────────────────┘
                                 syndrome ─► locator ─► corrector ─► dout (reg)
                                                         D' ───────► d1   (reg)
```

* **Write** (`we=1`): `din` is encoded in the same cycle. On the rising edge,
  `din` goes into the information memory and `{V,H}` into the redundancy
  memory. In the redundancy word, `H` is bits 39..0 and `V` bits 71..40.
* **Read** (`re=1`): the memories read asynchronously, and the word at `addr`
  is decoded in the same cycle. On the rising edge, the corrected word goes
  to `dout`, the raw stored word to `d1`, and the syndrome flag to
  `err_detect`. `rd_valid` is high in the following cycle. Read latency is
  therefore one clock.
* **Upset** (`upset=1`, `we=0`): on the rising edge, the word at
  `upset_addr` is XORed with `upset_info_mask` and `upset_red_mask`. This
  stands in for a particle strike. It can be combined with a read; the read
  then sees the contents before the upset.
* **`we` and `re` must not both be high.** An assertion checks this.
* **`rst`** is synchronous and active high. It clears only the output
  registers. The memory arrays have no reset, so write a word before
  reading it.

`DEPTH` (default 16) sets the number of words.

## Where this RTL departs from, or adds to, the published design

The published design gives the code (symbol pairing, sums, column parity,
2 x 8 x 4 shape), the decoder chain (subtracters and XORs, locator,
corrector) and the encoder sharing. The following are choices made here:

* **Locator rule.** The published design only says that the locator uses
  `dH` and `S` to find the bits in error. The per-bit AND above is the
  simplest rule that does this for a two-row matrix.
* **Syndrome format.** `dH` is 6-bit two's complement, and is defined as
  recomputed minus stored.
* **Memory and its controls.** The published top level has only `din`,
  `clk`, `rst`, `dout` and `d1`. The address, `we`/`re`, the upset port,
  `rd_valid`, `err_detect`, the depth of 16 words and the asynchronous-read
  memories are additions, so the memory can be used and tested.
* **Source of `d1`.** In the published implementation, `d1` came from an
  adder with a fixed constant used to corrupt the data. Here `d1` is the raw
  word read from memory, and corruption comes from the upset port.
* **Single encoder.** The published implementation schematic shows two
  encoder instances. This RTL uses a single shared encoder, as the encoder
  reuse calls for.
* **Parameters.** `K1`, `K2` and `M` are parameters of the code modules
  (`K2` must be even). `K2 = 4` gives the 32-bit version of the code. Only
  the 2 x 8 x 4 default is tested. `topdecimal` itself is fixed at the
  default shape.

## Files

| file | contents |
|------|----------|
| `rtl/dmc_pkg.sv` | code shape constants (K1=2, K2=8, M=4, widths 64/40/32/72, depth 16), group-index function |
| `rtl/dmc_encoder.sv` | 8 five-bit adders, 32 column XORs, data pass-through |
| `rtl/dmc_syndrome.sv` | per-group subtraction, column XOR |
| `rtl/dmc_locator.sv` | per-bit error mask, detect flag |
| `rtl/dmc_corrector.sv` | XOR of the mask into the received word |
| `rtl/dmc_codec_ert.sv` | shared encoder plus decoder chain |
| `rtl/dmc_sram.sv` | word memory with upset port (used twice) |
| `rtl/topdecimal.sv` | the protected memory |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example:

```
verilator --binary --timing --assert -Irtl rtl/dmc_pkg.sv tb/tb_topdecimal.sv \
          --top-module tb_topdecimal
./obj_dir/Vtb_topdecimal
```

Swap in another `tb_<module>` to run a different test. `-Irtl` lets verilator
find the modules. Every testbench runs at the default sizes in well under a
second.

What the tests establish:

* **Encoder.** Hand-worked words, plus 2000 random words against a reference
  that adds symbols as integers.
* **Syndrome calculator.** Exact signed differences.
* **Locator.** Checked against the row/column rule.
* **Codec.** 3000 random words through encode and then decode, with random
  bursts of 1 to 32 cells inside one row, including whole-row bursts.
  Whenever every touched pair changed its sum, the word must be recovered
  exactly and `err_mask` must equal the upset. Upsets of only `V` or only
  `H` bits must leave the data alone.
* **Memory (`tb_topdecimal`).** 3000 random writes, clean reads, MCU reads
  and check-bit upsets at the default 16-word size. The test checks the
  one-cycle read latency and counts each mechanism: writes, reads,
  corrections, 32-cell corrections and check-bit-only upsets. It fails if
  any of them never happened.

Timing closure and area were not studied. The decoder is one combinational
path: encoder adders, then subtracters, zero detect, AND, and XOR.
