# Complex floating-point multiplier with shared Booth encoding and combined 4:2 trees

This is a combinational macro cell that multiplies two complex numbers. Each
number is packed into one 32-bit word. A textbook complex multiplier computes
four real products (ac, bd, ad, bc) and then adds them in pairs. This design
never forms the four products separately:

- **Booth encoders are shared.** Only `a` and `b` are Booth-encoded. The
  digits of `a` serve both `ac` and `ad`, and the digits of `b` serve both
  `bc` and `bd`.
- **One tree per result part.** The partial products of `ac` and `-bd` go
  into one Wallace tree, and those of `bc` and `ad` into another. Each tree
  ends in one carry-propagate adder. No adder is spent on a single product,
  and no product is normalized on its own.
- **The tree is built from 4:2 counters.** The cells are Reduced Delay
  Counters (RDC). They give a more regular tree with fewer levels than full
  adders do.
- **The final adder is shaped to the tree's timing.** Its block sizes match
  the order in which the bits leave the tree.
- **Normalization happens once.** It runs once for the whole complex result,
  because both parts share one exponent.

```
        Re P = ac - bd          Im P = ad + bc
```

The block structure follows a published ASIC macro-cell design. That design
was built in a 1.5 µm CMOS gate-array library (LSI 10K). It reported about
10,800 gates, about 15.6 ns from Booth encoding to the final-adder inputs,
and 20.8 ns in total. Those numbers belong to that implementation. Nothing in
this RTL checks timing. The number format's sign convention, the exponent
bias and the rounding rule are not specified by the original design. They are
choices made here, and they are marked as such below and in each file's
header.

## Number format

```
 31      26  25  24            13  12  11             0
+----------+----+----------------+----+----------------+
| exponent | Sr | real magnitude | Si | imag magnitude |
|  6 bits  |    |    12 bits     |    |    12 bits     |
+----------+----+----------------+----+----------------+
```

The field positions are those of the original format.

- **Shared exponent (original).** The real and imaginary parts share one
  exponent.
- **Reading of the fields (this design's choice).** Each part is a sign bit
  plus a 12-bit magnitude. The value of a part is `(-1)^S * M/4096 * 2^(E-32)`.
- **Normalized result.** The larger of the two result magnitudes has bit 11
  set. The smaller part keeps whatever precision the shared exponent leaves
  it.
- **No hidden bit.** A hidden leading one cannot be used, because only one of
  the two parts can be normalized.

Inside the datapath each part becomes a 13-bit two's-complement mantissa in
the range -4095 to 4095. The magnitude bound matters:

```
|ac - bd| <= 2 * 4095^2 = 33,538,050 < 2^25
```

So every real or imaginary sum fits exactly in 26 signed bits. That is the
width of the trees and of the final adders. All tree and adder arithmetic is
therefore done modulo 2^26, and carries out of bit 25 are dropped.

## Datapath

```
 w_i ──┬─ exp ───────────────────────────────┐
       ├─ a ─► booth_enc ─┬─► pp_select(c)  AC ─┐           exp_adder
       │                  └─► pp_select(d)  AD ─┼──┐            │
       └─ b ─► booth_enc ─┬─► pp_select(d) -BD ─┘  │            │
                          └─► pp_select(c)  BC ────┤            │
 z_i ── c, d, exp                                  │            │
                 mwt (AC,-BD) ─► final_adder ─► Re ┐            │
                 mwt (BC, AD) ─► final_adder ─► Im ┴─► norm_round ─► p_o, ovf_o, unf_o
```

| Module        | Role |
|---------------|------|
| `cplx_mult`   | Top level. Unpacks the words, wires the blocks and packs the result. |
| `exp_adder`   | Computes `ea + eb - 32` as a signed 9-bit value. |
| `booth_enc`   | Radix-4 Booth recoder. Turns a 13-bit operand into 7 digits in {-2..2}. |
| `pp_select`   | Applies one operand's digits to a multiplicand. Gives 7 rows plus a row of +1 correction bits. |
| `rdc`         | The 4:2 Reduced Delay Counter cell. |
| `rdc_row`     | 26 RDC cells side by side. Compresses 4 rows into 2. |
| `mwt`         | Modified Wallace Tree. Three RDC levels reduce 16 rows to 2. |
| `vba_section` | A carry-skip adder section with blocks of different sizes. |
| `final_adder` | The 26-bit two-section conditional-sum adder built from VBA sections. |
| `norm_round`  | Shared normalization, rounding, exponent adjust and range handling. |
| `cplx_pkg`    | Format constants, the packed-word struct, the Booth digit type and sign-magnitude conversion. |

### Sharing the Booth digits, and getting -bd for free

The selectors are the "Select AC / BD / BC / AD" boxes of the original
organization. A Booth digit is stored as `{neg, one, two}`. The selector
chooses 0, x or 2x from `one` and `two`. It inverts the row when the digit is
negative. The +1 that completes the two's-complement negation goes into a
separate correction row at bit 2i. The rows are fully sign-extended to 26
bits.

The real part needs `-bd`. The BD selector gets it by having `negate_i` flip
the sign of every digit of `b`. Negating a product is then free: the encoder
is unchanged and no extra adder is needed. A digit of value 0 whose sign is
flipped gives an all-ones row plus a correction 1, which adds up to 0.

Each tree receives 7 + 7 Booth rows and 2 correction rows, 16 rows in all.
That is exactly what three levels of 4:2 compression reduce to 2 rows
(16 → 8 → 4 → 2). The Booth recoding radix (4), the sign-extension method and
this tree arrangement are this design's choices. The original describes a
single combined 4:2 tree per part, but not its exact wiring.

### The Reduced Delay Counter

A 4:2 counter adds five bits of equal weight (I1..I4 and a CIN from the next
lower bit). It returns one sum bit and two carry bits of double weight:

```
I1 + I2 + I3 + I4 + CIN = S + 2*(C + COUT)
```

COUT depends only on I2, I3 and I4, never on CIN. A row of these cells
therefore has no rippling carry: the CIN of bit k is the COUT of bit k-1,
which was computed without looking at any carry. `rdc` is written at gate
level with the cell's own gates:

- S: an XOR of I1 and CIN, a 3-input XNOR of I2..I4, and an XNOR of the two.
- C: a NAND and a NOR of I1 and CIN, chosen by an inverting 2:1 mux whose
  select is the 3-input XNOR.
- COUT: three 2-input NANDs over the pairs of I2..I4, then a 3-input NAND.

Which pin of each gate meets which input was read from a gate drawing. That
reading is confirmed by the identity above, which `tb_rdc` checks
exhaustively. The original reports 3 XOR delays through this cell, against 4
for the usual 4:2 counter, and about 30 gate equivalents against 20.

### Final adder tuned to arrival times

The bits at both ends of a Wallace tree settle earlier than the middle bits.
The adder is split to match:

- **Bits 0–12** are added by one VBA (variable block adder) section. Its
  blocks, from the LSB, are 1, 1, 3, 5 and 3 bits.
- **Bits 13–25** are added twice, by two identical VBA sections with blocks
  1, 3, 5, 3 and 1. One assumes a carry-in of 0 and the other a carry-in of 1.
- **A 13-bit multiplexer** picks one of the two high sums, steered by the
  carry out of the low section.

Inside each block the carry ripples. When every bit of a block propagates,
the block's carry-in is passed straight to its carry-out. That is the carry
skip that makes variable block sizes pay off. The 13/13 split and the block
sizes are the original's. The original tuned a 12/14 split for its baseline
full-adder tree, but that baseline is not built here.

### Normalization and rounding

`norm_round` gets the two 26-bit sums. On that scale 2^24 stands for
1.0 · 2^(ea+eb-64). The steps are:

1. Take both magnitudes. OR them together. The leading one of the OR is the
   leading one of the larger part, so a single leading-zero count `lz` gives
   the shift for both parts.
2. Shift both magnitudes left by `lz`. Keep the top 12 bits and round to
   nearest on the next bit, with ties away from zero.
3. The larger part may round up to 4096. In that case both parts are rounded
   again one bit further left, and the exponent grows by one. This avoids
   double rounding.
4. The exponent is `ea + eb - 32 + 1 - lz (+1)`.
5. Handle the range:
   - Above 63: each non-zero part saturates to magnitude 4095 and keeps its
     sign, and `ovf_o` is set.
   - Below 0: the result is flushed to zero and `unf_o` is set.
   - A part that rounds to zero gets sign 0. An all-zero product gives the
     all-zero word.

The original proposes limiting the shifter to five positions, as a later
improvement. This design keeps a full-range shifter, because its inputs need
not be normalized.

## Interface and timing

```systemverilog
cplx_mult #(.EW(6), .FW(12), .BIAS(32)) u_mul (
  .w_i  (w),    // [31:0] packed W = a + ib
  .z_i  (z),    // [31:0] packed Z = c + id
  .p_o  (p),    // [31:0] packed W*Z
  .ovf_o(ovf),  // exponent overflow (result saturated)
  .unf_o(unf)   // exponent underflow (result flushed to zero)
);
```

The cell is purely combinational. It has no clock and no reset, and it adds
no cycles of latency. Register the inputs and outputs in the surrounding
design as its timing requires. `EW` and `FW` are fixed by `cplx_pkg`, and
elaboration stops with an error if they are changed. `BIAS` may be changed
freely. The final adder's block layout assumes 26 bits.

## Where this departs from, or goes beyond, the original

These are this design's own choices:

- Sign-magnitude parts, bias 32, and the scaling of the value as `M/4096`.
- Radix-4 Booth recoding, full sign extension, and separate correction rows.
- The 16 → 8 → 4 → 2 arrangement of the tree.
- Round to nearest with ties away from zero.
- Saturation on overflow and flush to zero on underflow.
- A full-range normalization shifter.

Two parts of the original are not reproduced:

- **Physical placement and delay tuning.** The original chose which RDC input
  takes which signal by arrival time. RTL does not capture that, and these
  files contain no timing constraints.
- **The baseline full-adder Wallace tree and its 12/14-bit final adder.** The
  original used these only for comparison.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. All reference
values are computed independently of the RTL.

- `tb_rdc`: all 32 input combinations. Checks the counting identity, that
  COUT ignores CIN, and that COUT is the majority.
- `tb_booth_enc`: all 8192 operands. The digits must re-add to the operand.
- `tb_pp_select`: extreme and random operands. Uses the testbench's own
  recoder, with and without negation.
- `tb_mwt`: random rows, all-ones rows and single-row patterns.
- `tb_final_adder`: random and all-propagate operands. Counts both the
  carry-select and the block-skip events.
- `tb_exp_adder`: all exponent pairs.
- `tb_norm_round`: 20,000 random sums of every magnitude, plus round-up,
  zero, overflow and underflow cases.
- `tb_cplx_mult`: 30,000 random products of packed words at the default
  size, plus corner cases. It is checked against `tb_cplx_ref_pkg`, an
  integer model of the format. It counts negative Booth digits, negated BD
  rows, carry-select and carry-skip events, multi-bit normalizing shifts,
  rounding renormalization, overflow, underflow and zero results. It fails if
  any of these never happens.

To run one, for example the end-to-end test, from the directory that holds
`rtl/` and `tb/`:

```sh
verilator --binary --timing -y rtl -y tb \
    rtl/cplx_pkg.sv tb/tb_cplx_ref_pkg.sv tb/tb_cplx_mult.sv --top-module tb_cplx_mult
./obj_dir/Vtb_cplx_mult
```

Use the same command with another `tb_<module>.sv` and `--top-module
tb_<module>`. The end-to-end test finishes in well under a second.
