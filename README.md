# Signed radix-4 Booth / Wallace-tree multiplier with a modified hybrid final adder

A combinational N x N two's-complement multiplier (N = 8 by default, 16-bit
product). It attacks the three delays of an array multiplier one by one:

1. **Fewer partial products.** Radix-4 (modified) Booth recoding turns the N
   multiplier bits into N/2 digits in {-2, -1, 0, +1, +2}, so only N/2 partial
   products are formed.
2. **Parallel reduction.** A Wallace tree of carry-save adders compresses the
   partial products to two rows, with a depth that grows logarithmically in
   the number of rows.
3. **A fast final adder.** The last two rows are summed by a *modified hybrid
   adder*: a carry-select adder whose 2-bit blocks are Kogge-Stone prefix
   adders, with every XOR gate built as a 2:1 multiplexer.

```
 a ──► complement_generator ──► x, 2x, ~x, ~2x ─┐
                                                 ▼
 b ──► booth_encoder[i] ──► {neg,two,one,zero} ──► booth_decoder[i] ──► pp[i], neg_bit[i]
        (N/2 of each)                                   │
                                                        ▼
                           N/2 shifted rows + 1 correction row
                                                        ▼
                                   wallace_tree (3:2 CSA layers)
                                                        ▼
                                   sum_row, carry_row
                                                        ▼
                           mod_hybrid_adder (2N bits) ──► p = a * b
```

## Radix-4 Booth recoding

The multiplier `b` is read in overlapping 3-bit groups
`{b[2i+1], b[2i], b[2i-1]}` with `b[-1] = 0`. The value of digit *i* is
`-2*b[2i+1] + b[2i] + b[2i-1]`, and `a*b = sum_i digit_i * a * 4^i`. Because
the top bit of the last group is the sign bit of `b`, which has weight
`-2^(N-1)`, this works directly for signed operands.

`booth_encoder` turns a group into four control lines (`booth_sel_t` in
`booth_pkg`):

| group | digit | neg | two | one | zero |
|-------|-------|-----|-----|-----|------|
| 000   | +0    | 0   | 0   | 0   | 1    |
| 001   | +1    | 0   | 0   | 1   | 0    |
| 010   | +1    | 0   | 0   | 1   | 0    |
| 011   | +2    | 0   | 1   | 0   | 0    |
| 100   | -2    | 1   | 1   | 0   | 0    |
| 101   | -1    | 1   | 0   | 1   | 0    |
| 110   | -1    | 1   | 0   | 1   | 0    |
| 111   | -0    | 1   | 0   | 0   | 1    |

Note the last row: `neg` is set together with `zero`. The decoder therefore
gives `zero` priority over `neg`, both for the selected value and for the
correction bit below.

## Forming the signed partial products

`complement_generator` computes once, for all digits, the N+1-bit values
`x = a` (sign-extended), `2x = a << 1` and their bitwise complements `~x` and
`~2x`. Each `booth_decoder` is a multiplexer: `zero` gives 0, `two` gives `2x`
or `~2x`, `one` gives `x` or `~x`, the complemented form being chosen when
`neg` is set.

A negative multiple needs the two's complement, `~m + 1`. Rather than an
incrementer per partial product, the decoder outputs the one's complement and
a separate `neg_bit = neg & ~zero`. In `booth_multiplier`:

* partial product *i* is sign-extended to 2N bits and shifted left by 2i;
* all `neg_bit[i]` are placed at bit 2i of one extra row.

The tree therefore receives N/2 + 1 rows of 2N bits (5 rows of 16 bits for
N = 8). Full sign extension is used: simple and exact, at the price of some
full adders in the upper columns that a sign-extension-prevention scheme
would save.

## Wallace tree

`wallace_tree` works on whole rows. In each layer the rows are taken in
groups of three; each group goes through a `csa_row` (one full adder per bit,
sum kept in place, carry shifted up one bit) and becomes two rows; the one or
two rows left over pass to the next layer. Layers repeat until two rows
remain. For 5 rows the row counts go 5 → 4 → 3 → 2, i.e. three full-adder
delays. The number of layers and the rows per layer are computed at
elaboration from `ROWS`, so the same module serves any operand width. The
carry out of the top bit of each `csa_row` is dropped; that is exact because
every row is already a 2N-bit two's-complement number and only the product
modulo 2^(2N) is kept.

## Modified hybrid adder

This is the part with the most structure, built bottom-up:

**`mux_xor`.** An XOR made from one 2:1 multiplexer: the data inputs carry
`a` and `~a`, the select is `b`. Since both polarities of `a` are present, a
second multiplexer with swapped inputs gives XNOR; it is brought out as `y_n`
and unused inside the adders.

**`mod_ks_adder`.** A Kogge-Stone parallel-prefix adder with carry-in.
Pre-processing: `g = a & b`, `p = a ^ b` (via `mux_xor`). The carry-in is
folded into bit 0 as `g0 | p0 & cin`. Prefix stage: at level k each bit
i ≥ 2^k combines with bit i − 2^k, `G = G | P & G_low`, `P = P & P_low`;
after ⌈log2 WIDTH⌉ levels `G[i]` is the carry out of bit i. Post-processing:
`sum[i] = p[i] ^ carry_in[i]`, again through `mux_xor`. In the multiplier
the blocks are 2 bits wide, a single prefix level.

**`mod_hybrid_adder`.** A carry-select adder over `BLK`-bit blocks (2 by
default). The lowest block is one `mod_ks_adder` driven by the real carry-in.
Every higher block has two `mod_ks_adder`s, one with carry-in 0 and one with
carry-in 1, all computing at once. Then, from the bottom up, the carry out of
block j−1 selects block j's sum bits and block j's carry out through 2:1
multiplexers. The critical path is one 2-bit Kogge-Stone add followed by one
multiplexer per block. In the multiplier it is instantiated at 2N bits
(eight blocks for N = 8) with carry-in 0; its carry out lies above the
product and is left unused.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `booth_multiplier` | `N` | 8 | operand width; even, ≥ 4 |
| `mod_hybrid_adder` | `WIDTH`, `BLK` | 4, 2 | adder width (multiple of `BLK`), block width |
| `mod_ks_adder` | `WIDTH` | 2 | adder width, ≥ 2 |
| `wallace_tree` | `ROWS`, `W` | 5, 16 | input rows, row width |
| `complement_generator`, `booth_decoder` | `N` | 8 | multiplicand width |

The 4-bit default of `mod_hybrid_adder` and its 2-bit blocks are the sizes
for which this adder is characterised on its own. The operand width of the
multiplier is not fixed by the architecture; 8 is this implementation's
choice, and the testbenches also run N = 4, 16 and 32.

## Timing and interface

Everything is combinational: no clock, no reset, no handshake. `p` is valid
one propagation delay after `a` and `b` settle. To use the multiplier in a
clocked design, register its inputs and outputs around it (and retime as your
tool allows); no pipeline registers are built in.

## Choices not fixed by the architecture

* Operand width N = 8; operands and product are two's complement.
* One's complement partial products plus a separate row of "+1" correction
  bits; full sign extension of every partial product.
* Word-level (row) Wallace tree rather than a hand-drawn bit-level dot
  diagram; the reduction is functionally the same.
* `zero` overrides `neg` for group 111.
* The lowest adder block is added once with the real carry-in; only the
  higher blocks are duplicated.
* The multiplier is purely combinational, with no registers.

A conventional hybrid adder (plain Kogge-Stone blocks with XOR gates) is the
natural baseline for this adder; it differs only inside `mux_xor` and is not
included.

## Verification

Each testbench in `tb/` is self-checking, prints
`TB_RESULT checks=<n> failures=<n>` and stops with a watchdog if it hangs.
Expected values come from integer arithmetic in the testbench, never from the
RTL.

| testbench | what it covers |
|---|---|
| `tb_mux_xor` | all 4 input pairs, both outputs |
| `tb_mod_ks_adder` | exhaustive at WIDTH 2, 5 and 8 (all operands and carry-ins) |
| `tb_mod_hybrid_adder` | exhaustive at 4 bits; 16 bits random plus long carry chains; counts carry-in-1 selections |
| `tb_booth_encoder` | all 8 groups against the table and against the digit value |
| `tb_complement_generator` | all 256 multiplicands |
| `tb_booth_decoder` | 8 encoder words × 256 multiplicands, `pp + neg_bit == digit * x` |
| `tb_wallace_tree` | random rows, 5×16 and 9×24 trees, `sum + carry == Σ rows` |
| `tb_booth_multiplier` | all 65 536 signed 8×8 pairs at default parameters; counts every Booth digit, correction bits, carry-in-1 selections and a carry running through all higher adder blocks, and fails if any never happens |
| `tb_booth_multiplier_widths` | N = 4 exhaustive, N = 16 and 32 random plus corner operands |

The default-size multiplier is thus verified exhaustively. Timing, area and
power have not been characterised.

## Simulating

With Verilator 5 (the package must come first):

```sh
verilator --binary --timing --assert -Irtl -y rtl rtl/booth_pkg.sv \
    tb/tb_booth_multiplier.sv --top-module tb_booth_multiplier -Mdir obj
./obj/Vtb_booth_multiplier
```

Replace the testbench name to run any other. Lint a module on its own with
`verilator --lint-only -Wall -y rtl rtl/booth_pkg.sv rtl/<module>.sv`.
Verilator reports unused `y_n` pins (`PINCONNECTEMPTY`) and the unused final
carry out of the multiplier; both are intended.

## Files

`rtl/`: `booth_pkg` (shared types), `mux_xor`, `mod_ks_adder`,
`mod_hybrid_adder`, `booth_encoder`, `complement_generator`,
`booth_decoder`, `csa_row`, `wallace_tree`, `booth_multiplier` (top).
`tb/`: one `tb_<module>` per module (`csa_row` is covered by `tb_wallace_tree`)
plus `tb_booth_multiplier_widths`.
