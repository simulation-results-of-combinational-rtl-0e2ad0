# Reversible-gate Wallace tree multiplier and decoder-based circuits

This RTL builds combinational arithmetic out of *reversible* gates: gates with
as many outputs as inputs, whose input can always be recovered from the
output. Every logic cell here is one of five classic reversible gates
(Feynman, Toffoli, Peres, Fredkin and Haghparast-Navi), and any output a
gate produces that nothing needs is left as a "garbage" output. The
centerpiece is an 8 x 8 Wallace tree multiplier (`wallace_tree`),
unsigned by default and two's complement on request. It reduces partial
products with 4:2 compressors, then with full adders, and adds the last two
rows with a carry-select adder.
Next to it is a family of small circuits built on one idea. A reversible
decoder produces all minterms of its inputs, and any function of those
inputs is the OR of some of its minterms. These are a 4-to-16 decoder, a
full adder, a full subtractor, a 2:1 multiplexer and a 2-bit comparator.

Everything is combinational. There is no clock, reset or handshake, and an
output follows its inputs after the gate delays.

## The reversible gates

| gate | module | inputs -> outputs | used as |
|---|---|---|---|
| Feynman (FG), 2x2 | `rev_feynman` | P = A, Q = A ^ B | XOR; NOT when B = 1; XOR-accumulate of decoder lines |
| Toffoli (TG), 3x3 | `rev_toffoli` | P = A, Q = B, R = AB ^ C | AND when C = 0: the partial products |
| Peres (PG), 3x3 | `rev_peres` | P = A, Q = A ^ B, R = AB ^ C | half adder when C = 0 (`ha`) |
| Fredkin (FRG), 3x3 | `rev_fredkin` | P = A, Q = A ? C : B, R = A ? B : C | 2:1 mux (`smux`); line splitter in the decoder |
| HNG, 4x4 | `rev_hng` | P = A, Q = B, R = A^B^C, S = maj(A,B,C) ^ D | full adder when D = 0 (`fa`) |

These are the standard definitions of the gates. The RTL wires every cell
through one of these modules, so the gate count of a block can be read
straight from its instance tree. A synthesis tool flattens them into
ordinary logic, and the garbage outputs are removed as unused. That is why
lint reports many unused `g_*` signals: they are the garbage outputs, left
visible on purpose.

Three further gates of the same family, the modified Fredkin gate, the BVF
gate and the double Feynman gate, play no part in any circuit here and are
not provided.

## The Wallace tree multiplier

```
 x[7:0], y[7:0]
      |
 partialproducts   64 Toffoli gates: p[i*8+j] = x[j] & y[i]
      |            row i = (x & y[i]) << i, eight rows
 first stage       rows 0-3 and rows 4-7 each go through one row of 16
      |            cmprsr4_2 cells -> 4 rows (sum row + carry row per group)
 second stage      two carry-save rows of fa cells (HNG) -> 2 rows
      |
 final adder       csel_adder, 16 bits, 4-bit carry-select blocks
      |
   mul[15:0]
```

### 4:2 compressor (`cmprsr4_2`)

This is the cell that is least obvious. It takes five bits of one column
(`x1..x4` and `cin`) and returns `sum` at the column's weight, plus `carry`
and `cout` at the next weight:

    x1 + x2 + x3 + x4 + cin = sum + 2 * (carry + cout)

It is built from two kinds of sub-cell. The `special` cells produce XOR and
XNOR together, from two Feynman gates. The `smux` cells are 2:1
multiplexers, each one Fredkin gate:

    x12   = x1 ^ x2                (special)
    x34   = x3 ^ x4                (special)
    x1234 = x12 ? ~x34 : x34       (smux)
    cout  = x12 ? x3 : x1          (smux)
    carry = x1234 ? cin : x4       (smux)
    sum   = x1234 ^ cin            (special)

`cout` does not depend on `cin`. A row of compressors across the columns
can therefore chain `cout` of column k into `cin` of column k+1 without a
ripple: each row of the first stage takes one compressor delay. The sum bits
form a sum row, the carry bits shifted up one place form a carry row, and
the four input rows of a group become two.

### Second stage and final adder

The four rows left by the compressors go through two carry-save rows of full
adders. The first adds rows 0, 1 and 2; the second adds the result to row 3.
This leaves two rows. `csel_adder` adds them in 4-bit blocks. Block 0 is a
ripple adder, whose lowest bit is a half adder. Every other block computes
its sum twice, for a carry-in of 0 and of 1, and `smux` cells pick one when
the real carry arrives. So the carry crosses each block through one
multiplexer, not through four full adders.

Each intermediate row is kept 16 bits wide. An unsigned product is below
2^16, so any carry out of bit 15 is zero and is dropped. A side effect of this
reduction: the two rows that reach the final adder never both have a 1 in
bits 0..3. So in the unsigned 8 x 8 multiplier the carry into the second
carry-select block is always 0.

### Signed mode

With `SIGNED = 1` the multiplier uses the Baugh-Wooley form of a
two's-complement product. Each partial product that pairs a sign bit with a
non-sign bit (`x[7] & y[j]` or `x[j] & y[7]`, for j < 7) is inverted. The
inversion costs nothing: its Toffoli gate gets its target tied to 1 instead
of 0, giving NAND. Two constant 1s are added, at weights 2^8 and 2^15. They
go into row 0, whose own bits stop at weight 2^7. The tree then runs
unchanged. Carries out of bit 15 are dropped, so every stage keeps the
total modulo 2^16, which is exactly the 16-bit signed product.

### Parameters

`wallace_tree #(N, BLK, SIGNED)`: N is the operand width (default 8) and
must be a multiple of 4, since there is one compressor group per four rows.
BLK is the carry-select block size (default 4) and must divide 2N. SIGNED
(default 0) selects two's-complement operands. For larger N the
second stage is a linear chain of carry-save rows, one per extra row, not a
log-depth tree. N = 12 is tested.

## Circuits on the reversible decoder

`rev_decoder #(N)` (default 4 -> 16 lines, `y[v] = (a == v)`) decodes one
input bit at a time, most significant first:

* A Feynman gate with its target tied to 1 turns the top bit into two lines,
  `~a` and `a`.
* Each further bit `b` splits every existing line `L` into `~b & L` and
  `b & L`. The split is one Fredkin gate with control `b`, data `L` and
  constant 0.
* The control output of each Fredkin gate feeds the control of the next, so
  the bit passes along a row of gates and is never fanned out.

An N-input decoder costs 1 Feynman gate and 2^N - 2 Fredkin gates.

Because exactly one decoder line is high, the OR of any set of lines equals
their XOR. `line_or` computes it with a chain of Feynman gates: the target
starts at 0 and each chosen line is XORed in. Each circuit is then just a
decoder plus one mask per output:

| module | decoder input | outputs (minterms) |
|---|---|---|
| `dec_full_adder` | {a, b, cin} | sum = 1,2,4,7; cout = 3,5,6,7 |
| `dec_full_subtractor` | {a, b, bin} | diff = 1,2,4,7; bout = 1,2,3,7 |
| `dec_mux` | {sel, d1, d0} | y = 1,3,6,7 |
| `dec_comparator` | {a[1:0], b[1:0]} | lt / eq / gt masks computed at elaboration |

## Top level

`rev_circuits_top` places the multiplier (`x`, `y`, `mul`) and the decoder
circuits side by side, each with its own prefixed ports (`dec_*`, `fa_*`,
`fs_*`, `mux_*`, `cmp_*`). The two parts share nothing.

## Where this design makes its own choices

The overall structure is fixed by the design description: partial products,
then compressors, then full adders, then a carry-select final adder. So are
the cell names (`partialproducts`, `cmprsr4_2`, `special`, `smux`, `fa`),
the 8-bit operands and 16-bit product, the use of Toffoli, Peres and HNG
gates, and the decoder-based full adder, full subtractor, multiplexer and
comparator with a 4-to-16 decoder. The following are this implementation's
own choices:

* **Unsigned by default.** The description calls the multiplier signed, but
  its example result, 10101010 x 10101010 = 0111000011100100
  (170 x 170 = 28900), is the unsigned product. The default (`SIGNED = 0`)
  reproduces that example exactly. `SIGNED = 1` gives the two's-complement
  product, and the Baugh-Wooley method it uses is this implementation's
  choice.
* **Compressor internals.** The equations above, and the use of a Fredkin
  gate for `smux` and Feynman gates for `special`.
* **Row grouping.** Groups of four rows, and carry-save ordering in the
  second stage.
* **No 5:2 compressors.** Only 4:2 compressors are used.
* **Final adder size.** Carry-select block size 4.
* **Decoder circuits.** The decoder's gate structure, the Feynman-chain OR,
  the 2:1 multiplexer size and the 2-bit comparator width.
* **Garbage outputs.** Fanning out garbage-free signals is avoided only
  inside the decoder. Elsewhere, as on an FPGA, a signal may drive several
  gates.

Gate counts, garbage-output counts and quantum cost are not computed by the
RTL.

## Simulating

Every module has a self-checking testbench `tb/<module>_tb.sv` that prints
`TB_RESULT checks=N failures=M`. The gates and decoder circuits are checked
over their full truth tables. The multiplier is checked over all 65,536
operand pairs, both unsigned and signed, plus random 12-bit operands. The top-level testbench
`rev_circuits_top_tb` runs everything at the default sizes. It also counts
how often each mechanism fired: compressor carries, carry-save carries,
carry-select blocks taking the carry-in-1 sum, every decoder line, both
multiplexer inputs and all three comparator results. It fails if any never
did. With Verilator:

```
verilator --binary --timing -Irtl -y rtl +libext+.sv \
  --top-module rev_circuits_top_tb tb/rev_circuits_top_tb.sv
./obj_dir/Vrev_circuits_top_tb
```

Swap in another testbench name to check a single block. The full top-level
run takes well under a second.
