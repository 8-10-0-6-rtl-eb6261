# Rate 8/10 (0,6) MTR encoder and decoder

In high-density magnetic recording the sequence detector (EPRML, FDTS/DF and
similar) makes most of its errors on bit patterns with three or more
consecutive transitions. A *maximum transition run* (MTR) code removes those
patterns before they reach the medium. This RTL implements a byte-oriented MTR
block code: every 8-bit user byte becomes a 10-bit codeword. The stream of
concatenated codewords never has three consecutive ones, which in NRZI
recording means never three consecutive transitions. It never has more than
six consecutive zeros either, which keeps timing recovery fed (d = 0, k = 6).

The code is the rate 8/10 (0,6) MTR code published by J. Lee (1997). The
encoder and decoder are pure combinational logic. Neither needs a clock or a
reset, and a byte is coded in gate delays only.

## The constraint and the 282 candidate words

A 10-bit word can be placed next to any other word without breaking the run
limits when:

* it has no run of three ones and no run of seven zeros inside it;
* it starts and ends with at most one `1`, so two words can join into a run
  of at most two ones;
* it starts and ends with at most three `0`s, so two words can join into a
  run of at most six zeros.

Exactly 282 ten-bit words meet this. The code uses 256 of them, one per
byte. The other 26 are unused.

Bit naming follows the code's own convention. The byte is `m0..m7` and the
codeword is `c0..c9`. In the RTL, `m0` is bit 7 of `data_t` and `c0` is bit 9
of `code_t`, so a codeword reads the same as its usual 3-digit hex name. For
example, `10'h228` is `c0..c9 = 1000101000`. `c0` is the first bit sent.

## Four groups: c2 = m0, c7 = m1

The 256 codewords split into four groups of 64 that agree on two bit
positions. The encoder copies the two top data bits straight into the word:

    c2 = m0        c7 = m1

The decoder reads them straight back out. This leaves 64 words per group to
cover `m2..m7`.

## Group 00: prefix plus shared pattern modules

For `m0 m1 = 00`, bits `m2 m3` choose a 3-bit prefix on `c0 c1 c3`. The low
nibble `m4..m7` goes through a small pattern module, whose five outputs land
on `c4 c5 c6 c8 c9`:

| m2 m3 | c0 c1 c3 | c4 c5 c6 c8 c9 |
|-------|----------|----------------|
| 00    | 0 0 1    | Module A (a1..a5) |
| 01    | 0 1 1    | Module A |
| 10    | 1 0 1    | Module A |
| 11    | 0 1 0    | Module B (b1..b5) |

Module A yields only 15 legal patterns. In the first three rows, the byte with
`m4..m7 = 1111` therefore gets a special word instead:
`c0 c1 c3 c4 c5 c6 = 100101` and `c8 c9 = m2 m3`. These are codewords `228`,
`229` and `22A`.

Because one Module A serves three subgroups, 48 of the 64 words cost a single
15-output pattern function. This sharing is why the 256 words were chosen
as they were.

### Module A (`mtr_enc_module_a`)

    a1 = m4 m5 + m4 m6
    a2 = ~m4 ~m5 + ~m4 m6 ~m7
    a3 = ~m4 m6 + m4 m5 + m4 ~m6
    a4 = ~m5 m7 + ~m6 m7
    a5 = ~m5 ~m7 + ~m6 ~m7

| m4..m7 | 0000 | 0001 | 0010 | 0011 | 0100 | 0101 | 0110 | 0111 |
|---|---|---|---|---|---|---|---|---|
| a | 01001 | 01010 | 01101 | 01110 | 00001 | 00010 | 01100 | 00100 |

| m4..m7 | 1000 | 1001 | 1010 | 1011 | 1100 | 1101 | 1110 | 1111 |
|---|---|---|---|---|---|---|---|---|
| a | 00101 | 00110 | 10001 | 10010 | 10101 | 10110 | 10100 | (special word) |

### Module B (`mtr_enc_module_b`)

    b1 = m4 m5 + m4 m6 + m4 m7
    b2 = ~m4 ~m5 + ~m5 ~m6 + ~m5 ~m7
    b3 = ~m4 ~m6 + ~m4 m7 + m5 ~m6 + m5 m7
    b4 = m5 m6 + m6 ~m7 + ~m4 ~m5 ~m7
    b5 = ~m6 m7 + m4 ~m5 ~m6 + m4 ~m5 m7

All sixteen outputs are distinct. For example, `0000 -> 01110` and
`1111 -> 10110`.

## Decoding group 00

The decoder (`mtr_decoder`) sorts a group-00 word by its fixed bits:

| c0 c1 c3 c4 c5 c6 / c0 c1 c3 | m2 m3 | m4..m7 |
|---|---|---|
| 100101 (special word) | c8 c9 | 1111 |
| 001 | 00 | d1..d4 |
| 011 | 01 | d1..d4 |
| 101 | 10 | d1..d4 |
| 010 | 11 | h1..h4 |

Module d (`mtr_dec_module_d`) inverts Module A, and module h
(`mtr_dec_module_h`) inverts Module B. Both work from the five bits
`c4 c5 c6 c8 c9`:

    d1 = c4 + ~c5 c6 ~c8 c9 + ~c5 c6 c8 ~c9
    d2 = ~c8 ~c9 + ~c4 ~c5 ~c6 + c4 ~c5 c6
    d3 = ~c4 c5 c6 + c4 ~c5 ~c6 + c6 ~c8 ~c9
    d4 = c8 + ~c4 ~c5 ~c8 ~c9

    h1 = c4 + c5 ~c6 ~c8
    h2 = ~c5 c6 + ~c5 c8
    h3 = ~c5 c8 + ~c6 c8 + ~c5 ~c6 ~c8 + c5 ~c8 ~c9
    h4 = c4 c9 + c6 c9 + c4 c6 c8 + ~c4 ~c5 c6 c8 + c5 ~c8 ~c9

These are don't-care minimisations: they are correct only on patterns that
Modules A and B actually produce.

## Groups 01, 10 and 11: the codeword table

The published code also gives gate-level rules for the other three groups.
They are built from further shared modules: X is the one-hot code of `m6 m7`
on `c6 c8 c9`, Y is a 4-bit pattern, and u, s, r and v serve the decoder.
This RTL does not reproduce those rules. It builds the 192 published
codewords of these groups into a constant table, `UPPER_TABLE` in `mtr_pkg`.
Entry `i` is the codeword of byte `64 + i`.

The table is not stored as data. A constant function computes it at
elaboration from the run-length rule and a short list of patterns:

* The table is 14 segments laid end to end, each described by a mask and a
  value (`SEGMENTS`).
* A segment lists, in ascending order, every valid word whose fixed bits
  match, minus nine words the code leaves out (`UNUSED_WORDS`): `06D 16D
  09A 19A 29A 0DA 2D8 2D9 2DA`.
* Most segments hold exactly the 16 words of one value of `m2 m3`. The one
  exception is group 01 with `m2 m3 = 00`, which is three segments of 4, 4
  and 8 words.

| group (c2 c7) | m2 m3 = 00 | 01 | 10 | 11 |
|---|---|---|---|---|
| 01 | `000110x1xx`, `010110x1xx`, `01010xx1xx` | `0100xxx1xx` | `1000xxx1xx` | `x0010xx1xx` |
| 10 | `0010xxx0xx` | `0110xxx0xx` | `1010xxx0xx` | `x0110xx0xx` |
| 11 | `0010xxx1xx` | `0110xxx1xx` | `1010xxx1xx` | `x0110xx1xx` |

(Patterns are written `c0..c9`, with `x` for a free bit.)

* Encoder: `mtr_upper_table_enc` selects the entry for the byte. Synthesis
  turns the constant array into logic.
* Decoder: `mtr_upper_table_dec` compares the received word with all 192
  constant entries at once. The entries are distinct, so at most one
  comparator fires, and the byte is the OR of the matching indices plus 64.
  The two table modules are most of the design, about 1,100 word-level
  cells for the whole codec before technology mapping.

**How far to trust this part.** The set of codewords in each group is the
published one. Which byte gets which word *inside* a group is this design's
choice: the order in which the published list gives them. That order agrees
with the Module X structure wherever it can be checked. For example, the
words `044 045 046 04C` carry `c6 c8 c9` = `000 001 010 100`. Still, it may
differ from the original gate-level assignment. Any assignment within a
group is an equally valid code, because the constraints depend only on the
set of words. A system that must interoperate with another implementation
of this code should check the group 01/10/11 mapping against it. To change
the mapping, change the order of `SEGMENTS` or replace `build_upper_table`.

## Words that are not codewords

The decoder has no error output. Its behaviour on other inputs is this
design's choice:

* A group 01/10/11 word not in the table decodes to `m0 = c2`, `m1 = c7`,
  `m2..m7 = 0`.
* A group-00 word with an unused prefix (`000`, `100`, `110`, `111`, apart
  from the special words) decodes to `m2..m7 = 0`.
* A group-00 word with a valid prefix passes on whatever module d or h gives.

## Interfaces

`mtr_codec` (top) puts the two paths side by side, so that a serializer,
channel or detector can sit between them:

| port | dir | width | meaning |
|---|---|---|---|
| `enc_data` | in  | 8  | byte to encode, MSB = m0 |
| `enc_code` | out | 10 | its codeword, MSB = c0 (first bit sent) |
| `dec_code` | in  | 10 | received codeword, MSB = c0 |
| `dec_data` | out | 8  | decoded byte |

The top has no parameters. Both paths are combinational from input to
output. To pipeline them, register the inputs or outputs around `mtr_codec`.

## Where this design fixes the equations

Four terms of the pattern modules take a form chosen here:

* Module A: the third term of `a3` is `m4 ~m6`.
* Module B: the third term of `b4` is `~m4 ~m5 ~m7`.
* Module d: the second term of `d2` is `~c4 ~c5 ~c6`.
* Module h: `h3` and `h4` are re-derived as listed above.

Each was chosen so that the module maps one-to-one onto the published
codewords. Nearby forms, such as `m4 ~m7` in `a3` or `~c6 c9` in `h4`, make
patterns collide or decode wrongly. The testbenches check all four modules
exhaustively. Groups 01, 10 and 11 use the table described above instead of
the X/Y and u/s/r/v logic.

## Files

| file | contents |
|---|---|
| `rtl/mtr_pkg.sv` | `data_t`, `code_t`, run limits, special-word bits, the run-length rule and the computed group 01/10/11 table |
| `rtl/mtr_codec.sv` | top: encoder and decoder side by side |
| `rtl/mtr_encoder.sv` | group split, group-00 prefix/pattern mux, special word, table path |
| `rtl/mtr_decoder.sv` | group-00 classification, d/h modules, table reverse lookup |
| `rtl/mtr_enc_module_a.sv`, `rtl/mtr_enc_module_b.sv` | encoder pattern modules |
| `rtl/mtr_dec_module_d.sv`, `rtl/mtr_dec_module_h.sv` | their inverses |
| `rtl/mtr_upper_table_enc.sv`, `rtl/mtr_upper_table_dec.sv` | codeword table for groups 01/10/11, forward and reverse |
| `tb/mtr_tb_pkg.sv` | reference run-length checker and the Module A/B truth tables |
| `tb/mtr_table2.hex` | the 256 selected codewords as published, 64 per group in the order `m0 m1` = 00, 01, 10, 11: the reference for the computed table (group 00 is used only as a set) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog:

* `tb_mtr_enc_module_a`, `tb_mtr_enc_module_b`, `tb_mtr_dec_module_d` and
  `tb_mtr_dec_module_h` check all inputs against the truth tables.
  `tb_mtr_enc_module_a` and `tb_mtr_enc_module_b` also check that every
  pattern, placed behind its prefix, meets the run-length rules.
* `tb_mtr_encoder` checks all 256 bytes:
  * the run rules;
  * `c2 = m0` and `c7 = m1`;
  * membership in the published set of the right group;
  * the group-00 rule;
  * the table entries;
  * that no two bytes share a word.
* `tb_mtr_decoder` decodes all 256 codewords and 576 non-codewords of groups
  01/10/11.
* `tb_mtr_codec` runs end to end:
  * it checks all 65,536 ordered codeword pairs across the word boundary;
  * it streams 200,256 bytes serially through the encoder, tracking run
    lengths over the whole stream;
  * it loops each codeword back through the decoder;
  * it counts the Module A, Module B, special-word and table paths and
    requires each to occur;
  * it requires the stream to reach runs of exactly two ones and six zeros.

With plain Verilator, run from the directory that holds `rtl/` and `tb/`:

    verilator --binary -Irtl -Itb --top-module tb_mtr_codec \
        rtl/mtr_pkg.sv tb/mtr_tb_pkg.sv \
        rtl/mtr_enc_module_a.sv rtl/mtr_enc_module_b.sv \
        rtl/mtr_dec_module_d.sv rtl/mtr_dec_module_h.sv \
        rtl/mtr_upper_table_enc.sv rtl/mtr_upper_table_dec.sv \
        rtl/mtr_encoder.sv rtl/mtr_decoder.sv rtl/mtr_codec.sv \
        tb/tb_mtr_codec.sv -o sim && ./obj_dir/sim

The full end-to-end test runs in under a second. For the other testbenches,
swap the top module and the last file.
