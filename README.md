# SEC-DED-DAEC-TAED Hamming code for 16-bit memory words

A particle strike on a memory array often flips more than one cell, and the
cells it flips are usually neighbours. A plain SEC-DED Hamming code corrects
one flipped bit and detects two, but three flipped neighbours can look like a
single error and get "corrected" into a wrong word. This design protects a
16-bit word with a 28-bit code word (12 check bits) that

* corrects every single-bit error,
* corrects every error of two adjacent bits,
* detects every other double error,
* detects every error of three adjacent bits,

anywhere in the 28 stored bits. Encoder and decoder are shallow combinational
logic: XOR trees for the check bits and the syndrome, one level of syndrome
comparators, ORs and the correcting XORs.

The code is the concatenation of two codes over the same data bits: an
extended Hamming code whose columns are ordered so that triple adjacent errors
never look like single errors (the TAED part: triple adjacent error
detection), and a second set of six check bits from a code built so that every
adjacent pair of bits has its own syndrome (the DAEC part: double adjacent
error correction). The decoder joins the two syndromes into one 12-bit
syndrome and decodes that as a single code.

## The 28-bit code word

All vectors are numbered from 1, leftmost first (`logic [1:28]`), because the
check matrices are written that way: bit *i* of the word is column *i* of the
matrix. A binary literal in the code reads exactly like the bit strings below.

| bits   | content |
|--------|---------|
| 1..21  | TAED Hamming part, columns c1..c21: check bits in c1, c2, c4, c7, c13; data bits 1..16 in c3, c5, c6, c8..c12, c14..c21, in order |
| 22     | P, overall parity of bits 1..22 (even) |
| 23..28 | DAEC check bits k1..k6 |

Worked example: data `1011101110111011` is stored as
`1110011110111101110110` `010100`: the 22-bit TAED word, then the DAEC
check bits.

## TAED part: extended Hamming (22,16) with reordered columns

The 5x21 Hamming matrix uses every 5-bit value only once, and places columns
by weight in the repeating order odd, odd, even. So the XOR of any three
consecutive columns has even weight and can only collide with an even-weight
column. Each position takes the smallest free value of the required weight.
An even-weight position also skips every value equal to the XOR of three
consecutive columns already placed, and skips 3 (= c1 XOR c2). This gives
the columns (row 1 = most significant bit)

    c1..c21 = 1 2 5 4 7 9 8 11 12 13 14 17 16 19 20 21 22 24 25 26 29

so no three adjacent columns XOR to a column. With the overall parity check
pe this code decides on its own:

| pe | Hamming syndrome p1 | verdict |
|----|---------------------|---------|
| 0  | 0                   | no error |
| 1  | equal to column i   | single error in c_i, corrected |
| 1  | 0                   | single error in P |
| 0  | non-zero            | double error |
| 1  | not a column        | triple adjacent error |

The parity bit is stored after c21. That leaves one triple adjacent pattern,
(c20, c21, P), whose syndrome c20 XOR c21 = 7 equals column c5, so this code
alone would miscorrect it. The DAEC part covers that case (see below).

## DAEC part: (22,16) SEC-DED-DAEC code

The 6x22 matrix has weight-3 columns for the 16 data bits and the identity for
k1..k6:

    row 1  1100110001110100 100000
    row 2  0001010011011001 010000
    row 3  1010100111100011 001000
    row 4  1001001110010110 000100
    row 5  0110101100001101 000010
    row 6  0111011000101010 000001

Its columns are non-zero and distinct, no two columns XOR to a third (so every
double error is detected), and the 21 XORs of neighbouring columns are
distinct from each other and from all columns. So a syndrome names a single
bit or an adjacent pair unambiguously. Check bit k_r is the XOR of the data
bits with a 1 in row r.

## Decoding the whole word

This is the part to understand before changing anything. The two partial
syndromes, p1 (5 bits, rows 1..21 of the TAED matrix), pe (parity over bits
1..22) and p2 (6 bits, over the data bits wherever they sit in the word and
over k1..k6), together form the syndrome of the 28-bit word under one 12x28
matrix:

    column i = { TAED column (0 for bits 22..28),
                 1 for bits 1..22, 0 for bits 23..28,
                 DAEC column of the data bit held at i, unit column for k1..k6, 0 for TAED check bits and P }

`mhc_pkg::MHC_COL` builds this matrix with a constant function. An exhaustive
check of this matrix shows:

* its 28 columns are distinct and non-zero;
* the 27 XORs of neighbouring columns are distinct, non-zero and differ from
  every column;
* no double error, adjacent or not, has a column's syndrome, and no
  non-adjacent double error has an adjacent pair's syndrome;
* no triple adjacent error has a syndrome that is zero, a column or an
  adjacent pair's syndrome.

So the 28-bit word is decoded with one error locator of the classic shape:
for every bit, an AND gate per candidate syndrome (the bit alone, the pair
with its left neighbour, the pair with its right neighbour), then a 3-input OR,
then an XOR that flips the bit. The outcome:

| syndrome | status flags | data |
|----------|--------------|------|
| zero | none | as read |
| a column | `error`, `single_err` | corrected |
| an adjacent pair | `error`, `double_adj` | corrected |
| one of the 26 triple adjacent syndromes | `error`, `ue`, `triple_adj`, `resend` | as read |
| anything else | `error`, `ue`, `double_err`, `resend` | as read |

`ue` is "non-zero syndrome and nothing located", the OR/NOR/AND check of the
classic decoder. Splitting it into `triple_adj` and `double_err` costs 26
extra 12-bit comparators. `resend` asks the system to fetch the word again or
restore it from elsewhere.

Because the TAED and DAEC partial decoders are built anyway (they produce
p1, pe and p2), their own verdicts are brought out on `diag` for debug:
`out1`/`s1`/`de`/`ta` from the TAED part, `out2`/`s2`/`da`/`daec_ue` from the
DAEC part. They are not used for the final decision. For example, a triple
adjacent error on bits 1..3 hits two TAED check bits and data bit 1: the TAED
part reports `ta`, the DAEC part sees only a single data error (`s2`, and
`out2` is the right data), and the word is reported as `triple_adj` with
`resend`.

## Modules

| module | function |
|--------|----------|
| `mhc_pkg` | sizes, types (`data_t`, `code_t`, `status_t`, `diag_t`), both matrices, the combined matrix |
| `taed_encoder` | data -> 22-bit TAED word (5 check bits, overall parity) |
| `daec_encoder` | data -> 6 DAEC check bits |
| `mhc_encoder` | both encoders side by side -> 28-bit word; also brings out the two partial words |
| `syndrome_decoder` | error locator: per-bit AND/OR network for single and adjacent double errors, for any matrix given as a parameter (`NB` columns of `RB` bits, `ADJACENT` enables the pair terms) |
| `taed_decoder` | p1, pe, single-error correction and the table above, for the 22-bit word alone |
| `daec_decoder` | p2, locator, correction, error and ue for the 22-bit DAEC word alone |
| `mhc_decoder` | both partial decoders, then the locator over the 12x28 matrix, the correction and the status flags |
| `mhc_codec` | top: `mhc_encoder` on the write side, `mhc_decoder` on the read side |

## Interface and timing of `mhc_codec`

| port | dir | type | meaning |
|------|-----|------|---------|
| `wr_data` | in  | `data_t` (16) | word to write |
| `wr_code` | out | `code_t` (28) | code word to store |
| `rd_code` | in  | `code_t` (28) | code word read back |
| `rd_data` | out | `data_t` (16) | corrected data |
| `rd_status` | out | `status_t` | `error, single_err, double_adj, double_err, triple_adj, ue, resend` |
| `rd_diag` | out | `diag_t` | p1, pe, p2, partial-decoder flags, out1, out2 |

Both paths are combinational, with no clock and no reset, and independent of
each other. Register them where the surrounding memory interface needs it. The
encoder is one XOR tree of at most 9 data inputs per check bit; the parity
bit reduces to the XOR of the 7 data bits that sit in even-weight columns.
The decoder is the syndrome XOR trees, then 12-input ANDs, then ORs and the correcting XORs. The
memory array itself is not part of the design.

## Where this follows the source and where it chooses

Taken from the published design: the 16/28-bit sizes, both check matrices
(the TAED columns being the output of its construction rule), the placement
of data and check bits in the 28-bit word, the encoder structure (TAED word,
then the DAEC check bits appended), the decoding order (zero, column, adjacent
pair, otherwise uncorrectable), and the decoder structure (AND, 3-input OR,
XOR, plus OR/NOR/AND for an uncorrectable error). The worked example above and
the four decoder cases in `tb_mhc_paper_vectors` match the published
simulations bit for bit, including the syndromes p1 and p2.

Choices of this design:

* **One decoder over both syndromes.** The two partial syndromes are decoded as
  one 12-bit syndrome over all 28 bits. So errors in the TAED check bits, the
  parity bit and the DAEC check bits are covered too, and so is the
  (c20, c21, P) triple, which the TAED code alone would miscorrect.
* **Parity bit position.** The parity bit sits after c21, as in the published
  word layout, not before c1. The construction idea of the TAED code assumes
  it sits before c1, where (P, c1, c2) gives the non-column syndrome 3. With
  the parity bit after c21 the 28-bit code still detects every triple adjacent
  error, because the combined matrix covers the one case the TAED part misses.
* **Flags.** The names follow the published signals (`single_err`,
  `double_adj`, `triple_adj`, `double_err`, `resend`, `error`, `ue`), but the
  split of uncorrectable syndromes into `triple_adj` and `double_err` is this
  design's own. Here `ue` is the uncorrectable flag of the whole word: for a
  triple adjacent error it is 1. The published run showed its UE signal at 0
  in that case, which is what the DAEC part alone reports (`diag.daec_ue`).
* **Data on an uncorrectable error.** The data bits are passed through as
  read, not corrected. `resend` tells the user not to trust them.
* **No clock.** The source gives none for this logic.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. The reference model `tb/mhc_ref_pkg.sv` holds
the matrices row by row and finds the check columns itself, so it does not
share the design's column tables. For example:

    verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/mhc_pkg.sv tb/mhc_ref_pkg.sv tb/tb_mhc_codec.sv \
        --top-module tb_mhc_codec -o sim && ./obj_dir/sim

| testbench | what it covers |
|-----------|----------------|
| `tb_mhc_codec` | end to end at full size: 256 words written through the encoder into a memory model, hit by single, adjacent double, non-adjacent double and adjacent triple upsets, read back through the decoder; every mechanism must occur |
| `tb_mhc_paper_vectors` | the published encoder and decoder runs on the top, value by value |
| `tb_mhc_decoder` | random data x every single (28), adjacent double (27), other double (351) and adjacent triple (26) error |
| `tb_mhc_encoder`, `tb_taed_encoder`, `tb_daec_encoder` | worked example, corner and random data against the reference |
| `tb_taed_decoder`, `tb_daec_decoder` | every single and double error, and every adjacent triple (TAED) or adjacent double (DAEC) error, on the partial codes |
| `tb_syndrome_decoder` | all 64 syndromes on the 22-column DAEC locator |

Verilator's `-Wall` reports the ascending `[1:N]` ranges (ASCRANGE). They are
deliberate, see "The 28-bit code word".

## Changing it

The matrices live only in `mhc_pkg`: `TAED_COL`, `TAED_DATA_POS`,
`TAED_CHECK_POS` and `DAEC_COL`. The combined matrix, the encoders and the
decoders follow from them. The data width is not a free parameter: another
width needs new matrices. `syndrome_decoder` is generic and can be reused
for any matrix whose adjacent-pair syndromes are distinct. After a change,
run `tb_mhc_decoder`: it checks the correction and detection claims
exhaustively for the error classes above.
