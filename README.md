# 3-bit burst error correction extended with quadruple adjacent error correction

In deep-submicron SRAM, one particle strike can upset several neighbouring
cells of a word at once. A plain SEC or SEC-DED code cannot correct that.
This design is a memory-word ECC, a binary linear block code with an encoder
and a single-step decoder. It corrects every error pattern of a 3-bit burst
code and, in addition, every 4-bit run of adjacent errors. It uses no more
check bits than a plain 3-bit burst code. The main configuration protects
16 data bits with 7 check bits, giving a 23-bit codeword. Codes for 32 and
64 data bits are also provided.

Everything is combinational: no clock, no reset, no state. A word is
encoded on its way into memory and decoded on its way out.

## What the code corrects

Each of these patterns is corrected, at any position in the codeword (bit
masks, lowest bit first):

| pattern | name                        | positions in a 23-bit word |
|---------|-----------------------------|----------------------------|
| `1`     | single error                | 23 |
| `11`    | double adjacent             | 22 |
| `101`   | 3-bit burst with a gap      | 21 |
| `111`   | triple adjacent             | 21 |
| `1111`  | quadruple adjacent (QAEC)   | 20 |

That makes 107 patterns. Each one must have its own nonzero syndrome, and
7 check bits give 127 nonzero syndromes, so the code fits. A full 4-bit
burst code would need 167 syndromes, because it must also handle `1001`,
`1011` and `1101`. That needs at least 8 check bits. Quadruple *adjacent*
correction is the part of 4-bit burst correction that fits in the 3-bit
code's budget.

Patterns that cross the boundary between data bits and check bits are
corrected like any others. Errors outside this set are neither corrected
nor flagged. The decoder then passes the data through as received, or
changes it if the syndrome happens to match some pattern.

## Codeword layout and the parity-check matrix

The code is systematic, with `N = K + R` codeword bits:

```
bit:   N-1 ........ K   K-1 ........ 0
       cR  ...  c2  c1  d(K-1) ...  d0
```

The parity-check matrix is `H = [P | I]`:

- Data bit `j` has the R-bit column `P[j]`.
- Check bit `ci` has the unit column with its one in row `i-1`.

The syndrome of an error pattern is the XOR of the columns of its bits. The
code corrects the table above exactly when these two rules hold:

1. **Error space:** every correctable pattern has a nonzero syndrome.
2. **Unique syndromes:** no two correctable patterns share a syndrome.

The `P` columns are in `rtl/qaec_pkg.sv` as `P16`, `P32` and `P64`. They
come from a depth-first search:

- The search fills the data columns starting from the check-bit end.
- A column is accepted only if every pattern that starts at it satisfies
  both rules against all the patterns placed so far.
- Many random restarts were run. The matrix kept is the one with the fewest
  ones in `P`, with the lightest heaviest row breaking ties.

These two costs set the encoder's XOR count and the depth of the deepest
XOR tree. The search did not prove the matrices optimal.

| K data bits | R check bits | N | correctable patterns | ones in P | heaviest row |
|-------------|--------------|---|----------------------|-----------|--------------|
| 16 | 7 | 23 | 107 of 127 syndromes | 57  | 11 |
| 32 | 8 | 40 | 192 of 255           | 105 | 15 |
| 64 | 9 | 73 | 357 of 511           | 222 | 27 |

To use another matrix, replace the columns in the package. The testbenches
check the two rules themselves, so they show at once whether a new matrix is
valid.

## Blocks

`rtl/qaec_pkg.sv` holds the code:

- the `P` tables and `check_bits(K)`;
- `h_col` and `h_row`, which give one column or one row of H;
- `pattern_syndrome`, which gives the syndrome of a pattern at a position;
- the pattern masks `PAT_MASK`.

The modules call these functions at elaboration, so all matrix entries are
constants in the logic.

`qaec_encoder`, parameter `K`:

- Ports: `data_i[K-1:0]` in, `code_o[N-1:0]` out.
- The data bits are copied through unchanged.
- Each check bit is one XOR tree over the data bits that its row of `P`
  selects.

`qaec_syndrome`, parameter `K`:

- Ports: `code_i[N-1:0]` in, `syn_o[R-1:0]` out.
- There is one XOR tree per row of H.
- A zero syndrome means no detected error.

`qaec_decoder`, parameter `K`:

- Ports: `code_i[N-1:0]` in, `data_o[K-1:0]` out.
- It computes the syndrome with `qaec_syndrome`.
- It compares the syndrome with the constant syndrome of every correctable
  pattern that touches a data bit. At K=16 that is 80 comparators of 7 bits.
- Because the syndromes are unique, at most one comparator fires. A
  deferred assertion checks this in simulation.
- Each data bit is flipped if any firing pattern covers it: an OR of the
  comparator outputs, then an XOR.
- Patterns that lie only in the check bits need no data correction, so
  there are no comparators for them.

`qaec_top`, parameter `K`:

- Ports: `data_in[K-1:0]`, `error_in[N-1:0]`, `enc_out[N-1:0]`,
  `dec_out[K-1:0]`.
- It chains encoder → upset → decoder: `dec_out = decode(enc_out ^ error_in)`.
- `error_in` stands for the cells a particle strike flips while the word is
  stored.
- `dec_out` equals `data_in` whenever `error_in` is zero or one of the
  correctable patterns.

The timing path is input → check-bit XOR tree → syndrome XOR tree → 7-bit
compare → OR → XOR. At K=16, yosys coarse synthesis gives 80 `$eq`, 164
`$or` and 14 `$reduce_xor` cells for the top.

## Where this RTL departs from, or goes beyond, the design it follows

The design follows a published 16-bit implementation. That implementation:

- has a 23-bit codeword with data in the low 16 bits;
- has ports `in`, `enc_out`, `error_in` and `dec_out`;
- is purely combinational, with no flip-flops;
- names a 7th check bit that drives the top codeword bit.

The source gives no parity-check matrix. So:

- **The matrix is this design's own.** The one published example maps data
  56527 (`0xDCCF`) to codeword 3005647 (`0x2DDCCF`, check bits `0x2D`).
  The 16-bit search was constrained to reproduce that word, and it does.
  One word imposes only 7 linear conditions on the 112 entries of `P`, so
  other codewords may still differ from the published implementation.
  The published timing path also hints that data bit 12 (counting from 0)
  feeds `c7`, and that `c7` covers at most 8 data bits. This matrix meets
  neither hint: in it, `c7` covers 11 data bits.
- **The 32-bit and 64-bit check-bit counts (8 and 9)** are the smallest
  that fit the syndromes. The source names these data widths but not their
  codeword sizes.
- **The decoder structure** is the plain comparator form described above.
  The source does not describe its decoder's insides.
- **`error_in` is an XOR mask.** The published waveform shows an
  `error_in` value that, under either reading (received word or mask),
  is no correctable pattern. That value is therefore not used as a test
  vector.
- **There are no error-detected or uncorrectable outputs.** The published
  design has only `dec_out`. The syndrome is available inside the decoder
  if you want such flags.
- The `in` port is named `data_in`.

## Verification

Every testbench checks itself and ends with a
`TB_RESULT checks=<n> failures=<n>` line.

- `tb/qaec_tb_pkg.sv` is the reference model. It encodes column by column
  and recomputes syndromes bit by bit, a different route from the RTL's row
  XOR trees.
- `qaec_encoder_tb` covers K = 16, 32 and 64:
  - all unit words, all-zero, all-one and 2000 random words are checked
    against the reference;
  - every codeword must have a zero syndrome.
- `qaec_syndrome_tb` covers all three sizes:
  - codewords give a zero syndrome;
  - all 107, 192 and 357 correctable patterns give distinct nonzero
    syndromes that match the reference, which checks the code itself;
  - the syndrome is linear.
- `qaec_decoder_tb` covers all three sizes. For random data, it applies
  every correctable pattern at every position and checks that the data
  comes back.
- `qaec_top_tb` runs the top at its default size (K=16) with no parameter
  overrides:
  - data words: the published example word, all-zero, all-one and 200
    random words;
  - each word is checked with no error and with every pattern at every
    position;
  - it counts each case: no error, each of the five pattern types,
    boundary-straddling patterns, and check-bit-only patterns;
  - a case that never occurs counts as a failure.
- `qaec_top_widths_tb` runs the same end-to-end test on 32-bit and 64-bit
  tops.

Each run takes well under a second.

## Simulating

With plain Verilator (5.x), for example for the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/qaec_pkg.sv tb/qaec_tb_pkg.sv rtl/qaec_syndrome.sv rtl/qaec_encoder.sv \
  rtl/qaec_decoder.sv rtl/qaec_top.sv tb/qaec_top_tb.sv --top-module qaec_top_tb
./obj_dir/Vqaec_top_tb
```

Replace the testbench and the top module name to run the other tests. For a
lint check of the synthesizable code:

```
verilator --lint-only -Wall -Irtl rtl/qaec_pkg.sv rtl/qaec_syndrome.sv \
  rtl/qaec_encoder.sv rtl/qaec_decoder.sv rtl/qaec_top.sv --top-module qaec_top
```


## Changing it

- **Data width:** set `K` to 16, 32 or 64. Other widths need a new `P` table
  and a new `check_bits` entry.
- **Pipelining:** the design has no registers. For a clocked memory path,
  register `code_o` at the memory input and `data_o` at its output. For a
  long decoder path, the syndrome is the natural place to cut.
- **Error flags:** `syn != 0` means an error was detected. A nonzero
  syndrome that matches no comparator means an uncorrectable error.
