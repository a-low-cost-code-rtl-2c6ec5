# SEC-DED-DAEC protected memory

A particle strike on a memory array often upsets more than one cell. When
the upset cells sit next to each other in a row, they hit neighbouring bits of
the same word. A standard SEC-DED Hamming code only detects such a double
error and cannot fix it. The usual remedy is bit interleaving, which spreads
the bits of one word across the row. Interleaving costs column multiplexers,
extra read energy and floorplan freedom, and small arrays such as register
files, CAMs and router buffers cannot use it at all.

This design uses a **SEC-DED-DAEC** code instead:
- it corrects every single-bit error;
- it corrects every double error in **two adjacent bits**;
- it detects every other double error.

It needs no more check bits than SEC-DED: 6 check bits for a 16-bit word,
giving a 22-bit codeword. Its encoder and syndrome network are the same size
as a SEC-DED code's: 48 two-input XOR gates, logic depth 4. The only addition
is a set of comparators that recognise the 21 adjacent-pair syndromes.

The RTL is a small 1R1W memory with the encoder on the write path and the
decoder on the read path. The code blocks are also usable on their own. The
(22,16) code is the default. A parameter selects (39,32) or (72,64).

## The code

### What the H-matrix must satisfy

A linear code is defined by its r x n parity-check matrix H. A word V read
from memory has the syndrome S = H·V (mod 2). S is zero for a valid codeword.
Otherwise S is the XOR of the H columns of the flipped bits. The decoder's
job is to tell which error pattern produced S. The columns are chosen so
that:

1. **No column is zero, and no two columns are equal.** Every single error
   therefore has its own non-zero syndrome.
2. **Every column has odd weight.** A single error then gives an odd-weight
   syndrome and any double error an even-weight one, so the two can never be
   confused. This rules out any set of 2 or 3 columns that XORs to zero.
3. **All n-1 adjacent-pair sums H[i]^H[i+1] are different.** Four columns
   i, i+1, k, k+1 that XOR to zero are called a *forbidden 4-cycle*, and the
   matrix has none. Each adjacent double error therefore has a unique
   syndrome, different from every single-error syndrome.
4. **As few *bad* 4-cycles as possible.** A bad 4-cycle is any other set of
   four columns i<j<k<m that XORs to zero where j=i+1, k=j+1 or m=k+1. Each
   one lets some non-adjacent double error produce an adjacent pair's
   syndrome. The decoder then "corrects" the wrong pair.
5. **Balanced row weights.** This keeps the XOR trees shallow.

The check part of H is an identity matrix placed after the data columns, so
the code is systematic:
- codeword bits `[K-1:0]` are the data;
- bit `K+j` is check bit j.

Codeword bit index is also the physical cell order: bits i and i+1 are
neighbouring cells.

### The (22,16) matrix

Column i (bit i of the codeword) is shown top to bottom, rows 1..6. In
`daec_pkg` each column is stored as a number whose bit b is row b+1.

```
bit    0  1  2  3  4  5  6  7  8  9 10 11 12 13 14 15 16 17 18 19 20 21
row1   0  0  1  0  1  0  1  1  0  1  0  0  0  1  1  1  1  0  0  0  0  0
row2   1  0  0  1  0  1  1  1  0  0  0  1  1  0  1  0  0  1  0  0  0  0
row3   1  1  0  0  0  1  1  0  1  1  0  1  0  1  0  0  0  0  1  0  0  0
row4   1  0  1  1  0  0  0  0  1  1  1  0  1  0  0  1  0  0  0  1  0  0
row5   0  1  1  0  1  1  0  1  0  0  1  0  1  1  0  0  0  0  0  0  1  0
row6   0  1  0  1  1  0  0  0  1  0  1  1  0  0  1  1  0  0  0  0  0  1
```

The matrix has the following properties:
- each of the 16 data columns has weight 3;
- each row has 8 data ones;
- each syndrome bit is therefore a 9-input XOR, and each check bit an
  8-input XOR.

How the columns were chosen:
- The method: start from the pool of weight-1 columns, then weight-3 columns,
  and so on. Add columns one at a time, rejecting any that would create a
  3-cycle or a forbidden 4-cycle. Prefer columns that add few bad 4-cycles.
  Finish with a bounded number of column swaps that reduce bad 4-cycles.
- This matrix came from a randomised search under those rules, so the column
  order is this design's own.
- Its figures are close to the published (22,16) code's. The published code
  reports 48 XOR gates, depth 4, 0 forbidden, 118 bad and 251 total
  4-cycles.

| code    | check bits | XOR2 gates (syndrome) | depth | 4-cycles total / forbidden / bad |
|---------|-----------:|----------------------:|------:|----------------------------------|
| (22,16) | 6          | 48                    | 4     | 250 / 0 / 116                    |
| (39,32) | 7          | 96                    | 4     | 1363 / 0 / 363                   |
| (72,64) | 8          | 224                   | 5     | 8264 / 0 / 1230                  |

In the (72,64) code, 48 data columns have weight 3 and 16 have weight 5. All
three tables have the XOR counts and depths of the published codes, and their
bad-cycle counts are at or below the published ones (118, 379, 1316).

### What the decoder cannot do

Think of an r-bit syndrome as a count of the error patterns it can name.
With 6 check bits there are 31 non-zero even-weight syndromes. The 21
adjacent pairs use 21 of them. The remaining 189 non-adjacent double errors
must share these 31 values with the adjacent pairs.

In this (22,16) code:
- 78 of the 210 non-adjacent double errors produce a syndrome that names no
  correctable pattern. They are flagged uncorrectable (UE).
- The other 132 produce an adjacent pair's syndrome. The decoder flips that
  pair, so the word comes back with up to four wrong bits and no UE flag.
  `err` is still raised.

The corresponding counts are 382 of 703 for (39,32) and 1274 of 2485 for
(72,64). This trade-off is inherent to correcting adjacent pairs with
SEC-DED's check-bit budget. The code is meant for arrays where adjacent
upsets are far more likely than scattered double upsets.

## Encoder (`daec_encoder`)

The data bits are copied unchanged into the codeword. Check bit j is the XOR
of the data bits whose column has row j set. This is the generator matrix
G = [I | Pᵀ] that belongs to H = [P | I]. The encoder is purely
combinational.

## Decoder (`daec_syndrome_gen`, `daec_corrector`, `daec_decoder`)

The decoder is combinational, in three stages:

1. **Syndrome generator.** An XOR tree per row of H produces the r-bit
   syndrome.
2. **Syndrome decoder.** For every bit i, three comparators test the
   syndrome against:
   - `H[i]`, a single error in bit i;
   - `H[i-1]^H[i]`, an adjacent pair ending at bit i;
   - `H[i]^H[i+1]`, an adjacent pair starting at bit i.

   Their OR is the decoder output for bit i. The output is XORed into the
   word to correct it. Rules 1 and 3 guarantee that at most one pattern
   matches, so exactly the named bit or pair is flipped.
3. **Flags.**
   - `err`: the OR of the syndrome bits, meaning an error was detected.
   - `ue`: `err` AND the NOR of all n decoder outputs. The syndrome is
     non-zero but names nothing correctable.
   - `sec`: a single error was corrected. This flag is this design's
     addition.
   - `daec`: an adjacent pair was corrected. This flag is also this design's
     addition.

`daec_decoder` outputs the corrected data, the corrected codeword (for
example, for a scrubber to write back), the flipped-bit mask, the syndrome
and the flags.

## Protected memory (`daec_ecc_memory`, top)

```
wr_data ─► encoder ─► daec_mem_array ─► (registered read) ─► decoder ─► rd_data, flags
   K            N bits/word, DEPTH words                 N                 K
```

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset, which clears only the read-valid flag |
| `wr_en_i`, `wr_addr_i`, `wr_data_i` | in | 1, AW, K | write: stored at the rising edge |
| `rd_en_i`, `rd_addr_i` | in | 1, AW | read request |
| `rd_valid_o` | out | 1 | high in the cycle after `rd_en_i` |
| `rd_data_o` | out | K | corrected data |
| `rd_err_o`, `rd_ue_o`, `rd_sec_o`, `rd_daec_o` | out | 1 | decoder flags, gated by `rd_valid_o` |
| `rd_syn_o` | out | R | syndrome of the word read, for logging |

Read latency is one cycle. The array registers the stored codeword, and the
decoder works combinationally on that register. If a word is read in the
same cycle it is written, the read returns the old contents. Corrected data
is not written back to the array. Repeated upsets in a word that is never
rewritten therefore accumulate.

Parameters:
- `K` is 16, 32 or 64. `R` and `N` follow from `K`.
- `DEPTH` is 64 words by default. It can be any size.

The code and its costs follow the published method. The following are this
design's own choices:
- the memory organisation (depth, ports, read timing);
- the `sec`/`daec` flags;
- the exact H-matrix columns.

Bit interleaving is not built. The code can be combined with it by
permuting the codeword bits across the row outside this RTL.

## Files

| file | contents |
|------|----------|
| `rtl/daec_pkg.sv` | H-matrix tables for the three codes, `check_bits(k)`, `h_matrix(k)` |
| `rtl/daec_encoder.sv` | encoder |
| `rtl/daec_syndrome_gen.sv` | syndrome XOR network |
| `rtl/daec_corrector.sv` | syndrome decoder, bit correction, flags |
| `rtl/daec_decoder.sv` | syndrome generator + corrector |
| `rtl/daec_mem_array.sv` | 1R1W synchronous storage array |
| `rtl/daec_ecc_memory.sv` | top: protected memory |
| `tb/tb_daec_ref_pkg.sv` | bit-level reference model shared by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_daec_code_metrics` |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
Each one has also been run against a deliberately broken copy of its module,
and it catches the fault.

- `tb_daec_encoder`: hand-computed (22,16) codewords. For random data of all
  three sizes, checks that the data passes through unchanged and that the
  syndrome is zero.
- `tb_daec_syndrome_gen`: random words against the reference syndrome.
  Codewords must give zero, and each single flipped bit must give its own
  column.
- `tb_daec_corrector`: every possible syndrome value for all three codes,
  checking the flips and all four flags.
- `tb_daec_decoder`: applies, for all three codes, every error pattern of
  weight 0, 1 and 2, plus random triple errors. It also checks the exact
  number of aliasing double errors (132 / 382 / 1274).
- `tb_daec_code_metrics`: recomputes, from the tables, the column rules,
  the XOR count, the depth and the 4-cycle counts. The bad 4-cycle count must
  be at or below the published one.
- `tb_daec_mem_array`: fill, read-back, read latency, and reads colliding
  with writes.
- `tb_daec_ecc_memory`: end-to-end at the default parameters. It injects
  upsets directly into stored codewords:
  - no error;
  - single errors at every bit position;
  - adjacent pairs at every position;
  - random non-adjacent pairs;
  - three-bit bursts.

  It checks data, flags, syndrome and the one-cycle latency. It counts each
  case and fails if one never occurred.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/daec_pkg.sv tb/tb_daec_ref_pkg.sv tb/tb_daec_ecc_memory.sv \
  --top-module tb_daec_ecc_memory
./obj_dir/Vtb_daec_ecc_memory
```

Other testbenches work the same way: name the testbench file and top module.
Verilator finds the RTL modules in `rtl/` through `-Irtl`. All testbenches
finish in well under a second.

## Adding another code size

1. Add a data-column table to `daec_pkg`.
2. Extend `check_bits()` and `h_matrix()` with the new size.
3. Raise `MAX_K`/`MAX_R` if needed.

The new matrix must obey rules 1–3 above. Rule 3 is what makes
adjacent-pair correction unambiguous. Run `tb_daec_code_metrics` (after
adding the size to it) to confirm.
