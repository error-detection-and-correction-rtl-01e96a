# Minimal-parity matrix code for multi-cell-upset protection

A particle strike in a dense SRAM often flips several neighbouring cells at
once (a multiple cell upset, MCU). A plain SEC-DED Hamming code cannot repair
that. Matrix codes can, but they usually need many check bits: a well-known
4x8 matrix code stores 52 bits per 32-bit word. This design protects a 32-bit
word with **14 check bits (46 bits stored)**. It corrects every single-bit
error and any run of adjacent errors within one row of the data matrix, up to
the full 4-bit row. Encoder and decoder are plain XOR logic with no clock.

The repository holds the encoder, the decoder, a codeword memory with an
upset-injection port, and a top level that ties them into a protected memory.

## The code

The data word `D31..D0` is written into an 8-row x 4-column matrix, row by
row, so that `D[4r+c]` sits in row `r`, column `c`:

```
        c0   c1   c2   c3
row 0   D0   D1   D2   D3
row 1   D4   D5   D6   D7
 ...
row 7   D28  D29  D30  D31
```

Three kinds of check bits are computed from it, each the XOR of a set of data bits:

| bits | covers | count |
|---|---|---|
| `V[c]` | every bit of column `c` (column parity) | 4 |
| `M[2p]` | columns 0, 1, 2 of rows `p` and `p+4` (row pair `p` = 0..3) | 4 |
| `M[2p+1]` | columns 1 and 3 of rows `p` and `p+4` | 4 |
| `M8` | rows 0-3: cell (r, r); row 5: columns 0, 3; row 7: columns 1, 2 | 1 |
| `M9` | rows 0-3: cell (r, 3-r); row 4: columns 1, 2; row 6: columns 0, 3 | 1 |

Written out, for example:

```
V0 = D0 ^ D4 ^ D8 ^ D12 ^ D16 ^ D20 ^ D24 ^ D28
M0 = D0 ^ D1 ^ D2 ^ D16 ^ D17 ^ D18
M1 = D1 ^ D3 ^ D17 ^ D19
M8 = D0 ^ D5 ^ D10 ^ D15 ^ D20 ^ D23 ^ D29 ^ D30
M9 = D3 ^ D6 ^ D9 ^ D12 ^ D17 ^ D18 ^ D24 ^ D27
```

The `M0..M7` bits are *shared*: one pair of bits serves two rows, four rows
apart. That sharing is how the code saves check bits. `M8` and `M9` are two
interleaved diagonals, the "DNA" curves. In the upper half they run along the
main diagonal and the anti-diagonal. In the lower half they take whole pairs
of cells in alternate rows. The placement has one property that the decoder
relies on. For every row pair `p` and column `c`, exactly one of the two cells
(p, c) and (p+4, c) lies on a diagonal. The diagonals therefore tell the two
rows of a pair apart.

The codeword is `{M9..M0, V3..V0, D31..D0}` (`mbc_pkg::codeword_t`).

## How the decoder finds the error

The decoder re-encodes the received data and XORs the result with the
received check bits. This gives a 14-bit syndrome `{S_M, S_V}`. If the
syndrome is zero, the word goes straight out.

Otherwise the decoder assumes the error lies in a single row, as an MCU in
this layout usually does:

1. `S_V` is the set `E` of columns that hold a flipped bit.
2. An error with column pattern `E` in row `r` would disturb only the shared
   bits of pair `r mod 4`. The even bit flips by `parity(E & {0,1,2})` and the
   odd bit by `parity(E & {1,3})`. It would also disturb `M8` and `M9`
   according to which of the row's cells lie on each diagonal.
3. The decoder forms this predicted `S_M` for all eight rows in parallel
   (`mbc_decoder`, `g_row`). It compares each prediction with the received
   `S_M`.
4. If exactly one row matches, the bits `E` of that row are flipped and
   `corrected_o` is raised. If no row or several rows match, the data are
   passed on unchanged and `uncorrectable_o` is raised.

Example: only D1 is corrupted. `S_V = 0010` (column 1), and `M0` and `M1`
both flip, which points to pair 0 (row 0 or row 4). Neither diagonal flips.
Cell (4, 1) lies on `M9`, so row 4 would have flipped `M9`. Row 0 is the only
match, and D1 is restored.

### What can be corrected

Whether a row-confined error can be placed depends only on its column
pattern and its row. Column 0 is the leftmost column, so `{0,1}` means D0
and D1 in row 0.

| column pattern | corrected in |
|---|---|
| single bit `{c}` | all rows |
| `{0,1,2}`, `{0,2,3}`, `{0,1,2,3}` (whole row) | all rows |
| `{0,1}`, `{0,3}` | rows 0, 3, 4, 7 |
| `{1,2}`, `{2,3}` | rows 1, 2, 5, 6 |
| `{0,2}`, `{1,3}`, `{0,1,3}`, `{1,2,3}` | no row: detected only |

This includes every single-bit error, some two-bit errors and adjacent
errors of up to four bits in a row. One adjacent pattern is not covered:
three adjacent errors in columns 1-3 give all-zero pair bits, so the row
pair cannot be identified. The case is detected and reported, not
corrected.

Limits that follow from the code itself:

* There is no separate protection for the check bits. A flipped check bit
  gives a non-zero syndrome that no row explains. The word is reported
  `uncorrectable` but its data pass through untouched, so the data read are
  still correct. Keeping check cells physically away from data cells (more
  than three cells apart) stops one strike from hitting both.
* Errors spread over several rows, or two errors in the same column, can
  escape the single-row model. Some such patterns produce a syndrome that one
  row happens to explain, and are then miscorrected. The code has no distance
  margin against that.

## Modules

| file | what it is |
|---|---|
| `rtl/mbc_pkg.sv` | sizes (32 data, 8x4, 14 check, 46 code bits), codeword and syndrome structs, check-bit membership functions |
| `rtl/mbc_encoder.sv` | 14 XOR trees; combinational |
| `rtl/mbc_decoder.sv` | re-encode, syndrome, 8-way row match, correction; combinational |
| `rtl/mbc_memory.sv` | `DEPTH` x 46-bit array: synchronous write, registered read, upset port |
| `rtl/mbc_codec_top.sv` | protected memory: encoder, memory and decoder |

Only the code's geometry is fixed: 8x4 matrix, 14 check bits. The membership
functions in `mbc_pkg` describe exactly this geometry and do not scale to
other sizes. `DEPTH` (default 256 words) is the only free parameter.

### Protected memory timing (`mbc_codec_top`)

* Write: `wr_en`, `wr_addr`, `wr_data` (32 bits). The word is encoded and
  stored at the clock edge.
* Read: `rd_en` and `rd_addr` in cycle *t*. In cycle *t+1*, `rd_valid` is
  high together with the corrected `rd_data`, `rd_syndrome`, `rd_err`,
  `rd_corrected` and `rd_uncorrectable`. The decoder sits combinationally
  behind the read register.
* Upset: `upset_en`, `upset_addr`, `upset_mask` (46 bits, codeword order)
  XOR the mask into the stored codeword, as a strike flipping those cells
  would. This port is for fault-injection testing. A write to the same
  address in the same cycle takes precedence.
* Reset: `rst_n`, synchronous and active low, clears only `rd_valid`. The
  array is not reset, so read only addresses that were written.
* No write-back of corrected data (scrubbing) is done. Rewrite the word to
  clear an upset.

## Which choices are the code's and which are this design's

Taken from the code: the 8x4 row-by-row matrix, the check-bit equations
(V0-V3, M0-M9) and the 46-bit word. Also from the code: locating the error
column by `V`, the row pair by the shared bits and the row by the diagonals,
and skipping correction when the syndrome is zero.

Only `M0` and `M1` are spelled out among the shared bits. For `M2..M7` the
same rule is applied to row pairs (1,5), (2,6) and (3,7). That reading
reproduces every syndrome of the worked examples:

| error | disturbed bits |
|---|---|
| D0 | M0, V0, M8 |
| D0, D3 | M0, M1, V0, V3, M8, M9 |
| D0..D2 | M0, M1, V0..V2, M8 |
| D0..D3 | M0, V0..V3, M8, M9 |

This design's own choices:

* the codeword bit order;
* the match-all-rows decoder structure and the rule of refusing ambiguous
  syndromes;
* the three status flags;
* the memory: depth, one write and one read port, read latency, read-old-data
  on a collision, the upset port and the `rd_valid` handshake.

Published results for this code on a Virtex-6 FPGA give 68 area units,
3.6 uW and 1.7 ns for the codec. These results are not reproduced here. The
RTL has no FPGA-specific structure.

## Simulating

Each testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With plain Verilator, from the repository
root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mbc_pkg.sv tb/mbc_ref_pkg.sv tb/tb_mbc_codec_top.sv \
    --top-module tb_mbc_codec_top -o sim && ./obj_dir/sim
```

Replace the last file and `--top-module` with another testbench to run it.

| testbench | what it checks |
|---|---|
| `tb_mbc_encoder` | check bits against index-list equations (`tb/mbc_ref_pkg.sv`) for walking ones, random words and the four worked examples |
| `tb_mbc_decoder` | for 20 words: clean words; all 32 single-bit errors; every row x every one of the 15 column patterns, corrected or refused as in the table above; every single check-bit error |
| `tb_mbc_memory` | read-back against a shadow copy; one-cycle latency; read-during-write; upsets; write-over-upset priority |
| `tb_mbc_codec_top` | 256-word memory at default size. Per address: clean write and read, then an upset of each kind, a read, a rewrite and a re-read. Also checks the exact `rd_valid` timing and the four worked examples, and counts each mechanism (clean bypass, single and multi-bit correction, uncorrectable detection, check-bit upset, rewrite) |

The reference model in `tb/mbc_ref_pkg.sv` holds the equations as explicit
lists of bit indices. The correctability table is entered by hand. Neither
shares code with the RTL.
