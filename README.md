# A zero-skipping CAVLC residual encoder for H.264 baseline

Most quantised coefficients in a video encoder are zero. CAVLC (the baseline
entropy code of H.264) still has to walk them, and a naive encoder spends one cycle per
coefficient. The coded block pattern (CBP) helps only at a coarse grain. It marks an
8x8 luma group, or all chroma, as empty, and then the whole group is skipped.
Inside a group that is not skipped, every 4x4 block is still scanned, even an
all-zero one and even when it holds a single nonzero value.

This encoder removes that waste with two mechanisms and a strict cycle budget:

* **Zero-block codeword.** A 4x4 block that the CBP does not skip but that holds
  only zeros needs just one coeff_token codeword (TotalCoeff = 0). Which one
  depends on nC. It comes from a five-entry table in one cycle, and the block ends
  there: 6 cycles, whatever its size.
* **Nonzero index table.** For a block with nonzero coefficients, a 16-bit flag
  word marks the nonzero positions. A leading-one finder points straight at the
  next nonzero coefficient, so zeros between coefficients cost no cycles. The
  distance between two consecutive pointers is the run_before of the
  coefficient just passed.
* **No syntax-element buffers.** Every codeword is computed combinationally as
  soon as its inputs are known, and is sent in H.264 order, at most one per cycle.
  The run_before codewords come last in the syntax, but they become known early.
  They are coded at once and collected in one 32-bit register, which is sent as a
  single codeword at the end.

The result is a fixed, data-dependent cost per 4x4 block:

| class | meaning | cycles |
|---|---|---|
| CS   | skipped by the coded block pattern | 3 |
| NSZB | not skipped, all coefficients zero | 6 |
| NAZ  | not all zero | 9 + x + y |

Here x depends on TrailingOnes (0, 1, 2, 2 for 0, 1, 2, 3 trailing ones), and
y = (TotalCoeff − TrailingOnes) + 1, which is one cycle per level plus one.
Zeros never appear in the count. At 145 MHz, 1080p at 30 frames/s gives
145e6 / 244,800 = 592 cycles per macro-block. Typical content needs 150 to 400
cycles per macro-block.

The RTL covers the residual-coding section of an encoder:

* residual buffer;
* CBP generator;
* entropy SRAM interface;
* CAVLC encoder;
* Exp-Golomb unit for header elements;
* a 2:1 codeword multiplexer;
* bit-stream packer with emulation prevention.

The prediction/transform stage, the macro-block header sequencing, the pipeline
registers and the bus interface are outside it. Their signals are ports of the
top module, `entropy_coding_top`.

## Sub-blocks, their numbers and types

A 4:2:0 macro-block is coded as up to 27 sub-blocks:

| BlkIdx | type | coefficients coded | sub-block index (neighbour numbering) |
|---|---|---|---|
| 0 | LUMA_DC (Intra16x16 only) | 16 | 0 |
| 1..16 | LUMA (or LUMA_AC in Intra16x16) | 16 (15) | 0..15, luma 4x4 blocks in z-order |
| 17, 18 | CHROMA_DC (U, V) | 4 | 16, 20 |
| 19..22, 23..26 | CHROMA_AC (U, V) | 15 | 16..19, 20..23 |

The type sets four things:

* the maximum TotalCoeff (16, 15 or 4);
* whether total_zeros is sent (only when TotalCoeff is below that maximum);
* which total_zeros table is used (chroma DC has its own);
* how nC is found (chroma DC always uses nC = −1).

The CBP-skip rule is the standard one:

* LUMA is skipped when its 8x8 group bit is 0.
* LUMA_AC is skipped when all four luma bits are 0.
* CHROMA_DC is skipped when the chroma field is 0.
* CHROMA_AC is skipped unless the chroma field is 2.
* LUMA_DC is never skipped.

## Inside the CAVLC encoder (`cavlc_encoder`)

`cavlc_encoder` wires together these parts:

* `cavlc_data_ready`: Input Buffer, block registers, CBP skip.
* `cavlc_scan`: nonzero index table.
* `cavlc_coding`: coeff_token, total_zeros and zero-block look-ups.
* `cavlc_coding_level`: level codewords.
* `cavlc_coding_crun`: run_before collector.
* `cavlc_nunl` and `sram_nonzero`: nC prediction.
* `cavlc_mux`: the controller, which also selects the codeword sent on `cw`.

### Sub-block timeline

Cycle numbers below are counted from the cycle in which the interface updates
its block index (fetch step 0). `blk_start` is cycle 1, and the coefficients
arrive on cycle 2.

| cycle | work |
|---|---|
| 1 | block type, index, position and CBP are registered |
| 2 | CBP skip decided. For CS the block ends here and TotalCoeff 0 is written to the nC memory. Otherwise all 16 coefficients load into the Input Buffer, the nonzero flags load into the index table, and the top neighbour's TotalCoeff is read. |
| 3 | TotalCoeff (popcount), total_zeros (stop index + 1 − TotalCoeff) and the all-zero flag are registered; the left neighbour is read |
| 4 | all-zero: go to the zero-block state. Otherwise the first trailing-one test. |
| 5 | NSZB: the zero-block codeword is sent and the block ends (6 cycles including the fetch cycle). NAZ: nC is valid from here. |
| 4 … 4+x | up to three trailing-one tests, one per cycle. Each trailing one found is consumed from the table, and its run_before is collected. |
| then | coeff_token (TotalCoeff is written back to the nC memory); trailing-one signs; one level per cycle; total_zeros; the collected run_before bits |

The controller's states are IDLE, DATA, ANALYZE, SCAN, ZERO, TOKEN, SIGN, LEVEL,
TZ and RUN. The sign, total_zeros and run_before states send nothing when their
element is empty. The codeword count therefore varies, but the cycle count
follows the formula exactly.

### Walking the nonzero index table

The table holds one bit per coefficient position in scan order. The **stop
index** is the highest set bit, found with a priority encoder. The **start
index** is the position consumed last (15 after loading). In each step:

1. The coefficient at the stop index is used. It is either a trailing one, whose
   sign is collected, or a level, which is coded this cycle.
2. Its bit is cleared and the start index moves to it. The next cycle's stop
   index then jumps to the next nonzero position.
3. In that next cycle, `run_before = start − stop − 1` is known. So is zerosLeft,
   the zeros still below, which starts at total_zeros and drops by each run.
   While a lower coefficient remains and zerosLeft > 0, the run_before codeword is
   looked up (zerosLeft is saturated at 7 for "more than 6") and appended to
   the collector.

For example, take a block with nonzero values at scan positions 9, 4 and 0:

* Step 1 visits 9 and step 2 visits 4. Then run_before = 9 − 4 − 1 = 4 and
  zerosLeft = 7 − 4 = 3.
* Step 3 visits 0. Then run_before = 4 − 0 − 1 = 3 and zerosLeft = 0.
* No run is coded for the last coefficient.

The run_before bits of a 4x4 block total at most 25 bits, so the 32-bit
collector cannot overflow.

### nC and the TotalCoeff memory

nC is predicted from the TotalCoeff of the top (nU) and left (nL) neighbours:

* both available: (nU + nL + 1) >> 1;
* one available: that one;
* none available: 0.

Chroma DC always uses nC = −1.

`sram_nonzero` keeps one 5-bit TotalCoeff per sub-block at address
`{mb_x, sub-block index}`. This is 32 word slots per macro-block column, of
which 24 are used. Because the macro-blocks of a row overwrite the column they
occupy, the memory always holds:

* the row above, for the columns not yet coded in this row;
* the current row, for the columns already coded.

The neighbour rules are:

* A top neighbour in row 0 of a block lives in the same column slot, row 3. It
  was written by the macro-block above.
* A left neighbour in column 0 lives in column slot `mb_x − 1`.
* A neighbour outside the frame (`mb_y = 0` or `mb_x = 0`) is unavailable.

CBP-skipped blocks write 0. DC blocks are not stored. The default
`MB_ADDR_W = 7` gives 128 columns (4096 x 5 bits), enough for 1920-pixel rows.
The memory is single-ported: the top read, the left read and the write-back fall
in different cycles.

### Level coding

Levels are coded by arithmetic, not by look-up:

* levelCode = 2·|level| − 2 for positive levels and 2·|level| − 1 for negative
  ones.
* The first level is reduced by 2 when there are fewer than three trailing
  ones.
* The code is a unary prefix plus a suffix of `vlcnum` bits.
* An escape (prefix 15) carries a 12-bit suffix. With vlcnum 0, prefix 14 uses a
  4-bit suffix.

`vlcnum` starts at 1 when TotalCoeff > 10 and TrailingOnes < 3, otherwise at 0.
After each level it steps up when |level| exceeds 0, 3, 6, 12, 24 or 48 for
tables 0 to 5. A first level above 3 moves it straight to 2. Only the baseline
escape range is supported (levelCode up to 4095 above the escape base). An
assertion flags larger levels.

## Around the encoder

* **Residual buffer** (`residual_buffer`) holds one macro-block:
  * Luma SRAM: 16 words x 224 bits (16 coefficients of 14 bits).
  * Chroma SRAM: 8 words x 192 bits (12-bit AC coefficients; U in words 0–3, V in words 4–7).
  * Luma-DC register: 16 x 14 bits.
  * Two chroma-DC registers: 4 x 14 bits each.

  A whole sub-block is written per cycle. In every word, label 0 sits in the
  most significant field and labels run down the columns of the block
  (label = 4·column + row). The SRAMs read synchronously.
* **CBP generator** (`cbp_generator`) sees each sub-block as it is written. It
  sets or clears one bit of a 26-bit tag (0–15 luma, 16/17 chroma DC, 18–25
  chroma AC). The CBP is built from the tag:
  * one bit per luma group;
  * a chroma field of 2 if any chroma AC block is nonzero, else 1 if any chroma DC block is nonzero, else 0.

  The DC position of AC words is ignored: always for chroma, and for luma in Intra16x16.
* **Entropy SRAM interface** (`entropy_sram_if`) walks BlkIdx in coding order
  with a four-step fetch:
  * step 0: update the index;
  * step 1: read address, plus `blk_start`;
  * step 2: data ready;
  * step 3: the encoder works.

  It reorders the selected word into scan order: zigzag for 4x4 blocks (AC
  types start at zigzag position 1) and raster for 2x2 chroma DC. A skipped
  block can finish in step 2, and the next block then starts at once.
* **Exp-Golomb unit** (`expgolomb_unit`) codes header elements as ue(v), se(v) or
  coded_block_pattern me(v), using the standard intra/inter mapping. codeNum must
  stay below 65535, so the code fits 32 bits.
* **Codeword multiplexer** (in the top): a header codeword (`hdr_valid`) has
  priority over the encoder's. The caller must not present a header element
  while the encoder sends a codeword; an assertion checks this.
* **Bit-stream packer** (`bitstream_packer`) works as follows:
  * Codewords arrive left-aligned with a length and are appended to a
    right-aligned residual register.
  * Once 32 or more bits are pending, the first four bytes are checked against
    the last two bytes sent. Wherever two zero bytes would be followed by
    0x00–0x03, an emulation-prevention byte 0x03 is inserted.
  * Four bytes leave as one 32-bit word. Input bytes displaced by an insertion
    go back to the residual.
  * `flush` sends the final partial word left-aligned, with its bit count on
    `bs_len`, and restarts the byte history.

  Sustained input must stay near 32 bits per cycle or less. CAVLC output is far
  below that.

## Top-level use (`entropy_coding_top`)

For each macro-block:

1. Pulse `mb_clear` with `intra16x16`, `mb_x` and `mb_y` set.
2. Write the 26 sub-blocks with `pe_we` / `pe_sb_index` (0–15 luma, 16 U DC,
   17 V DC, 18–25 chroma AC), and the luma DC with `ldc_we` for Intra16x16.
3. Read `cbp`. Present the header elements, one per cycle, with `hdr_valid`,
   `hdr_mode` (0 ue, 1 se, 2 CBP) and `hdr_data`.
4. Pulse `esi_enable`. Wait for `mb_done` before writing the next macro-block,
   because the buffer holds one macro-block.

Packed words appear on `bs_word` with `bs_valid` and `bs_len`. `blk_done` /
`blk_class` report each finished sub-block. Parameters:

* `MB_ADDR_W` (default 7): the macro-block column width, which sets the
  `sram_nonzero` size.
* `MB_Y_W` (default 7): the row width, used only for edge availability.

## Where this RTL departs from or adds to the original design

* The bit-stream packer's residual register is 64 bits, not 32. After an
  emulation byte is inserted, up to 31 pending bits plus two pushed-back bytes
  must fit.
* The packer's `flush` input, its end-of-stream behaviour and the 0xFFFF reset
  value of the byte history are additions.
* Two details of the cycle timing are reconstructions, chosen to meet both
  stated totals (6 cycles for NSZB, 9 + x + y for NAZ):
  * the exact cycle in which nC becomes valid;
  * the meaning of y as "levels + 1".
* The coeff_token, total_zeros, run_before and coded_block_pattern tables are
  the H.264 standard tables (`rtl/cavlc_tables_pkg.sv` states the index formula
  of each ROM). The nC ≥ 8 coeff_token class is computed as a 6-bit
  fixed-length code.
* Scan-order packing is done in the SRAM interface. The header multiplexer's
  priority rule, the `mb_y` input and the single-port nC memory are this
  design's choices.
* CBP-skipped blocks write TotalCoeff 0 to the nC memory, so later neighbours
  see 0.
* The sub-block index equals the transform stage's global counter.
* The SRAM word field order follows the printed layout of the DC registers.
* The macro-block header sequencer, the transform stage, the pipeline registers
  and the bus interface are not included.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. The references are
written independently of the RTL:

* `tb/cavlc_ref_pkg.sv` is a software CAVLC coder working on bit strings.
* `tb/cavlc_ref_tables_pkg.sv` holds the code tables as bit strings.
* The testbenches also hold the neighbour table and the cycle formula.

| testbench | what it checks |
|---|---|
| `tb_entropy_coding_top` | Runs two rows of 120 macro-blocks at default parameters, with random Intra16x16/inter types, CBPs, header elements and coefficients. Checks the CBP, the cycles per macro-block, and the de-emulated bit-stream bit for bit. Counts every mechanism: CS/NSZB/NAZ, 0–3 trailing ones, top-row neighbours, emulation bytes, flush. |
| `tb_cavlc_encoder` | A 4x3 frame, three passes. Checks the bits, cycle count and class of every sub-block, including escapes and vlcnum 6. |
| `tb_cavlc_mux` | Controller: class, cycle count, number of codewords and the write-back value for every block type. |
| `tb_cavlc_scan`, `tb_cavlc_coding`, `tb_cavlc_coding_level`, `tb_cavlc_coding_crun`, `tb_cavlc_nunl`, `tb_cavlc_data_ready`, `tb_sram_nonzero` | The encoder's parts, exhaustively or with random input. |
| `tb_residual_buffer`, `tb_cbp_generator`, `tb_entropy_sram_if`, `tb_expgolomb_unit`, `tb_bitstream_packer` | The surrounding units. |

To run one with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl \
  --top-module tb_entropy_coding_top \
  rtl/cavlc_pkg.sv rtl/cavlc_tables_pkg.sv \
  tb/cavlc_ref_tables_pkg.sv tb/cavlc_ref_pkg.sv tb/tb_entropy_coding_top.sv -o sim
./obj_dir/sim
```

Replace the last file and `--top-module` for another testbench. The packages
must come first. Every testbench finishes in seconds. `-Wno-fatal` is only
needed for width notes in the testbenches. In the RTL, Verilator's lint reports
only two kinds of note:

* unused signals and parameters that are kept for observation;
* the asynchronous reset feeding the assertions' `disable iff`.

Both are explained in the headers of the modules concerned.
