# MMLP: minimal maximum-level programming for 4-level flash

A multi-level cell is slow to program to a high level. Each extra level costs
more program-verify pulses, and reading a cell at an unknown level takes more
reference comparisons. Minimal maximum-level programming (MMLP) shares every
cell of a wordline among several sectors. It encodes the data so that the
k-th sector written to a cell may raise it to level k and no higher:

| write to a cell | levels it may use | 4-level wordline |
|---|---|---|
| 1st | 0, 1 | sector 1 or 2 |
| 2nd | 0, 1, 2 | sector 3 |
| 3rd | 0, 1, 2, 3 | sector 4 |

Early sectors therefore program as fast as single-level cells. A wordline
that is not yet full can be read with fewer comparisons. Nothing is lost:
four sectors still fill a wordline of 4-level cells with no redundancy, and
the host still sees fixed-size sectors.

This repository holds synthesizable SystemVerilog for the MMLP front end of
a 4-level-cell memory: the address-to-cells mapping, the encoder, the
decoder, the per-wordline MaxLevel table, the reference planner and the
controller that runs the write, read, erase and rewrite flows. The memory
array is not included. A behavioural model of it is used for simulation.

## Wordline layout

A sector has S bits (default S = 32768, 4 KB). A wordline of 4-level cells
has 2S cells and holds four sectors:

| address | cells | layer (highest level) | bits per cell |
|---|---|---|---|
| 1 | 0 .. S-1 | 1 | 1 |
| 2 | S .. 2S-1 | 1 | 1 |
| 3 | 0 .. 2S-1 | 2 | 1/2 |
| 4 | 0 .. 2S-1 | 3 | 1/2 |

Sectors 3 and 4 put one bit into each *pair* of adjacent cells. Bit i goes
to cells 2i and 2i+1. Every cell therefore carries one bit of sector 1 or 2,
and half a bit each of sectors 3 and 4.

The layout is built recursively, and `mmlp_atc` implements it for any level
count. Start with one sector per wordline for 2-level cells. To go from L/2
to L levels:

1. Double the wordline.
2. Put two copies of the L/2 layout side by side.
3. Add L/2 sectors that each span the whole wordline.
4. Renumber by increasing span.

In closed form, with P the level count rounded up to a power of two:
- Layer k (k = 1 .. L-1, j = floor(log2 k)) holds P/2^(j+1) sectors.
- Each of those sectors spans S·2^j cells.

For 8 levels this gives twelve sectors:

| addresses | span | layer |
|---|---|---|
| 1–4 | quarter wordline | 1 |
| 5, 6 | half wordline | 2 |
| 7, 8 | half wordline | 3 |
| 9–12 | whole wordline | 4–7 |

For 6 levels the top two layers are dropped, leaving ten sectors. Only the
mapping is generic. The encoder and decoder exist for 4 levels only.

## The pair code

This is the heart of the design and the least obvious part. A cell pair has
16 level combinations and holds exactly four bits:
- a: the base-layer bit of its first cell;
- b: the base-layer bit of its second cell;
- s3: the sector-3 bit;
- s4: the sector-4 bit.

Each combination means exactly one value of the four bits:

| pair | a b s3 s4 | pair | a b s3 s4 | pair | a b s3 s4 | pair | a b s3 s4 |
|---|---|---|---|---|---|---|---|
| 00 | 0 0 0 0 | 12 | 0 0 1 0 | 22 | 0 0 0 1 | 13 | 0 0 1 1 |
| 01 | 0 1 0 0 | 02 | 0 1 1 0 | 23 | 0 1 0 1 | 03 | 0 1 1 1 |
| 10 | 1 0 0 0 | 20 | 1 0 1 0 | 32 | 1 0 0 1 | 30 | 1 0 1 1 |
| 11 | 1 1 0 0 | 21 | 1 1 1 0 | 33 | 1 1 0 1 | 31 | 1 1 1 1 |

The table is read as follows:
- **Writing sector 1 or 2** writes a and b directly as levels 0 and 1.
- **Writing sector 3** leaves the pair alone for a 0. For a 1 it moves it
  from the first column to the second: 00→12, 01→02, 10→20, 11→21. Only
  the steps 0→1, 0→2 and 1→2 occur, and no cell passes level 2.
- **Writing sector 4** leaves the pair alone for a 0. For a 1 it moves it
  from the first two columns to the last two: 00→22, 01→23, 10→32, 11→33,
  12→13, 02→03, 20→30, 21→31. Only 0→2, 1→3 and 2→3 occur.

Levels never go down, so no erase is needed between the four writes. Each
write must know the current levels first, so sectors 3 and 4 start with a
sense.

Worked example on a 4-cell wordline (c1..c4):

| step | data | c1 c2 c3 c4 |
|---|---|---|
| write sector 1 | 01 | 0 1 0 0 |
| write sector 2 | 11 | 0 1 1 1 |
| write sector 3 | 01 | 0 1 2 1 |
| write sector 4 | 10 | 2 3 2 1 |

Reading 2321 back gives 10 for sector 4 and 01 for sector 3. Both testbenches
replay this example.

The code also survives the reduced sensing described in the next section.
Suppose only references 2 and 3 are sensed, so levels 0 and 1 look the same.
The bits of the upper sectors are still exact:

    s3 = [a >= 2] xor [b >= 2]
    s4 = [a = 3] or [b = 3] or ([a >= 2] and [b >= 2])

On a wordline that holds only sectors 1 to 3, state 22 never arises, and
sector 3 is read from reference 2 alone as `[a >= 2] or [b >= 2]`. On every
stored state this gives the same bit as the xor. It differs only when a pair
has drifted into 22: from 12 or 21, the or keeps sector 3 correct. That is
why a three-sector read loses fewer bits to drift (see the last section).

So the decoder is one 16-entry lookup per pair, plus that or. It is fed levels quantized
to the sensed references: a cell below every sensed reference reads as 0.
After four random sectors, each level holds a quarter of the cells. The
full-size test checks this.

## Reading with fewer references

The MaxLevel table keeps, for each wordline, the highest layer written since
the last erase. `mmlp_sense_planner` derives the references to sense from
that value and the sector's layer. Reference k tells whether a cell is at
level k or above.

| sector | MaxLevel 1 | MaxLevel 2 | MaxLevel 3 |
|---|---|---|---|
| 1, 2 | ref 1 | refs 1, 2 | refs 1, 2, 3 |
| 3 | not written | ref 2 | refs 2, 3 |
| 4 | not written | not written | refs 2, 3 |

What this gives on average:
- **Two sectors per wordline:** every read costs one comparison.
- **Three sectors:** the reads cost 2, 2 and 1.
- **Four sectors:** the reads cost 3, 3, 2 and 2, an average of 2.5.
- **A sector above MaxLevel:** it was never written, so it is returned as
  zeros without touching the array.

The sense done before a write uses every reference up to MaxLevel:
- one comparison before sector 3 on a wordline that holds sectors 1 and 2;
- two comparisons before sector 4.

Writes must go up in layer on each wordline. A write is accepted if its
layer is above MaxLevel, or if it is a layer-1 sector and nothing above
layer 1 has been written. Otherwise it is refused with `RESP_ORDER_ERR`.
Sector 3 may be written on an empty wordline, because erased pairs are valid
"sectors 1 and 2 all zero" states.

## Controller and timing

`mmlp_controller` runs four flows. All signals are synchronous to `clk`,
and `rst_n` is an active-low asynchronous reset.

**Write** (wordline W, address A):
1. Map A to its cells and layer. Check the order against MaxLevel.
2. For layer 2 or 3, sense the cells into the array's page buffer.
3. For each 8-bit data beat:
   - read 8 cell pairs from the page buffer;
   - encode them with the beat;
   - write them back under the encoder's lane mask.

   A layer-1 beat fills 4 pairs (8 cells). A layer-2 or layer-3 beat fills
   8 pairs (16 cells).
4. Program the cell range from the page buffer.
5. Raise MaxLevel[W] to the layer and respond `RESP_OK`.

**Read:**
1. Map the address to its cells and layer.
2. Choose references from MaxLevel. If the sector was never written, stream
   zero beats instead.
3. Sense the cells.
4. For each beat, read 8 pairs and decode them to 8 data bits.

**Erase:** erase the wordline and clear its MaxLevel entry.

**Rewrite** (`HOST_REWRITE`, for phase-change arrays): replaces the data of
a sector that is already written, without an erase.
1. Refuse with `RESP_ORDER_ERR` if the sector was never written.
2. Sense the sector's cells with every reference up to MaxLevel, so the
   page buffer holds exact levels. This applies to layer-1 sectors too.
3. Run the beats as for a write, with the encoder in rewrite mode. Each
   pair is decoded to its four bits, and the rewritten sector's bits are
   replaced. The pair is then re-encoded from scratch.
4. Ask the array (`ARR_REWRITE`) to set every cell to its new level. Cells
   may go up or down. MaxLevel is unchanged, because a re-encoded pair never
   uses a layer that was not already written.

How far a rewrite moves cells depends on the page:
- **Page 4:** moves cells only 3↔2, 3↔1 and 2↔0.
- **Page 3:** never needs the slowest swing, 0↔3.
- **Pages 1 and 2:** touch only their own half of the wordline, but may use
  all six transitions between the four levels.

This is possible only where cells can be lowered (phase-change memory). On
flash, a sector must wait for the wordline to be erased.

Interface timing:
- **Host:** `cmd_valid/cmd_ready`, `wr_valid/wr_ready` and
  `rd_valid/rd_ready` are valid/ready handshakes.
- **Response:** `resp_valid` is a one-cycle pulse carrying `resp_code`
  (`RESP_OK`, `RESP_ORDER_ERR`, `RESP_ADDR_ERR`).
- **Array operations:** one at a time. A one-cycle `arr_valid` carries
  `arr_op`, `arr_wl`, `arr_refs` and the cell range. These are held until a
  one-cycle `arr_done`.
- **Page buffer:** it answers `pb_rd_en` on the next cycle, 8 pairs wide,
  and holds the data.
- **Throughput:** each data beat takes two cycles, so a 4 KB sector is
  8192 cycles plus the array time.

With the flash timing used in the model, writing sectors 1 to 4 costs
200, 200, 610 and 920 µs: a mean of 482.5 µs, against 800 µs for
conventional programming. The model uses:
- **Pulses from level 0:** 10, 20 and 40 to reach levels 1, 2 and 3.
- **Pulse and verify:** 10 µs each, with one verify per distinct target
  level after every pulse.

The 610 µs for sector 3 is one comparison (10 µs) plus 20 pulses of 30 µs.
The 920 µs for sector 4 is two comparisons plus 30 pulses of 30 µs.

## Blocks

| module | role |
|---|---|
| `mmlp_pkg` | level, cell-pair, reference-mask, command and response types |
| `mmlp_atc` | address → cell range and layer, any level count |
| `mmlp_encoder` | data + current pair levels → new pair levels (4 levels); rewrite mode |
| `mmlp_decoder` | sensed pair levels → sector bits (4 levels) |
| `mmlp_sense_planner` | reference sets for reads and pre-write senses; write-order check |
| `mmlp_maxlevel_table` | per-wordline highest written layer |
| `mmlp_controller` | write / read / erase / rewrite sequencing |
| `mmlp_top` | all of the above wired together; array and page buffer as ports |

Parameters of `mmlp_top`:

| parameter | default | meaning |
|---|---|---|
| `SECTOR_BITS` | 32768 | bits per sector; a wordline has `2*SECTOR_BITS` cells |
| `NUM_WL` | 64 | wordlines covered by the MaxLevel table |
| `DATA_W` | 8 | host data beat; also the number of cell pairs per page-buffer access |

`SECTOR_BITS` must be a multiple of `DATA_W`, and `DATA_W` must be even.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl \
        rtl/mmlp_pkg.sv tb/mlc_array_model.sv tb/tb_mmlp_top.sv \
        --top-module tb_mmlp_top
    ./obj_dir/Vtb_mmlp_top

For a unit test, replace the last file and the top module with one of these:
- `tb_mmlp_encoder`, `tb_mmlp_decoder`, `tb_mmlp_atc`;
- `tb_mmlp_sense_planner`, `tb_mmlp_maxlevel_table`, `tb_mmlp_controller`.

What each testbench checks:
- **`tb_mmlp_top`:** runs the full default size.
  - Fills a wordline sector by sector and reads every sector back after
    each write.
  - Checks write latencies, comparison counts, the worked example, the level
    balance, order and address errors, erase, and a sector-3 write on an
    empty wordline.
  - Rewrites all four sectors of the full wordline in place. Checks the
    data and the level moves listed under Rewrite above, and that a rewrite
    of an unwritten sector is refused.
  - Counts each of these mechanisms and fails if one never happens.
- **Encoder and decoder tests:** cover all pair states and every reduced
  reference set.
- **`tb_mmlp_atc`:** checks the 4-, 6- and 8-level mappings.
- **`tb_mmlp_read_workload`:** fills wordlines to 50 %, 75 % and 100 %.
  It then measures the mean comparisons per random read and the mean write
  time per sector at each fill level.
- **`tb_mmlp_drift_errors`:** writes every data combination into a pair
  with the encoder. It moves each cell up or down one level, in every
  allowed way, and reads the pair back with the planner's references. It
  then counts the wrong page bits. A full wordline gives 142 bit errors over
  120 cell drifts, 1.18 per drift. Three sectors give 57 over 52, 1.09 per
  drift. The test checks both totals exactly.

`tb/mlc_array_model.sv` is the behavioural flash model. It stores cell
levels and the page buffer, senses with a reference mask and programs with
the pulse timing above. A program cannot lower a cell, and the model counts
any request to do so as an error. A rewrite sets cells in either direction,
as a phase-change array does. It records which level transitions it made and
which cells changed. Its timing (a reset pulse, then programming up from
level 0) is the model's own choice. Erase takes a fixed 100 µs, an arbitrary
value.

## How far to trust it, and where it departs

The four-bit meaning of every pair state was checked against the worked
example, the per-sector level transitions and the effect of single-level
drifts on each sector's bits. For example, 11 drifting to 12 upsets
a, b and s3, and 33 drifting to 23 upsets only a. The decoding shortcuts
with reduced references follow from the table. They are checked
exhaustively in `tb_mmlp_decoder`. The drift totals above (1.18 and 1.09
wrong bits per drifted cell, against 1 for plain Gray-coded pages) match the
published reliability figures for this code. Only the sector-3 or-read
makes the three-sector figure come out.

These choices are this design's own:
- **Layout:** each sector occupies a contiguous range: the wordline halves
  for sectors 1 and 2, and consecutive pairs for sectors 3 and 4. Any
  pairing works with the same code, so the sectors could equally be
  interleaved chunk by chunk.
- **Interfaces:** the beat width, the handshakes, two cycles per beat, the
  wordline erase command, and zeros for never-written sectors.
- **Write order:** checked with MaxLevel alone. A second write to the same
  layer-1 sector is therefore not caught. The logical-to-physical table of
  the surrounding system is expected to prevent it.
- **MaxLevel:** holds the highest layer written, not the highest level
  actually programmed.
- **MaxLevel table size:** 64 wordlines, held in flip-flops. A full drive
  (for example 32 GB, about two million wordlines of 16 KB) would keep this
  table in external memory.

Not included:
- **The flash or PCM array:** only its behavioural model is provided.
- **8-level (and larger) encoders and decoders:** their code tables are not
  worked out. The 8-level wordline mapping exists in `mmlp_atc`.
- **Error correction.** Section "How far to trust it" gives the number of
  bits a level drift corrupts. A symbol-level code over the cell levels would
  suit the pair code, because one drift upsets one symbol but up to four
  page bits.
- **Shared senses for sequential reads:** every read senses its own sector.
  A host reading a whole wordline pays for one sense per sector, where one
  sense of all three references would serve all four.
- **Phase-change pulse timing:** the rewrite latency of the array model is
  only a placeholder.
