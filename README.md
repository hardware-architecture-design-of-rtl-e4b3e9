# HEVC CABAC entropy decoder

HEVC codes every syntax element with CABAC, a binary arithmetic code whose bit
probabilities adapt per *context*. Decoding it is serial by nature: each bin
changes the interval state and the context that the next bin uses. This RTL
is a hardware CABAC decoder organised the way the architecture it follows
draws it. A bitstream resolution FSM coordinates a residual-syntax sequencer
with a fast coefficient-scanning helper (plus small sequencers for the SAO,
intra-mode, prediction-unit and MVD syntax), a context-modelling region (index
generator plus context storage), a context initialization unit, a bitstream
buffer, an arithmetic decoding unit (regular decoder, LPS table, bypass
decoder, terminate) and a de-binarizer.

The decoder produces **one bin per clock cycle** whenever at least 9
bitstream bits are buffered. It decodes the complete `residual_coding`
syntax of HEVC version 1, for 4x4 to 32x32 blocks, luma and chroma, with
all three scans (diagonal, horizontal, vertical), `transform_skip_flag` and
sign data hiding, the SAO parameters of each CTB, the intra prediction
modes of a CU, inter prediction units (`prediction_unit`, with their motion
vector differences) and the `end_of_slice_segment_flag`. It does not parse
the coding quadtree, the other CU-level elements or the transform tree. The
host issues one command per transform block, per CTB's SAO parameters, per
CU's intra modes and per prediction unit instead (see *Scope*).

## Block map

```
             host commands                  off-chip init values   off-chip bitstream
                  |                                  |                      |
               [bfsm] ---- slice start ----> [ctx_init]              [bs_buffer]
                  |   \                              | write               | 16-bit window,
          tu start|    request mux                   v                     | 0..9 bits/cycle
                  v     (sequencer / terminate) [cgm_buffer] <-- write-back --+
   [bsru + rcm] --+--------------------------->   ^  | context             |
   (or sao/mvd/intra_mode/pu_parser)              |  |                     |
     |   |  selects element, mode, binarization   |  v                     |
     |   +--> [cgm] -- context index -------------+ [adu: lps_lut, gdc, bdc, terminate]
     |                                                 | bin
     +<----------------- [debin] <---------------------+
     |  element done / value
     v
  coefficients (x, y, value), syntax elements, end-of-slice flag
```

| Module | Role |
|---|---|
| `hevc_entropy_decoder` | top level, wiring and the host interface |
| `bfsm` | command controller: slice start, one transform block, one CTB's SAO parameters, one CU's intra modes, one prediction unit, one motion vector difference, end-of-slice flag; routes bin requests to the decoder |
| `bsru` | residual syntax sequencer: decides which element, mode, binarization and context inputs the next bin has |
| `sao_parser` | SAO syntax sequencer for one CTB: merge flags, type, offsets, signs, band position, edge class |
| `mvd_parser` | `mvd_coding` sequencer: greater0/greater1 flags, `abs_mvd_minus2`, sign, for x and y |
| `intra_mode_parser` | intra prediction mode sequencer for one CU: luma mode flags and indices, chroma mode |
| `pu_parser` | inter prediction unit sequencer: merge flag and index, inter_pred_idc, reference indices, MVD (through `mvd_parser`), MVP flags |
| `rcm` | fast scanning helper: last position to scan index, scan index to coordinates, n-th significant coefficient of a sub-block |
| `cgm` | context index generation (HEVC context-increment rules) |
| `cgm_buffer` | context storage, 130 x 7 bits (6-bit state, MPS) |
| `ctx_init` | context initialization from 8-bit init values and the slice QP |
| `bs_buffer` | 64-bit bitstream window, refilled with 32-bit words |
| `adu` | arithmetic decoding unit: range/offset registers and mode selection |
| `gdc`, `lps_lut` | regular bin decoding and its 64x4 LPS range table |
| `bdc` | bypass bin decoding |
| `debin` | de-binarizer: fixed length, truncated unary, Golomb-Rice with Exp-Golomb escape, k-th order Exp-Golomb |
| `cabac_pkg` | shared types, context memory layout and the fixed HEVC tables |

## The single-cycle bin loop

The cycle time of the design is one pass round this loop, and every unit on it
is combinational:

1. `bsru` holds the parsing state: element, coefficient position, the
   coded-sub-block flags of its right and lower neighbours, ctxSet and
   greater1Ctx. (For the other syntax the active sequencer takes its
   place.) `debin` supplies the index of the bin within the element.
2. `cgm` turns these into a context address. `cgm_buffer` reads it
   asynchronously.
3. `adu` decodes the bin in the requested mode:
   * **regular** (`gdc`): the LPS sub-range comes from `lps_lut[state][range[7:6]]`.
     An offset at or above `range - rLPS` means an LPS. The state then moves up
     one on an MPS (at most 62), or follows the LPS transition table on an LPS,
     and the MPS flips when the state was 0. Range and offset shift left until
     the range is at least 256, taking up to 6 new bits.
   * **bypass** (`bdc`): offset = 2*offset + next bit. The bin is 1 when the
     result reaches the range, which is then subtracted.
   * **terminate**: the range drops by 2. A bin of 1 ends the arithmetic-coded
     data, and the unit waits for the next slice start.
4. The adapted context is written back at the clock edge. `bs_buffer` drops
   the bits used. `debin` either signals that the element is complete, with its
   value, in the same cycle, or records the bin.
5. `bsru` moves to its next state on that same edge.

A request waits (`bin_valid` low) only while the buffer holds fewer than 9
bits. The buffer takes a new 32-bit word whenever it holds 32 bits or fewer,
so a stream arriving at one word per cycle never starves the decoder.

## Residual parsing (`bsru` with `rcm`)

For each transform block of size 2^n (n = 2..5):

0. When the host says the flag is present and the block is 4x4,
   `transform_skip_flag` is decoded first (one regular bin, one context for
   luma and one for chroma). It is reported on the syntax-element output
   only, since it does not change how the rest is parsed.
1. `last_sig_coeff_x_prefix` and `last_sig_coeff_y_prefix` are decoded as
   truncated unary codes with cMax = 2n-1 (regular bins). The context
   increment is `offset + (binIdx >> shift)`: luma uses offset 3(n-2)+((n-1)>>2)
   and shift (n+1)>>2; chroma uses offset 15 and shift n-2. When a prefix is
   above 3, a bypass suffix of (prefix>>1)-1 bits follows, and
   last = 2^((prefix>>1)-1) * (2 + (prefix&1)) + suffix. For the vertical
   scan the two decoded coordinates are swapped.
2. `rcm` converts the last position into a sub-block scan index and a position
   inside the sub-block, in the block's scan order. The diagonal scan walks
   up-right anti-diagonals, the horizontal scan goes row by row and the
   vertical scan column by column. The same order applies to the sub-blocks
   and to the positions inside each one. Parsing starts there and does not walk the scan from
   the top.
3. For each 4x4 sub-block, from that one down to sub-block 0:
   * `coded_sub_block_flag` is decoded except for the first and the last
     sub-block, where it is taken as 1. Its context depends on whether the
     right or lower neighbour is coded.
   * `sig_coeff_flag` is decoded for every scan position below the last one.
     When the sub-block was signalled as coded and no other flag was set, the
     DC flag is not sent and is taken as 1. The context is the 4x4 position map
     for 4x4 blocks. Larger blocks use one of four patterns chosen by the
     neighbours' coded flags, plus offsets for the first sub-block, the block
     size and chroma. 8x8 luma blocks with a horizontal or vertical scan use
     a separate group of contexts (offset 15 instead of 9).
   * `rcm` enumerates the significant positions from the highest scan position
     down. The level phase visits only those: up to eight `greater1` flags, one
     `greater2` flag, one sign per coefficient (bypass), then
     `coeff_abs_level_remaining` for each coefficient whose level has reached
     its base level (3 for the greater2 candidate, 2 for the other first
     eight, 1 beyond).
   * Context state across sub-blocks: ctxSet is 2 for luma sub-blocks other
     than sub-block 0, otherwise 0. It is raised by one when the previous
     coded sub-block ended with greater1Ctx = 0. Within a sub-block,
     greater1Ctx starts at 1, becomes 0 after a greater1 flag of 1, and
     otherwise counts up to 3.
   * Sign data hiding: when it is enabled and the highest and lowest
     significant scan positions of the sub-block are more than 3 apart, the
     lowest one gets no sign bit. Its sign is negative when the sum of the
     sub-block's absolute levels is odd. The parser keeps this parity while
     it outputs the levels, and the hidden coefficient is the last one out.
   * The Rice parameter starts at 0 in each sub-block. It rises by one, to at
     most 4, after a level above 3*2^k, that is above 3, 6, 12 or 24.
4. Each coefficient leaves on `coef_valid` with `(coef_x, coef_y)` and its
   signed value once its level is known, in reverse scan order. `tu_done`
   follows the last one. Coefficients that are not output are zero.

`coeff_abs_level_remaining` is decoded by `debin` as a unary prefix p. When
p <= 3, a k-bit suffix s follows and the value is (p<<k)+s. Otherwise a
(p-3+k)-bit suffix follows and the value is ((2^(p-3)+2)<<k)+s.

## SAO parameters (`sao_parser`)

For a CTB, `sao_parser` first decodes `sao_merge_left_flag` when the left CTB
is a merge candidate. It then decodes `sao_merge_up_flag` when the upper CTB
is one and there was no left merge. Both flags use one shared context. After
a merge nothing else follows. Otherwise each component with SAO enabled in
the slice (luma, then Cb and Cr) carries:

* `sao_type_idx`: truncated unary, cMax 2. The first bin is context-coded
  and the second is bypass. Cr has none and reuses the Cb type.
* For type 0 (off), nothing more.
* Otherwise four `sao_offset_abs` values, truncated unary bypass with cMax 7.
* Band offset (type 1): one sign per non-zero offset, then a 5-bit
  `sao_band_position`.
* Edge offset (type 2): a 2-bit `sao_eo_class` for luma and Cb. Cr reuses
  the Cb class.

Like `bsru`, it only picks the element, mode and binarization of each bin.
It shares `debin`, `cgm` and the arithmetic decoder with `bsru`, and only one
sequencer runs at a time. The values leave on the syntax-element output, in
syntax order.

## Motion vector differences (`mvd_parser`)

`mvd_parser` walks one `mvd_coding` in eight fixed steps:
`abs_mvd_greater0_flag` for x and for y, `abs_mvd_greater1_flag` for each
component whose greater0 flag is 1, then for x and then y (when greater0 is
1) `abs_mvd_minus2` (when greater1 is 1) and `mvd_sign_flag`. The greater0
flags share one context, and so do the greater1 flags. `abs_mvd_minus2` is a
first-order Exp-Golomb code in bypass bins: a unary prefix p, then p+1
suffix bits s, value ((2^p - 1)<<1) + s. The sign is one bypass bin. A step
whose element is absent takes one cycle without a bin. Like `sao_parser`, it
shares `debin`, `cgm` and the arithmetic decoder, and its values leave on
the syntax-element output in syntax order.

## Intra prediction modes (`intra_mode_parser`)

For an intra CU, `intra_mode_parser` decodes one `prev_intra_luma_pred_flag`
per prediction block: four when the host says the CU is split NxN, else one.
All of them use one context. Then, for each block, it decodes `mpm_idx`
(truncated unary, cMax 2, bypass) if the block's flag is 1, or
`rem_intra_luma_pred_mode` (5 bypass bits) if it is 0. Last comes
`intra_chroma_pred_mode` for 4:2:0 video. Its first bin has its own context
and leaves as `SE_CHROMA_FLAG`; a 0 there means chroma mode 4. When the bin
is 1, two bypass bins follow as `SE_CHROMA_IDX` and give mode 0..3. The
luma and chroma modes themselves (the most-probable-mode list) are derived
outside the decoder from these values.

## Inter prediction units (`pu_parser`)

`pu_parser` follows `prediction_unit()`. For a skipped CU only `merge_idx`
is coded. Otherwise `merge_flag` comes first, and a merged block carries
only `merge_idx`. `merge_idx` is truncated unary with cMax =
MaxNumMergeCand-1, and only its first bin is context-coded; it is absent
when there is a single candidate. A block that is not merged carries:

* in B slices, `inter_pred_idc`. It leaves as two elements. `SE_INTER_BI`
  is the first bin (1 = bi-prediction, context chosen by the CU depth); it
  is absent for 8x4 and 4x8 blocks (nPbW+nPbH = 12). `SE_INTER_L1` follows
  when the block is not bi-predicted (0 = list 0, 1 = list 1, fifth
  context).
* for each list in use: `ref_idx_lX` when the list has more than one
  reference (truncated unary, cMax = count-1, first two bins
  context-coded), then an `mvd_coding`, then `mvp_lX_flag`. The list-1
  `mvd_coding` is left out when `mvd_l1_zero_flag` is set and the block is
  bi-predicted.

For each `mvd_coding` the sequencer starts `mvd_parser` and waits for its
done; the MVD bins go through the same request path. The host gives the
CU and slice facts with the command.

## Contexts and their initialization

`cabac_pkg` fixes the context memory layout (130 entries):

| Element | First address | Count |
|---|---|---|
| last_sig_coeff_x_prefix | 0 | 18 |
| last_sig_coeff_y_prefix | 18 | 18 |
| coded_sub_block_flag | 36 | 4 |
| sig_coeff_flag | 40 | 42 (27 luma, 15 chroma) |
| coeff_abs_level_greater1_flag | 82 | 24 |
| coeff_abs_level_greater2_flag | 106 | 6 |
| transform_skip_flag | 112 | 2 |
| sao_merge_left_flag, sao_merge_up_flag | 114 | 1 |
| sao_type_idx (first bin) | 115 | 1 |
| abs_mvd_greater0_flag | 116 | 1 |
| abs_mvd_greater1_flag | 117 | 1 |
| prev_intra_luma_pred_flag | 118 | 1 |
| intra_chroma_pred_mode (first bin) | 119 | 1 |
| merge_flag | 120 | 1 |
| merge_idx (first bin) | 121 | 1 |
| inter_pred_idc | 122 | 5 (CU depth 0..3, last bin) |
| ref_idx_l0, ref_idx_l1 (first two bins) | 127 | 2 |
| mvp_l0_flag, mvp_l1_flag | 129 | 1 |

The init values are not built in. `ctx_init` reads them from an external
memory that holds three tables of 130 bytes, one per initialization type, at
address `init_type*130 + context`. For each value v it computes
m = 5*(v>>4) - 45, n = 8*(v&15) - 16 and
pre = clip(1, 126, ((m*clip(0,51,QP))>>4) + n). The MPS is pre > 63, and the
state is pre-64 or 63-pre. A host loads the HEVC standard's init values in
this layout, or any other table.

## Host interface and timing (`hevc_entropy_decoder`)

* Commands are taken on `cmd_valid && cmd_ready`. `cmd_ready` is high only
  while the controller is idle.
  * `CMD_SLICE` (with `slice_qp`, `init_type`): empties the bitstream buffer
    in the accepting cycle. It then initialises all contexts, one per cycle
    (done 132 cycles after the command), and then the arithmetic decoder
    (range 510, 9-bit offset) as soon as 9 bits are buffered. Send the first
    word of the slice's arithmetic-coded data after the command has been
    accepted.
  * `CMD_TU` (with `log2_size` 2..5, `c_idx` 0 luma / 1, 2 chroma, `scan`
    diagonal / horizontal / vertical, `sdh_en` sign data hiding, `ts_en`
    transform_skip_flag present): parses one `residual_coding`.
  * `CMD_SAO` (with `sao_luma`, `sao_chroma` = the slice's SAO enables,
    `sao_left`, `sao_up` = whether the left/upper CTB is a merge
    candidate): parses the SAO parameters of one CTB.
  * `CMD_MVD`: parses one `mvd_coding`.
  * `CMD_INTRA` (with `intra_nxn` = the CU has four prediction blocks):
    parses the intra prediction modes of one CU.
  * `CMD_PU` (with `pu_skip`, `pu_slice_b`, `pu_max_merge_m1` =
    MaxNumMergeCand-1, `pu_nref0_m1`/`pu_nref1_m1` = reference counts minus
    1, `pu_mvd_l1_zero`, `pu_ct_depth`, `pu_pb12` = the block is 8x4 or
    4x8): parses one inter `prediction_unit`.
  * `CMD_END`: decodes `end_of_slice_segment_flag`, reported on
    `eos_valid`/`eos_flag`. After a 1, the next slice needs `CMD_SLICE` and its
    own data, starting at a fresh word.
* Init memory: `init_mem_addr`/`init_mem_re` out, data on `init_mem_rdata`
  one cycle later.
* Bitstream: 32-bit words on `bs_word`/`bs_valid`/`bs_ready`, with the first
  bit in bit 31.
* Outputs: `coef_*` and `tu_done` as above. `se_valid`/`se_id`/`se_value`
  give every completed syntax element with its de-binarized value.

## Scope and departures

* **Most CTU-level syntax is not parsed.** The architecture's controller
  walks whole CTUs (SAO, coding quadtree, CU, PU, MVD, transform tree). Here
  the controller sequences slice start, SAO parameters, intra prediction
  modes, inter prediction units, motion vector differences, residual blocks
  and the end-of-slice flag. The coding quadtree, `cu_transquant_bypass_flag`,
  `cu_skip_flag`, `pred_mode_flag`, `part_mode`, `rqt_root_cbf` and the
  transform tree (`split_transform_flag`, the cbf flags, `cu_qp_delta`) are
  not parsed. When each of them
  occurs, block sizes and components come from the host, and so does the
  CTB's merge-candidate availability for SAO. The context
  layout, `cgm` and `bsru` are where the missing elements would be added.
* The host tells the decoder, per block, the scan order, whether sign data
  hiding applies and whether a `transform_skip_flag` is present. In a full
  decoder these come from the intra prediction mode, the picture parameter
  set and `cu_transquant_bypass_flag`, which belong to the CTU-level syntax.
* The range-extension residual tools (explicit RDPCM, extended precision,
  persistent Rice adaptation, cross-component prediction) are not included.
  A stream that uses them does not decode correctly.
* Decisions of this design, not taken from the architecture: the command
  interface, the 32-bit word interface and 64-bit buffer, the 9-bit stall
  rule, the asynchronous context memory, the context memory layout, the
  1-cycle init memory, and the 16-bit coefficient values.
* The fixed tables (LPS range, LPS state transition, initialization formula,
  scan order, context increments) are those of the HEVC standard.
* A generic yosys coarse synthesis of the top gives about 1900 word-level
  cells, 416 flip-flops and 3.4 kbit of memory. About 2 kbit of that memory is
  the LPS table, and 910 bits are the context storage.

## Throughput

While a block is parsed, a cycle either decodes one bin or does bookkeeping
without one. Bookkeeping cycles are: one to turn the last position into scan
indices, one per sub-block to load its neighbour flags, one per coded
sub-block to start the level phase, and one per sub-block to move on.
`tb_residual_rate` measures this on two synthetic slices of 40 blocks with
the bitstream offered every cycle:

| Level profile | Bins per parsing cycle | Coded bits per cycle | Cycles without a bin | Last-position cycles |
|---|---|---|---|---|
| sparse, small levels (coarse quantizer) | 0.85 | 0.62 | 15% | 1.0% |
| dense, larger levels (fine quantizer) | 0.92 | 0.89 | 8% | 1.1% |

At a 400 MHz clock this is 30 to 43 MB/s of residual data. The bit rate of
an HEVC Level 4 main-tier stream is about 1.5 MB/s. The test fails if
either slice falls below 0.8 bins per cycle or below that rate. These numbers
cover the residual data only; the other syntax is not part of this measurement.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/tb_cabac_pkg.sv` provides the
reference models. These are a CABAC *encoder* (interval low/range with
outstanding bits, bypass, terminate and flush) and a `residual_coding` bin
generator with its own implementation of the context rules. The tests are
built on them:

* `tb_hevc_entropy_decoder` runs the top at its default parameters end to end.
  It builds 3 slices of 24 random blocks (all sizes, luma and chroma, sparse
  to dense, levels up to 3000, DC-only sub-blocks, all three scans for 4x4
  and 8x8, sign data hiding and transform_skip_flag on and off) from random
  init tables
  and QPs. It encodes them with end-of-slice flags of 0 between some blocks
  and 1 at the end, and feeds the stream with random gaps, one slice starved
  on purpose. It checks every coefficient and flag, and fails if any of these
  never occurred: regular, bypass and both terminate outcomes, buffer
  starvation, multi-bit renormalisation, uncoded sub-blocks, last-position
  suffixes, greater2 flags, Rice parameter 4, Exp-Golomb escapes, the ctxSet
  carry, inferred DC flags, every block size, chroma, the horizontal and
  vertical scans, hidden signs, transform_skip_flag, SAO CTBs, SAO
  merges, motion vector differences, Exp-Golomb prefixes in them, intra CUs,
  NxN intra CUs, prediction units, B-slice prediction units, or merged
  prediction units. SAO parameters of random CTBs, random motion vector
  differences, intra modes and prediction units are interleaved with the
  blocks, and each of their elements and values is checked.
* `tb_bsru` checks the element, mode and context address of every bin the
  parser requests against the generator, over all scans and with sign data
  hiding and `transform_skip_flag` on and off.
* `tb_sao_parser` does the same for the SAO sequencer and also checks every
  element value, over random enables and merge candidates.
* `tb_mvd_parser` does the same for the MVD sequencer over differences from
  zero to +-32768, and rebuilds each difference from the decoded elements.
  `tb_intra_mode_parser` does it for the intra-mode sequencer over 2Nx2N
  and NxN CUs, and `tb_pu_parser` for the PU sequencer with the MVD sequencer
  it calls, over skip, merge, P and B slices, 1 to 16 references and
  `mvd_l1_zero_flag`.
* `tb_residual_rate` checks every coefficient of its two slices and measures
  the throughput described above.
* `tb_adu` round-trips 6000 mixed bins through the encoder with a starved
  bit window. `tb_gdc`, `tb_bdc`, `tb_debin`, `tb_cgm`, `tb_rcm` and
  `tb_ctx_init` compare against independent reference formulas. `tb_lps_lut`
  spot-checks table entries and the table's monotonicity. `tb_bs_buffer` and
  `tb_cgm_buffer` compare against queue and array models.

To simulate one test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_hevc_entropy_decoder \
  rtl/cabac_pkg.sv tb/tb_cabac_pkg.sv tb/tb_hevc_entropy_decoder.sv
./obj_dir/Vtb_hevc_entropy_decoder
```

For another test, substitute its name. The end-to-end test takes well under a
second.
