# Combined frame memory motion compensation (CFMMC)

A motion compensation unit for a video decoder without B-frames that works
with **one** frame memory instead of two. A conventional decoder keeps a
reference frame and the frame being reconstructed in two memories and swaps
them after every frame (a ping-pong frame memory). Here both live in a single
main frame memory (MFM). Everything above the macroblock (MB) being decoded
already belongs to the new frame. Everything from it on still belongs to the
reference frame.

The saving goes beyond memory area. A perfect-matched MB has a zero motion
vector and no residue (MPEG-4 NOT-CODED). It is identical in the old and the
new frame and is already in the right place, so decoding it costs no memory
access at all, only one clock cycle. Sequences with a static background
(surveillance, video telephony, conferencing) have many such MBs.

The RTL follows the architecture published by N. Y.-C. Chang and T.-S. Chang,
"Combined Frame Memory Motion Compensation for Video Coding". That paper gives
the memory organisation, the block diagram and the cycle budget. Where it is
silent, choices were made and are listed under
[Design choices and departures](#design-choices-and-departures).

Default configuration: QCIF (176x144), 4:2:0, 8-bit samples, half-pel
vectors in [-16 : +15.5] pixels.

## Why one frame memory is enough: MFM, VRSB and dirty table

Writing a reconstructed MB into the MFM destroys the reference pixels that
were stored there. A later MB can still need them: a vector may reach at most
16 pixels up or left, so an MB's prediction can touch the 3x3 MBs around its
own position. Two small structures keep those pixels available.

**Vector range strip buffer (VRSB).** Just before MB *n* is written, its
reference pixels (the collocated MB of the MFM) are copied into the VRSB. The
VRSB is a ring of `SLOTS = MBW + 1` MB slots of 384 bytes each. MBW is the
frame width in MBs: 11 for QCIF, so 12 slots and 4608 bytes. MB *n* uses slot
*n* mod 12, so the ring always holds the reference copies of the 12 MBs
processed most recently. Those 12 MBs are exactly the ones a prediction can
need that are already overwritten:

```
           column c-1   c     c+1
row r-1     n-12      n-11   n-10      <- overwritten, copies in VRSB
row r       n-1       n      n+1       <- n-1 overwritten; n, n+1 still reference in MFM
row r+1     n+10      n+11   n+12      <- still reference in MFM
```

MB n-12 is the oldest copy that is still needed. Its slot is the one MB *n*
will use itself, which is why MB *n* reads its prediction **before** it backs
up its own reference MB.

**Dirty table (DT).** This is one bit per VRSB slot plus an index, the slot
of the current MB. When MB *n* finishes, the bit of its slot is set if its
pixels were backed up and overwritten. The bit is cleared if the MB was
NOT-CODED, because then the MFM still holds those pixels unchanged. The index
then advances. For each predicted pixel, the offset generators give the MB
that holds it as an offset (dx, dy) from the current MB, each -1, 0 or +1.
The linear distance is `d = dy*MBW + dx`.

* If `d >= 0`, the MB has not been processed yet in this frame. The pixel is
  read from the MFM.
* If `d < 0`, the slot is `index + d` (mod SLOTS). If that slot's bit is set,
  the pixel is read from the VRSB. Otherwise it is read from the MFM: that MB
  was NOT-CODED, so its MFM pixels are still the reference.

`mc_clear` empties the table before each frame. After the last MB of a frame
the MFM holds the complete new frame, which is the next frame's reference.
Nothing is copied between frames.

## Per-MB sequence and latency

`mc_control` runs each MB through a fixed sequence. `busy` is high for exactly
the listed number of cycles, and `mc_done` pulses in the last of them.

| MB mode | states | cycles |
|---|---|---|
| NOT_CODED (zero vector, no residue) | UPD | 1 |
| INTRA (I-frame) | MODE, WRRES(384) | 385 |
| INTER_INTRA (intra MB in a P-frame) | MODE, BKUP(384), WRRES(384), UPD | 770 |
| INTER (1 vector), INTER4V (4 vectors) | MODE, CMV(3), RD(384\*), BKUP(384), WRREC(384), UPD | 1157\* |

The states do the following:

* **MODE**: decodes the mode.
* **CMV**: `mvprocessor` derives the chroma vector in three steps (pair sums,
  total, rounding).
* **RD**: `memory_accessor` reads the predicted MB, one byte per cycle, from
  the MFM or the VRSB. `filter_reconstructor` interpolates it into its
  384-byte MB buffer.
* **BKUP**: the collocated reference MB is copied from the MFM to VRSB slot
  `index`. In the same cycles the reconstructor adds the residue to the
  buffer, clipped to 0..255.
* **WRREC**: the reconstructed MB is written to the MFM.
* **WRRES**: intra samples are written straight to the MFM.
* **UPD**: the DT bit is written and the index advances.

\* With integer vectors. A block whose vector has a half-pel component needs
one more column and/or row of reference pixels, so RD takes
Σ over the 6 blocks of (8+fx)(8+fy) cycles: at most 486, and 1259 for the
whole MB. The 1157-cycle figure counts 384 read cycles, which assumes integer
vectors or a wider memory path.

For the synthetic P-frames used in the testbench (zero vectors, a share P0
of NOT-CODED MBs), one QCIF P-frame takes `N_nc*1 + (99-N_nc)*1157` cycles.
That is 114 543 cycles at P0 = 0 and 11 659 cycles at P0 = 90 % (89 NOT-CODED
MBs). A ping-pong design takes 772 cycles for every inter MB whatever its
mode, so the single memory is faster only when many MBs are NOT-CODED. For
CIF the worst case is 396 x 1157 = 458 172 cycles per frame, 109 frames/s at
50 MHz.

### Memory accesses and energy

Energy, not speed, is what the single memory buys. Count one access per
cycle with a chip select:

| MB mode | CFMMC MFM | CFMMC VRSB | ping-pong |
|---|---|---|---|
| NOT-CODED | 0 | 0 | 768 |
| INTRA | 384 | 0 | 384 |
| INTER_INTRA | 768 | 384 | 384 |
| INTER, INTER4V | 768 + R_mfm | 384 + R_vrsb | 768 |

R_mfm + R_vrsb = 384 with integer vectors; they are the prediction reads that
the dirty table sends to each memory. Let k be the energy of an MFM access
divided by that of a VRSB access, and give every ping-pong access MFM energy.
The share of memory energy saved is then
`1 - (k*MFM + VRSB) / (k*ping-pong)`. For the synthetic P-frames this is
-62.5 % at P0 = 0 and +83.6 % at P0 = 90 % with k = 4, and -75.0 % and
+82.3 % with k = 2. The break-even point lies near P0 = 40 %. This count
covers memory accesses only. It leaves out the logic and the standby power
of the memories, so it is an upper bound on the saving.

## Block structure

```
cfmmc_top
 ├─ mc_control            state machine above, host handshake
 ├─ mvprocessor           MV0..MV3 per luma block, chroma vector MVuv (3 cycles)
 ├─ inblk_offset_gen      row/column of a predicted pixel inside its MB
 ├─ pblk_offset_gen       which MB (dx, dy in -1..+1) holds the predicted pixel
 ├─ dirty_table           dirty bits, slot ring index, MFM/VRSB decision
 ├─ memory_accessor       counters, MFM/VRSB addresses, read-data mux, backup copy
 ├─ filter_reconstructor  half-pel filter, 384-byte MB buffer, residue add + clip
 ├─ mfm_sram              single-port 8-bit SRAM, W*H*1.5 bytes (38 016)
 └─ vrsb_sram             single-port 8-bit SRAM, SLOTS*384 bytes (4 608)
cfmmc_pkg                 MB mode enum, vector types, chroma rounding, clamping
```

The offset generators and the dirty table are combinational on the read
path. An address is formed in the same cycle as the window position, and
data returns one cycle later from the synchronous SRAM. The accessor carries
the window tag (block, column, row, half-pel bits) along with it.

Both memories are written as plain arrays with one-cycle read latency and
`cs`/`we`/`addr`/`wdata`/`rdata` ports, so they can be swapped for SRAM
macros.

## Interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (memories are not reset) |
| `mc_enable` | in | 1 | start one MB; one cycle, only while `busy` is low |
| `mb_type` | in | `mb_type_e` | INTRA, INTER_INTRA, INTER, INTER4V, NOT_CODED |
| `mv_in[4]` | in | 2 x 6 each | luma vectors (x, y) in half-pel units, -32..31; INTER uses `mv_in[0]` |
| `mbx`, `mby` | in | 4 | MB position |
| `rounding_type` | in | 1 | MPEG-4 rounding control for half-pel averages |
| `mc_clear` | in | 1 | clear the dirty table; pulse while idle before every frame |
| `busy`, `mc_done` | out | 1 | MB in progress; last cycle of the MB |
| `res_rd` | out | 1 | a residue word is consumed in this cycle |
| `res_data` | in | 9, signed | residue (intra: the sample), valid whenever `res_rd` is high |

Operating rules:

* The inputs are sampled in the `mc_enable` cycle.
* MBs of a frame must come in raster order, every MB once.
* Residues follow MPEG-4 block order: 384 words per coded MB, for Y0, Y1, Y2,
  Y3, Cb, Cr, raster order inside each 8x8 block.

Memory layouts:

* MFM: luma in raster order, then Cb (88x72), then Cr.
* VRSB slot: 256 luma bytes (16x16 raster), then 64 Cb, then 64 Cr.

## Design choices and departures

The published description covers the memory organisation, the block list,
the signal names and the cycle budget. The following are choices of this RTL:

* **Order of read and backup.** The published flowchart shows the backup
  before the prediction read. Its prose, its two-MB example and its latency
  breakdown put the read first, with reconstruction overlapping the backup.
  The RTL reads first. This is also required for the VRSB ring to work (see
  above).
* **VRSB as a ring of MB slots.** Only the buffer's size is given. The slot
  ring, indexed by MB number mod (MBW+1), is this design's reading of it.
* **NOT_CODED update** writes 0 into the current slot's dirty bit as well as
  advancing the index.
* **Chroma vectors and half-pel interpolation** use the MPEG-4 simple-profile
  rules, including rounding control. The source only says that the chroma
  vector and sub-pel samples are computed.
* **Read window and latency.** Half-pel blocks lengthen the read phase (see
  the latency table). The source budget of 384 read cycles holds for integer
  vectors.
* **Frame edges.** Vectors pointing outside the frame are handled by clamping
  coordinates, so edge pixels repeat. This matches MPEG-4 unrestricted
  vectors.
* **MB buffer.** `filter_reconstructor` holds the MB between the phases in a
  384-byte register array, because reconstruction runs during the backup.
* **Offset generators.** Both receive all vectors and pick the current
  block's. The published block diagram shows the chroma vector feeding them
  and the luma vectors feeding the accessor.
* **Widths.** Vectors are 6-bit signed half-pel values, residues 9-bit
  signed, and results are clipped to 0..255.
* **Not included:** the ping-pong baseline, the bitstream decoder and IDCT
  that feed this unit, and a display read-out port for the MFM.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

* `tb_cfmmc_top` runs the whole design at its default QCIF size. It contains
  an independent two-frame decoder model (reference plus current frame,
  clamping, half-pel, MPEG-4 chroma rule).
  * It decodes the synthetic IPP pattern (zero vectors, one residue value per
    MB) for P0 = 0 %..90 % of NOT-CODED MBs, then an I-frame and four random
    P-frames with every mode and vector.
  * After each frame it compares the whole MFM with the model.
  * It checks every MB's cycle count against the latency table and the number
    of residue words taken.
  * It checks every MB's SRAM access count against the table above. For the
    synthetic frames it prints the access totals and the k = 2 and k = 4
    energy reductions.
  * It counts each mechanism and fails if one never happens: NOT-CODED skip,
    VRSB prediction reads, backups, each half-pel case, windows past the frame
    edge, clipping, rounding type 1 and dirty-table clear.
* `tb_cfmmc_cif` repeats the end-to-end test with the top set to CIF.
* Unit testbenches:
  * `tb_mc_control`: state lengths, per mode.
  * `tb_mvprocessor`: chroma rounding over the full vector range.
  * `tb_inblk_offset_gen` and `tb_pblk_offset_gen`.
  * `tb_dirty_table`: the ring against a per-MB history.
  * `tb_memory_accessor`: with real SRAMs and DT; every raw byte, the backup
    slot and the write-back are checked.
  * `tb_filter_reconstructor`: all four half-pel cases, both rounding types,
    clipping and the intra path.
  * `tb_mfm_sram` and `tb_vrsb_sram`.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/cfmmc_pkg.sv \
          tb/tb_cfmmc_top.sv --top-module tb_cfmmc_top -Mdir obj
./obj/Vtb_cfmmc_top
```

Verilator finds the other modules in `rtl/` by file name. The package must
be listed first. `-Wno-fatal` keeps the testbenches' width warnings from
stopping the build. The end-to-end run takes a few million cycles, a few
seconds of simulation.

What is not verified:

* No timing or area results exist for this RTL. The published design met
  50 MHz in a 0.18 um process.
* Energy is estimated only from access counts (see above). There is no
  power model of the logic or of the memories' standby power, and k has to
  be chosen.
* No real video sequences were decoded. Random frames stand in for them.

## Changing the size

`FRAME_W` and `FRAME_H` on `cfmmc_top` (multiples of 16) set everything else:

* MBW and the slot count MBW+1;
* the MFM depth W·H·1.5 and the VRSB depth (MBW+1)·384;
* the address widths and the MB-coordinate widths `MBX_W`/`MBY_W`.

For CIF (352x288) that gives a 152 064-byte MFM and a 23-slot, 8832-byte
VRSB. The top's `mbx`/`mby` ports take their width from the parameters.
`tb_cfmmc_cif` runs the whole design at that size with the same checks as
the QCIF test. The unit testbenches use QCIF constants.
