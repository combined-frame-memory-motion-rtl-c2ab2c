// cfmmc_pkg: types, constants and small arithmetic shared by the combined
// frame memory motion compensation (CFMMC) blocks.
//
// A macroblock (MB) is processed as six 8x8 blocks in MPEG-4 order: four luma
// blocks Y0..Y3 (raster order inside the 16x16 luma MB), then Cb, then Cr.
// Inside a block pixels are in raster order, so MB pixel k = blk*64 + row*8 + col.
// Motion vectors are in half-pel units of their own plane.
//
// The MB modes, the 4:2:0 frame format and the 384-byte MB follow the
// document; the half-pel vector width, the chroma-vector rounding (MPEG-4
// simple profile rule) and the edge clamping are this design's choices.
package cfmmc_pkg;

  // MB modes of MPEG-4 simple profile handled by the controller.
  typedef enum logic [2:0] {
    MB_INTRA       = 3'd0,  // intra MB of an I-frame
    MB_INTER_INTRA = 3'd1,  // intra MB inside a P-frame
    MB_INTER       = 3'd2,  // one MV for the MB
    MB_INTER4V     = 3'd3,  // one MV per luma 8x8 block
    MB_NOT_CODED   = 3'd4   // zero MV and no residue: perfect-matched MB
  } mb_type_e;

  // Vector range [-16:+15.5] pixels, in half-pel units.
  localparam int MV_W = 6;
  typedef logic signed [MV_W-1:0] mv_t;
  typedef struct packed {
    mv_t x;
    mv_t y;
  } mv_pair_t;

  localparam int RES_W  = 9;     // residue / intra sample, signed
  localparam int MB_PIX = 384;   // 256 luma + 64 Cb + 64 Cr bytes
  localparam int BLK_PIX = 64;
  typedef logic [8:0] mbpix_t;   // 0..383
  typedef logic [2:0] blk_t;     // 0..5
  typedef logic [3:0] win_t;     // window coordinate 0..8

  // Memory accessor operation, driven by the controller.
  typedef enum logic [1:0] {
    OP_IDLE = 2'd0,
    OP_RD   = 2'd1,  // read the predicted MB (MFM and/or VRSB)
    OP_BKUP = 2'd2,  // copy the collocated reference MB from MFM to VRSB
    OP_WR   = 2'd3   // write the reconstructed MB (or intra samples) to MFM
  } acc_op_e;

  // Chroma vector of a one-vector MB: the luma vector halved, quarter-pel
  // positions rounded to the half-pel position (MPEG-4 rule).
  function automatic mv_t chroma_mv_1(mv_t l);
    return (l >>> 1) | mv_t'({5'b0, l[0]});
  endfunction

  // Rounding of the sixteenth-pel fraction of (sum of four vectors)/8 to
  // half-pel units (MPEG-4 four-vector chroma rule).
  function automatic logic [1:0] sixteenth_round(logic [3:0] f);
    if (f < 4'd3)       return 2'd0;
    else if (f < 4'd14) return 2'd1;
    else                return 2'd2;
  endfunction

  // Chroma vector from the sum of the four luma vectors of an INTER4V MB.
  function automatic mv_t chroma_mv_4(logic signed [MV_W+1:0] s);
    logic [MV_W+1:0] mag;
    logic [MV_W:0]   c;
    mag = s[MV_W+1] ? (~s + 1'b1) : s;
    c   = (MV_W+1)'({mag[MV_W+1:4], 1'b0}) + (MV_W+1)'(sixteenth_round(mag[3:0]));
    return s[MV_W+1] ? mv_t'(-$signed({1'b0, c})) : mv_t'(c);
  endfunction

  // Vector used by block blk: Y0..Y3 take their own vector, Cb/Cr the chroma one.
  function automatic mv_pair_t blk_mv(blk_t blk, mv_pair_t mv0, mv_pair_t mv1,
                                      mv_pair_t mv2, mv_pair_t mv3, mv_pair_t mvuv);
    case (blk)
      3'd0:    return mv0;
      3'd1:    return mv1;
      3'd2:    return mv2;
      3'd3:    return mv3;
      default: return mvuv;
    endcase
  endfunction

  // Reference coordinate along one axis, in plane pixels, clamped to the
  // plane (edge pixels repeat outside the frame).
  //   mb   : MB coordinate (column or row)
  //   luma : 1 for the luma plane (16-pixel MBs), 0 for chroma (8-pixel MBs)
  //   org  : block origin inside the MB (0 or 8, luma only)
  //   mv   : vector component in half-pel units
  //   k    : position inside the read window (0..8)
  //   dim  : plane size along this axis
  function automatic int ref_axis(int mb, logic luma, int org, mv_t mv, int k, int dim);
    int p;
    p = (luma ? mb * 16 : mb * 8) + org + (int'(mv) >>> 1) + k;
    if (p < 0) p = 0;
    if (p > dim - 1) p = dim - 1;
    return p;
  endfunction

endpackage
