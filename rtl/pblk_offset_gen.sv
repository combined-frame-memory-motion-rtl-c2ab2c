// pblk_offset_gen: offset between the current MB and the MB that holds a
// predicted pixel.
//
// For the pixel at position (i, j) of the read window of block blk, the
// reference coordinate is the block origin plus the integer part of the
// block's vector plus (i, j), clamped to the plane. The generator returns the
// column and row of the MB holding it relative to the current MB. With the
// vector range [-16:+15.5] both offsets are -1, 0 or +1. The dirty table uses
// them to decide whether the pixel comes from the MFM or from the VRSB.
// Purely combinational. The document names the block and its output; the
// clamping and the arithmetic are this design's choices.
module pblk_offset_gen
  import cfmmc_pkg::*;
#(
    parameter int FRAME_W = 176,
    parameter int FRAME_H = 144,
    parameter int MBX_W   = $clog2(FRAME_W / 16),
    parameter int MBY_W   = $clog2(FRAME_H / 16)
) (
    input  logic [MBX_W-1:0] mbx,
    input  logic [MBY_W-1:0] mby,
    input  blk_t             blk,
    input  win_t             win_i,   // window column
    input  win_t             win_j,   // window row
    input  mv_pair_t         mv [4],  // MV0~MV3
    input  mv_pair_t         mv_uv,   // MVuv
    output logic signed [1:0] pblk_dx,  // MB column offset, -1..+1
    output logic signed [1:0] pblk_dy   // MB row offset, -1..+1
);

  logic     luma;
  mv_pair_t bmv;
  int       rx, ry;

  always_comb begin
    luma = (blk < 3'd4);
    bmv  = blk_mv(blk, mv[0], mv[1], mv[2], mv[3], mv_uv);
    rx   = ref_axis(int'(mbx), luma, luma ? int'(blk[0]) * 8 : 0, bmv.x, int'(win_i),
                    luma ? FRAME_W : FRAME_W / 2);
    ry   = ref_axis(int'(mby), luma, luma ? int'(blk[1]) * 8 : 0, bmv.y, int'(win_j),
                    luma ? FRAME_H : FRAME_H / 2);
    pblk_dx = 2'(luma ? (rx / 16) - int'(mbx) : (rx / 8) - int'(mbx));
    pblk_dy = 2'(luma ? (ry / 16) - int'(mby) : (ry / 8) - int'(mby));
  end

endmodule
