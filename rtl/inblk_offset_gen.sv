// inblk_offset_gen: offset of a predicted pixel inside its predicted MB.
//
// For the pixel at position (i, j) of the read window of block blk, the
// reference coordinate is the block origin plus the integer part of the
// block's vector plus (i, j), clamped to the plane so that vectors pointing
// past the frame edge repeat the edge pixels. The generator returns that
// coordinate modulo the MB size (16 luma, 8 chroma): the pixel's row and
// column inside the MB that holds it. Together with the pblk offset (which
// MB) it addresses the pixel in the MFM or in a VRSB slot.
// Purely combinational. The document names the block and its output; the
// clamping and the arithmetic are this design's choices.
module inblk_offset_gen
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
    output logic [3:0] in_x,       // column inside the predicted MB
    output logic [3:0] in_y        // row inside the predicted MB
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
    in_x = luma ? 4'(rx % 16) : 4'(rx % 8);
    in_y = luma ? 4'(ry % 16) : 4'(ry % 8);
  end

endmodule
