// cfmmc_top: combined frame memory motion compensation (CFMMC) for a 4:2:0
// video decoder without B-frames.
//
// Instead of two frame memories used in ping-pong (reference and current),
// the CFMMC keeps one frame in a main frame memory (MFM): MBs above the one
// being decoded already hold the reconstructed current frame, the rest still
// hold the reference frame. Before an MB is overwritten, its reference pixels
// are copied into the vector range strip buffer (VRSB), a ring of MBW+1 MB
// slots, and a dirty bit for that slot is set, so later MBs whose vectors
// reach back into it still find their reference. A NOT-CODED (perfect-
// matched) MB is identical in both frames: it costs no memory access at all,
// one cycle to advance the dirty-table index.
//
// Blocks: mc_control sequences each MB; mvprocessor holds MV0~MV3 and derives
// MVuv; the inblk and pblk offset generators map each predicted pixel to an MB
// and an offset in it; dirty_table says whether that MB is in the VRSB;
// memory_accessor drives both SRAMs; filter_reconstructor interpolates
// half-pel samples and adds the residue. The MFM and VRSB are the two
// single-port 8-bit SRAMs.
//
// Host interface: while busy is low, present mb_type, mv_in (four luma
// vectors, half-pel units, [-32:+31]; INTER uses mv_in[0]), mbx, mby and
// rounding_type with mc_enable high for one cycle. MBs of a frame must come in
// raster order, every MB of the frame once, and mc_clear must be pulsed (while
// idle) before each frame. Residue words (signed 9 bit, per MB 384 of them in
// block order Y0..Y3, Cb, Cr, raster inside each 8x8 block) are taken from
// res_data in every cycle res_rd is high, like a show-ahead FIFO. mc_done
// pulses in the last busy cycle. Latencies are those of mc_control.
module cfmmc_top
  import cfmmc_pkg::*;
#(
    parameter int FRAME_W = 176,   // QCIF
    parameter int FRAME_H = 144,
    parameter int MBW     = FRAME_W / 16,
    parameter int MBH     = FRAME_H / 16,
    parameter int MBX_W   = $clog2(MBW),
    parameter int MBY_W   = $clog2(MBH),
    parameter int SLOTS   = MBW + 1,
    parameter int SLOT_W  = $clog2(SLOTS),
    parameter int MFM_AW  = $clog2(FRAME_W * FRAME_H * 3 / 2),
    parameter int VRSB_AW = $clog2(SLOTS * MB_PIX)
) (
    input  logic                    clk,
    input  logic                    rst_n,
    input  logic                    mc_enable,
    input  logic                    mc_clear,
    output logic                    mc_done,
    output logic                    busy,
    input  mb_type_e                mb_type,
    input  mv_pair_t                mv_in [4],
    input  logic [MBX_W-1:0]        mbx,
    input  logic [MBY_W-1:0]        mby,
    input  logic                    rounding_type,
    output logic                    res_rd,
    input  logic signed [RES_W-1:0] res_data
);

  // control
  logic [MBX_W-1:0] cur_mbx;
  logic [MBY_W-1:0] cur_mby;
  logic             mvp_load, mvp_calc, acc_last, recon, intra;
  logic             dt_clear, dt_upd, dt_upd_dirty;
  acc_op_e          op;
  // vectors
  mv_pair_t         mv [4];
  mv_pair_t         mv_uv;
  logic             uv_valid;
  // offsets and dirty status
  blk_t             blk;
  win_t             win_i, win_j;
  logic [3:0]       in_x, in_y;
  logic signed [1:0] pblk_dx, pblk_dy;
  logic             dirty;
  logic [SLOT_W-1:0] rd_slot, index;
  // filter path
  logic             raw_valid, raw_fx, raw_fy;
  logic [7:0]       raw_pix, wr_pix;
  blk_t             raw_blk;
  win_t             raw_i, raw_j;
  mbpix_t           k;
  // SRAM ports
  logic               mfm_cs, mfm_we, vrsb_cs, vrsb_we;
  logic [MFM_AW-1:0]  mfm_addr;
  logic [VRSB_AW-1:0] vrsb_addr;
  logic [7:0]         mfm_wdata, mfm_rdata, vrsb_wdata, vrsb_rdata;

  mc_control #(.MBX_W(MBX_W), .MBY_W(MBY_W)) u_ctrl (
    .clk, .rst_n, .mc_enable, .mc_clear, .mb_type,
    .mbx_in(mbx), .mby_in(mby), .mc_done, .busy, .res_rd,
    .mbx(cur_mbx), .mby(cur_mby), .mvp_load, .mvp_calc, .op, .acc_last,
    .recon, .intra, .dt_clear, .dt_upd, .dt_upd_dirty
  );

  mvprocessor u_mvp (
    .clk, .rst_n, .load(mvp_load), .mb_type, .mv_in, .calc(mvp_calc),
    .mv, .mv_uv, .uv_valid
  );

  inblk_offset_gen #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .MBX_W(MBX_W), .MBY_W(MBY_W)) u_inblk (
    .mbx(cur_mbx), .mby(cur_mby), .blk, .win_i, .win_j, .mv, .mv_uv, .in_x, .in_y
  );

  pblk_offset_gen #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .MBX_W(MBX_W), .MBY_W(MBY_W)) u_pblk (
    .mbx(cur_mbx), .mby(cur_mby), .blk, .win_i, .win_j, .mv, .mv_uv, .pblk_dx, .pblk_dy
  );

  dirty_table #(.MBW(MBW), .SLOTS(SLOTS), .SLOT_W(SLOT_W)) u_dt (
    .clk, .rst_n, .clear(dt_clear), .upd(dt_upd), .upd_dirty(dt_upd_dirty),
    .pblk_dx, .pblk_dy, .dirty, .rd_slot, .index
  );

  memory_accessor #(
    .FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .MBX_W(MBX_W), .MBY_W(MBY_W),
    .SLOTS(SLOTS), .SLOT_W(SLOT_W), .MFM_AW(MFM_AW), .VRSB_AW(VRSB_AW)
  ) u_acc (
    .clk, .rst_n, .op, .last(acc_last), .mbx(cur_mbx), .mby(cur_mby), .mv, .mv_uv,
    .blk, .win_i, .win_j, .in_x, .in_y, .pblk_dx, .pblk_dy,
    .dirty, .rd_slot, .index,
    .raw_valid, .raw_pix, .raw_blk, .raw_i, .raw_j, .raw_fx, .raw_fy, .k, .wr_pix,
    .mfm_cs, .mfm_we, .mfm_addr, .mfm_wdata, .mfm_rdata,
    .vrsb_cs, .vrsb_we, .vrsb_addr, .vrsb_wdata, .vrsb_rdata
  );

  filter_reconstructor u_fr (
    .clk, .rst_n, .rounding_type,
    .raw_valid, .raw_pix, .raw_blk, .raw_i, .raw_j, .raw_fx, .raw_fy,
    .recon, .intra, .k, .res(res_data), .wr_pix
  );

  mfm_sram #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .AW(MFM_AW)) u_mfm (
    .clk, .cs(mfm_cs), .we(mfm_we), .addr(mfm_addr), .wdata(mfm_wdata), .rdata(mfm_rdata)
  );

  vrsb_sram #(.FRAME_W(FRAME_W), .SLOTS(SLOTS), .AW(VRSB_AW)) u_vrsb (
    .clk, .cs(vrsb_cs), .we(vrsb_we), .addr(vrsb_addr), .wdata(vrsb_wdata), .rdata(vrsb_rdata)
  );

  // The chroma vector is ready before the predicted MB is read.
  a_uv_ready: assert property (@(posedge clk) disable iff (!rst_n)
                               (op == OP_RD) |-> uv_valid);

endmodule
