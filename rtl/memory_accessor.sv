// memory_accessor: address generation for the MFM and the VRSB and the data
// multiplexing between them.
//
// The controller selects one operation at a time with `op`; the accessor runs
// its own counters through it and raises `last` in the operation's final
// cycle, after which the counters are back at zero for the next operation.
//
//   OP_RD   Reads the predicted MB, one pixel per cycle, block by block (Y0..Y3,
//           Cb, Cr). Each block reads a window of (8+fx) x (8+fy) pixels, fx/fy
//           being the half-pel bits of the block's vector, so an MB with
//           integer vectors takes 384 cycles. The window position goes out to
//           the offset generators; their pblk offset selects the dirty bit,
//           and the pixel is read from VRSB slot rd_slot when it is dirty and
//           from the MFM otherwise. One cycle later the SRAM word comes back
//           and is passed to the filter with its window tag (raw_*).
//   OP_BKUP Copies the collocated reference MB (384 pixels) from the MFM to
//           the VRSB slot of the current MB: MFM read in cycle k, VRSB write
//           of the same pixel in cycle k+1 (the last write lands in the first
//           cycle of the next operation, which only uses the MFM).
//   OP_WR   Writes wr_pix to the current MB's pixel k of the MFM, 384 cycles.
// `k` is the MB pixel index (blk*64 + row*8 + col) of OP_BKUP and OP_WR; the
// filter/reconstructor uses it to step through its MB buffer and the residue.
//
// MFM layout: luma raster, then Cb, then Cr (half width and height). VRSB slot
// layout: 256 luma bytes in MB raster order, then 64 Cb, then 64 Cr.
// The document gives the accessor's role; the read order, window sizes and
// memory layouts are this design's choices.
module memory_accessor
  import cfmmc_pkg::*;
#(
    parameter int FRAME_W = 176,
    parameter int FRAME_H = 144,
    parameter int MBX_W   = $clog2(FRAME_W / 16),
    parameter int MBY_W   = $clog2(FRAME_H / 16),
    parameter int SLOTS   = FRAME_W / 16 + 1,
    parameter int SLOT_W  = $clog2(SLOTS),
    parameter int MFM_AW  = $clog2(FRAME_W * FRAME_H * 3 / 2),
    parameter int VRSB_AW = $clog2(SLOTS * MB_PIX)
) (
    input  logic               clk,
    input  logic               rst_n,
    input  acc_op_e            op,
    output logic               last,
    input  logic [MBX_W-1:0]   mbx,
    input  logic [MBY_W-1:0]   mby,
    input  mv_pair_t           mv [4],
    input  mv_pair_t           mv_uv,
    // window position to the offset generators, and their answers
    output blk_t               blk,
    output win_t               win_i,
    output win_t               win_j,
    input  logic [3:0]         in_x,
    input  logic [3:0]         in_y,
    input  logic signed [1:0]  pblk_dx,
    input  logic signed [1:0]  pblk_dy,
    // dirty table
    input  logic               dirty,
    input  logic [SLOT_W-1:0]  rd_slot,
    input  logic [SLOT_W-1:0]  index,
    // to / from the filter and reconstructor
    output logic               raw_valid,
    output logic [7:0]         raw_pix,
    output blk_t               raw_blk,
    output win_t               raw_i,
    output win_t               raw_j,
    output logic               raw_fx,
    output logic               raw_fy,
    output mbpix_t             k,
    input  logic [7:0]         wr_pix,
    // MFM port
    output logic               mfm_cs,
    output logic               mfm_we,
    output logic [MFM_AW-1:0]  mfm_addr,
    output logic [7:0]         mfm_wdata,
    input  logic [7:0]         mfm_rdata,
    // VRSB port
    output logic               vrsb_cs,
    output logic               vrsb_we,
    output logic [VRSB_AW-1:0] vrsb_addr,
    output logic [7:0]         vrsb_wdata,
    input  logic [7:0]         vrsb_rdata
);

  localparam int YSIZE = FRAME_W * FRAME_H;
  localparam int CSIZE = YSIZE / 4;

  // MFM address of plane pixel (px, py) of the plane of block b.
  function automatic logic [MFM_AW-1:0] mfm_at(blk_t b, int px, int py);
    if (b < 3'd4)       return MFM_AW'(py * FRAME_W + px);
    else if (b == 3'd4) return MFM_AW'(YSIZE + py * (FRAME_W / 2) + px);
    else                return MFM_AW'(YSIZE + CSIZE + py * (FRAME_W / 2) + px);
  endfunction

  // VRSB address of in-MB pixel (ix, iy) of the plane of block b in slot s.
  function automatic logic [VRSB_AW-1:0] vrsb_at(logic [SLOT_W-1:0] s, blk_t b, int ix, int iy);
    int o;
    if (b < 3'd4)       o = iy * 16 + ix;
    else if (b == 3'd4) o = 256 + iy * 8 + ix;
    else                o = 320 + iy * 8 + ix;
    return VRSB_AW'(int'(s) * MB_PIX + o);
  endfunction

  // ---------------------------------------------------------------- counters
  blk_t     blk_c;
  win_t     i_c, j_c;
  mbpix_t   k_c;
  mv_pair_t bmv;
  logic     fx, fy, win_last_i, win_last_j;

  always_comb begin
    bmv        = blk_mv(blk_c, mv[0], mv[1], mv[2], mv[3], mv_uv);
    fx         = bmv.x[0];
    fy         = bmv.y[0];
    win_last_i = (i_c == win_t'(7 + int'(fx)));
    win_last_j = (j_c == win_t'(7 + int'(fy)));
    unique case (op)
      OP_RD:          last = win_last_i && win_last_j && (blk_c == 3'd5);
      OP_BKUP, OP_WR: last = (k_c == mbpix_t'(MB_PIX - 1));
      default:        last = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blk_c <= '0;
      i_c   <= '0;
      j_c   <= '0;
      k_c   <= '0;
    end else begin
      unique case (op)
        OP_RD: begin
          if (!win_last_i) i_c <= i_c + 1'b1;
          else begin
            i_c <= '0;
            if (!win_last_j) j_c <= j_c + 1'b1;
            else begin
              j_c   <= '0;
              blk_c <= (blk_c == 3'd5) ? '0 : blk_c + 1'b1;
            end
          end
        end
        OP_BKUP, OP_WR: k_c <= last ? '0 : k_c + 1'b1;
        default: ;
      endcase
    end
  end

  assign blk   = blk_c;
  assign win_i = i_c;
  assign win_j = j_c;
  assign k     = k_c;

  // --------------------------------------------------------- address forming
  logic [MFM_AW-1:0]  ref_mfm_addr, cur_mfm_addr;
  logic [VRSB_AW-1:0] ref_vrsb_addr, cur_vrsb_addr;
  blk_t               kb;
  int                 rmx, rmy, ix, iy;

  always_comb begin
    // predicted pixel: MB (mbx+dx, mby+dy), offset (in_x, in_y) inside it
    rmx = int'(mbx) + int'(pblk_dx);
    rmy = int'(mby) + int'(pblk_dy);
    if (blk_c < 3'd4)
      ref_mfm_addr = mfm_at(blk_c, rmx * 16 + int'(in_x), rmy * 16 + int'(in_y));
    else
      ref_mfm_addr = mfm_at(blk_c, rmx * 8 + int'(in_x), rmy * 8 + int'(in_y));
    ref_vrsb_addr = vrsb_at(rd_slot, blk_c, int'(in_x), int'(in_y));

    // pixel k of the current MB
    kb = k_c[8:6];
    if (kb < 3'd4) begin
      ix = int'(kb[0]) * 8 + int'(k_c[2:0]);
      iy = int'(kb[1]) * 8 + int'(k_c[5:3]);
      cur_mfm_addr = mfm_at(kb, int'(mbx) * 16 + ix, int'(mby) * 16 + iy);
    end else begin
      ix = int'(k_c[2:0]);
      iy = int'(k_c[5:3]);
      cur_mfm_addr = mfm_at(kb, int'(mbx) * 8 + ix, int'(mby) * 8 + iy);
    end
    cur_vrsb_addr = vrsb_at(index, kb, ix, iy);
  end

  // ------------------------------------------------------- pipeline registers
  logic               rd_q, sel_vrsb_q, bk_q;
  logic [VRSB_AW-1:0] bk_addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q       <= 1'b0;
      sel_vrsb_q <= 1'b0;
      bk_q       <= 1'b0;
      bk_addr_q  <= '0;
      raw_blk    <= '0;
      raw_i      <= '0;
      raw_j      <= '0;
      raw_fx     <= 1'b0;
      raw_fy     <= 1'b0;
    end else begin
      rd_q       <= (op == OP_RD);
      sel_vrsb_q <= dirty;
      raw_blk    <= blk_c;
      raw_i      <= i_c;
      raw_j      <= j_c;
      raw_fx     <= fx;
      raw_fy     <= fy;
      bk_q       <= (op == OP_BKUP);
      bk_addr_q  <= cur_vrsb_addr;
    end
  end

  assign raw_valid = rd_q;
  assign raw_pix   = sel_vrsb_q ? vrsb_rdata : mfm_rdata;

  // ---------------------------------------------------------------- SRAM ports
  always_comb begin
    mfm_cs    = 1'b0;
    mfm_we    = 1'b0;
    mfm_addr  = cur_mfm_addr;
    mfm_wdata = wr_pix;
    vrsb_cs   = bk_q;
    vrsb_we   = bk_q;
    vrsb_addr = bk_addr_q;
    vrsb_wdata = mfm_rdata;
    unique case (op)
      OP_RD: begin
        if (dirty) begin
          vrsb_cs   = 1'b1;
          vrsb_addr = ref_vrsb_addr;
        end else begin
          mfm_cs   = 1'b1;
          mfm_addr = ref_mfm_addr;
        end
      end
      OP_BKUP: mfm_cs = 1'b1;
      OP_WR: begin
        mfm_cs = 1'b1;
        mfm_we = 1'b1;
      end
      default: ;
    endcase
  end

  // A VRSB backup write never meets a VRSB read: OP_RD never follows OP_BKUP.
  a_vrsb_port: assert property (@(posedge clk) disable iff (!rst_n)
                                !(bk_q && op == OP_RD && dirty));

endmodule
