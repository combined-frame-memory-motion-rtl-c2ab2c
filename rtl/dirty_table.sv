// dirty_table: records which reference MBs have been moved from the MFM to
// the VRSB.
//
// The VRSB is used as a ring of SLOTS = MBW+1 MB slots (12 for QCIF, the
// document's (176+16)/16 dirty bits). MB number n of the frame (raster order)
// owns slot `index` = n mod SLOTS; `index` is the DT index of the document.
// When MB n is finished the controller pulses `upd`: the bit of slot `index`
// takes `upd_dirty` (1 when the MB's reference pixels were backed up because
// the MFM copy was overwritten, 0 for a perfect-matched MB, whose MFM pixels
// are unchanged) and the index advances. The ring then always holds the last
// SLOTS MBs, which covers every reference MB a vector in [-16:+15.5] can reach
// from the current MB (one MB row up and one MB left at most).
//
// Lookup (combinational): for the pblk offset (dx, dy) of a predicted pixel
// the linear MB distance is dy*MBW + dx. A negative distance is an MB already
// processed in this frame; its slot is index + distance (mod SLOTS) and the
// dirty bit of that slot says where its reference pixels are. A distance of 0
// or more is an MB not yet processed, whose reference pixels are in the MFM.
// `clear` (frame start) empties the table and resets the index.
// The slot ring and the index arithmetic are this design's reading of the
// document's dirty table and "index in DT".
module dirty_table #(
    parameter int MBW    = 11,
    parameter int SLOTS  = MBW + 1,
    parameter int SLOT_W = $clog2(SLOTS)
) (
    input  logic              clk,
    input  logic              rst_n,
    input  logic              clear,
    input  logic              upd,
    input  logic              upd_dirty,
    input  logic signed [1:0] pblk_dx,
    input  logic signed [1:0] pblk_dy,
    output logic              dirty,      // pixel is in the VRSB
    output logic [SLOT_W-1:0] rd_slot,    // VRSB slot of the predicted MB
    output logic [SLOT_W-1:0] index       // slot of the current MB
);

  logic [SLOTS-1:0] bits;   // one dirty bit per VRSB slot

  int mb_dist, s;

  always_comb begin
    mb_dist = int'(pblk_dy) * MBW + int'(pblk_dx);
    s    = int'(index) + mb_dist;
    if (s < 0) s = s + SLOTS;
    rd_slot = SLOT_W'(s);
    dirty   = (mb_dist < 0) && bits[rd_slot];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits  <= '0;
      index <= '0;
    end else if (clear) begin
      bits  <= '0;
      index <= '0;
    end else if (upd) begin
      bits[index] <= upd_dirty;
      index       <= (int'(index) == SLOTS - 1) ? '0 : index + 1'b1;
    end
  end

endmodule
