// filter_reconstructor: half-pel interpolation of the predicted MB and its
// reconstruction with the residue.
//
// Filter (during the predicted-MB read): raw reference pixels arrive one per
// cycle in raster order of each block's read window, tagged with block,
// column i and row j and the half-pel bits fx, fy of the block's vector. The
// window is (8+fx) x (8+fy). A one-row line buffer, the previous pixel and the
// previous line-buffer word give the four neighbours of a 2x2 group, and the
// predicted pixel at (i-fx, j-fy) is produced as soon as its last neighbour
// arrives (MPEG-4 half-pel rule, rc = rounding_type):
//   integer        p
//   horizontal     (left + p + 1 - rc) >> 1
//   vertical       (above + p + 1 - rc) >> 1
//   both           (aboveleft + above + left + p + 2 - rc) >> 2
// Predicted pixels go into a 384-byte MB buffer at blk*64 + row*8 + col.
//
// Reconstructor: while `recon` is high (the backup cycles, as the document
// overlaps reconstruction with the backup) it reads residue word res and
// replaces buffer entry k by clip(pred + res) to 0..255. During the MFM write
// the pixel to write is buffer entry k, or clip(res) directly when `intra`
// is high (intra MBs write their samples without prediction).
//
// Timing: buffer writes happen at the clock edge of the input cycle;
// wr_pix is combinational from k. The document gives the block's function;
// the line-buffer structure and the buffer are this design's choices.
module filter_reconstructor
  import cfmmc_pkg::*;
(
    input  logic                    clk,
    input  logic                    rst_n,
    input  logic                    rounding_type,
    // raw reference pixels
    input  logic                    raw_valid,
    input  logic [7:0]              raw_pix,
    input  blk_t                    raw_blk,
    input  win_t                    raw_i,
    input  win_t                    raw_j,
    input  logic                    raw_fx,
    input  logic                    raw_fy,
    // reconstruction and write-back
    input  logic                    recon,
    input  logic                    intra,
    input  mbpix_t                  k,
    input  logic signed [RES_W-1:0] res,
    output logic [7:0]              wr_pix
);

  function automatic logic [7:0] clip8(int v);
    if (v < 0)   return 8'd0;
    if (v > 255) return 8'd255;
    return 8'(v);
  endfunction

  logic [7:0] buf_q  [MB_PIX];
  logic [7:0] line_q [9];
  logic [7:0] left_q, aboveleft_q;

  logic [7:0] above, pred;
  logic       emit;
  int         r, c;
  logic [9:0] sum;

  always_comb begin
    above = line_q[raw_i];
    sum   = '0;
    unique case ({raw_fx, raw_fy})
      2'b00: pred = raw_pix;
      2'b10: begin
        sum  = 10'(left_q) + 10'(raw_pix) + 10'd1 - 10'(rounding_type);
        pred = 8'(sum >> 1);
      end
      2'b01: begin
        sum  = 10'(above) + 10'(raw_pix) + 10'd1 - 10'(rounding_type);
        pred = 8'(sum >> 1);
      end
      default: begin
        sum  = 10'(aboveleft_q) + 10'(above) + 10'(left_q) + 10'(raw_pix) + 10'd2
               - 10'(rounding_type);
        pred = 8'(sum >> 2);
      end
    endcase
    emit = raw_valid && (raw_i >= win_t'(raw_fx)) && (raw_j >= win_t'(raw_fy));
    c    = int'(raw_i) - int'(raw_fx);
    r    = int'(raw_j) - int'(raw_fy);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left_q      <= '0;
      aboveleft_q <= '0;
      for (int n = 0; n < 9; n++) line_q[n] <= '0;
    end else if (raw_valid) begin
      left_q         <= raw_pix;
      aboveleft_q    <= above;
      line_q[raw_i]  <= raw_pix;
    end
  end

  always_ff @(posedge clk) begin
    if (emit) buf_q[int'(raw_blk) * BLK_PIX + r * 8 + c] <= pred;
    if (recon) buf_q[k] <= clip8(int'(buf_q[k]) + int'(res));
  end

  assign wr_pix = intra ? clip8(int'(res)) : buf_q[k];

endmodule
