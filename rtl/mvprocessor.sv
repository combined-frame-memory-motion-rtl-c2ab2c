// mvprocessor: holds the motion vectors of the current MB and derives the
// chroma vector.
//
// At `load` (the cycle the controller accepts an MB) it stores the four luma
// vectors and the MB mode. An INTER MB uses mv_in[0] for all four luma
// blocks; an INTER4V MB uses one vector per block; every other mode gets zero
// vectors. While `calc` is high the chroma vector is computed in three steps,
// one per cycle, matching the document's 3-cycle chroma MV latency:
//   step 0: pairwise sums of the x and y components (mv0+mv1, mv2+mv3)
//   step 1: total sums
//   step 2: rounding to half-pel chroma units (MPEG-4 rules: one vector is
//           halved with quarter positions taken to the half position; four
//           vectors are summed, divided by 8 and the sixteenth fraction rounded
//           by the 0,0,0,1,...,1,2,2 table)
// mv_uv is valid from the cycle after the third `calc` cycle until the next
// `load`. The step order is this design's choice; the document gives only
// the 3-cycle latency and the chroma vector as output.
module mvprocessor
  import cfmmc_pkg::*;
(
    input  logic      clk,
    input  logic      rst_n,
    input  logic      load,
    input  mb_type_e  mb_type,
    input  mv_pair_t  mv_in [4],
    input  logic      calc,
    output mv_pair_t  mv    [4],   // MV0~MV3 per luma block
    output mv_pair_t  mv_uv,       // MVuv, chroma vector
    output logic      uv_valid
);

  mb_type_e                 type_q;
  logic [1:0]               step;
  logic signed [MV_W+1:0]   px01, py01, px23, py23, sx, sy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      type_q   <= MB_INTRA;
      step     <= '0;
      uv_valid <= 1'b0;
      mv_uv    <= '0;
      px01 <= '0; py01 <= '0; px23 <= '0; py23 <= '0; sx <= '0; sy <= '0;
      for (int b = 0; b < 4; b++) mv[b] <= '0;
    end else if (load) begin
      type_q   <= mb_type;
      step     <= '0;
      uv_valid <= 1'b0;
      for (int b = 0; b < 4; b++) begin
        unique case (mb_type)
          MB_INTER:   mv[b] <= mv_in[0];
          MB_INTER4V: mv[b] <= mv_in[b];
          default:    mv[b] <= '0;
        endcase
      end
    end else if (calc) begin
      step <= step + 2'd1;
      unique case (step)
        2'd0: begin
          px01 <= (MV_W+2)'(mv[0].x) + (MV_W+2)'(mv[1].x);
          py01 <= (MV_W+2)'(mv[0].y) + (MV_W+2)'(mv[1].y);
          px23 <= (MV_W+2)'(mv[2].x) + (MV_W+2)'(mv[3].x);
          py23 <= (MV_W+2)'(mv[2].y) + (MV_W+2)'(mv[3].y);
        end
        2'd1: begin
          sx <= px01 + px23;
          sy <= py01 + py23;
        end
        default: begin
          if (type_q == MB_INTER4V) begin
            mv_uv.x <= chroma_mv_4(sx);
            mv_uv.y <= chroma_mv_4(sy);
          end else begin
            mv_uv.x <= chroma_mv_1(mv[0].x);
            mv_uv.y <= chroma_mv_1(mv[0].y);
          end
          uv_valid <= 1'b1;
        end
      endcase
    end
  end

endmodule
