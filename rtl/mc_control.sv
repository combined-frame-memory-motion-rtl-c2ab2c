// mc_control: motion compensation controller of the CFMMC.
//
// Accepts one MB when mc_enable is high while idle, latching its mode and
// position, and sequences it by mode. Each state lasts the number of cycles
// the document's latency table gives; busy is high for exactly that many
// cycles and mc_done pulses in the last of them:
//   NOT-CODED    UPD                                                1
//   INTRA        MODE, WRRES(384)                                  385
//   INTER_INTRA  MODE, BKUP(384), WRRES(384), UPD                  770
//   INTER(4V)    MODE, CMV(3), RD(384*), BKUP(384), WRREC(384), UPD 1157*
// (* 384 read cycles with integer vectors; a half-pel component widens that
// block's read window by one column or row.)
//   MODE   checks the MB mode
//   CMV    the mvprocessor derives the chroma vector
//   RD     the memory accessor reads the predicted MB from MFM and/or VRSB
//   BKUP   the collocated reference MB is copied from MFM to the VRSB while
//          the reconstructor adds the residue (res_rd high)
//   WRREC  the reconstructed MB is written to the MFM
//   WRRES  intra samples (the residue) are written straight to the MFM
//   UPD    the dirty bit of the current slot is set (cleared for a NOT-CODED
//          MB, whose MFM pixels did not change) and the DT index advances
// An INTRA MB (I-frame) touches neither VRSB nor dirty table; mc_clear, taken
// while idle, empties the dirty table at the start of a frame.
// The state order follows the document's text (predicted MB read before the
// backup); the handshake (enable/clear/done/busy) is this design's choice.
module mc_control
  import cfmmc_pkg::*;
#(
    parameter int MBX_W = 4,
    parameter int MBY_W = 4
) (
    input  logic             clk,
    input  logic             rst_n,
    // host side
    input  logic             mc_enable,
    input  logic             mc_clear,
    input  mb_type_e         mb_type,
    input  logic [MBX_W-1:0] mbx_in,
    input  logic [MBY_W-1:0] mby_in,
    output logic             mc_done,
    output logic             busy,
    output logic             res_rd,       // residue word consumed this cycle
    // to the blocks
    output logic [MBX_W-1:0] mbx,
    output logic [MBY_W-1:0] mby,
    output logic             mvp_load,
    output logic             mvp_calc,
    output acc_op_e          op,
    input  logic             acc_last,
    output logic             recon,
    output logic             intra,
    output logic             dt_clear,
    output logic             dt_upd,
    output logic             dt_upd_dirty
);

  typedef enum logic [2:0] {
    S_IDLE, S_MODE, S_CMV, S_RD, S_BKUP, S_WRREC, S_WRRES, S_UPD
  } state_e;

  state_e   state;
  mb_type_e type_q;
  logic [1:0] cmv_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      type_q  <= MB_INTRA;
      mbx     <= '0;
      mby     <= '0;
      cmv_cnt <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (mc_enable) begin
          type_q <= mb_type;
          mbx    <= mbx_in;
          mby    <= mby_in;
          state  <= (mb_type == MB_NOT_CODED) ? S_UPD : S_MODE;
        end
        S_MODE: begin
          cmv_cnt <= '0;
          unique case (type_q)
            MB_INTRA:       state <= S_WRRES;
            MB_INTER_INTRA: state <= S_BKUP;
            default:        state <= S_CMV;
          endcase
        end
        S_CMV: begin
          cmv_cnt <= cmv_cnt + 1'b1;
          if (cmv_cnt == 2'd2) state <= S_RD;
        end
        S_RD:    if (acc_last) state <= S_BKUP;
        S_BKUP:  if (acc_last) state <= (type_q == MB_INTER_INTRA) ? S_WRRES : S_WRREC;
        S_WRREC: if (acc_last) state <= S_UPD;
        S_WRRES: if (acc_last) state <= (type_q == MB_INTRA) ? S_IDLE : S_UPD;
        S_UPD:   state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy         = (state != S_IDLE);
    mvp_load     = (state == S_IDLE) && mc_enable;
    mvp_calc     = (state == S_CMV);
    dt_clear     = (state == S_IDLE) && !mc_enable && mc_clear;
    dt_upd       = (state == S_UPD);
    dt_upd_dirty = (type_q != MB_NOT_CODED);
    recon        = (state == S_BKUP) && (type_q == MB_INTER || type_q == MB_INTER4V);
    intra        = (state == S_WRRES);
    res_rd       = recon || intra;
    mc_done      = (state == S_UPD) || (state == S_WRRES && acc_last && type_q == MB_INTRA);
    unique case (state)
      S_RD:             op = OP_RD;
      S_BKUP:           op = OP_BKUP;
      S_WRREC, S_WRRES: op = OP_WR;
      default:          op = OP_IDLE;
    endcase
  end

  // The host offers a new MB only while the controller is idle.
  a_no_enable_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                     busy |-> !mc_enable);

endmodule
