// tb_mc_control: self-checking test of the motion compensation controller.
//
// A small model of the memory accessor answers each operation with `last`
// after a fixed length (OP_RD a random 384..507 cycles, standing for half-pel
// windows; OP_BKUP and OP_WR 384). For random MB modes the testbench counts,
// per MB, the busy cycles, the cycles of each operation, the chroma-vector
// cycles, residue reads, reconstruction and intra cycles, dirty-table updates
// and done pulses, and compares them with the latency table:
//   NOT-CODED 1, INTRA 385, INTER_INTRA 770, INTER/INTER4V 1+3+RD+384+384+1.
// It also checks that mc_clear clears the dirty table only while idle and that
// the MB position is latched at mc_enable.
module tb_mc_control;
  import cfmmc_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       mc_enable = 1'b0, mc_clear = 1'b0, mc_done, busy, res_rd;
  mb_type_e   mb_type = MB_INTRA;
  logic [3:0] mbx_in = '0, mby_in = '0, mbx, mby;
  logic       mvp_load, mvp_calc, acc_last, recon, intra, dt_clear, dt_upd, dt_upd_dirty;
  acc_op_e    op;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  mc_control dut (.*);

  // accessor model
  int op_cnt = 0, rd_len = 384;
  acc_op_e op_prev = OP_IDLE;
  always_comb acc_last = (op == OP_RD) ? (op_cnt == rd_len - 1) :
                         (op == OP_BKUP || op == OP_WR) ? (op_cnt == 383) : 1'b0;
  always @(posedge clk) op_cnt <= (op == OP_IDLE || acc_last) ? 0 : op_cnt + 1;

  // per-MB event counters
  int n_busy, n_rd, n_bk, n_wr, n_calc, n_res, n_recon, n_intra, n_upd, n_done, n_load, n_clear;
  int upd_dirty_v;
  always @(posedge clk) begin
    if (busy) n_busy++;
    if (op == OP_RD) n_rd++;
    if (op == OP_BKUP) n_bk++;
    if (op == OP_WR) n_wr++;
    if (mvp_calc) n_calc++;
    if (res_rd) n_res++;
    if (recon) n_recon++;
    if (intra) n_intra++;
    if (mvp_load) n_load++;
    if (dt_clear) n_clear++;
    if (dt_upd) begin n_upd++; upd_dirty_v = int'(dt_upd_dirty); end
    if (mc_done) begin
      n_done++;
      checks++;
      if (!busy) begin failures++; $display("mc_done outside busy"); end
    end
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mb_type_e t;
    int lat, rd, bk, wr, res, upd;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      t = (n < 5) ? mb_type_e'(n) : mb_type_e'($urandom_range(0, 4));
      rd_len = (n < 5) ? 384 : 384 + int'($urandom_range(0, 123));
      // frame-start clear while idle
      if (n % 7 == 0) begin
        n_clear = 0;
        @(negedge clk);
        mc_clear = 1'b1;
        @(negedge clk);
        mc_clear = 1'b0;
        check("dt_clear pulses", n_clear, 1);
      end
      n_busy = 0; n_rd = 0; n_bk = 0; n_wr = 0; n_calc = 0; n_res = 0; n_recon = 0;
      n_intra = 0; n_upd = 0; n_done = 0; n_load = 0; upd_dirty_v = -1;
      @(negedge clk);
      mb_type = t;
      mbx_in = 4'($urandom_range(0, 10));
      mby_in = 4'($urandom_range(0, 8));
      mc_enable = 1'b1;
      @(negedge clk);
      mc_enable = 1'b0;
      check("MB x latched", int'(mbx), int'(mbx_in));
      check("MB y latched", int'(mby), int'(mby_in));
      while (busy) @(negedge clk);
      case (t)
        MB_NOT_CODED:   begin lat = 1;   rd = 0;      bk = 0;   wr = 0;   res = 0;   upd = 1; end
        MB_INTRA:       begin lat = 385; rd = 0;      bk = 0;   wr = 384; res = 384; upd = 0; end
        MB_INTER_INTRA: begin lat = 770; rd = 0;      bk = 384; wr = 384; res = 384; upd = 1; end
        default:        begin lat = 1 + 3 + rd_len + 384 + 384 + 1;
                              rd = rd_len; bk = 384; wr = 384; res = 384; upd = 1; end
      endcase
      check($sformatf("%s busy cycles", t.name()), n_busy, lat);
      check($sformatf("%s OP_RD cycles", t.name()), n_rd, rd);
      check($sformatf("%s OP_BKUP cycles", t.name()), n_bk, bk);
      check($sformatf("%s OP_WR cycles", t.name()), n_wr, wr);
      check($sformatf("%s chroma MV cycles", t.name()), n_calc, (t == MB_INTER || t == MB_INTER4V) ? 3 : 0);
      check($sformatf("%s residue reads", t.name()), n_res, res);
      check($sformatf("%s reconstruction cycles", t.name()), n_recon,
            (t == MB_INTER || t == MB_INTER4V) ? 384 : 0);
      check($sformatf("%s intra write cycles", t.name()), n_intra,
            (t == MB_INTRA || t == MB_INTER_INTRA) ? 384 : 0);
      check($sformatf("%s DT updates", t.name()), n_upd, upd);
      if (upd == 1) check($sformatf("%s DT dirty value", t.name()), upd_dirty_v, t == MB_NOT_CODED ? 0 : 1);
      check($sformatf("%s done pulses", t.name()), n_done, 1);
      check($sformatf("%s vector loads", t.name()), n_load, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
