// tb_memory_accessor: self-checking test of the memory accessor.
//
// The accessor is tested with the offset generators, the dirty table and the
// two SRAMs around it. Both SRAMs are filled with random bytes. For random MB
// positions n (frame corners included) the dirty table is cleared and given a
// random dirty flag for each of the n MBs before the current one. Then:
//   OP_RD   every raw pixel handed to the filter is compared with the pixel
//           the model expects: the clamped reference coordinate gives MB m;
//           if m is an earlier MB with its flag set the byte comes from VRSB
//           slot m mod 12, otherwise from the MFM. The operation must last
//           sum((8+fx)(8+fy)) cycles over the six blocks.
//   OP_BKUP afterwards the current MB's slot must hold the current MB's MFM
//           pixels in slot layout; 384 cycles.
//   OP_WR   with wr_pix a function of k, the current MB in the MFM must hold
//           those bytes afterwards; 384 cycles.
module tb_memory_accessor;
  import cfmmc_pkg::*;

  localparam int W = 176, H = 144, MBW = 11, SLOTS = 12;
  localparam int YS = W * H, CS = YS / 4, FSIZE = YS + 2 * CS;

  logic              clk = 1'b0, rst_n = 1'b0;
  acc_op_e           op = OP_IDLE;
  logic              last;
  logic [3:0]        mbx = '0, mby = '0;
  mv_pair_t          mv [4];
  mv_pair_t          mv_uv;
  blk_t              blk;
  win_t              win_i, win_j;
  logic [3:0]        in_x, in_y;
  logic signed [1:0] pblk_dx, pblk_dy;
  logic              dirty, dt_clear = 1'b0, dt_upd = 1'b0, dt_dirty = 1'b0;
  logic [3:0]        rd_slot, index;
  logic              raw_valid, raw_fx, raw_fy;
  logic [7:0]        raw_pix, wr_pix;
  blk_t              raw_blk;
  win_t              raw_i, raw_j;
  mbpix_t            k;
  logic              mfm_cs, mfm_we, vrsb_cs, vrsb_we;
  logic [15:0]       mfm_addr;
  logic [12:0]       vrsb_addr;
  logic [7:0]        mfm_wdata, mfm_rdata, vrsb_wdata, vrsb_rdata;
  int                checks = 0, failures = 0, n_vrsb = 0;

  always #5 clk = ~clk;

  memory_accessor dut (.*);
  inblk_offset_gen u_in (.mbx, .mby, .blk, .win_i, .win_j, .mv, .mv_uv, .in_x, .in_y);
  pblk_offset_gen u_pb (.mbx, .mby, .blk, .win_i, .win_j, .mv, .mv_uv, .pblk_dx, .pblk_dy);
  dirty_table u_dt (.clk, .rst_n, .clear(dt_clear), .upd(dt_upd), .upd_dirty(dt_dirty),
                    .pblk_dx, .pblk_dy, .dirty, .rd_slot, .index);
  mfm_sram u_mfm (.clk, .cs(mfm_cs), .we(mfm_we), .addr(mfm_addr), .wdata(mfm_wdata), .rdata(mfm_rdata));
  vrsb_sram u_vrsb (.clk, .cs(vrsb_cs), .we(vrsb_we), .addr(vrsb_addr), .wdata(vrsb_wdata), .rdata(vrsb_rdata));

  assign wr_pix = 8'(int'(k) * 7 + 3);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit flag [99];
  int mvx [6], mvy [6];
  int cur_n;

  // expected byte for window pixel (i, j) of block b
  function automatic int expect_pix(int b, int i, int j);
    int sz = b < 4 ? 16 : 8, pw = b < 4 ? W : W / 2, ph = b < 4 ? H : H / 2;
    int mx = int'(mbx), my = int'(mby), x, y, m, base, o;
    x = mx * sz + (b < 4 ? (b % 2) * 8 : 0) + (mvx[b] - (mvx[b] & 1)) / 2 + i;
    y = my * sz + (b < 4 ? (b / 2) * 8 : 0) + (mvy[b] - (mvy[b] & 1)) / 2 + j;
    x = x < 0 ? 0 : (x >= pw ? pw - 1 : x);
    y = y < 0 ? 0 : (y >= ph ? ph - 1 : y);
    m = (y / sz) * MBW + x / sz;
    if (m < cur_n && flag[m]) begin
      o = b < 4 ? (y % 16) * 16 + x % 16 : (b == 4 ? 256 : 320) + (y % 8) * 8 + x % 8;
      return int'(u_vrsb.mem[(m % SLOTS) * 384 + o]);
    end
    base = b < 4 ? 0 : (b == 4 ? YS : YS + CS);
    return int'(u_mfm.mem[base + y * pw + x]);
  endfunction

  function automatic int cur_addr(int kk);
    int b = kk / 64, r = (kk / 8) % 8, c = kk % 8;
    if (b < 4) return (int'(mby) * 16 + (b / 2) * 8 + r) * W + int'(mbx) * 16 + (b % 2) * 8 + c;
    return (b == 4 ? YS : YS + CS) + (int'(mby) * 8 + r) * (W / 2) + int'(mbx) * 8 + c;
  endfunction

  function automatic int slot_off(int kk);
    int b = kk / 64, r = (kk / 8) % 8, c = kk % 8;
    if (b < 4) return ((b / 2) * 8 + r) * 16 + (b % 2) * 8 + c;
    return (b == 4 ? 256 : 320) + r * 8 + c;
  endfunction

  initial begin
    int cyc, exp_cyc, got_n;
    logic is_last;
    int exp_raw [6][9][9];
    for (int a = 0; a < FSIZE; a++) u_mfm.mem[a] = 8'($urandom);
    for (int a = 0; a < SLOTS * 384; a++) u_vrsb.mem[a] = 8'($urandom);
    for (int b = 0; b < 4; b++) mv[b] = '0;
    mv_uv = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      cur_n = (t < 4) ? (t == 0 ? 0 : t == 1 ? 10 : t == 2 ? 88 : 98) : int'($urandom_range(0, 98));
      mbx = 4'(cur_n % MBW);
      mby = 4'(cur_n / MBW);
      // dirty table state for MBs 0..n-1
      dt_clear = 1'b1;
      @(negedge clk);
      dt_clear = 1'b0;
      for (int m = 0; m < cur_n; m++) begin
        flag[m] = ($urandom_range(0, 1) == 1);
        dt_upd = 1'b1;
        dt_dirty = flag[m];
        @(negedge clk);
      end
      dt_upd = 1'b0;
      for (int b = 0; b < 6; b++) begin
        mvx[b] = (b < 4) ? int'($urandom_range(0, 63)) - 32 : int'($urandom_range(0, 31)) - 16;
        mvy[b] = (b < 4) ? int'($urandom_range(0, 63)) - 32 : int'($urandom_range(0, 31)) - 16;
        if (b < 4) begin mv[b].x = mv_t'(mvx[b]); mv[b].y = mv_t'(mvy[b]); end
      end
      mvx[5] = mvx[4]; mvy[5] = mvy[4];
      mv_uv.x = mv_t'(mvx[4]); mv_uv.y = mv_t'(mvy[4]);
      exp_cyc = 0;
      for (int b = 0; b < 6; b++) begin
        exp_cyc += (8 + (mvx[b] & 1)) * (8 + (mvy[b] & 1));
        for (int j = 0; j < 8 + (mvy[b] & 1); j++)
          for (int i = 0; i < 8 + (mvx[b] & 1); i++) exp_raw[b][j][i] = expect_pix(b, i, j);
      end
      // OP_RD
      @(negedge clk);
      op = OP_RD;
      cyc = 0;
      got_n = 0;
      forever begin
        #1;
        is_last = last;
        if (dirty) n_vrsb++;
        cyc++;
        @(posedge clk);
        #1;
        if (raw_valid) begin
          got_n++;
          check($sformatf("MB %0d raw pixel blk %0d (%0d,%0d)", cur_n, raw_blk, raw_i, raw_j),
                int'(raw_pix), exp_raw[raw_blk][raw_j][raw_i]);
        end
        @(negedge clk);
        if (is_last || cyc > 1000) break;
      end
      op = OP_IDLE;
      check("OP_RD cycles", cyc, exp_cyc);
      check("OP_RD pixels", got_n, exp_cyc);
      // OP_BKUP then OP_WR
      for (int o = 0; o < 2; o++) begin
        @(negedge clk);
        op = (o == 0) ? OP_BKUP : OP_WR;
        cyc = 0;
        do begin
          cyc++;
          #1;
          if (last) begin
            @(negedge clk);
            op = OP_IDLE;
          end else @(negedge clk);
        end while (op != OP_IDLE && cyc < 1000);
        check(o == 0 ? "OP_BKUP cycles" : "OP_WR cycles", cyc, 384);
      end
      @(negedge clk);
      for (int kk = 0; kk < MB_PIX; kk++) begin
        check("MFM after OP_WR", int'(u_mfm.mem[cur_addr(kk)]), (kk * 7 + 3) % 256);
      end
    end
    check("VRSB prediction reads happened", int'(n_vrsb > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // backup check: remember the current MB's MFM bytes when OP_BKUP starts and
  // compare the slot once OP_BKUP and its trailing write are done
  int bk_exp [MB_PIX];
  int bk_slot;
  always @(posedge clk) begin
    if (op == OP_BKUP && k == 0) begin
      for (int kk = 0; kk < MB_PIX; kk++) bk_exp[kk] = int'(u_mfm.mem[cur_addr(kk)]);
      bk_slot = int'(index);
    end
    if (op == OP_WR && k == 1) begin
      for (int kk = 0; kk < MB_PIX; kk++)
        check("VRSB slot after OP_BKUP", int'(u_vrsb.mem[bk_slot * 384 + slot_off(kk)]), bk_exp[kk]);
    end
  end
endmodule
