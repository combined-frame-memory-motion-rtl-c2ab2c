// tb_pblk_offset_gen: self-checking test of the pblk offset generator.
//
// For random MB positions (frame corners included), blocks, window positions
// and vectors over the full range, it works out the reference pixel's plane
// coordinate (block origin + integer vector part + window position, clamped
// to the plane) and checks the MB offset of the MB that holds the pixel relative to the current MB.
module tb_pblk_offset_gen;
  import cfmmc_pkg::*;

  localparam int W = 176, H = 144;

  logic [3:0] mbx, mby;
  blk_t       blk;
  win_t       win_i, win_j;
  mv_pair_t   mv [4];
  mv_pair_t   mv_uv;
  logic signed [1:0] pblk_dx, pblk_dy;
  int         checks = 0, failures = 0;
  logic       clk = 1'b0;

  always #5 clk = ~clk;

  pblk_offset_gen dut (.mbx, .mby, .blk, .win_i, .win_j, .mv, .mv_uv, .pblk_dx, .pblk_dy);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d, expected %0d (mb %0d,%0d blk %0d win %0d,%0d)",
                                   what, got, exp, mbx, mby, blk, win_i, win_j);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mx, my, b, i, j, vx, vy, sz, pw, ph, rx, ry;
    for (int n = 0; n < 20000; n++) begin
      mx = int'($urandom_range(0, W / 16 - 1));
      my = int'($urandom_range(0, H / 16 - 1));
      if (n % 4 == 0) mx = (n % 8 == 0) ? 0 : W / 16 - 1;
      if (n % 3 == 0) my = (n % 6 == 0) ? 0 : H / 16 - 1;
      b  = int'($urandom_range(0, 5));
      i  = int'($urandom_range(0, 8));
      j  = int'($urandom_range(0, 8));
      for (int q = 0; q < 4; q++) begin
        mv[q].x = mv_t'($urandom_range(0, 63));
        mv[q].y = mv_t'($urandom_range(0, 63));
      end
      mv_uv.x = mv_t'(int'($urandom_range(0, 31)) - 16);
      mv_uv.y = mv_t'(int'($urandom_range(0, 31)) - 16);
      vx = (b < 4) ? int'(mv[b].x) : int'(mv_uv.x);
      vy = (b < 4) ? int'(mv[b].y) : int'(mv_uv.y);
      sz = (b < 4) ? 16 : 8;
      pw = (b < 4) ? W : W / 2;
      ph = (b < 4) ? H : H / 2;
      // floor of a half-pel vector in whole pixels
      rx = mx * sz + ((b < 4) ? (b % 2) * 8 : 0) + (vx - (vx & 1)) / 2 + i;
      ry = my * sz + ((b < 4) ? (b / 2) * 8 : 0) + (vy - (vy & 1)) / 2 + j;
      rx = rx < 0 ? 0 : (rx >= pw ? pw - 1 : rx);
      ry = ry < 0 ? 0 : (ry >= ph ? ph - 1 : ry);
      mbx = 4'(mx); mby = 4'(my); blk = blk_t'(b); win_i = win_t'(i); win_j = win_t'(j);
      @(negedge clk);
      check("pblk_dx", int'(pblk_dx), rx / sz - mx);
      check("pblk_dy", int'(pblk_dy), ry / sz - my);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
