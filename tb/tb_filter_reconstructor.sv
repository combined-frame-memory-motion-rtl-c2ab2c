// tb_filter_reconstructor: self-checking test of the half-pel filter and the
// reconstructor.
//
// For each test MB: streams six random read windows (random half-pel bits per
// block, random rounding type, an idle cycle now and then) into the filter;
// runs the reconstruction pass with random residues; reads every buffer entry
// back through wr_pix and compares it with clip(pred + res), pred being the
// MPEG-4 half-pel average of the window computed here. Then checks the intra
// path, wr_pix = clip(res).
module tb_filter_reconstructor;
  import cfmmc_pkg::*;

  logic                    clk = 1'b0, rst_n = 1'b0, rounding_type = 1'b0;
  logic                    raw_valid = 1'b0, raw_fx = 1'b0, raw_fy = 1'b0;
  logic [7:0]              raw_pix = '0;
  blk_t                    raw_blk = '0;
  win_t                    raw_i = '0, raw_j = '0;
  logic                    recon = 1'b0, intra = 1'b0;
  mbpix_t                  k = '0;
  logic signed [RES_W-1:0] res = '0;
  logic [7:0]              wr_pix;
  int                      checks = 0, failures = 0;

  always #5 clk = ~clk;

  filter_reconstructor dut (.*);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d, expected %0d", what, got, exp);
    end
  endtask

  function automatic int clip(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int win [6][9][9];
    int fx [6], fy [6];
    int exp_px [MB_PIX];
    int rv, rc, a, b2, c, d, p;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int mb = 0; mb < 40; mb++) begin
      rc = int'($urandom_range(0, 1));
      rounding_type = rc[0];
      for (int b = 0; b < 6; b++) begin
        fx[b] = (mb < 4) ? mb % 2 : int'($urandom_range(0, 1));
        fy[b] = (mb < 4) ? mb / 2 : int'($urandom_range(0, 1));
        for (int j = 0; j < 9; j++)
          for (int i = 0; i < 9; i++) win[b][j][i] = int'($urandom_range(0, 255));
        for (int r = 0; r < 8; r++)
          for (int cc = 0; cc < 8; cc++) begin
            a = win[b][r][cc]; b2 = win[b][r][cc + 1];
            c = win[b][r + 1][cc]; d = win[b][r + 1][cc + 1];
            if (!fx[b] && !fy[b])     p = a;
            else if (fx[b] && !fy[b]) p = (a + b2 + 1 - rc) / 2;
            else if (!fx[b] && fy[b]) p = (a + c + 1 - rc) / 2;
            else                      p = (a + b2 + c + d + 2 - rc) / 4;
            exp_px[b * 64 + r * 8 + cc] = p;
          end
        // stream the window
        for (int j = 0; j < 8 + fy[b]; j++)
          for (int i = 0; i < 8 + fx[b]; i++) begin
            if ($urandom_range(0, 15) == 0) begin
              raw_valid = 1'b0;
              @(negedge clk);
            end
            raw_valid = 1'b1;
            raw_pix = 8'(win[b][j][i]);
            raw_blk = blk_t'(b); raw_i = win_t'(i); raw_j = win_t'(j);
            raw_fx = fx[b][0]; raw_fy = fy[b][0];
            @(negedge clk);
          end
      end
      raw_valid = 1'b0;
      // reconstruction pass
      for (int n = 0; n < MB_PIX; n++) begin
        rv = int'($urandom_range(0, 511)) - 256;
        recon = 1'b1; k = mbpix_t'(n); res = RES_W'(rv);
        exp_px[n] = clip(exp_px[n] + rv);
        @(negedge clk);
      end
      recon = 1'b0;
      // write-back read
      for (int n = 0; n < MB_PIX; n++) begin
        k = mbpix_t'(n);
        #1;
        check($sformatf("MB %0d pixel %0d (fx %0d fy %0d rc %0d)", mb, n, fx[n / 64], fy[n / 64], rc),
              int'(wr_pix), exp_px[n]);
      end
      // intra path
      intra = 1'b1;
      for (int n = 0; n < 64; n++) begin
        rv = int'($urandom_range(0, 511)) - 256;
        res = RES_W'(rv);
        k = mbpix_t'($urandom_range(0, MB_PIX - 1));
        #1;
        check("intra sample", int'(wr_pix), clip(rv));
      end
      intra = 1'b0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
