// tb_cfmmc_cif: end-to-end test of the CFMMC resized to CIF (352x288).
//
// Same decoder model and checks as the QCIF end-to-end test (whole-MFM
// comparison after every frame, per-MB cycle counts against the latency
// table, residue word counts, every mechanism counted), with the top's
// FRAME_W/FRAME_H set to CIF. The VRSB ring then has 23 slots. It runs one
// synthetic IPP pattern with 80 % NOT-CODED MBs, then an I-frame and four
// random P-frames with every mode and vector.
module tb_cfmmc_cif;
  import cfmmc_pkg::*;

  localparam int W     = 352;
  localparam int H     = 288;
  localparam int MBW   = W / 16;
  localparam int MBH   = H / 16;
  localparam int YS    = W * H;
  localparam int CS    = YS / 4;
  localparam int FSIZE = YS + 2 * CS;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                    mc_enable = 1'b0, mc_clear = 1'b0, mc_done, busy, res_rd;
  mb_type_e                mb_type = MB_INTRA;
  mv_pair_t                mv_in [4];
  logic [4:0]              mbx = '0, mby = '0;
  logic                    rounding_type = 1'b0;
  logic signed [RES_W-1:0] res_data;

  cfmmc_top #(.FRAME_W(W), .FRAME_H(H)) dut (.*);

  // ------------------------------------------------------------ model state
  byte unsigned ref_fr [FSIZE];
  byte unsigned cur_fr [FSIZE];
  int           res_buf [MB_PIX];
  int           res_idx;
  int           checks = 0, failures = 0;
  longint       cycle = 0;

  // mechanism counters
  int n_not_coded = 0, n_intra = 0, n_inter_intra = 0, n_inter = 0, n_inter4v = 0;
  int n_vrsb_reads = 0, n_mfm_pred_reads = 0, n_backup_writes = 0;
  int n_hp_x = 0, n_hp_y = 0, n_hp_xy = 0, n_edge = 0, n_clip = 0, n_rc1 = 0, n_clear = 0;

  assign res_data = RES_W'(res_buf[res_idx % MB_PIX]);

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (res_rd) res_idx <= res_idx + 1;
    if (dut.vrsb_cs && !dut.vrsb_we) n_vrsb_reads++;
    if (dut.vrsb_cs && dut.vrsb_we) n_backup_writes++;
    if (dut.mfm_cs && !dut.mfm_we && dut.op == OP_RD) n_mfm_pred_reads++;
  end

  // watchdog
  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ helpers
  function automatic int plane_base(int p);
    return (p == 0) ? 0 : (p == 1) ? YS : YS + CS;
  endfunction

  function automatic int ref_px(int p, int x, int y);
    int pw = (p == 0) ? W : W / 2;
    int ph = (p == 0) ? H : H / 2;
    if (x < 0) x = 0;
    if (x > pw - 1) x = pw - 1;
    if (y < 0) y = 0;
    if (y > ph - 1) y = ph - 1;
    return int'(ref_fr[plane_base(p) + y * pw + x]);
  endfunction

  function automatic int clip(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  // chroma vector (half-pel chroma units) from the sum s of four luma vectors
  function automatic int chroma_from_sum(int s);
    int mag = s < 0 ? -s : s;
    int frac = mag % 16;
    int c = 2 * (mag / 16) + ((frac <= 2) ? 0 : (frac <= 13) ? 1 : 2);
    return s < 0 ? -c : c;
  endfunction

  // half-pel prediction of plane p at half-pel position (hx, hy)
  function automatic int predict(int p, int hx, int hy, int rc);
    int x = hx >>> 1, y = hy >>> 1, fx = hx & 1, fy = hy & 1;
    int a = ref_px(p, x, y), b = ref_px(p, x + 1, y);
    int c = ref_px(p, x, y + 1), d = ref_px(p, x + 1, y + 1);
    if (!fx && !fy) return a;
    if (fx && !fy)  return (a + b + 1 - rc) / 2;
    if (!fx && fy)  return (a + c + 1 - rc) / 2;
    return (a + b + c + d + 2 - rc) / 4;
  endfunction

  // address in a frame of pixel k (block order) of MB (mx, my)
  function automatic int mb_addr(int mx, int my, int k);
    int b = k / 64, r = (k / 8) % 8, c = k % 8;
    if (b < 4) return (my * 16 + (b / 2) * 8 + r) * W + mx * 16 + (b % 2) * 8 + c;
    return plane_base(b - 3) + (my * 8 + r) * (W / 2) + mx * 8 + c;
  endfunction

  // ------------------------------------------------------------ one MB
  task automatic run_mb(mb_type_e t, int mx, int my, int vx[4], int vy[4], int rc);
    int lat, exp_lat, rd_cycles, exp_res, sx, sy, uvx, uvy;
    int bvx[6], bvy[6];
    logic done;
    // expected pixels
    for (int b = 0; b < 4; b++) begin
      bvx[b] = (t == MB_INTER4V) ? vx[b] : (t == MB_INTER) ? vx[0] : 0;
      bvy[b] = (t == MB_INTER4V) ? vy[b] : (t == MB_INTER) ? vy[0] : 0;
    end
    sx = bvx[0] + bvx[1] + bvx[2] + bvx[3];
    sy = bvy[0] + bvy[1] + bvy[2] + bvy[3];
    uvx = chroma_from_sum(sx);
    uvy = chroma_from_sum(sy);
    bvx[4] = uvx; bvx[5] = uvx; bvy[4] = uvy; bvy[5] = uvy;
    rd_cycles = 0;
    for (int b = 0; b < 6; b++) begin
      rd_cycles += (8 + (bvx[b] & 1)) * (8 + (bvy[b] & 1));
    end
    for (int k = 0; k < MB_PIX; k++) begin
      int b = k / 64, r = (k / 8) % 8, c = k % 8, p, ox, oy, pred, v;
      p  = (b < 4) ? 0 : b - 3;
      ox = (b < 4) ? mx * 16 + (b % 2) * 8 + c : mx * 8 + c;
      oy = (b < 4) ? my * 16 + (b / 2) * 8 + r : my * 8 + r;
      case (t)
        MB_NOT_CODED: v = int'(ref_fr[mb_addr(mx, my, k)]);
        MB_INTRA, MB_INTER_INTRA: begin
          v = clip(res_buf[k]);
          if (v != res_buf[k]) n_clip++;
        end
        default: begin
          pred = predict(p, 2 * ox + bvx[b], 2 * oy + bvy[b], rc);
          v = clip(pred + res_buf[k]);
          if (v != pred + res_buf[k]) n_clip++;
        end
      endcase
      cur_fr[mb_addr(mx, my, k)] = byte'(v);
    end
    if (t == MB_INTER || t == MB_INTER4V) begin
      for (int b = 0; b < 6; b++) begin
        int pw = (b < 4) ? W : W / 2, ph = (b < 4) ? H : H / 2, sz = (b < 4) ? 16 : 8;
        int x0 = mx * sz + ((b < 4) ? (b % 2) * 8 : 0) + (bvx[b] >>> 1);
        int y0 = my * sz + ((b < 4) ? (b / 2) * 8 : 0) + (bvy[b] >>> 1);
        if (x0 < 0 || y0 < 0 || x0 + 8 + (bvx[b] & 1) > pw || y0 + 8 + (bvy[b] & 1) > ph) n_edge++;
        if ((bvx[b] & 1) && !(bvy[b] & 1)) n_hp_x++;
        if (!(bvx[b] & 1) && (bvy[b] & 1)) n_hp_y++;
        if ((bvx[b] & 1) && (bvy[b] & 1)) n_hp_xy++;
      end
      if (rc) n_rc1++;
    end
    case (t)
      MB_NOT_CODED:   begin exp_lat = 1;   exp_res = 0;   n_not_coded++;   end
      MB_INTRA:       begin exp_lat = 385; exp_res = 384; n_intra++;       end
      MB_INTER_INTRA: begin exp_lat = 770; exp_res = 384; n_inter_intra++; end
      default: begin
        exp_lat = 1 + 3 + rd_cycles + 384 + 384 + 1;
        exp_res = 384;
        if (t == MB_INTER) n_inter++; else n_inter4v++;
      end
    endcase

    // drive the design
    @(negedge clk);
    res_idx = 0;
    mb_type = t;
    mbx = 5'(mx);
    mby = 5'(my);
    rounding_type = rc[0];
    for (int b = 0; b < 4; b++) begin
      mv_in[b].x = mv_t'(vx[b]);
      mv_in[b].y = mv_t'(vy[b]);
    end
    mc_enable = 1'b1;
    @(negedge clk);
    mc_enable = 1'b0;
    lat = 0;
    do begin
      lat++;
      done = mc_done;
      @(negedge clk);
    end while (!done && lat < 5000);
    checks++;
    if (lat != exp_lat) begin
      failures++;
      $display("latency MB(%0d,%0d) type %s: %0d cycles, expected %0d", mx, my, t.name(), lat, exp_lat);
    end
    checks++;
    if (res_idx != exp_res || busy) begin
      failures++;
      $display("MB(%0d,%0d): %0d residue words taken, expected %0d; busy %0d", mx, my, res_idx, exp_res, busy);
    end
  endtask

  task automatic frame_start();
    @(negedge clk);
    mc_clear = 1'b1;
    @(negedge clk);
    mc_clear = 1'b0;
    n_clear++;
  endtask

  // compare the MFM with the model's current frame, then make it the reference
  task automatic frame_end(string what);
    int bad = 0;
    for (int a = 0; a < FSIZE; a++) begin
      if (dut.u_mfm.mem[a] != cur_fr[a]) begin
        if (bad < 5) $display("%s: MFM[%0d] = %0d, expected %0d", what, a, dut.u_mfm.mem[a], cur_fr[a]);
        bad++;
      end
    end
    checks++;
    if (bad != 0) failures++;
    for (int a = 0; a < FSIZE; a++) ref_fr[a] = cur_fr[a];
  endtask

  task automatic intra_frame();
    int vz[4] = '{0, 0, 0, 0};
    frame_start();
    for (int my = 0; my < MBH; my++)
      for (int mx = 0; mx < MBW; mx++) begin
        for (int k = 0; k < MB_PIX; k++) res_buf[k] = int'($urandom_range(0, 255));
        run_mb(MB_INTRA, mx, my, vz, vz, 0);
      end
    frame_end("I-frame");
  endtask

  // ------------------------------------------------------------ main
  initial begin
    int vz[4] = '{0, 0, 0, 0};
    int vx[4], vy[4];
    longint t0;
    for (int b = 0; b < 4; b++) mv_in[b] = '0;
    res_idx = 0;
    foreach (res_buf[k]) res_buf[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Part 1: synthetic IPP patterns, zero vectors, one residue per MB
    for (int p0 = 80; p0 <= 80; p0 += 10) begin
      intra_frame();
      for (int f = 0; f < 2; f++) begin
        int n_nc;
        n_nc = 0;
        frame_start();
        t0 = cycle;
        for (int n = 0; n < MBW * MBH; n++) begin
          int rv;
          rv = int'($urandom_range(0, 40)) - 20;
          foreach (res_buf[k]) res_buf[k] = rv;
          if (((n * 37) % 100) < p0) begin
            run_mb(MB_NOT_CODED, n % MBW, n / MBW, vz, vz, 0);
            n_nc++;
          end else
            run_mb(MB_INTER, n % MBW, n / MBW, vz, vz, 0);
        end
        $display("P0=%0d%%: P-frame %0d, %0d NOT-CODED of %0d MBs, %0d cycles",
                 p0, f + 1, n_nc, MBW * MBH, cycle - t0);
        frame_end($sformatf("synthetic P0=%0d frame %0d", p0, f + 1));
      end
    end

    // Part 2: random frames over every mode and vector
    intra_frame();
    for (int f = 0; f < 4; f++) begin
      frame_start();
      for (int n = 0; n < MBW * MBH; n++) begin
        int sel;
        mb_type_e t;
        sel = int'($urandom_range(0, 9));
        t = (sel < 3) ? MB_NOT_CODED : (sel < 4) ? MB_INTER_INTRA :
            (sel < 7) ? MB_INTER : MB_INTER4V;
        for (int b = 0; b < 4; b++) begin
          vx[b] = int'($urandom_range(0, 63)) - 32;
          vy[b] = int'($urandom_range(0, 63)) - 32;
        end
        for (int k = 0; k < MB_PIX; k++)
          res_buf[k] = (t == MB_INTER_INTRA) ? int'($urandom_range(0, 275)) - 20
                                             : int'($urandom_range(0, 160)) - 80;
        run_mb(t, n % MBW, n / MBW, vx, vy, f % 2);
      end
      frame_end($sformatf("random P-frame %0d", f + 1));
    end

    // every mechanism must have happened
    begin
      int counts[15];
      string names[15];
      counts = '{n_not_coded, n_intra, n_inter_intra, n_inter, n_inter4v,
                         n_vrsb_reads, n_mfm_pred_reads, n_backup_writes,
                         n_hp_x, n_hp_y, n_hp_xy, n_edge, n_clip, n_rc1, n_clear};
      names = '{"NOT-CODED MB", "INTRA MB", "INTER_INTRA MB", "INTER MB",
                           "INTER4V MB", "VRSB prediction read", "MFM prediction read",
                           "VRSB backup write", "half-pel x", "half-pel y", "half-pel xy",
                           "window past frame edge", "clipped sample", "rounding type 1",
                           "dirty-table clear"};
      for (int m = 0; m < 15; m++) begin
        $display("  %-24s %0d", names[m], counts[m]);
        checks++;
        if (counts[m] == 0) begin
          failures++;
          $display("mechanism never exercised: %s", names[m]);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
