// tb_mvprocessor: self-checking test of the vector processor.
//
// For random MB modes and vectors over the full range, loads the MB, runs the
// three calculation cycles and checks MV0~MV3 (INTER copies mv_in[0], INTER4V
// keeps each, other modes give zero) and MVuv. The expected chroma vector is
// computed here from the sum of the four block vectors by integer division of
// the magnitude into whole pixels and a sixteenth fraction, rounded by the
// MPEG-4 table (a one-vector MB counts as four equal vectors). It also checks
// that MVuv is flagged valid exactly after the third cycle.
module tb_mvprocessor;
  import cfmmc_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0, load = 1'b0, calc = 1'b0, uv_valid;
  mb_type_e mb_type = MB_INTRA;
  mv_pair_t mv_in [4];
  mv_pair_t mv [4];
  mv_pair_t mv_uv;
  int       checks = 0, failures = 0;

  always #5 clk = ~clk;

  mvprocessor dut (.*);

  function automatic int chroma_of(int s);
    int mag = s < 0 ? -s : s;
    int f = mag % 16;
    int c = 2 * (mag / 16) + ((f <= 2) ? 0 : (f <= 13) ? 1 : 2);
    return s < 0 ? -c : c;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vx[4], vy[4], ex[4], ey[4], sx, sy;
    mb_type_e t;
    for (int b = 0; b < 4; b++) mv_in[b] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      t = mb_type_e'($urandom_range(0, 4));
      if (n < 4) t = MB_INTER4V;
      for (int b = 0; b < 4; b++) begin
        vx[b] = int'($urandom_range(0, 63)) - 32;
        vy[b] = int'($urandom_range(0, 63)) - 32;
        if (n == 0) begin vx[b] = -32; vy[b] = 31; end   // range ends
        if (n == 1) begin vx[b] = 31;  vy[b] = -32; end
        mv_in[b].x = mv_t'(vx[b]);
        mv_in[b].y = mv_t'(vy[b]);
      end
      sx = 0; sy = 0;
      for (int b = 0; b < 4; b++) begin
        ex[b] = (t == MB_INTER4V) ? vx[b] : (t == MB_INTER) ? vx[0] : 0;
        ey[b] = (t == MB_INTER4V) ? vy[b] : (t == MB_INTER) ? vy[0] : 0;
        sx += ex[b];
        sy += ey[b];
      end
      @(negedge clk);
      mb_type = t;
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      calc = 1'b1;
      repeat (2) @(negedge clk);
      check("uv_valid after two cycles", int'(uv_valid), 0);
      @(negedge clk);
      calc = 1'b0;
      check("uv_valid after three cycles", int'(uv_valid), 1);
      for (int b = 0; b < 4; b++) begin
        check($sformatf("MV%0d.x type %s", b, t.name()), int'(mv[b].x), ex[b]);
        check($sformatf("MV%0d.y type %s", b, t.name()), int'(mv[b].y), ey[b]);
      end
      check($sformatf("MVuv.x type %s sum %0d", t.name(), sx), int'(mv_uv.x), chroma_of(sx));
      check($sformatf("MVuv.y type %s sum %0d", t.name(), sy), int'(mv_uv.y), chroma_of(sy));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
