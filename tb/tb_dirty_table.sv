// tb_dirty_table: self-checking test of the dirty table.
//
// Plays frames of 99 MBs (QCIF) with a random dirty flag per MB and a clear
// before each frame. The model keeps the flag of every MB of the frame by its
// raster number n. Before each update it queries all nine pblk offsets and
// checks: an offset to an MB m = n + dy*11 + dx already processed in this
// frame is dirty exactly when MB m was, and its slot is m mod 12; an offset to
// an MB not yet processed is never dirty. It also checks the index (n mod 12)
// and that the NOT-CODED update (dirty 0) clears a slot that was set 12 MBs
// earlier.
module tb_dirty_table;

  localparam int MBW = 11, MBH = 9, SLOTS = 12;

  logic              clk = 1'b0, rst_n = 1'b0, clear = 1'b0, upd = 1'b0, upd_dirty = 1'b0;
  logic signed [1:0] pblk_dx = '0, pblk_dy = '0;
  logic              dirty;
  logic [3:0]        rd_slot, index;
  int                checks = 0, failures = 0, overwrites = 0;

  always #5 clk = ~clk;

  dirty_table dut (.*);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit hist [MBW * MBH];
    int m, d;
    bit f;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int frame = 0; frame < 6; frame++) begin
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      for (int n = 0; n < MBW * MBH; n++) begin
        check("index", int'(index), n % SLOTS);
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++) begin
            pblk_dx = 2'(dx);
            pblk_dy = 2'(dy);
            #1;
            d = dy * MBW + dx;
            m = n + d;
            if (d < 0 && m >= 0) begin
              check($sformatf("dirty MB %0d offset (%0d,%0d)", n, dx, dy), int'(dirty), int'(hist[m]));
              check("rd_slot", int'(rd_slot), m % SLOTS);
            end else begin
              check($sformatf("dirty MB %0d offset (%0d,%0d)", n, dx, dy), int'(dirty), 0);
            end
          end
        f = ($urandom_range(0, 2) != 0);
        if (n >= SLOTS && hist[n - SLOTS] && !f) overwrites++;
        hist[n] = f;
        @(negedge clk);
        upd = 1'b1;
        upd_dirty = f;
        @(negedge clk);
        upd = 1'b0;
        check("slot bit after update", int'(dut.bits[n % SLOTS]), int'(f));
      end
    end
    check("a set slot was cleared by a later clean MB", int'(overwrites > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
