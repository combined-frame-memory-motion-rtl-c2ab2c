// tb_vrsb_sram: self-checking test of the vrsb single-port SRAM.
//
// Fills the whole array with pseudo-random bytes, then does 20000 random
// accesses (writes and reads mixed) against a shadow copy. Each read is
// checked one cycle after its address, and the read word must hold through
// idle (cs low) cycles and through writes.
module tb_vrsb_sram;
  localparam int DEPTH = 12 * 384;
  localparam int AW    = $clog2(DEPTH);

  logic          clk = 1'b0;
  logic          cs = 1'b0, we = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [7:0]    wdata = '0, rdata;
  byte unsigned  shadow [DEPTH];
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  vrsb_sram dut (.clk, .cs, .we, .addr, .wdata, .rdata);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, kind;
    logic [7:0] last_rd;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      cs = 1'b1; we = 1'b1; addr = AW'(i); wdata = 8'($urandom);
      shadow[i] = wdata;
    end
    @(negedge clk);
    cs = 1'b1; we = 1'b0; addr = '0;
    @(negedge clk);
    last_rd = shadow[0];
    for (int n = 0; n < 20000; n++) begin
      kind = int'($urandom_range(0, 2));
      a    = int'($urandom_range(0, DEPTH - 1));
      cs = (kind != 2); we = (kind == 0); addr = AW'(a); wdata = 8'($urandom);
      @(negedge clk);
      if (kind == 0) shadow[a] = wdata;
      if (kind == 1) last_rd = shadow[a];
      checks++;
      if (rdata !== last_rd) begin
        failures++;
        if (failures < 5) $display("access %0d addr %0d: rdata %0d, expected %0d", n, a, rdata, last_rd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
