// vrsb_sram: vector range strip buffer (VRSB) of the combined frame memory.
//
// Backup store for reference MBs that the reconstructed frame has overwritten
// in the MFM. It is organised as SLOTS MB slots of 384 bytes (256 luma, 64 Cb,
// 64 Cr); with SLOTS = FRAME_W/16 + 1 = 12 for QCIF its size is the document's
// 16 x (176+16) x 1.5 = 4608 bytes. Written as a single-port synchronous SRAM
// with an 8-bit word, as the document specifies.
//
// Interface and timing: one access per clock. With cs=1 and we=1 the word
// wdata is written to addr at the rising edge; with cs=1 and we=0 the word at
// addr appears on rdata after that edge (one-cycle read latency). rdata holds
// its value while cs=0. The document uses a generated SRAM macro; this array
// stands in for it with the same port behaviour.
module vrsb_sram #(
    parameter int FRAME_W = 176,
    parameter int SLOTS   = FRAME_W / 16 + 1,
    parameter int DEPTH   = SLOTS * 384,
    parameter int AW      = $clog2(DEPTH)
) (
    input  logic          clk,
    input  logic          cs,
    input  logic          we,
    input  logic [AW-1:0] addr,
    input  logic [7:0]    wdata,
    output logic [7:0]    rdata
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (cs) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
