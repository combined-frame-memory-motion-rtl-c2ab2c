// mfm_sram: main frame memory (MFM) of the combined frame memory.
//
// One frame of 4:2:0 video, written as a single-port synchronous SRAM with an
// 8-bit word, as the document specifies. Its size is one frame:
// FRAME_W*FRAME_H*1.5 bytes (38016 for QCIF). Luma occupies addresses
// 0..W*H-1 in raster order, then Cb (W/2 x H/2), then Cr. The part above the MB
// being decoded holds the reconstructed current frame, the part from it down the
// reference frame.
//
// Interface and timing: one access per clock. With cs=1 and we=1 the word
// wdata is written to addr at the rising edge; with cs=1 and we=0 the word at
// addr appears on rdata after that edge (one-cycle read latency). rdata holds
// its value while cs=0. The document uses a generated SRAM macro; this array
// stands in for it with the same port behaviour.
module mfm_sram #(
    parameter int FRAME_W = 176,
    parameter int FRAME_H = 144,
    parameter int DEPTH   = FRAME_W * FRAME_H * 3 / 2,
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
