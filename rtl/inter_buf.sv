// Inter interpolation buffer.
//
// Receives from motion estimation the (sub-pixel) interpolated prediction of
// one INTER candidate for the whole 16x16 macroblock, one 4x4 block of 16
// pixels per write, addressed by z-scan block index. The MC pipeline reads a
// block combinationally when it issues that block. The document places this
// buffer between ME and MC; the block-wide write port and the register
// implementation are this design's choices.
module inter_buf
  import mc_pkg::*;
(
  input  logic       clk,
  input  logic       wr_en,
  input  logic [3:0] wr_blk,
  input  blk_t       wr_data,
  input  logic [3:0] rd_blk,
  output blk_t       rd_data
);
  blk_t mem [16];
  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_blk] <= wr_data;
  end
  assign rd_data = mem[rd_blk];
endmodule
