// Differential (residual) and Reference (prediction) double buffer.
//
// Two sets, each made of a Differential buffer and a Reference buffer. Each
// buffer is four banks, bank k holding row k of every 4x4 block, so that a
// whole block (16 residuals and 16 prediction pixels) is written or read in
// one cycle. A set holds one macroblock candidate: NBLK blocks addressed by
// their z-scan index.
//
// The two sets are used alternately: the candidate being evaluated is
// written into one set while the other keeps the best candidate found so far
// for the macroblock; when a new candidate wins, the roles swap (the caller
// flips wr_set / rd_set). Reads are synchronous: rd_res/rd_pred are valid one
// cycle after rd_en.
//
// Two sets of four-bank Differential and Reference buffers follow the
// document; keeping the best candidate in one set while the other is
// refilled is this design's reading of how they alternate.
module resref_buf
  import mc_pkg::*;
#(
  parameter int unsigned NBLK = 16
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic                     wr_set,
  input  logic [$clog2(NBLK)-1:0]  wr_blk,
  input  resblk_t                  wr_res,
  input  blk_t                     wr_pred,
  input  logic                     rd_en,
  input  logic                     rd_set,
  input  logic [$clog2(NBLK)-1:0]  rd_blk,
  output resblk_t                  rd_res,
  output blk_t                     rd_pred
);
  localparam int unsigned AW = $clog2(NBLK) + 1;  // {set, block}

  // bank k of the Differential and Reference buffers
  for (genvar k = 0; k < 4; k++) begin : g_bank
    logic [35:0] diff_mem [2*NBLK];
    logic [31:0] ref_mem  [2*NBLK];
    always_ff @(posedge clk) begin
      if (wr_en) begin
        diff_mem[AW'({wr_set, wr_blk})] <= wr_res[4*k +: 4];
        ref_mem [AW'({wr_set, wr_blk})] <= wr_pred[4*k +: 4];
      end
      if (rd_en) begin
        rd_res [4*k +: 4] <= diff_mem[AW'({rd_set, rd_blk})];
        rd_pred[4*k +: 4] <= ref_mem [AW'({rd_set, rd_blk})];
      end
    end
  end
endmodule
