// 8-bit x 16 prediction register file.
//
// Holds the 16 prediction pixels of the 4x4 block that enters MC-. On load
// it captures either the INTRA interpolation output or the INTER
// interpolation data (from the inter buffer), selected by use_inter. The
// content is available on q from the cycle after the load and is held until
// the next load. The 8-bit x 16 size and its two sources follow the
// document; the single whole-block load port is this design's choice.
module pred_regfile
  import mc_pkg::*;
(
  input  logic clk,
  input  logic load,
  input  logic use_inter,
  input  blk_t intra_blk,
  input  blk_t inter_blk,
  output blk_t q
);
  always_ff @(posedge clk) begin
    if (load) q <= use_inter ? inter_blk : intra_blk;
  end
endmodule
