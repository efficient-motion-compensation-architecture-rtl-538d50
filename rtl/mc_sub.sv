// MC- (motion compensation differential).
//
// Sixteen parallel subtractors forming the residual of a 4x4 block:
// res[i] = cur[i] - pred[i], 9-bit two's complement. Purely combinational;
// the surrounding pipeline registers the result. The operation follows the
// document; the 16-wide parallelism matches its one-block-per-cycle read of
// the current data buffer.
module mc_sub
  import mc_pkg::*;
(
  input  blk_t    cur,
  input  blk_t    pred,
  output resblk_t res
);
  always_comb begin
    for (int i = 0; i < 16; i++)
      res[i] = {1'b0, cur[i]} - {1'b0, pred[i]};
  end
endmodule
