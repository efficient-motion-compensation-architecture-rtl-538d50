// COST: Lagrangian rate-distortion cost of one coded 4x4 block.
//
// J = D + lambda * R, with D the distortion from MC+ and R the number of
// bits the variable length coder reports for the block. lambda comes from
// rate control. The result saturates at 2^32-1. Combinational. The cost
// function is the document's; widths and saturation are this design's.
module rdo_cost
  import mc_pkg::*;
(
  input  logic [19:0] sse,
  input  logic [11:0] bits,
  input  logic [15:0] lambda,
  output cost_t       cost
);
  logic [33:0] sum;
  always_comb begin
    sum  = 34'(sse) + 34'(lambda) * 34'(bits);
    cost = (sum > 34'hFFFF_FFFF) ? 32'hFFFF_FFFF : sum[31:0];
  end
endmodule
