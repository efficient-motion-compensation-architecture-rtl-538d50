// MC+ (motion compensation reconstruction) with distortion.
//
// Adds the decoded residual from DQ to the prediction and clips to 0..255,
// giving the reconstructed 4x4 block. In the same step it measures the
// coding distortion as the sum of squared differences between the current
// pixels and the reconstruction (at most 16*255^2, 20 bits). Purely
// combinational. Reconstruction and the distortion output follow the
// document; using the sum of squared differences as the distortion is this
// design's choice.
module mc_add
  import mc_pkg::*;
(
  input  blk_t                    pred,
  input  blk_t                    cur,
  input  logic [15:0][15:0]       rres,   // signed decoded residual
  output blk_t                    rec,
  output logic [19:0]             sse
);
  always_comb begin
    logic signed [31:0] d;
    sse = '0;
    for (int i = 0; i < 16; i++) begin
      rec[i] = clip8(32'(signed'({1'b0, pred[i]})) + 32'(signed'(rres[i])));
      d      = 32'(signed'({1'b0, cur[i]})) - 32'(signed'({1'b0, rec[i]}));
      sse   = sse + 20'(d * d);
    end
  end
endmodule
