// INTRA interpolation for 16x16 luma prediction, one 4x4 block at a time.
//
// Given the 16 pixels above the macroblock (top), the 16 to its left (left)
// and the above-left pixel (corner), produces the prediction of the 4x4 block
// at block column bx and block row by for one of the four H.264 intra 16x16
// modes: 0 vertical, 1 horizontal, 2 DC, 3 plane. Combinational, one block per
// cycle, so a whole 16x16 candidate streams through the MC pipeline in 16
// cycles. All neighbours are assumed available. The document names 16x16
// intra prediction and its mode numbers; the equations are those of the
// H.264/AVC standard, and producing the prediction block by block is this
// design's choice.
module intra16_interp
  import mc_pkg::*;
(
  input  pix_t [15:0] top,
  input  pix_t [15:0] left,
  input  pix_t        corner,
  input  logic [1:0]  mode,
  input  logic [1:0]  bx,
  input  logic [1:0]  by,
  output blk_t        pred
);
  function automatic int ptop(input int x);   // p[x,-1], x = -1..15
    return (x < 0) ? int'(corner) : int'(top[x[3:0]]);
  endfunction
  function automatic int pleft(input int y);  // p[-1,y], y = -1..15
    return (y < 0) ? int'(corner) : int'(left[y[3:0]]);
  endfunction

  logic signed [31:0] dc, h, v, a, b, c;
  always_comb begin
    dc = 16;
    for (int i = 0; i < 16; i++) dc += int'(top[i]) + int'(left[i]);
    dc = dc >>> 5;
    h = 0;
    v = 0;
    for (int i = 0; i < 8; i++) begin
      h += (i + 1) * (ptop(8 + i) - ptop(6 - i));
      v += (i + 1) * (pleft(8 + i) - pleft(6 - i));
    end
    a = 16 * (int'(left[15]) + int'(top[15]));
    b = (5 * h + 32) >>> 6;
    c = (5 * v + 32) >>> 6;
  end

  always_comb begin
    int px, py;
    for (int y = 0; y < 4; y++) begin
      for (int x = 0; x < 4; x++) begin
        px = 4 * int'(bx) + x;
        py = 4 * int'(by) + y;
        unique case (mode)
          2'd0: pred[4*y+x] = top[px];
          2'd1: pred[4*y+x] = left[py];
          2'd2: pred[4*y+x] = pix_t'(dc);
          default: pred[4*y+x] = clip8((a + b * (px - 7) + c * (py - 7) + 16) >>> 5);
        endcase
      end
    end
  end
endmodule
