// INTRA interpolation for 4x4 blocks.
//
// Forms the prediction of one 4x4 luma block for one of the nine H.264
// intra 4x4 modes from its neighbouring reconstructed pixels:
//   top[0..7]  the row above (A..H; 4..7 is the above-right block)
//   left[0..3] the column to the left (I..L)
//   corner     the pixel above-left (M)
// mode: 0 vertical, 1 horizontal, 2 DC, 3 diagonal down-left,
// 4 diagonal down-right, 5 vertical-right, 6 horizontal-down,
// 7 vertical-left, 8 horizontal-up. Purely combinational, one block per
// cycle. The caller substitutes the above-right pixels when they are not
// available (replicating top[3]), as H.264 prescribes; all other neighbours
// are assumed present. The document names this unit and its nine modes; the
// prediction equations are those of the H.264/AVC standard.
module intra4_interp
  import mc_pkg::*;
(
  input  pix_t [7:0] top,
  input  pix_t [3:0] left,
  input  pix_t       corner,
  input  logic [3:0] mode,
  output blk_t       pred
);
  // neighbour p[x,y] with x or y equal to -1
  function automatic int unsigned p(input int x, input int y);
    return (y < 0 && x < 0) ? int'(corner) :
           (y < 0)          ? int'(top[x[2:0]]) : int'(left[y[1:0]]);
  endfunction

  function automatic pix_t f3(input int unsigned a, input int unsigned b, input int unsigned c);
    return pix_t'((a + 2*b + c + 2) >> 2);
  endfunction
  function automatic pix_t f2(input int unsigned a, input int unsigned b);
    return pix_t'((a + b + 1) >> 1);
  endfunction

  // DC: rounded mean of the four top and four left neighbours
  logic [10:0] dc_sum;
  pix_t        dc;
  always_comb begin
    dc_sum = 11'd4;
    for (int i = 0; i < 4; i++) dc_sum += 11'(top[i]) + 11'(left[i]);
  end
  assign dc = dc_sum[10:3];

  logic signed [31:0] z;
  always_comb begin
    z = '0;
    for (int y = 0; y < 4; y++) begin
      for (int x = 0; x < 4; x++) begin
        pix_t v;
        v = '0;
        unique case (mode)
          4'd0: v = top[x];
          4'd1: v = left[y];
          4'd2: v = dc;
          4'd3: begin
            if (x == 3 && y == 3) v = pix_t'((int'(top[6]) + 3*int'(top[7]) + 2) >> 2);
            else                  v = f3(p(x+y, -1), p(x+y+1, -1), p(x+y+2, -1));
          end
          4'd4: begin
            if (x > y)      v = f3(p(x-y-2, -1), p(x-y-1, -1), p(x-y, -1));
            else if (x < y) v = f3(p(-1, y-x-2), p(-1, y-x-1), p(-1, y-x));
            else            v = f3(p(0, -1), p(-1, -1), p(-1, 0));
          end
          4'd5: begin
            z = 2*x - y;
            if (z >= 0 && z % 2 == 0) v = f2(p(x-(y>>1)-1, -1), p(x-(y>>1), -1));
            else if (z > 0)           v = f3(p(x-(y>>1)-2, -1), p(x-(y>>1)-1, -1), p(x-(y>>1), -1));
            else if (z == -1)         v = f3(p(-1, 0), p(-1, -1), p(0, -1));
            else                      v = f3(p(-1, y-1), p(-1, y-2), p(-1, y-3));
          end
          4'd6: begin
            z = 2*y - x;
            if (z >= 0 && z % 2 == 0) v = f2(p(-1, y-(x>>1)-1), p(-1, y-(x>>1)));
            else if (z > 0)           v = f3(p(-1, y-(x>>1)-2), p(-1, y-(x>>1)-1), p(-1, y-(x>>1)));
            else if (z == -1)         v = f3(p(-1, 0), p(-1, -1), p(0, -1));
            else                      v = f3(p(x-1, -1), p(x-2, -1), p(x-3, -1));
          end
          4'd7: begin
            if (y % 2 == 0) v = f2(p(x+(y>>1), -1), p(x+(y>>1)+1, -1));
            else            v = f3(p(x+(y>>1), -1), p(x+(y>>1)+1, -1), p(x+(y>>1)+2, -1));
          end
          4'd8: begin
            z = x + 2*y;
            if (z > 5)                   v = left[3];
            else if (z == 5)             v = pix_t'((int'(left[2]) + 3*int'(left[3]) + 2) >> 2);
            else if (z % 2 == 0)         v = f2(p(-1, y+(x>>1)), p(-1, y+(x>>1)+1));
            else                         v = f3(p(-1, y+(x>>1)), p(-1, y+(x>>1)+1), p(-1, y+(x>>1)+2));
          end
          default: v = dc;
        endcase
        pred[4*y+x] = v;
      end
    end
  end
endmodule
