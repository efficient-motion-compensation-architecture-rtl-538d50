// Self-checking test of intra16_interp: the four 16x16 modes for all 16
// block positions on random and smooth neighbourhoods, against the
// reference predictor.
`include "tb_util.svh"
module tb_intra16_interp;
  import mc_pkg::*;
  import mc_ref_pkg::*;
  int checks = 0, failures = 0;
  pix_t [15:0] top, left;
  pix_t corner;
  logic [1:0] mode, bx, by;
  blk_t pred;
  intra16_interp dut (.top(top), .left(left), .corner(corner), .mode(mode), .bx(bx), .by(by), .pred(pred));
  initial begin
    for (int t = 0; t < 60; t++) begin
      int rt[16], rl[16], rc;
      blk16_t exp;
      for (int i = 0; i < 16; i++) begin
        rt[i] = (t % 2 == 0) ? $urandom_range(255) : 8 * i + $urandom_range(15);
        rl[i] = (t % 2 == 0) ? $urandom_range(255) : 240 - 12 * i + $urandom_range(15);
        top[i] = 8'(rt[i]); left[i] = 8'(rl[i]);
      end
      rc = $urandom_range(255); corner = 8'(rc);
      for (int m = 0; m < 4; m++)
        for (int b = 0; b < 16; b++) begin
          mode = 2'(m); bx = 2'(b % 4); by = 2'(b / 4);
          #1;
          ref_i16(rt, rl, rc, m, b % 4, b / 4, exp);
          for (int i = 0; i < 16; i++)
            `CHECK(int'(pred[i]) == exp[i], $sformatf("t%0d mode %0d blk %0d px %0d got %0d exp %0d", t, m, b, i, pred[i], exp[i]))
        end
    end
    `FINISH
  end
  initial begin #1000000; failures++; `FINISH end
endmodule
