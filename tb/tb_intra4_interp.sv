// Self-checking test of intra4_interp: all nine modes for random, flat and
// ramp neighbourhoods, against the reference predictor (edge-array form of
// the H.264 equations).
`include "tb_util.svh"
module tb_intra4_interp;
  import mc_pkg::*;
  import mc_ref_pkg::*;
  int checks = 0, failures = 0;
  pix_t [7:0] top;
  pix_t [3:0] left;
  pix_t corner;
  logic [3:0] mode;
  blk_t pred;
  intra4_interp dut (.top(top), .left(left), .corner(corner), .mode(mode), .pred(pred));
  initial begin
    for (int t = 0; t < 400; t++) begin
      int rt[8], rl[4], rc;
      blk16_t exp;
      for (int i = 0; i < 8; i++) rt[i] = (t == 0) ? 77 : (t == 1 ? 30 * i : $urandom_range(255));
      for (int i = 0; i < 4; i++) rl[i] = (t == 0) ? 77 : (t == 1 ? 255 - 40 * i : $urandom_range(255));
      rc = (t < 2) ? 128 : $urandom_range(255);
      for (int i = 0; i < 8; i++) top[i] = 8'(rt[i]);
      for (int i = 0; i < 4; i++) left[i] = 8'(rl[i]);
      corner = 8'(rc);
      for (int m = 0; m < 9; m++) begin
        mode = 4'(m);
        #1;
        ref_i4(rt, rl, rc, m, exp);
        for (int i = 0; i < 16; i++)
          `CHECK(int'(pred[i]) == exp[i], $sformatf("t%0d mode %0d pixel %0d got %0d exp %0d", t, m, i, pred[i], exp[i]))
      end
    end
    `FINISH
  end
  initial begin #100000; failures++; `FINISH end
endmodule
