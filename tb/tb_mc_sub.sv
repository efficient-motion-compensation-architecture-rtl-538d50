// Self-checking test of mc_sub: random current and prediction blocks,
// residual compared with the integer difference.
`include "tb_util.svh"
module tb_mc_sub;
  import mc_pkg::*;
  int checks = 0, failures = 0;
  blk_t cur, pred;
  resblk_t res;
  mc_sub dut (.cur(cur), .pred(pred), .res(res));
  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < 16; i++) begin
        cur[i]  = 8'($urandom);
        pred[i] = (t < 2) ? 8'(t * 255) : 8'($urandom);
      end
      #1;
      for (int i = 0; i < 16; i++)
        `CHECK(int'(signed'(res[i])) == int'(cur[i]) - int'(pred[i]), $sformatf("t%0d i%0d", t, i))
    end
    `FINISH
  end
  initial begin #100000; failures++; `FINISH end
endmodule
