// Self-checking test of mc_add: reconstruction with clipping and the sum of
// squared differences, against integer arithmetic in the testbench.
`include "tb_util.svh"
module tb_mc_add;
  import mc_pkg::*;
  int checks = 0, failures = 0;
  blk_t pred, cur, rec;
  logic [15:0][15:0] rres;
  logic [19:0] sse;
  mc_add dut (.pred(pred), .cur(cur), .rres(rres), .rec(rec), .sse(sse));
  initial begin
    for (int t = 0; t < 500; t++) begin
      int e, r, s;
      s = 0;
      for (int i = 0; i < 16; i++) begin
        pred[i] = 8'($urandom);
        cur[i]  = 8'($urandom);
        rres[i] = 16'(int'($urandom_range(600)) - 300);
      end
      #1;
      for (int i = 0; i < 16; i++) begin
        r = int'(pred[i]) + int'(signed'(rres[i]));
        r = r < 0 ? 0 : (r > 255 ? 255 : r);
        `CHECK(int'(rec[i]) == r, $sformatf("rec t%0d i%0d", t, i))
        e = int'(cur[i]) - r;
        s += e * e;
      end
      `CHECK(int'(sse) == s, $sformatf("sse t%0d got %0d exp %0d", t, sse, s))
    end
    `FINISH
  end
  initial begin #100000; failures++; `FINISH end
endmodule
