// Self-checking test of intra4_modesel: for random per-mode costs and
// thresholds the evaluation is replayed step by step (costs revealed only
// for the modes already chosen); the sequence of requested modes and the
// point where the search ends must equal the reference 3-step search with
// compensation.
`include "tb_util.svh"
module tb_intra4_modesel;
  import mc_pkg::*;
  import mc_ref_pkg::*;
  int checks = 0, failures = 0;
  cost_t [8:0] cost;
  logic  [8:0] done_mask;
  cost_t cost_min, th;
  logic  th_valid, next_valid, finished, compensating;
  logic [3:0] next_mode;
  int n_comp = 0;
  intra4_modesel dut (.cost(cost), .done_mask(done_mask), .cost_min(cost_min), .th(th), .th_valid(th_valid),
                      .next_valid(next_valid), .next_mode(next_mode), .finished(finished),
                      .compensating(compensating));
  initial begin
    for (int t = 0; t < 2000; t++) begin
      longint c[9], rth;
      int order[9], n, best, k;
      longint mn;
      for (int m = 0; m < 9; m++) c[m] = (t % 4 == 0) ? longint'($urandom_range(20)) : longint'($urandom_range(5000));
      th_valid = (t % 3 != 0);
      rth = longint'($urandom_range(5000));
      th = cost_t'(rth);
      ref_search(c, th_valid ? rth : -1, order, n, best);
      // replay
      done_mask = 9'b000000111;
      cost = '0;
      for (int m = 0; m < 3; m++) cost[m] = cost_t'(c[m]);
      mn = c[0];
      for (int m = 1; m < 3; m++) if (c[m] < mn) mn = c[m];
      cost_min = cost_t'(mn);
      k = 3;
      while (1) begin
        #1;
        if (finished) break;
        `CHECK(next_valid && k < n && int'(next_mode) == order[k],
               $sformatf("t%0d step %0d got %0d exp %0d (n=%0d)", t, k, next_mode, (k < n) ? order[k] : -1, n))
        if (compensating) n_comp++;
        if (!next_valid || k >= 9 || done_mask[next_mode]) break;
        done_mask[next_mode] = 1'b1;
        cost[next_mode] = cost_t'(c[next_mode]);
        if (c[next_mode] < mn) mn = c[next_mode];
        cost_min = cost_t'(mn);
        k++;
      end
      `CHECK(finished && k == n, $sformatf("t%0d ended after %0d modes, expected %0d", t, k, n))
    end
    `CHECK(n_comp > 0, "compensation never exercised")
    `FINISH
  end
  initial begin #1000000; failures++; `FINISH end
endmodule
