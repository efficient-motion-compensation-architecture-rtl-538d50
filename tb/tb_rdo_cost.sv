// Self-checking test of rdo_cost: J = D + lambda*R for random and extreme
// operands.
`include "tb_util.svh"
module tb_rdo_cost;
  import mc_pkg::*;
  int checks = 0, failures = 0;
  logic [19:0] sse;
  logic [11:0] bits;
  logic [15:0] lambda;
  cost_t cost;
  rdo_cost dut (.sse(sse), .bits(bits), .lambda(lambda), .cost(cost));
  initial begin
    for (int t = 0; t < 1000; t++) begin
      longint exp;
      sse = 20'($urandom); bits = 12'($urandom); lambda = 16'($urandom);
      if (t == 0) begin sse = '1; bits = '1; lambda = '1; end
      if (t == 1) begin sse = 0; bits = 0; lambda = 0; end
      #1;
      exp = longint'(sse) + longint'(lambda) * longint'(bits);
      `CHECK(longint'(cost) == exp, $sformatf("t%0d got %0d exp %0d", t, cost, exp))
    end
    `FINISH
  end
  initial begin #100000; failures++; `FINISH end
endmodule
