// Self-checking test of pred_regfile: loads from either source, holds its
// content while load is low, output valid the cycle after the load.
`include "tb_util.svh"
module tb_pred_regfile;
  import mc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, load, use_inter;
  blk_t intra_blk, inter_blk, q, exp;
  always #5 clk = ~clk;
  pred_regfile dut (.clk(clk), .load(load), .use_inter(use_inter),
                    .intra_blk(intra_blk), .inter_blk(inter_blk), .q(q));
  initial begin
    load = 1; use_inter = 0;
    intra_blk = '0; inter_blk = '0;
    @(posedge clk); #1;
    exp = '0;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 16; i++) begin intra_blk[i] = 8'($urandom); inter_blk[i] = 8'($urandom); end
      load = 1'($urandom); use_inter = 1'($urandom);
      @(posedge clk); #1;
      if (load) exp = use_inter ? inter_blk : intra_blk;
      `CHECK(q == exp, $sformatf("t%0d load=%0d inter=%0d", t, load, use_inter))
    end
    `FINISH
  end
  initial begin #100000; failures++; `FINISH end
endmodule
