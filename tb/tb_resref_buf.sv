// Self-checking test of resref_buf: both sets are filled with different
// random residual/prediction blocks, partially overwritten, and read back
// with one cycle latency; a write to one set must not disturb the other.
`include "tb_util.svh"
module tb_resref_buf;
  import mc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, wr_en, wr_set, rd_en, rd_set;
  logic [3:0] wr_blk, rd_blk;
  resblk_t wr_res, rd_res;
  blk_t wr_pred, rd_pred;
  resblk_t mres [2][16];
  blk_t mpred [2][16];
  always #5 clk = ~clk;
  resref_buf dut (.clk(clk), .wr_en(wr_en), .wr_set(wr_set), .wr_blk(wr_blk), .wr_res(wr_res),
                  .wr_pred(wr_pred), .rd_en(rd_en), .rd_set(rd_set), .rd_blk(rd_blk),
                  .rd_res(rd_res), .rd_pred(rd_pred));
  task automatic wr(input int s, input int b);
    wr_en = 1; wr_set = 1'(s); wr_blk = 4'(b);
    for (int i = 0; i < 16; i++) begin wr_res[i] = 9'($urandom); wr_pred[i] = 8'($urandom); end
    mres[s][b] = wr_res; mpred[s][b] = wr_pred;
    @(posedge clk); #1;
    wr_en = 0;
  endtask
  initial begin
    wr_en = 0; rd_en = 0; wr_set = 0; rd_set = 0; wr_blk = 0; rd_blk = 0; wr_res = '0; wr_pred = '0;
    for (int s = 0; s < 2; s++) for (int b = 0; b < 16; b++) wr(s, b);
    for (int r = 0; r < 4; r++) begin
      for (int k = 0; k < 10; k++) wr($urandom_range(1), $urandom_range(15));
      for (int k = 0; k < 40; k++) begin
        rd_en = 1; rd_set = 1'($urandom); rd_blk = 4'($urandom);
        @(posedge clk); #1;
        rd_en = 0;
        `CHECK(rd_res == mres[rd_set][rd_blk] && rd_pred == mpred[rd_set][rd_blk],
               $sformatf("set %0d blk %0d", rd_set, rd_blk))
      end
    end
    `FINISH
  end
  initial begin #100000; failures++; `FINISH end
endmodule
