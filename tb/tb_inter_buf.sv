// Self-checking test of inter_buf: 16 random blocks written, read back in
// random order, partial overwrite checked.
`include "tb_util.svh"
module tb_inter_buf;
  import mc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, wr_en;
  logic [3:0] wr_blk, rd_blk;
  blk_t wr_data, rd_data;
  blk_t model [16];
  always #5 clk = ~clk;
  inter_buf dut (.clk(clk), .wr_en(wr_en), .wr_blk(wr_blk), .wr_data(wr_data),
                 .rd_blk(rd_blk), .rd_data(rd_data));
  initial begin
    wr_en = 0; rd_blk = 0; wr_blk = 0; wr_data = '0;
    for (int r = 0; r < 3; r++) begin
      for (int b = 0; b < 16; b++) begin
        if (r == 0 || $urandom_range(1)) begin
          wr_en = 1; wr_blk = 4'(b);
          for (int i = 0; i < 16; i++) wr_data[i] = 8'($urandom);
          model[b] = wr_data;
          @(posedge clk); #1;
        end
      end
      wr_en = 0;
      for (int k = 0; k < 32; k++) begin
        rd_blk = 4'($urandom);
        #1;
        `CHECK(rd_data == model[rd_blk], $sformatf("round %0d blk %0d", r, rd_blk))
      end
    end
    `FINISH
  end
  initial begin #100000; failures++; `FINISH end
endmodule
