// Self-checking test of recon_buf: blocks are written in z-scan order; before
// each write the neighbours delivered for that block are compared with a
// 21x17 pixel picture (macroblock plus its top, above-right and left
// neighbours) kept by the testbench, including the H.264 above-right
// availability rule; afterwards every block is read back.
`include "tb_util.svh"
module tb_recon_buf;
  import mc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, wr_en;
  logic [3:0] wr_blk, nb_blk, rd_blk;
  blk_t wr_data, rd_data;
  pix_t [19:0] mb_top;
  pix_t [15:0] mb_left;
  pix_t mb_corner, nb_corner;
  pix_t [7:0] nb_top;
  pix_t [3:0] nb_left;
  int pic [17][21];   // [y+1][x+1]: row 0 above, column 0 left
  bit written [16];
  always #5 clk = ~clk;
  recon_buf dut (.clk(clk), .wr_en(wr_en), .wr_blk(wr_blk), .wr_data(wr_data), .mb_top(mb_top),
                 .mb_left(mb_left), .mb_corner(mb_corner), .nb_blk(nb_blk), .nb_top(nb_top),
                 .nb_left(nb_left), .nb_corner(nb_corner), .rd_blk(rd_blk), .rd_data(rd_data));
  initial begin
    for (int r = 0; r < 3; r++) begin
      wr_en = 0; wr_blk = 0; nb_blk = 0; rd_blk = 0; wr_data = '0;
      for (int i = 0; i < 20; i++) begin pic[(-1)+1][(i)+1] = $urandom_range(255); mb_top[i] = 8'(pic[(-1)+1][(i)+1]); end
      for (int i = 0; i < 16; i++) begin pic[(i)+1][(-1)+1] = $urandom_range(255); mb_left[i] = 8'(pic[(i)+1][(-1)+1]); end
      pic[(-1)+1][(-1)+1] = $urandom_range(255); mb_corner = 8'(pic[(-1)+1][(-1)+1]);
      for (int b = 0; b < 16; b++) written[b] = 0;
      for (int b = 0; b < 16; b++) begin
        automatic int bx = 2 * ((b >> 2) & 1) + (b & 1), by = 2 * ((b >> 3) & 1) + ((b >> 1) & 1);
        automatic bit avail;
        nb_blk = 4'(b);
        #1;
        // above-right available: top macroblock row, or that block already written
        if (by == 0) avail = 1;
        else if (bx == 3) avail = 0;
        else avail = written[8 * ((by - 1) / 2) + 4 * ((bx + 1) / 2) + 2 * ((by - 1) % 2) + (bx + 1) % 2];
        for (int i = 0; i < 8; i++) begin
          automatic int e = (i < 4 || avail) ? pic[(4*by-1)+1][(4*bx+i)+1] : pic[(4*by-1)+1][(4*bx+3)+1];
          `CHECK(int'(nb_top[i]) == e, $sformatf("r%0d blk %0d top %0d got %0d exp %0d", r, b, i, nb_top[i], e))
        end
        for (int i = 0; i < 4; i++)
          `CHECK(int'(nb_left[i]) == pic[(4*by+i)+1][(4*bx-1)+1], $sformatf("r%0d blk %0d left %0d", r, b, i))
        `CHECK(int'(nb_corner) == pic[(4*by-1)+1][(4*bx-1)+1], $sformatf("r%0d blk %0d corner", r, b))
        // write the block
        wr_en = 1; wr_blk = 4'(b);
        for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) begin
          pic[(4*by+y)+1][(4*bx+x)+1] = $urandom_range(255);
          wr_data[4*y+x] = 8'(pic[(4*by+y)+1][(4*bx+x)+1]);
        end
        @(posedge clk); #1;
        wr_en = 0;
        written[b] = 1;
      end
      for (int b = 0; b < 16; b++) begin
        automatic int bx = 2 * ((b >> 2) & 1) + (b & 1), by = 2 * ((b >> 3) & 1) + ((b >> 1) & 1);
        rd_blk = 4'(b);
        #1;
        for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++)
          `CHECK(int'(rd_data[4*y+x]) == pic[(4*by+y)+1][(4*bx+x)+1], $sformatf("read blk %0d", b))
      end
    end
    `FINISH
  end
  initial begin #100000; failures++; `FINISH end
endmodule
