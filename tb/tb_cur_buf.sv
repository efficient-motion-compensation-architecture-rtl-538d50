// Self-checking test of cur_buf: two whole macroblocks (256 luma + 128
// chroma pixels each) are written in 96 DMA words into the two pages; the
// second is written while the first page is being read. Every luma 4x4 block
// is read back in one cycle and every chroma word through its bank address.
// Read latency is one cycle.
`include "tb_util.svh"
module tb_cur_buf;
  import mc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, wr_en, wr_page, rd_page;
  logic [6:0] wr_idx;
  logic [31:0] wr_data;
  logic [4:0] rd_addr;
  blk_t rd_blk;
  int luma [2][16][16];
  int chroma [2][2][8][8];
  always #5 clk = ~clk;
  cur_buf dut (.clk(clk), .wr_en(wr_en), .wr_page(wr_page), .wr_idx(wr_idx), .wr_data(wr_data),
               .rd_page(rd_page), .rd_addr(rd_addr), .rd_blk(rd_blk));
  task automatic dma(input int pg);
    for (int w = 0; w < 96; w++) begin
      @(negedge clk);
      wr_en = 1; wr_page = 1'(pg); wr_idx = 7'(w);
      for (int k = 0; k < 4; k++) begin
        if (w < 64) wr_data[8*k +: 8] = 8'(luma[pg][w / 4][4 * (w % 4) + k]);
        else wr_data[8*k +: 8] = 8'(chroma[pg][(w - 64) / 16][((w - 64) % 16) / 2][4 * ((w - 64) % 2) + k]);
      end
    end
    @(negedge clk); wr_en = 0;
  endtask
  task automatic readback(input int pg);
    for (int by = 0; by < 4; by++)
      for (int bx = 0; bx < 4; bx++) begin
        @(negedge clk);
        rd_page = 1'(pg); rd_addr = 5'(by * 4 + bx);
        @(posedge clk); #1;
        for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++)
          `CHECK(int'(rd_blk[4*y+x]) == luma[pg][4*by+y][4*bx+x], $sformatf("page %0d luma b(%0d,%0d) p(%0d,%0d)", pg, bx, by, x, y))
      end
    // chroma: address 16 + c*4 + half*2 + col, bank k = row within half
    for (int c = 0; c < 2; c++)
      for (int h = 0; h < 2; h++)
        for (int col = 0; col < 2; col++) begin
          @(negedge clk);
          rd_page = 1'(pg); rd_addr = 5'(16 + c * 4 + h * 2 + col);
          @(posedge clk); #1;
          for (int k = 0; k < 4; k++) for (int x = 0; x < 4; x++)
            `CHECK(int'(rd_blk[4*k+x]) == chroma[pg][c][4*h+k][4*col+x], $sformatf("page %0d chroma c%0d row%0d", pg, c, 4*h+k))
        end
  endtask
  initial begin
    wr_en = 0; wr_page = 0; rd_page = 0; rd_addr = 0; wr_idx = 0; wr_data = 0;
    for (int pg = 0; pg < 2; pg++) begin
      for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) luma[pg][y][x] = $urandom_range(255);
      for (int c = 0; c < 2; c++) for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++)
        chroma[pg][c][y][x] = $urandom_range(255);
    end
    dma(0);
    fork
      readback(0);
      dma(1);
    join
    readback(1);
    readback(0);
    `FINISH
  end
  initial begin #100000; failures++; `FINISH end
endmodule
