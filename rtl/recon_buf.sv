// Reference buffer: reconstructed pixels of the current macroblock.
//
// Stores the 16x16 reconstructed luma pixels, written one 4x4 block at a
// time when the mode of that block has been decided. For the block at z-scan
// index nb_blk it delivers the neighbours that INTRA 4x4 interpolation needs,
// taking them from inside the macroblock where they exist and from the
// neighbouring macroblocks (mb_top: 20 pixels above, the last 4 belonging to
// the above-right macroblock; mb_left: 16 pixels to the left; mb_corner:
// above-left) at its edges. Above-right pixels that H.264 treats as not
// available (not yet coded inside the macroblock, or right of the
// macroblock below its top row) are replaced by the last pixel of the top row,
// as the standard does.
// The read port rd_blk returns a stored block combinationally.
// The document describes this buffer as holding the pixels used for INTRA
// interpolation; its organisation as registers and the edge handling are this
// design's choices.
module recon_buf
  import mc_pkg::*;
(
  input  logic        clk,
  input  logic        wr_en,
  input  logic [3:0]  wr_blk,
  input  blk_t        wr_data,
  input  pix_t [19:0] mb_top,
  input  pix_t [15:0] mb_left,
  input  pix_t        mb_corner,
  input  logic [3:0]  nb_blk,
  output pix_t [7:0]  nb_top,
  output pix_t [3:0]  nb_left,
  output pix_t        nb_corner,
  input  logic [3:0]  rd_blk,
  output blk_t        rd_data
);
  pix_t mem [16][16];   // [row][column]

  always_ff @(posedge clk) begin
    if (wr_en)
      for (int y = 0; y < 4; y++)
        for (int x = 0; x < 4; x++)
          mem[4*int'(blk_y(wr_blk)) + y][4*int'(blk_x(wr_blk)) + x] <= wr_data[4*y+x];
  end

  // z-scan index of the block at block column bx, block row by
  function automatic logic [3:0] zidx(input logic [1:0] bx, input logic [1:0] by);
    return {by[1], bx[1], by[0], bx[0]};
  endfunction

  always_comb begin
    int x0, y0;
    logic [1:0] bx, by;
    logic tr_avail;
    bx = blk_x(nb_blk);
    by = blk_y(nb_blk);
    x0 = 4 * int'(bx);
    y0 = 4 * int'(by);
    // above-right block availability
    if (by == 2'd0)       tr_avail = 1'b1;
    else if (bx == 2'd3)  tr_avail = 1'b0;
    else                  tr_avail = zidx(bx + 2'd1, by - 2'd1) < nb_blk;
    for (int i = 0; i < 8; i++) begin
      if (by == 2'd0) nb_top[i] = mb_top[x0 + i];
      else            nb_top[i] = mem[y0 - 1][(x0 + i) % 16];
    end
    if (!tr_avail)
      for (int i = 4; i < 8; i++) nb_top[i] = nb_top[3];
    for (int i = 0; i < 4; i++) begin
      if (bx == 2'd0) nb_left[i] = mb_left[y0 + i];
      else            nb_left[i] = mem[y0 + i][x0 - 1];
    end
    if (bx == 2'd0 && by == 2'd0) nb_corner = mb_corner;
    else if (bx == 2'd0)          nb_corner = mb_left[y0 - 1];
    else if (by == 2'd0)          nb_corner = mb_top[x0 - 1];
    else                          nb_corner = mem[y0 - 1][x0 - 1];
  end

  always_comb begin
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++)
        rd_data[4*y+x] = mem[4*int'(blk_y(rd_blk)) + y][4*int'(blk_x(rd_blk)) + x];
  end
endmodule
