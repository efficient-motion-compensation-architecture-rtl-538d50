// Current data buffer.
//
// Holds the pixels of the macroblock being coded. It is built from four
// distributed SRAM banks of DEPTH 32-bit words each, so that the 16 pixels of
// one 4x4 block can be read in a single cycle (four pixels from each bank).
// Luma row r of the macroblock is stored in bank r mod 4, so the four rows of
// any 4x4 block lie in four different banks at the same address.
//
// Write port (DMA side, 32 bits = four pixels per cycle): wr_idx is the
// word number in the order the macroblock arrives:
//   0..63  luma, word = row*4 + column/4          -> bank row%4, address (row/4)*4 + column/4
//   64..95 chroma 8x8 Cb then Cr, word = 64 + c*16 + row*2 + column/4
//                                                 -> bank row%4, address 16 + c*4 + (row/4)*2 + column/4
// A full macroblock (luma and chroma, 4:2:0) therefore takes 96 writes.
// Pixel x of a word occupies bits [8x+7:8x].
//
// One macroblock uses 24 words of each bank. The banks are split into two
// pages of DEPTH/2 words: the DMA fills one page (wr_page) with the next
// macroblock while the other (rd_page) is read for the macroblock being
// coded, so data input overlaps processing.
//
// Read port: rd_addr selects the same address in all four banks of page
// rd_page; the 16 pixels appear on rd_blk one cycle later (synchronous SRAM).
// The luma 4x4 block at block column bx, block row by is at address by*4 + bx.
//
// Four banks of 64 words, the 16-pixel read and the overlap of data input
// with processing follow the document; the 32-bit word width, the address
// map, the two pages and the synchronous read are this design's own choices.
module cur_buf
  import mc_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic        clk,
  input  logic        wr_en,
  input  logic        wr_page,
  input  logic [6:0]  wr_idx,
  input  logic [31:0] wr_data,
  input  logic        rd_page,
  input  logic [$clog2(DEPTH)-2:0] rd_addr,
  output blk_t        rd_blk
);
  localparam int unsigned AW = $clog2(DEPTH) - 1;   // address bits inside a page

  logic [31:0] mem [4][DEPTH];
  logic [1:0]    wr_bank;
  logic [AW-1:0] wr_addr;

  always_comb begin
    if (wr_idx < 7'd64) begin
      wr_bank = wr_idx[3:2];                                   // row % 4
      wr_addr = AW'({wr_idx[5:4], wr_idx[1:0]});               // (row/4)*4 + col
    end else begin
      // chroma: v = wr_idx-64 = {c, row[2:0], col}
      wr_bank = wr_idx[2:1];                                   // row % 4
      wr_addr = AW'(16 + {wr_idx[4], wr_idx[3], wr_idx[0]});   // 16 + c*4 + (row/4)*2 + col
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_bank][{wr_page, wr_addr}] <= wr_data;
  end

  for (genvar b = 0; b < 4; b++) begin : g_bank
    always_ff @(posedge clk) begin
      rd_blk[4*b +: 4] <= mem[b][{rd_page, rd_addr}];
    end
  end

endmodule
