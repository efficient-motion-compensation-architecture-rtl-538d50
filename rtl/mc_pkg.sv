// Shared types and constants of the motion compensation (MC) unit.
//
// A 4x4 block is carried as a packed vector of 16 elements in raster order
// (element 4*y + x is the pixel in row y, column x). Pixels are 8 bits,
// residuals 9 bits two's complement, quantized levels 16 bits two's
// complement. Rate-distortion costs are 32 bits per 4x4 block and 36 bits per
// macroblock (the sum of 16 block costs cannot overflow). The widths are
// this design's own choice; the 8-bit pixel and the 4x4/16x16 block
// structure follow H.264/AVC.
package mc_pkg;

  typedef logic [7:0]             pix_t;
  typedef logic [15:0][7:0]       blk_t;     // 16 pixels
  typedef logic [15:0][8:0]       resblk_t;  // 16 signed residuals
  typedef logic [15:0][15:0]      lvlblk_t;  // 16 signed quantized levels
  typedef logic [31:0]            cost_t;
  typedef logic [35:0]            mbcost_t;

  // Macroblock decision
  typedef enum logic [1:0] {
    MB_I4    = 2'd0,
    MB_I16   = 2'd1,
    MB_INTER = 2'd2
  } mbtype_e;

  // Which prediction source a candidate in the pipeline uses
  typedef enum logic [1:0] {
    SRC_I4    = 2'd0,
    SRC_I16   = 2'd1,
    SRC_INTER = 2'd2
  } src_e;

  // Tag travelling with one 4x4 block through MC-, DQ, MC+ and COST
  typedef struct packed {
    src_e       src;
    logic [3:0] mode;   // prediction mode (INTRA) or candidate number (INTER)
    logic [3:0] blk;    // 4x4 block index, z-scan order inside the macroblock
  } tag_t;


  // Position of a 4x4 block given its z-scan index (H.264 block order)
  function automatic logic [1:0] blk_x(input logic [3:0] idx);
    return {idx[2], idx[0]};
  endfunction
  function automatic logic [1:0] blk_y(input logic [3:0] idx);
    return {idx[3], idx[1]};
  endfunction

  function automatic pix_t clip8(input logic signed [31:0] v);
    if (v < 0)        return 8'd0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

endpackage
