// DQ: forward transform, quantization, inverse quantization and inverse
// transform of one 4x4 residual block, in two pipelined cycles.
//
// Cycle 1 (in_valid -> lvl_valid): H.264 4x4 forward integer core transform
//   Y = Cf * X * Cf^T, then quantization
//   |Z| = (|Y| * MF(QP%6, position) + f) >> (15 + QP/6), sign of Y,
//   f = 2^(15+QP/6)/3 for intra blocks and /6 for inter blocks.
// Cycle 2 (lvl_valid -> rres_valid): inverse quantization
//   W = Z * V(QP%6, position) << (QP/6),
//   then the H.264 inverse core transform with (x + 32) >> 6 rounding,
//   giving the decoded residual.
// A new block can enter every cycle. Levels are offered to the variable
// length coder on lvl; the decoded residual feeds MC+.
//
// The document adopts published low-complexity transform/quantization
// methods and states only that DQ finishes one 4x4 block in two cycles; the
// arithmetic here is the H.264/AVC standard's, the split of the four steps
// over the two cycles is this design's choice.
module dq
  import mc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  resblk_t              res,
  input  logic [5:0]           qp,
  input  logic                 intra,
  output logic                 lvl_valid,
  output lvlblk_t              lvl,
  output logic                 rres_valid,
  output logic [15:0][15:0]    rres
);
  // quantization multipliers and dequantization scales, indexed by QP%6
  function automatic int mf(input int r, input int i, input int j);
    int a[6] = '{13107, 11916, 10082, 9362, 8192, 7282};
    int b[6] = '{5243, 4660, 4194, 3647, 3355, 2893};
    int c[6] = '{8066, 7490, 6554, 5825, 5243, 4559};
    if (i % 2 == 0 && j % 2 == 0) return a[r];
    else if (i % 2 == 1 && j % 2 == 1) return b[r];
    else return c[r];
  endfunction
  function automatic int vs(input int r, input int i, input int j);
    int a[6] = '{10, 11, 13, 14, 16, 18};
    int b[6] = '{16, 18, 20, 23, 25, 29};
    int c[6] = '{13, 14, 16, 18, 20, 23};
    if (i % 2 == 0 && j % 2 == 0) return a[r];
    else if (i % 2 == 1 && j % 2 == 1) return b[r];
    else return c[r];
  endfunction

  // 1-D forward core transform of four values
  function automatic void fwd4(input int x0, input int x1, input int x2, input int x3,
                               output int y0, output int y1, output int y2, output int y3);
    int s03, s12, d03, d12;
    s03 = x0 + x3; d03 = x0 - x3;
    s12 = x1 + x2; d12 = x1 - x2;
    y0 = s03 + s12;
    y2 = s03 - s12;
    y1 = 2 * d03 + d12;
    y3 = d03 - 2 * d12;
  endfunction
  // 1-D inverse core transform of four values
  function automatic void inv4(input int w0, input int w1, input int w2, input int w3,
                               output int x0, output int x1, output int x2, output int x3);
    int e0, e1, e2, e3;
    e0 = w0 + w2;
    e1 = w0 - w2;
    e2 = (w1 >>> 1) - w3;
    e3 = w1 + (w3 >>> 1);
    x0 = e0 + e3;
    x1 = e1 + e2;
    x2 = e1 - e2;
    x3 = e0 - e3;
  endfunction

  // ---------------- cycle 1: transform and quantization
  lvlblk_t    lvl_d;
  logic [5:0] qp_q;
  always_comb begin
    int t[16], y[16];
    int qb, rem, fq, mag, z;
    qb  = 15 + int'(qp) / 6;
    rem = int'(qp) % 6;
    fq  = intra ? (1 << qb) / 3 : (1 << qb) / 6;
    for (int r = 0; r < 4; r++)   // rows
      fwd4(int'(signed'(res[4*r])), int'(signed'(res[4*r+1])), int'(signed'(res[4*r+2])),
           int'(signed'(res[4*r+3])), t[4*r], t[4*r+1], t[4*r+2], t[4*r+3]);
    for (int cl = 0; cl < 4; cl++) // columns
      fwd4(t[cl], t[4+cl], t[8+cl], t[12+cl], y[cl], y[4+cl], y[8+cl], y[12+cl]);
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        mag = (y[4*i+j] < 0) ? -y[4*i+j] : y[4*i+j];
        z   = (mag * mf(rem, i, j) + fq) >> qb;
        lvl_d[4*i+j] = 16'((y[4*i+j] < 0) ? -z : z);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lvl_valid <= 1'b0;
      lvl       <= '0;
      qp_q      <= '0;
    end else begin
      lvl_valid <= in_valid;
      lvl       <= lvl_d;
      qp_q      <= qp;
    end
  end

  // ---------------- cycle 2: inverse quantization and inverse transform
  logic [15:0][15:0] rres_d;
  always_comb begin
    int w[16], t[16], x[16];
    int sh, rem;
    sh  = int'(qp_q) / 6;
    rem = int'(qp_q) % 6;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        w[4*i+j] = (int'(signed'(lvl[4*i+j])) * vs(rem, i, j)) <<< sh;
    for (int r = 0; r < 4; r++)
      inv4(w[4*r], w[4*r+1], w[4*r+2], w[4*r+3], t[4*r], t[4*r+1], t[4*r+2], t[4*r+3]);
    for (int cl = 0; cl < 4; cl++)
      inv4(t[cl], t[4+cl], t[8+cl], t[12+cl], x[cl], x[4+cl], x[8+cl], x[12+cl]);
    for (int i = 0; i < 16; i++) rres_d[i] = 16'((x[i] + 32) >>> 6);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rres_valid <= 1'b0;
      rres       <= '0;
    end else begin
      rres_valid <= lvl_valid;
      rres       <= rres_d;
    end
  end
endmodule
