// Self-checking test of dq: random residual blocks at random QP (0..51),
// intra and inter rounding, one block per cycle. Levels must appear one
// cycle and the decoded residual two cycles after the input, equal to the
// matrix-form reference.
`include "tb_util.svh"
module tb_dq;
  import mc_pkg::*;
  import mc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid, intra, lvl_valid, rres_valid;
  resblk_t res;
  logic [5:0] qp;
  lvlblk_t lvl;
  logic [15:0][15:0] rres;
  always #5 clk = ~clk;
  dq dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .res(res), .qp(qp), .intra(intra),
          .lvl_valid(lvl_valid), .lvl(lvl), .rres_valid(rres_valid), .rres(rres));
  int exp_lvl [700][16], exp_rres [700][16];
  int n_in = 0, n_lvl = 0, n_rres = 0;
  initial begin
    in_valid = 0; res = '0; qp = 0; intra = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      blk16_t r, l, rr;
      int amp;
      @(negedge clk);
      in_valid = (t % 7 != 3);
      qp = 6'($urandom_range(51));
      intra = 1'($urandom);
      amp = (t % 3 == 0) ? 255 : ((t % 3 == 1) ? 20 : 4);
      for (int i = 0; i < 16; i++) begin
        r[i] = int'($urandom_range(2 * amp)) - amp;
        res[i] = 9'(r[i]);
      end
      if (in_valid) begin
        ref_dq(r, int'(qp), intra, l, rr);
        for (int i = 0; i < 16; i++) begin
          exp_lvl[n_in][i] = l[i];
          exp_rres[n_in][i] = rr[i];
        end
        n_in++;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (4) @(posedge clk);
    `CHECK(n_lvl == n_in && n_rres == n_in, $sformatf("count in %0d lvl %0d rres %0d", n_in, n_lvl, n_rres))
    `FINISH
  end
  // outputs, checked right after each edge; latency: input sampled at edge k,
  // levels valid after edge k+1... so valid flags line up with the queues
  blk16_t e;
  always @(posedge clk) begin
    #1;
    if (lvl_valid) begin
      for (int i = 0; i < 16; i++) e[i] = exp_lvl[n_lvl][i];
      n_lvl++;
      for (int i = 0; i < 16; i++)
        `CHECK(int'(signed'(lvl[i])) == e[i], $sformatf("lvl %0d px %0d got %0d exp %0d", n_lvl, i, int'(signed'(lvl[i])), e[i]))
    end
    if (rres_valid) begin
      for (int i = 0; i < 16; i++) e[i] = exp_rres[n_rres][i];
      n_rres++;
      for (int i = 0; i < 16; i++)
        `CHECK(int'(signed'(rres[i])) == e[i], $sformatf("rres %0d px %0d got %0d exp %0d", n_rres, i, int'(signed'(rres[i])), e[i]))
    end
  end
  // latency check: lvl_valid follows in_valid by exactly one cycle
  logic in_d1, in_d2;
  always @(posedge clk) begin
    #2;
    if (rst_n) begin
      `CHECK(lvl_valid == in_d1, "lvl latency")
      `CHECK(rres_valid == in_d2, "rres latency")
    end
  end
  always @(posedge clk) begin in_d2 <= in_d1; in_d1 <= in_valid && rst_n; end
  initial begin in_d1 = 0; in_d2 = 0; end
  initial begin #100000; failures++; `FINISH end
endmodule
