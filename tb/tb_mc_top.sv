// End-to-end test of mc_top at its default parameters.
//
// Several macroblocks with different content (noise, vertical and
// horizontal stripes continuing the neighbours, a diagonal ramp, a flat
// area) are loaded through the DMA port; for each, zero to three INTER
// candidates are offered through the inter buffer. A stand-in variable
// length coder answers every block with a bit count computed from its
// quantized levels. The testbench recomputes the whole decision
// independently: every INTRA 4x4 mode cost with the reference predictor and
// transform, the 3-step search with threshold compensation, the 16x16
// candidate rule and costs, the INTER costs and the final choice. It checks
// modes, costs, macroblock type, the reconstruction, the residual and
// prediction read back from the winning set, and the INTRA 4x4 cycle count:
// 18 cycles per 4x4 block (288 per macroblock) plus 5 per extra
// compensation mode. It counts how often each mechanism occurred (threshold
// compensation, DMA overlapping processing, 16x16 skipped, one and two 16x16 candidates, INTER and
// 16x16 winners swapping the double buffer, unavailable above-right pixels)
// and fails if one never did.
`include "tb_util.svh"
module tb_mc_top;
  import mc_pkg::*;
  import mc_ref_pkg::*;

  int checks = 0, failures = 0;
  localparam int QP = 28;
  localparam int LAMBDA = 24;
  localparam int NMB = 11;
  int kinds [NMB] = '{0, 1, 2, 3, 4, 1, 5, 6, 7, 8, 8};
  int ninter [NMB] = '{2, 0, 1, 3, 1, 3, 1, 0, 1, 0, 0};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cur_wr_en, inter_wr_en, start, inter_go, mb_finish, out_rd_en;
  logic [6:0] cur_wr_idx;
  logic [31:0] cur_wr_data;
  pix_t [19:0] mb_top;
  pix_t [15:0] mb_left;
  pix_t mb_corner;
  logic [3:0] inter_wr_blk, inter_id, out_rd_blk, rec_rd_blk;
  blk_t inter_wr_data, out_pred, rec_data;
  resblk_t out_res;
  logic busy, inter_ready, done, vlc_valid, i16_valid, inter_valid;
  tag_t vlc_tag;
  lvlblk_t vlc_lvl;
  logic [11:0] vlc_bits;
  mbtype_e mb_type;
  logic [15:0][3:0] i4_modes;
  mbcost_t i4_cost, i16_cost, inter_cost, best_cost;
  logic [1:0] i16_mode;
  logic [3:0] inter_best_id;

  mc_top dut (
    .clk(clk), .rst_n(rst_n),
    .cur_wr_en(cur_wr_en), .cur_wr_idx(cur_wr_idx), .cur_wr_data(cur_wr_data),
    .mb_top(mb_top), .mb_left(mb_left), .mb_corner(mb_corner),
    .inter_wr_en(inter_wr_en), .inter_wr_blk(inter_wr_blk), .inter_wr_data(inter_wr_data),
    .qp(6'(QP)), .lambda(16'(LAMBDA)),
    .start(start), .inter_go(inter_go), .inter_id(inter_id), .mb_finish(mb_finish),
    .busy(busy), .inter_ready(inter_ready), .done(done),
    .vlc_valid(vlc_valid), .vlc_tag(vlc_tag), .vlc_lvl(vlc_lvl), .vlc_bits(vlc_bits),
    .mb_type(mb_type), .i4_modes(i4_modes), .i4_cost(i4_cost),
    .i16_valid(i16_valid), .i16_mode(i16_mode), .i16_cost(i16_cost),
    .inter_valid(inter_valid), .inter_best_id(inter_best_id), .inter_cost(inter_cost),
    .best_cost(best_cost),
    .out_rd_en(out_rd_en), .out_rd_blk(out_rd_blk), .out_res(out_res), .out_pred(out_pred),
    .rec_rd_blk(rec_rd_blk), .rec_data(rec_data)
  );

  // stand-in variable length coder
  always_comb begin
    blk16_t l;
    for (int i = 0; i < 16; i++) l[i] = int'(signed'(vlc_lvl[i]));
    vlc_bits = vlc_valid ? 12'(vlc_bits_model(l)) : 12'd0;
  end

  // ---------------------------------------------------------------- reference state
  int cur [16][16], nxt_cur [16][16];
  int nxt_top [20], nxt_left [16], nxt_corner, nxt_kind;
  int n_dma_overlap = 0;
  int pic [17][21];               // reconstruction with neighbours, [y+1][x+1]
  int ntop [20], nleft [16], ncorner;
  int exp_modes [16];
  longint exp_blkcost [16];
  longint exp_i4;
  int exp_cycles;
  int exp_res [16][16], exp_pred [16][16];     // winner, per block
  int cand_res [16][16], cand_pred [16][16];   // scratch
  int i4_res [16][16], i4_pred [16][16];

  // mechanism counters
  int n_comp = 0, n_skip = 0, n_i16_one = 0, n_i16_two = 0, n_inter_win = 0, n_i16_win = 0;
  int n_tr_unavail = 0, n_inter_cands = 0;

  function automatic int bxof(int b); return 2 * ((b >> 2) & 1) + (b & 1); endfunction
  function automatic int byof(int b); return 2 * ((b >> 3) & 1) + ((b >> 1) & 1); endfunction

  // cost of coding one 4x4 block of cur at (bx,by) with prediction pred
  function automatic longint blk_cost(int bx, int by, blk16_t pred, bit intra,
                                      output blk16_t rec, output blk16_t res);
    blk16_t lvl, rres;
    longint sse = 0;
    for (int i = 0; i < 16; i++) res[i] = cur[4*by + i/4][4*bx + i%4] - pred[i];
    ref_dq(res, QP, intra, lvl, rres);
    for (int i = 0; i < 16; i++) begin
      int d;
      rec[i] = clip255(pred[i] + rres[i]);
      d = cur[4*by + i/4][4*bx + i%4] - rec[i];
      sse += d * d;
    end
    return sse + longint'(LAMBDA) * vlc_bits_model(lvl);
  endfunction

  task automatic ref_intra4();
    exp_i4 = 0;
    exp_cycles = 0;
    for (int b = 0; b < 16; b++) begin
      int bx = bxof(b), by = byof(b);
      int t[8], l[4], c, order[9], n, best;
      bit tr_avail;
      longint cost[9], th;
      blk16_t pred, rec, res, recs[9], ress[9], preds[9];
      tr_avail = (by == 0) ? 1 : ((bx == 3) ? 0 :
                 (8 * ((by - 1) / 2) + 4 * ((bx + 1) / 2) + 2 * ((by - 1) % 2) + (bx + 1) % 2) < b);
      if (!tr_avail) n_tr_unavail++;
      for (int i = 0; i < 8; i++) t[i] = pic[4*by][4*bx + 1 + ((i < 4 || tr_avail) ? i : 3)];
      for (int i = 0; i < 4; i++) l[i] = pic[4*by + 1 + i][4*bx];
      c = pic[4*by][4*bx];
      for (int m = 0; m < 9; m++) begin
        ref_i4(t, l, c, m, pred);
        cost[m] = blk_cost(bx, by, pred, 1'b1, rec, res);
        recs[m] = rec; ress[m] = res; preds[m] = pred;
      end
      if (bx > 0 && by > 0)
        th = (exp_blkcost[8 * (by / 2) + 4 * (bx / 2) + 2 * (by % 2) + bx % 2 - 0] * 0) +
             ((exp_blkcost[8 * ((by - 1) / 2) + 4 * (bx / 2) + 2 * ((by - 1) % 2) + bx % 2] +
               exp_blkcost[8 * (by / 2) + 4 * ((bx - 1) / 2) + 2 * (by % 2) + (bx - 1) % 2]) >> 1);
      else if (by > 0)
        th = exp_blkcost[8 * ((by - 1) / 2) + 4 * (bx / 2) + 2 * ((by - 1) % 2) + bx % 2];
      else if (bx > 0)
        th = exp_blkcost[8 * (by / 2) + 4 * ((bx - 1) / 2) + 2 * (by % 2) + (bx - 1) % 2];
      else
        th = -1;
      ref_search(cost, th, order, n, best);
      if (n > 5) n_comp++;
      exp_cycles += 18 + 5 * (n - 5);
      exp_modes[b] = best;
      exp_blkcost[b] = cost[best];
      exp_i4 += cost[best];
      for (int i = 0; i < 16; i++) begin
        pic[4*by + 1 + i/4][4*bx + 1 + i%4] = recs[best][i];
        i4_res[b][i] = ress[best][i];
        i4_pred[b][i] = preds[best][i];
      end
    end
  endtask

  function automatic longint ref_mb_cost(int src, int mode, blk_t inter_pred [16]);
    longint tot = 0;
    int t16[16], l16[16];
    for (int i = 0; i < 16; i++) begin t16[i] = ntop[i]; l16[i] = nleft[i]; end
    for (int b = 0; b < 16; b++) begin
      blk16_t pred, rec, res;
      if (src == 1) ref_i16(t16, l16, ncorner, mode, bxof(b), byof(b), pred);
      else for (int i = 0; i < 16; i++) pred[i] = int'(inter_pred[b][i]);
      tot += blk_cost(bxof(b), byof(b), pred, src == 1, rec, res);
      for (int i = 0; i < 16; i++) begin cand_res[b][i] = res[i]; cand_pred[b][i] = pred[i]; end
    end
    return tot;
  endfunction

  // ---------------------------------------------------------------- stimulus
  int cyc = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (cur_wr_en && busy) n_dma_overlap++;
  int first_i4_issue, last_i4_commit;
  always @(posedge clk) begin
    if (dut.issue && dut.issue_src == SRC_I4 && dut.blk == 4'd0 && dut.issue_cnt == 2'd0 &&
        dut.state == dut.S_I4_START)
      first_i4_issue <= cyc;
    if (dut.i4_commit && dut.blk == 4'd15) last_i4_commit <= cyc;
  end

  // content of the next macroblock
  task automatic gen_mb(int kind);
    nxt_kind = kind;
    // picture content
    for (int i = 0; i < 20; i++) nxt_top[i] = $urandom_range(255);
    for (int i = 0; i < 16; i++) nxt_left[i] = $urandom_range(255);
    nxt_corner = $urandom_range(255);
    if (kind == 2) for (int i = 0; i < 16; i++) nxt_left[i] = (i % 3 == 0) ? 30 : 220;
    if (kind == 3) begin
      for (int i = 0; i < 20; i++) nxt_top[i] = 128 + 6 * (i + 1);
      for (int i = 0; i < 16; i++) nxt_left[i] = 128 - 6 * (i + 1);
      nxt_corner = 128;
    end
    if (kind == 1 || kind == 5 || kind == 8) for (int i = 0; i < 20; i++) nxt_top[i] = (i % 4 < 2) ? 40 : 200;
    if (kind == 5) for (int i = 0; i < 16; i++) nxt_left[i] = (i % 3 == 0) ? 30 : 220;
    if (kind == 7) begin
      for (int i = 0; i < 20; i++) nxt_top[i] = 90 + (3 * i) / 4;
      for (int i = 0; i < 16; i++) nxt_left[i] = 90 + i / 2;
      nxt_corner = 90;
    end
    if (kind == 4 || kind == 6) begin
      for (int i = 0; i < 20; i++) nxt_top[i] = 100;
      for (int i = 0; i < 16; i++) nxt_left[i] = 100;
      nxt_corner = 100;
    end
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++)
        case (kind)
          1: nxt_cur[y][x] = nxt_top[x] + $urandom_range(6) - 3;
          2: nxt_cur[y][x] = nxt_left[y] + $urandom_range(6) - 3;
          3: nxt_cur[y][x] = 128 + 6 * (x - y) + $urandom_range(2) - 1;
          4: nxt_cur[y][x] = 100 + $urandom_range(2);
          5: nxt_cur[y][x] = (y < 8) ? nxt_top[x] : nxt_left[y];
          6: nxt_cur[y][x] = 100;
          8: nxt_cur[y][x] = nxt_top[x] + $urandom_range(16) - 8;
          default: nxt_cur[y][x] = $urandom_range(255);
        endcase
    if (kind == 7) begin
      // content equal to the 16x16 plane prediction of its neighbours
      int t16[16], l16[16];
      blk16_t pp;
      for (int i = 0; i < 16; i++) begin t16[i] = nxt_top[i]; l16[i] = nxt_left[i]; end
      for (int b = 0; b < 16; b++) begin
        ref_i16(t16, l16, nxt_corner, 3, bxof(b), byof(b), pp);
        for (int i = 0; i < 16; i++) nxt_cur[4*byof(b) + i/4][4*bxof(b) + i%4] = pp[i];
      end
    end
  endtask

  // DMA of the next macroblock: 64 luma words and 32 chroma words
  task automatic dma_mb();
    for (int w = 0; w < 96; w++) begin
      @(negedge clk);
      cur_wr_en = 1; cur_wr_idx = 7'(w);
      for (int k = 0; k < 4; k++)
        cur_wr_data[8*k +: 8] = (w < 64) ? 8'(nxt_cur[w / 4][4 * (w % 4) + k]) : 8'($urandom);
    end
    @(negedge clk); cur_wr_en = 0;
  endtask

  task automatic run_mb(int n_inter);
    int kind;
    blk_t ipred [16];
    longint c16[4], cinter, best;
    int bt, i16m, ibest;
    bit i16v, interv;
    longint i16c, interc;
    logic [3:0] cand;
    int n0, n1, n2;
    // take over the macroblock loaded last
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) cur[y][x] = nxt_cur[y][x];
    for (int i = 0; i < 20; i++) ntop[i] = nxt_top[i];
    for (int i = 0; i < 16; i++) nleft[i] = nxt_left[i];
    ncorner = nxt_corner;
    kind = nxt_kind;
    for (int i = 0; i < 20; i++) mb_top[i] = 8'(ntop[i]);
    for (int i = 0; i < 16; i++) mb_left[i] = 8'(nleft[i]);
    mb_corner = 8'(ncorner);
    for (int y = 0; y < 17; y++) for (int x = 0; x < 21; x++) pic[y][x] = 0;
    for (int i = 0; i < 20; i++) pic[0][i + 1] = ntop[i];
    for (int i = 0; i < 16; i++) pic[i + 1][0] = nleft[i];
    pic[0][0] = ncorner;

    // reference: INTRA 4x4
    ref_intra4();
    bt = 0; best = exp_i4;
    for (int b = 0; b < 16; b++) for (int i = 0; i < 16; i++) begin
      exp_res[b][i] = i4_res[b][i]; exp_pred[b][i] = i4_pred[b][i];
    end
    // reference: 16x16
    n0 = 0; n1 = 0; n2 = 0;
    for (int b = 0; b < 16; b++) begin
      n0 += int'(exp_modes[b] == 0); n1 += int'(exp_modes[b] == 1); n2 += int'(exp_modes[b] == 2);
    end
    if (n0 + n1 + n2 < 8) cand = 4'b0000;
    else if (n0 > 12) cand = 4'b0001;
    else if (n0 > 9 && n0 < 12) cand = 4'b1001;
    else if (n1 > 12) cand = 4'b0010;
    else if (n1 > 9 && n1 < 12) cand = 4'b1010;
    else cand = 4'b1100;
    if (cand == 0) n_skip++;
    else if ($countones(cand) == 1) n_i16_one++;
    else n_i16_two++;
    i16v = 0; i16c = 0; i16m = 0;
    for (int m = 0; m < 4; m++) if (cand[m]) begin
      longint c = ref_mb_cost(1, m, ipred);
      if (!i16v || c < i16c) begin i16v = 1; i16c = c; i16m = m; end
      if (c < best) begin
        best = c; bt = 1;
        for (int b = 0; b < 16; b++) for (int i = 0; i < 16; i++) begin
          exp_res[b][i] = cand_res[b][i]; exp_pred[b][i] = cand_pred[b][i];
        end
      end
    end

    // run the unit
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!inter_ready) @(negedge clk);
    `CHECK(int'(last_i4_commit - first_i4_issue + 1) == exp_cycles,
           $sformatf("INTRA 4x4 cycles %0d expected %0d", last_i4_commit - first_i4_issue + 1, exp_cycles))
    for (int b = 0; b < 16; b++)
      `CHECK(int'(i4_modes[b]) == exp_modes[b], $sformatf("kind %0d blk %0d mode %0d exp %0d", kind, b, i4_modes[b], exp_modes[b]))
    `CHECK(longint'(i4_cost) == exp_i4, $sformatf("i4 cost %0d exp %0d", i4_cost, exp_i4))
    `CHECK(i16_valid == i16v, "i16_valid")
    if (i16v) begin
      `CHECK(longint'(i16_cost) == i16c && int'(i16_mode) == i16m,
             $sformatf("i16 cost %0d mode %0d exp %0d %0d", i16_cost, i16_mode, i16c, i16m))
    end

    // INTER candidates
    interv = 0; interc = 0; ibest = 0;
    for (int k = 0; k < n_inter; k++) begin
      longint c;
      for (int b = 0; b < 16; b++) begin
        @(negedge clk);
        inter_wr_en = 1; inter_wr_blk = 4'(b);
        for (int i = 0; i < 16; i++) begin
          int v = cur[4*byof(b) + i/4][4*bxof(b) + i%4];
          v = (k == 0) ? v + $urandom_range(4) - 2 : ((k == 1) ? $urandom_range(255) : v + $urandom_range(40) - 20);
          v = clip255(v);
          inter_wr_data[i] = 8'(v);
          ipred[b][i] = 8'(v);
        end
      end
      @(negedge clk); inter_wr_en = 0;
      c = ref_mb_cost(2, 0, ipred);
      n_inter_cands++;
      if (!interv || c < interc) begin interv = 1; interc = c; ibest = k + 3; end
      if (c < best) begin
        best = c; bt = 2;
        for (int b = 0; b < 16; b++) for (int i = 0; i < 16; i++) begin
          exp_res[b][i] = cand_res[b][i]; exp_pred[b][i] = cand_pred[b][i];
        end
      end
      inter_go = 1; inter_id = 4'(k + 3);
      @(negedge clk); inter_go = 0;
      while (!inter_ready) @(negedge clk);
    end
    mb_finish = 1;
    @(negedge clk); mb_finish = 0;
    while (!done) @(negedge clk);
    if (bt == 1) n_i16_win++;
    if (bt == 2) n_inter_win++;

    `CHECK(inter_valid == interv, "inter_valid")
    if (interv)
      `CHECK(longint'(inter_cost) == interc && int'(inter_best_id) == ibest,
             $sformatf("inter cost %0d id %0d exp %0d %0d", inter_cost, inter_best_id, interc, ibest))
    `CHECK(int'(mb_type) == bt, $sformatf("kind %0d mb_type %0d exp %0d", kind, mb_type, bt))
    `CHECK(longint'(best_cost) == best, $sformatf("best cost %0d exp %0d", best_cost, best))

    // readout of the winner and the INTRA 4x4 reconstruction
    for (int b = 0; b < 16; b++) begin
      @(negedge clk);
      out_rd_en = 1; out_rd_blk = 4'(b); rec_rd_blk = 4'(b);
      @(negedge clk);
      out_rd_en = 0;
      for (int i = 0; i < 16; i++) begin
        `CHECK(int'(signed'(out_res[i])) == exp_res[b][i] && int'(out_pred[i]) == exp_pred[b][i],
               $sformatf("kind %0d readout blk %0d px %0d", kind, b, i))
        `CHECK(int'(rec_data[i]) == pic[4*byof(b) + 1 + i/4][4*bxof(b) + 1 + i%4],
               $sformatf("kind %0d recon blk %0d px %0d", kind, b, i))
      end
    end
    $display("INFO kind %0d: type %0d i4 %0d i16 %0b/%0d inter %0d, i4 cycles %0d", kind, bt, exp_i4,
             cand, i16c, interc, exp_cycles);
  endtask

  initial begin
    cur_wr_en = 0; inter_wr_en = 0; start = 0; inter_go = 0; mb_finish = 0; out_rd_en = 0;
    cur_wr_idx = 0; cur_wr_data = 0; inter_wr_blk = 0; inter_wr_data = '0; inter_id = 0;
    out_rd_blk = 0; rec_rd_blk = 0; mb_top = '0; mb_left = '0; mb_corner = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // macroblock kinds and number of INTER candidates; the DMA loads
    // macroblock i+1 while macroblock i is being coded
    gen_mb(kinds[0]);
    dma_mb();
    for (int i = 0; i < NMB; i++) begin
      fork
        run_mb(ninter[i]);
        if (i + 1 < NMB) begin
          while (!busy) @(negedge clk);
          repeat (20) @(negedge clk);
          gen_mb(kinds[i + 1]);
          dma_mb();
        end
      join
      if (kinds[i] == 6)
        `CHECK(exp_cycles == 288, $sformatf("flat macroblock: INTRA 4x4 took %0d cycles, 288 expected", exp_cycles))
    end
    `CHECK(n_comp > 0, "threshold compensation never happened")
    `CHECK(n_skip > 0, "16x16 search never skipped")
    `CHECK(n_i16_one + n_i16_two > 0, "16x16 never evaluated")
    `CHECK(n_i16_two > 0, "two 16x16 candidates never evaluated")
    `CHECK(n_inter_win > 0, "INTER candidate never won")
    `CHECK(n_i16_win > 0, "16x16 candidate never won")
    `CHECK(n_tr_unavail > 0, "above-right substitution never used")
    `CHECK(n_dma_overlap > 0, "DMA never overlapped macroblock processing")
    $display("INFO mechanisms: compensation %0d, 16x16 skip %0d, one cand %0d, two cands %0d, 16x16 wins %0d, inter wins %0d, inter cands %0d, above-right substituted %0d, DMA words during processing %0d",
             n_comp, n_skip, n_i16_one, n_i16_two, n_i16_win, n_inter_win, n_inter_cands, n_tr_unavail, n_dma_overlap);
    `FINISH
  end
  initial begin #2000000; failures++; `FINISH end
endmodule
