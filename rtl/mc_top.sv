// Motion compensation (MC) unit with embedded rate-distortion optimisation.
//
// The unit decides the coding mode of one 16x16 luma macroblock by
// pre-coding candidates and comparing their Lagrangian costs
// J = D + lambda*R. Every candidate 4x4 block runs through the same
// five-stage pipeline, one block per cycle:
//   ISSUE  prediction formed (INTRA interpolation or inter buffer) and
//          loaded into the 8-bit x 16 register file; current block read
//          from the four-bank current data buffer
//   MC-    residual = current - prediction, into DQ
//   DQ     transform + quantization (cycle 1), inverse (cycle 2)
//   MC+    reconstruction and distortion (sum of squared differences)
//   COST   bits from the external variable length coder (vlc_bits, same
//          cycle as vlc_valid) and J = D + lambda*R
// A cost is visible to the controller five cycles after its block issued.
//
// Mode search, in this order, after start:
//  1. INTRA 4x4, block by block in z-scan order. Modes 0, 1, 2 issue on
//     three consecutive cycles; when they have drained, the 3-step tree
//     picks mode 7 or 8, then one of 5/3/6/4, each issued after the previous
//     cost is known. If the best cost exceeds the threshold (beta times the
//     average best cost of the top and left blocks inside the macroblock),
//     remaining modes are tried one at a time. The best mode's
//     reconstruction is written to the reference (reconstruction) buffer
//     before the next block starts, because the next block predicts from
//     it. Without compensation a block takes 18 cycles, 288 per macroblock.
//  2. INTRA 16x16: the counts of modes 0/1/2 among the 16 chosen 4x4 modes
//     select none, one or two 16x16 candidates; each streams its 16 blocks
//     (16 issue cycles + 5 drain cycles).
//  3. INTER: whenever motion estimation has filled the inter buffer with a
//     candidate's interpolated prediction it pulses inter_go; the candidate
//     streams like a 16x16 one. mb_finish ends the search.
// Residuals and predictions of the candidate being evaluated go to one set
// of the Differential/Reference double buffer while the other set holds the
// best candidate so far; the sets swap when a candidate wins. After done,
// out_rd_* reads the winner's residual and prediction (one cycle latency)
// and rec_rd_* the INTRA 4x4 reconstruction.
//
// Handshake: start is accepted in idle (busy low). inter_ready is high
// while the unit waits for inter_go or mb_finish; both are ignored
// otherwise. done pulses for one cycle with the results valid until the
// next start. The current data buffer has two pages: cur_wr_* always writes
// the page that is not being coded, so the next macroblock can be loaded at
// any time while the present one is processed; start switches to the page
// just filled. The inter buffer is written through inter_wr_* while no
// INTER candidate is streaming.
//
// The pipeline stages, the 3-step/compensation INTRA 4x4 search, the 16x16
// candidate rule, the buffers and their use follow the document. The exact
// stage boundaries, the handshake, the serial order INTRA 4x4 -> 16x16 ->
// INTER, the SSD distortion and the fixed-point beta are this design's
// choices. Chroma, the deblocking filter and the variable length coder are
// outside this unit.
module mc_top
  import mc_pkg::*;
#(
  parameter int unsigned BETA_Q4 = 16,   // threshold factor beta in 1/16 units (beta = 1)
  parameter int unsigned CUR_DEPTH = 64  // words per current data buffer bank (two pages)
) (
  input  logic              clk,
  input  logic              rst_n,
  // DMA: current macroblock, 32 bits per cycle
  input  logic              cur_wr_en,
  input  logic [6:0]        cur_wr_idx,
  input  logic [31:0]       cur_wr_data,
  // neighbouring reconstructed pixels of the macroblock
  input  pix_t [19:0]       mb_top,
  input  pix_t [15:0]       mb_left,
  input  pix_t              mb_corner,
  // motion estimation: interpolated prediction of one INTER candidate
  input  logic              inter_wr_en,
  input  logic [3:0]        inter_wr_blk,
  input  blk_t              inter_wr_data,
  // rate control
  input  logic [5:0]        qp,
  input  logic [15:0]       lambda,
  // control
  input  logic              start,
  input  logic              inter_go,
  input  logic [3:0]        inter_id,
  input  logic              mb_finish,
  output logic              busy,
  output logic              inter_ready,
  output logic              done,
  // variable length coder
  output logic              vlc_valid,
  output tag_t              vlc_tag,
  output lvlblk_t           vlc_lvl,
  input  logic [11:0]       vlc_bits,
  // results
  output mbtype_e           mb_type,
  output logic [15:0][3:0]  i4_modes,
  output mbcost_t           i4_cost,
  output logic              i16_valid,
  output logic [1:0]        i16_mode,
  output mbcost_t           i16_cost,
  output logic              inter_valid,
  output logic [3:0]        inter_best_id,
  output mbcost_t           inter_cost,
  output mbcost_t           best_cost,
  // readout of the chosen candidate
  input  logic              out_rd_en,
  input  logic [3:0]        out_rd_blk,
  output resblk_t           out_res,
  output blk_t              out_pred,
  input  logic [3:0]        rec_rd_blk,
  output blk_t              rec_data
);

  typedef enum logic [3:0] {
    S_IDLE, S_I4_START, S_I4_WAIT, S_I4_END,
    S_I16_ISSUE, S_I16_WAIT, S_INTER_IDLE, S_INTER_ISSUE, S_INTER_WAIT, S_DONE
  } state_e;

  state_e state;

  // ---------------------------------------------------------------- control registers
  logic [3:0]  blk;          // block being issued / searched
  logic [1:0]  issue_cnt;    // INTRA 4x4 step-1 issue counter
  logic [3:0]  i16_cand;     // remaining 16x16 candidates
  logic [1:0]  i16_cur;      // 16x16 mode being streamed
  logic [3:0]  inter_cur;    // INTER candidate being streamed
  logic        cur_page;     // current buffer page being coded (DMA fills the other)
  logic        work_set;     // resref set receiving the current candidate
  logic        best_set;     // resref set holding the best candidate
  mbcost_t     cand_total;   // running cost of a 16x16 / INTER candidate

  cost_t [8:0] cost_r;       // INTRA 4x4 costs of the current block
  logic  [8:0] mask_r;
  cost_t       blk_best_cost;
  logic  [3:0] blk_best_mode;
  blk_t        blk_best_rec;
  cost_t [15:0] blk_cost;    // committed best cost per 4x4 block

  // ---------------------------------------------------------------- pipeline registers
  logic    v1, v2, v3, v4;
  tag_t    tag1, tag2, tag3, tag4;
  blk_t    cur_q, pred_q, cur2, pred2, cur3, pred3, pred4, rec4;
  resblk_t res1, res2, res3, res4;
  lvlblk_t lvl3, lvl4;
  logic [19:0] sse4;

  logic pipe_empty;
  assign pipe_empty = !(v1 || v2 || v3 || v4);

  // ---------------------------------------------------------------- issue
  logic       issue;
  src_e       issue_src;
  logic [3:0] issue_mode;
  logic [3:0] issue_blk;

  // mode selection
  cost_t th;
  logic  th_valid;
  logic  sel_next_valid, sel_finished, sel_comp;
  logic [3:0] sel_next_mode;

  always_comb begin
    logic [1:0] bx, by;
    logic [35:0] avg;
    bx = blk_x(blk);
    by = blk_y(blk);
    th_valid = (bx != 2'd0) || (by != 2'd0);
    if (bx != 2'd0 && by != 2'd0)
      avg = (36'(blk_cost[zpos(bx, by - 2'd1)]) + 36'(blk_cost[zpos(bx - 2'd1, by)])) >> 1;
    else if (by != 2'd0)
      avg = 36'(blk_cost[zpos(bx, by - 2'd1)]);
    else
      avg = 36'(blk_cost[zpos(bx - 2'd1, by)]);
    avg = (avg * 36'(BETA_Q4)) >> 4;
    th  = (avg > 36'hFFFF_FFFF) ? 32'hFFFF_FFFF : avg[31:0];
  end

  function automatic logic [3:0] zpos(input logic [1:0] bx, input logic [1:0] by);
    return {by[1], bx[1], by[0], bx[0]};
  endfunction

  intra4_modesel u_sel (
    .cost(cost_r), .done_mask(mask_r), .cost_min(blk_best_cost),
    .th(th), .th_valid(th_valid),
    .next_valid(sel_next_valid), .next_mode(sel_next_mode),
    .finished(sel_finished), .compensating(sel_comp)
  );

  logic       i16_skip;
  logic [3:0] i16_cand_d;
  intra16_modesel u_sel16 (.modes4(i4_modes), .skip(i16_skip), .cand(i16_cand_d));

  always_comb begin
    issue      = 1'b0;
    issue_src  = SRC_I4;
    issue_mode = '0;
    issue_blk  = blk;
    unique case (state)
      S_I4_START: begin
        issue      = 1'b1;
        issue_mode = 4'(issue_cnt);
      end
      S_I4_WAIT: begin
        if (pipe_empty && sel_next_valid) begin
          issue      = 1'b1;
          issue_mode = sel_next_mode;
        end
      end
      S_I16_ISSUE: begin
        issue      = 1'b1;
        issue_src  = SRC_I16;
        issue_mode = 4'(i16_cur);
      end
      S_INTER_ISSUE: begin
        issue      = 1'b1;
        issue_src  = SRC_INTER;
        issue_mode = inter_cur;
      end
      default: ;
    endcase
  end

  // prediction sources
  pix_t [7:0] nb_top;
  pix_t [3:0] nb_left;
  pix_t       nb_corner;
  blk_t       p4, p16, pinter, p_intra;
  logic       rec_wr;

  recon_buf u_recon (
    .clk(clk), .wr_en(rec_wr), .wr_blk(blk), .wr_data(blk_best_rec),
    .mb_top(mb_top), .mb_left(mb_left), .mb_corner(mb_corner),
    .nb_blk(issue_blk), .nb_top(nb_top), .nb_left(nb_left), .nb_corner(nb_corner),
    .rd_blk(rec_rd_blk), .rd_data(rec_data)
  );

  intra4_interp u_i4 (
    .top(nb_top), .left(nb_left), .corner(nb_corner), .mode(issue_mode), .pred(p4)
  );

  intra16_interp u_i16 (
    .top(mb_top[15:0]), .left(mb_left), .corner(mb_corner), .mode(issue_mode[1:0]),
    .bx(blk_x(issue_blk)), .by(blk_y(issue_blk)), .pred(p16)
  );

  inter_buf u_inter (
    .clk(clk), .wr_en(inter_wr_en), .wr_blk(inter_wr_blk), .wr_data(inter_wr_data),
    .rd_blk(issue_blk), .rd_data(pinter)
  );

  assign p_intra = (issue_src == SRC_I16) ? p16 : p4;

  pred_regfile u_rf (
    .clk(clk), .load(issue), .use_inter(issue_src == SRC_INTER),
    .intra_blk(p_intra), .inter_blk(pinter), .q(pred_q)
  );

  cur_buf #(.DEPTH(CUR_DEPTH)) u_cur (
    .clk(clk), .wr_en(cur_wr_en), .wr_page(~cur_page), .wr_idx(cur_wr_idx), .wr_data(cur_wr_data),
    .rd_page(cur_page), .rd_addr(($clog2(CUR_DEPTH) - 1)'({blk_y(issue_blk), blk_x(issue_blk)})),
    .rd_blk(cur_q)
  );

  // ---------------------------------------------------------------- MC-
  mc_sub u_sub (.cur(cur_q), .pred(pred_q), .res(res1));

  // ---------------------------------------------------------------- DQ
  logic              dq_lvl_valid, dq_rres_valid;
  lvlblk_t           dq_lvl;
  logic [15:0][15:0] dq_rres;
  dq u_dq (
    .clk(clk), .rst_n(rst_n), .in_valid(v1), .res(res1), .qp(qp),
    .intra(tag1.src != SRC_INTER),
    .lvl_valid(dq_lvl_valid), .lvl(dq_lvl), .rres_valid(dq_rres_valid), .rres(dq_rres)
  );

  // ---------------------------------------------------------------- MC+
  blk_t        rec3;
  logic [19:0] sse3;
  mc_add u_add (.pred(pred3), .cur(cur3), .rres(dq_rres), .rec(rec3), .sse(sse3));

  // ---------------------------------------------------------------- COST
  cost_t cost4;
  rdo_cost u_cost (.sse(sse4), .bits(vlc_bits), .lambda(lambda), .cost(cost4));

  assign vlc_valid = v4;
  assign vlc_tag   = tag4;
  assign vlc_lvl   = lvl4;

  logic i4_better;
  assign i4_better = (mask_r == '0) || (cost4 < blk_best_cost);

  logic resref_wr;
  assign resref_wr = v4 && ((tag4.src != SRC_I4) || i4_better);

  resref_buf #(.NBLK(16)) u_rr (
    .clk(clk), .wr_en(resref_wr), .wr_set(work_set), .wr_blk(tag4.blk),
    .wr_res(res4), .wr_pred(pred4),
    .rd_en(out_rd_en), .rd_set(best_set), .rd_blk(out_rd_blk),
    .rd_res(out_res), .rd_pred(out_pred)
  );

  // pipeline registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; v4 <= 1'b0;
    end else begin
      v1 <= issue;
      v2 <= v1;
      v3 <= v2;
      v4 <= v3;
    end
  end

  always_ff @(posedge clk) begin
    tag1  <= tag_t'{src: issue_src, mode: issue_mode, blk: issue_blk};
    tag2  <= tag1;  res2  <= res1;  pred2 <= pred_q; cur2 <= cur_q;
    tag3  <= tag2;  res3  <= res2;  pred3 <= pred2;  cur3 <= cur2;  lvl3 <= dq_lvl;
    tag4  <= tag3;  res4  <= res3;  pred4 <= pred3;  rec4 <= rec3;  lvl4 <= lvl3; sse4 <= sse3;
  end

  // ---------------------------------------------------------------- controller
  logic i4_commit;
  assign i4_commit = (state == S_I4_WAIT) && pipe_empty && sel_finished;
  assign rec_wr    = i4_commit;

  logic cand_end;   // a 16x16 or INTER candidate has drained
  assign cand_end = ((state == S_I16_WAIT) || (state == S_INTER_WAIT)) && pipe_empty;

  assign busy        = (state != S_IDLE);
  assign inter_ready = (state == S_INTER_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      cur_page      <= 1'b1;
      blk           <= '0;
      issue_cnt     <= '0;
      i16_cand      <= '0;
      i16_cur       <= '0;
      inter_cur     <= '0;
      work_set      <= 1'b0;
      best_set      <= 1'b1;
      cand_total    <= '0;
      cost_r        <= '0;
      mask_r        <= '0;
      blk_best_cost <= '0;
      blk_best_mode <= '0;
      blk_best_rec  <= '0;
      blk_cost      <= '0;
      done          <= 1'b0;
      mb_type       <= MB_I4;
      i4_modes      <= '0;
      i4_cost       <= '0;
      i16_valid     <= 1'b0;
      i16_mode      <= '0;
      i16_cost      <= '0;
      inter_valid   <= 1'b0;
      inter_best_id <= '0;
      inter_cost    <= '0;
      best_cost     <= '0;
    end else begin
      done <= 1'b0;

      // COST stage results
      if (v4) begin
        if (tag4.src == SRC_I4) begin
          cost_r[tag4.mode] <= cost4;
          mask_r[tag4.mode] <= 1'b1;
          if (i4_better) begin
            blk_best_cost <= cost4;
            blk_best_mode <= tag4.mode;
            blk_best_rec  <= rec4;
          end
        end else begin
          cand_total <= cand_total + mbcost_t'(cost4);
        end
      end

      unique case (state)
        S_IDLE: begin
          if (start) begin
            cur_page    <= ~cur_page;
            state       <= S_I4_START;
            blk         <= '0;
            issue_cnt   <= '0;
            mask_r      <= '0;
            i4_cost     <= '0;
            i16_valid   <= 1'b0;
            inter_valid <= 1'b0;
          end
        end
        S_I4_START: begin
          issue_cnt <= issue_cnt + 2'd1;
          if (issue_cnt == 2'd2) state <= S_I4_WAIT;
        end
        S_I4_WAIT: begin
          if (i4_commit) begin
            i4_modes[blk] <= blk_best_mode;
            blk_cost[blk] <= blk_best_cost;
            i4_cost       <= i4_cost + mbcost_t'(blk_best_cost);
            mask_r        <= '0;
            issue_cnt     <= '0;
            if (blk == 4'd15) begin
              state <= S_I4_END;
            end else begin
              blk   <= blk + 4'd1;
              state <= S_I4_START;
            end
          end
        end
        S_I4_END: begin
          // INTRA 4x4 is the first complete candidate
          mb_type    <= MB_I4;
          best_cost  <= i4_cost;
          best_set   <= work_set;
          work_set   <= ~work_set;
          cand_total <= '0;
          blk        <= '0;
          if (i16_skip) begin
            state <= S_INTER_IDLE;
          end else begin
            i16_cand <= i16_cand_d;
            i16_cur  <= first_mode(i16_cand_d);
            state    <= S_I16_ISSUE;
          end
        end
        S_I16_ISSUE, S_INTER_ISSUE: begin
          blk <= blk + 4'd1;
          if (blk == 4'd15) state <= (state == S_I16_ISSUE) ? S_I16_WAIT : S_INTER_WAIT;
        end
        S_I16_WAIT: begin
          if (cand_end) begin
            cand_total <= '0;
            if (!i16_valid || cand_total < i16_cost) begin
              i16_valid <= 1'b1;
              i16_cost  <= cand_total;
              i16_mode  <= i16_cur;
            end
            if (cand_total < best_cost) begin
              mb_type   <= MB_I16;
              best_cost <= cand_total;
              best_set  <= work_set;
              work_set  <= ~work_set;
            end
            if ((i16_cand & ~(4'b0001 << i16_cur)) == 4'b0000) begin
              state <= S_INTER_IDLE;
            end else begin
              i16_cand <= i16_cand & ~(4'b0001 << i16_cur);
              i16_cur  <= first_mode(i16_cand & ~(4'b0001 << i16_cur));
              state    <= S_I16_ISSUE;
            end
          end
        end
        S_INTER_IDLE: begin
          if (inter_go) begin
            inter_cur <= inter_id;
            blk       <= '0;
            state     <= S_INTER_ISSUE;
          end else if (mb_finish) begin
            state <= S_DONE;
          end
        end
        S_INTER_WAIT: begin
          if (cand_end) begin
            cand_total <= '0;
            if (!inter_valid || cand_total < inter_cost) begin
              inter_valid   <= 1'b1;
              inter_cost    <= cand_total;
              inter_best_id <= inter_cur;
            end
            if (cand_total < best_cost) begin
              mb_type   <= MB_INTER;
              best_cost <= cand_total;
              best_set  <= work_set;
              work_set  <= ~work_set;
            end
            state <= S_INTER_IDLE;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  function automatic logic [1:0] first_mode(input logic [3:0] m);
    for (int i = 3; i >= 0; i--)
      if (m[i]) first_mode = 2'(i);
    if (m == '0) first_mode = 2'd0;
  endfunction

  // a candidate's prediction must not change while it streams
  assert property (@(posedge clk) disable iff (!rst_n) (state == S_INTER_ISSUE) |-> !inter_wr_en)
    else $error("inter buffer written while a candidate streams");

endmodule
