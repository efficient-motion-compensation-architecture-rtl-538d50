// INTRA 4x4 mode selection: 3-step candidate tree with threshold compensation.
//
// Decides, from the costs already measured for the current 4x4 block, which
// intra 4x4 mode to pre-code next, or that the search is finished.
//   Step 1: modes 0, 1 and 2 are always evaluated (the caller issues them).
//   Step 2: cost0 < cost1 -> vertical group, evaluate mode 7;
//           otherwise horizontal group, evaluate mode 8.
//   Step 3: vertical:   cost0 < cost7 -> mode 5, else mode 3;
//           horizontal: cost1 < cost8 -> mode 6, else mode 4.
//   Compensation: once the tree is done, if th_valid and cost_min > th
//   (th = beta x average cost of the top and left neighbour blocks, formed by
//   the caller), the lowest-numbered mode not yet evaluated is tried next,
//   and so on until cost_min <= th or all nine modes have been evaluated.
// Inputs: cost[m] and done_mask[m] for m = 0..8, the running minimum
// cost_min. Outputs: next_mode with next_valid, or finished. Combinational.
// The tree and the compensation rule follow the document; the order in which
// the remaining modes are tried is this design's choice.
module intra4_modesel
  import mc_pkg::*;
(
  input  cost_t [8:0] cost,
  input  logic  [8:0] done_mask,
  input  cost_t       cost_min,
  input  cost_t       th,
  input  logic        th_valid,
  output logic        next_valid,
  output logic [3:0]  next_mode,
  output logic        finished,
  output logic        compensating
);
  logic [3:0] step2, step3;
  always_comb begin
    logic vert;
    vert  = cost[0] < cost[1];
    step2 = vert ? 4'd7 : 4'd8;
    if (vert) step3 = (cost[0] < cost[7]) ? 4'd5 : 4'd3;
    else      step3 = (cost[1] < cost[8]) ? 4'd6 : 4'd4;

    next_valid   = 1'b0;
    next_mode    = '0;
    finished     = 1'b0;
    compensating = 1'b0;
    if (!(&done_mask[2:0])) begin
      // step 1 not complete yet: wait
    end else if (!done_mask[step2]) begin
      next_valid = 1'b1;
      next_mode  = step2;
    end else if (!done_mask[step3]) begin
      next_valid = 1'b1;
      next_mode  = step3;
    end else if (th_valid && cost_min > th && !(&done_mask)) begin
      next_valid   = 1'b1;
      compensating = 1'b1;
      for (int m = 8; m >= 0; m--)
        if (!done_mask[m]) next_mode = 4'(m);
    end else begin
      finished = 1'b1;
    end
  end
endmodule
