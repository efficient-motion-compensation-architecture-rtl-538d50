// INTRA 16x16 candidate prediction from the 16 selected 4x4 modes.
//
// Counts how many of the 16 4x4 blocks chose modes 0, 1 and 2 and decides
// which 16x16 modes (0 vertical, 1 horizontal, 2 DC, 3 plane) are
// pre-coded:
//   N0+N1+N2 < 8        -> no 16x16 mode is evaluated (skip)
//   N0 > 12             -> mode 0 only
//   9 < N0 < 12         -> modes 0 and 3
//   N1 > 12             -> mode 1 only
//   9 < N1 < 12         -> modes 1 and 3
//   otherwise           -> modes 2 and 3
// cand[m] = 1 when mode m is to be evaluated. Combinational. The conditions
// are those of the document's decision chart, with the comparison operators
// exactly as it prints them.
module intra16_modesel
  import mc_pkg::*;
(
  input  logic [15:0][3:0] modes4,
  output logic             skip,
  output logic [3:0]       cand
);
  logic [4:0] n0, n1, n2;
  always_comb begin
    n0 = '0; n1 = '0; n2 = '0;
    for (int i = 0; i < 16; i++) begin
      n0 += 5'(modes4[i] == 4'd0);
      n1 += 5'(modes4[i] == 4'd1);
      n2 += 5'(modes4[i] == 4'd2);
    end
    skip = (6'(n0) + 6'(n1) + 6'(n2)) < 6'd8;
    if (skip)                      cand = 4'b0000;
    else if (n0 > 5'd12)           cand = 4'b0001;
    else if (n0 > 5'd9 && n0 < 5'd12) cand = 4'b1001;
    else if (n1 > 5'd12)           cand = 4'b0010;
    else if (n1 > 5'd9 && n1 < 5'd12) cand = 4'b1010;
    else                           cand = 4'b1100;
  end
endmodule
