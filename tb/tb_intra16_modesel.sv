// Self-checking test of intra16_modesel: directed mode counts at every
// decision boundary of the 16x16 candidate rule plus random mode maps,
// against the rule evaluated in the testbench.
`include "tb_util.svh"
module tb_intra16_modesel;
  import mc_pkg::*;
  int checks = 0, failures = 0;
  logic [15:0][3:0] modes4;
  logic skip;
  logic [3:0] cand;
  intra16_modesel dut (.modes4(modes4), .skip(skip), .cand(cand));

  function automatic logic [4:0] rule(input int n0, input int n1, input int n2);
    // {skip, cand}
    if (n0 + n1 + n2 < 8) return 5'b1_0000;
    if (n0 > 12) return 5'b0_0001;
    if (n0 == 10 || n0 == 11) return 5'b0_1001;
    if (n1 > 12) return 5'b0_0010;
    if (n1 == 10 || n1 == 11) return 5'b0_1010;
    return 5'b0_1100;
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int n0, n1, n2, k;
      logic [4:0] exp;
      if (t < 17 * 17) begin
        // directed: t encodes n0 and n1 (n0 + n1 <= 16), rest mode 2 or 5
        n0 = t / 17; n1 = t % 17;
        if (n0 + n1 > 16) continue;
        k = 0;
        for (int i = 0; i < 16; i++) modes4[i] = 4'd5;
        for (int i = 0; i < n0; i++) modes4[k++] = 4'd0;
        for (int i = 0; i < n1; i++) modes4[k++] = 4'd1;
        if (t % 2 == 0) while (k < 16) modes4[k++] = 4'd2;
      end else begin
        for (int i = 0; i < 16; i++) modes4[i] = 4'($urandom_range(8) % ($urandom_range(1) ? 3 : 9));
      end
      n0 = 0; n1 = 0; n2 = 0;
      for (int i = 0; i < 16; i++) begin
        n0 += int'(modes4[i] == 0); n1 += int'(modes4[i] == 1); n2 += int'(modes4[i] == 2);
      end
      exp = rule(n0, n1, n2);
      #1;
      `CHECK({skip, cand} == exp, $sformatf("n0=%0d n1=%0d n2=%0d got %b exp %b", n0, n1, n2, {skip, cand}, exp))
    end
    `FINISH
  end
  initial begin #100000; failures++; `FINISH end
endmodule
