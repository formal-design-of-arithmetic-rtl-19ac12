// rb_adder_tree: adds N radix-2 signed-digit numbers with a binary tree of
// redundant-binary adders.
//
// All operands share one W-digit frame; the result is their sum modulo 2^W
// (the digit each rba adds beyond position W-1 is dropped, which changes
// the value only by a multiple of 2^W). Each level adds neighbouring
// operands in pairs (0+1, 2+3, ...), an odd last one passes to the next
// level, so four operands give RBA0(op0, op1), RBA1(op2, op3) and RBA2 on
// their sums. Depth is ceil(log2 N) adders of constant delay.
// Combinational.
module rb_adder_tree
  import arith_pkg::*;
#(
  parameter int unsigned N = 4,
  parameter int unsigned W = 16
) (
  input  sd2_digit_t [N-1:0][W-1:0] ops,
  output sd2_digit_t [W-1:0]        sum
);
  function automatic int cnt(int l);
    int n;
    n = int'(N);
    for (int i = 0; i < l; i++) n = (n + 1) / 2;
    return n;
  endfunction
  function automatic int levels();
    int l;
    l = 0;
    while (cnt(l) > 1) l++;
    return l;
  endfunction

  localparam int unsigned L = levels();
  sd2_digit_t [L:0][N-1:0][W-1:0] lv;

  assign lv[0] = ops;
  for (genvar l = 0; l < L; l++) begin : g_level
    localparam int unsigned NI = cnt(l);
    localparam int unsigned G  = NI / 2;
    for (genvar k = 0; k < G; k++) begin : g_rba
      sd2_digit_t [W:0] s;
      rba #(.W(W)) u_add (.x(lv[l][2*k]), .y(lv[l][2*k+1]), .s(s));
      assign lv[l+1][k] = s[W-1:0];
    end
    if (NI % 2 == 1) begin : g_odd
      assign lv[l+1][G] = lv[l][NI-1];
    end
    for (genvar u = (NI + 1) / 2; u < N; u++) begin : g_unused
      assign lv[l+1][u] = '0;
    end
  end
  assign sum = lv[L][0];
endmodule
