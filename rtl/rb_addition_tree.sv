// rb_addition_tree: multi-operand adder as a tree of redundant-binary adders.
//
// Binary operands are paired into redundant-binary numbers without any logic:
// the pair (a, b) becomes the signed-digit number with positive bits a and
// negative bits ~b, whose value is a + b + 1 (mod 2^W); an unpaired operand
// has no negative bits. rb_adder_tree sums the resulting numbers with
// carry-free RB adders. The output pair is s = positive bits and c = ~(negative
// bits), so s + c = (value - 1) mod 2^W. The +1 of every pair and this -1 are
// cancelled by one constant operand K = 1 - pairs, added before pairing,
// which synthesis folds away. s + c = sum of the operands (mod 2^W).
// Combinational.
module rb_addition_tree
  import arith_pkg::*;
#(
  parameter int unsigned N = 64,
  parameter int unsigned W = 64
) (
  input  logic [N-1:0][W-1:0] ops,
  output logic [W-1:0]        s,
  output logic [W-1:0]        c
);
  localparam int unsigned M  = N + 1;          // operands with the constant
  localparam int unsigned NP = M / 2;          // number of pairs
  localparam int unsigned NR = (M + 1) / 2;    // RB numbers
  localparam logic [W-1:0] K = W'(1) - W'(NP);

  logic [M-1:0][W-1:0]        all;
  sd2_digit_t [NR-1:0][W-1:0] rb;
  sd2_digit_t [W-1:0]         sum;

  assign all = {K, ops};
  always_comb begin
    for (int j = 0; j < int'(NR); j++)
      for (int i = 0; i < int'(W); i++) begin
        rb[j][i].p = all[2*j][i];
        rb[j][i].n = (2*j + 1 < int'(M)) ? ~all[2*j+1][i] : 1'b0;
      end
    for (int i = 0; i < int'(W); i++) begin
      s[i] = sum[i].p;
      c[i] = ~sum[i].n;
    end
  end
  rb_adder_tree #(.N(NR), .W(W)) u_tree (.ops(rb), .sum(sum));
endmodule
