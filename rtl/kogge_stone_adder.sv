// kogge_stone_adder: Kogge-Stone parallel prefix adder.
//
// Carry-in is folded into bit 0's generate. ceil(log2 W) prefix levels;
// at the level with span d every position i >= d combines its (G, P) with
// that of position i-d, giving minimum depth and fan-out 2 at the cost of
// about W*log2(W) prefix cells. c[i+1] = G[i], s[i] = p[i] ^ c[i].
// Combinational.
module kogge_stone_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W-1:0] p, gg, pp;
  always_comb begin
    p  = a ^ b;
    gg = a & b;
    pp = p;
    gg[0] = gg[0] | (p[0] & cin);
    for (int d = 1; d < int'(W); d = d * 2)
      // descending, so that position i-d still holds the previous level
      for (int i = int'(W) - 1; i >= d; i--) begin
        gg[i] = gg[i] | (pp[i] & gg[i-d]);
        pp[i] = pp[i] & pp[i-d];
      end
    s    = p ^ {gg[W-2:0], cin};
    cout = gg[W-1];
  end
endmodule
