// han_carlson_adder: Han-Carlson parallel prefix adder.
//
// Carry-in is folded into bit 0's generate. Odd positions first take
// their even neighbour (span 1), then run a Kogge-Stone network among
// themselves (spans 2, 4, ...); a last level gives every even position its
// odd neighbour's prefix. One level more than Kogge-Stone, about half the
// prefix cells. c[i+1] = G[i]. Combinational.
module han_carlson_adder #(
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
    for (int i = 1; i < int'(W); i += 2) begin
      gg[i] = gg[i] | (pp[i] & gg[i-1]);
      pp[i] = pp[i] & pp[i-1];
    end
    for (int d = 2; d < int'(W); d = d * 2)
      for (int i = int'(W) - 1; i >= d; i--)
        if (i % 2 == 1) begin
          gg[i] = gg[i] | (pp[i] & gg[i-d]);
          pp[i] = pp[i] & pp[i-d];
        end
    for (int i = 2; i < int'(W); i += 2) begin
      gg[i] = gg[i] | (pp[i] & gg[i-1]);
      pp[i] = pp[i] & pp[i-1];
    end
    s    = p ^ {gg[W-2:0], cin};
    cout = gg[W-1];
  end
endmodule
