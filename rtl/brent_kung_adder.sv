// brent_kung_adder: Brent-Kung parallel prefix adder.
//
// Carry-in is folded into bit 0's generate. An up-sweep combines (G, P)
// pairs at spans 1, 2, 4, ... into positions 2d-1, 4d-1, ...; a down-sweep
// then fills the remaining positions at spans ..., 2, 1. About 2*log2(W)
// levels with fan-out 2 and only ~2W prefix cells. c[i+1] = G[i].
// Combinational.
module brent_kung_adder #(
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
    int d;
    p  = a ^ b;
    gg = a & b;
    pp = p;
    gg[0] = gg[0] | (p[0] & cin);
    // up-sweep
    d = 1;
    while (d < int'(W)) begin
      for (int i = 2 * d - 1; i < int'(W); i += 2 * d) begin
        gg[i] = gg[i] | (pp[i] & gg[i-d]);
        pp[i] = pp[i] & pp[i-d];
      end
      d = d * 2;
    end
    // down-sweep
    d = d / 2;
    while (d >= 1) begin
      for (int i = 3 * d - 1; i < int'(W); i += 2 * d) begin
        gg[i] = gg[i] | (pp[i] & gg[i-d]);
        pp[i] = pp[i] & pp[i-d];
      end
      d = d / 2;
    end
    s    = p ^ {gg[W-2:0], cin};
    cout = gg[W-1];
  end
endmodule
