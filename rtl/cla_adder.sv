// cla_adder: carry lookahead adder, {cout, s} = a + b + cin.
//
// Bit generate g = a&b and propagate p = a^b; every carry is produced
// directly as a two-level sum of products
//   c[i] = g[i-1] | p[i-1]g[i-2] | ... | p[i-1]..p[0]cin
// so no carry waits on another one (fan-in grows with the width). The sums
// are s[i] = p[i] ^ c[i]. Combinational.
module cla_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W-1:0] g, p;
  logic [W:0]   c;
  always_comb begin
    logic term, prop;
    g = a & b;
    p = a ^ b;
    for (int i = 0; i <= int'(W); i++) begin
      term = 1'b0;
      prop = 1'b1;
      // OR over j = i-1 .. 0 of g[j] & p[i-1..j+1], then cin & p[i-1..0]
      for (int j = i - 1; j >= 0; j--) begin
        term = term | (g[j] & prop);
        prop = prop & p[j];
      end
      c[i] = term | (cin & prop);
    end
    s    = p ^ c[W-1:0];
    cout = c[W];
  end
endmodule
