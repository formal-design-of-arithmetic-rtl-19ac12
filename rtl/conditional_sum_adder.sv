// conditional_sum_adder: conditional sum adder.
//
// Level 0 computes, for every bit, its sum and carry for both possible
// carry-ins. Each following level merges neighbouring blocks of size h into
// blocks of size 2h: the lower block's two conditional carries select the
// upper block's conditional sums and carries. After ceil(log2 W) levels
// the whole word has two conditional results and cin picks one.
// Combinational.
module conditional_sum_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  // s0/s1: sum bits assuming the carry into their block is 0/1;
  // c0/c1 indexed by the block's lowest bit: the block's carry-out.
  logic [W-1:0] s0, s1, c0, c1;
  always_comb begin
    s0 = a ^ b;
    s1 = ~(a ^ b);
    c0 = a & b;
    c1 = a | b;
    for (int h = 1; h < int'(W); h = h * 2)
      for (int base = 0; base + h < int'(W); base += 2 * h) begin
        logic lc0, lc1, hc0, hc1;
        lc0 = c0[base];
        lc1 = c1[base];
        hc0 = c0[base+h];
        hc1 = c1[base+h];
        for (int i = base + h; i < base + 2 * h && i < int'(W); i++) begin
          logic u0, u1;
          u0 = s0[i];
          u1 = s1[i];
          s0[i] = lc0 ? u1 : u0;
          s1[i] = lc1 ? u1 : u0;
        end
        c0[base] = lc0 ? hc1 : hc0;
        c1[base] = lc1 ? hc1 : hc0;
      end
    s    = cin ? s1 : s0;
    cout = cin ? c1[0] : c0[0];
  end
endmodule
