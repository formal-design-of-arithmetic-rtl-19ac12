// carry_skip_adder: fixed-block-size carry skip adder.
//
// BLK-bit ripple carry blocks. When every bit of a block propagates, the
// block's carry-in is passed straight to its carry-out (the skip path);
// otherwise the rippled carry leaves the block. Block size 4 is this
// design's choice. Combinational.
module carry_skip_adder #(
  parameter int unsigned W   = 64,
  parameter int unsigned BLK = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W-1:0] g, p;
  always_comb begin
    logic c, cblk, pblk;
    g    = a & b;
    p    = a ^ b;
    c    = cin;
    cblk = cin;
    pblk = 1'b1;
    for (int i = 0; i < int'(W); i++) begin
      if (i % int'(BLK) == 0) begin
        cblk = c;
        pblk = 1'b1;
      end
      s[i] = p[i] ^ c;
      c    = g[i] | (p[i] & c);
      pblk = pblk & p[i];
      if (i % int'(BLK) == int'(BLK) - 1 || i == int'(W) - 1)
        c = pblk ? cblk : c;     // skip multiplexer at the block end
    end
    cout = c;
  end
endmodule
