// var_carry_skip_adder: variable-block-size carry skip adder.
//
// Same skip mechanism as carry_skip_adder, but block sizes grow from both
// ends of the word towards the middle (FIRST, FIRST+1, ... from the LSB and
// from the MSB, the remainder forming the middle block), so that short
// blocks sit where a carry is generated or consumed and long blocks are
// skipped. The size sequence is this design's choice. Combinational.
module var_carry_skip_adder #(
  parameter int unsigned W     = 64,
  parameter int unsigned FIRST = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  // Bit i set when a block starts at bit i; bit W always set.
  function automatic logic [W:0] block_starts();
    logic [W:0] m;
    int lo, hi, sz;
    m  = '0;
    lo = 0;
    hi = int'(W);
    sz = int'(FIRST);
    while (hi - lo > 2 * sz) begin
      m[lo] = 1'b1;
      lo    = lo + sz;
      hi    = hi - sz;
      m[hi] = 1'b1;
      sz    = sz + 1;
    end
    m[lo] = 1'b1;
    m[W]  = 1'b1;
    return m;
  endfunction

  localparam logic [W:0] STARTS = block_starts();

  logic [W-1:0] g, p;
  always_comb begin
    logic c, cblk, pblk;
    g    = a & b;
    p    = a ^ b;
    c    = cin;
    cblk = cin;
    pblk = 1'b1;
    for (int i = 0; i < int'(W); i++) begin
      if (STARTS[i]) begin
        cblk = c;
        pblk = 1'b1;
      end
      s[i] = p[i] ^ c;
      c    = g[i] | (p[i] & c);
      pblk = pblk & p[i];
      if (STARTS[i+1])
        c = pblk ? cblk : c;     // skip multiplexer at the block end
    end
    cout = c;
  end
endmodule
