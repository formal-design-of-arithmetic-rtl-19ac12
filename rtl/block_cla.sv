// block_cla: two-level (block) carry lookahead adder.
//
// Bits are grouped in BLK-bit blocks. Each block forms a block generate
// G = g[hi] | p[hi]g[hi-1] | ... and propagate P = p[hi]..p[lo]; a second
// lookahead level computes every block carry-in directly from the block
// G/P and cin, and inside each block the bit carries are looked ahead from
// that block carry-in. Block size 4 is this design's choice. Combinational.
module block_cla #(
  parameter int unsigned W   = 64,
  parameter int unsigned BLK = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int unsigned NB = (W + BLK - 1) / BLK;
  logic [W-1:0]  g, p, c;
  logic [NB-1:0] bg, bp;
  logic [NB:0]   bc;
  always_comb begin
    logic term, prop;
    g = a & b;
    p = a ^ b;
    // level 1: block generate / propagate
    for (int k = 0; k < int'(NB); k++) begin
      bg[k] = 1'b0;
      bp[k] = 1'b1;
      for (int i = k * int'(BLK); i < (k + 1) * int'(BLK) && i < int'(W); i++) begin
        bg[k] = g[i] | (p[i] & bg[k]);
        bp[k] = bp[k] & p[i];
      end
    end
    // level 2: block carries, flat lookahead over blocks
    for (int k = 0; k <= int'(NB); k++) begin
      term = 1'b0;
      prop = 1'b1;
      for (int j = k - 1; j >= 0; j--) begin
        term = term | (bg[j] & prop);
        prop = prop & bp[j];
      end
      bc[k] = term | (cin & prop);
    end
    // bit carries inside each block, flat lookahead from the block carry-in
    for (int i = 0; i < int'(W); i++) begin
      int lo;
      lo   = (i / int'(BLK)) * int'(BLK);
      term = 1'b0;
      prop = 1'b1;
      for (int j = i - 1; j >= lo; j--) begin
        term = term | (g[j] & prop);
        prop = prop & p[j];
      end
      c[i] = term | (bc[i / int'(BLK)] & prop);
    end
    s    = p ^ c;
    cout = bc[NB];
  end
endmodule
