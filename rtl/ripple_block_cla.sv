// ripple_block_cla: ripple-block carry lookahead adder.
//
// The word is cut into BLK-bit groups (the last one may be shorter); each
// group is a cla_adder whose carry-out feeds the next group's carry-in, so
// carries are looked ahead inside a group and ripple from group to group.
// Group size 4 is this design's choice. Combinational.
module ripple_block_cla #(
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
  logic [NB:0] c;
  assign c[0] = cin;
  for (genvar k = 0; k < NB; k++) begin : g_blk
    localparam int unsigned LO = k * BLK;
    localparam int unsigned SZ = (W - LO < BLK) ? W - LO : BLK;
    cla_adder #(.W(SZ)) u_cla (.a(a[LO +: SZ]), .b(b[LO +: SZ]), .cin(c[k]),
                               .s(s[LO +: SZ]), .cout(c[k+1]));
  end
  assign cout = c[NB];
endmodule
