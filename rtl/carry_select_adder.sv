// carry_select_adder: carry select adder.
//
// The lowest BLK-bit block is a plain ripple carry adder. Every higher block
// is built twice, once for carry-in 0 and once for carry-in 1, both ripple
// carry adders working in parallel; the actual carry out of the block below
// then selects sum and carry with a multiplexer, so only the multiplexers lie
// on the block-to-block path. Block size 4 is this design's choice.
// Combinational.
module carry_select_adder #(
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
    if (k == 0) begin : g_first
      rca #(.W(SZ)) u_add (.a(a[LO +: SZ]), .b(b[LO +: SZ]), .cin(c[0]),
                           .s(s[LO +: SZ]), .cout(c[1]));
    end else begin : g_sel
      logic [SZ-1:0] s0, s1;
      logic          c0, c1;
      rca #(.W(SZ)) u_add0 (.a(a[LO +: SZ]), .b(b[LO +: SZ]), .cin(1'b0), .s(s0), .cout(c0));
      rca #(.W(SZ)) u_add1 (.a(a[LO +: SZ]), .b(b[LO +: SZ]), .cin(1'b1), .s(s1), .cout(c1));
      assign s[LO +: SZ] = c[k] ? s1 : s0;
      assign c[k+1]      = c[k] ? c1 : c0;
    end
  end
  assign cout = c[NB];
endmodule
