// compressor42: word-level (4;2) compressor.
//
// Four W-bit words in, two out, s + c = x0 + x1 + x2 + x3 (mod 2^W). Each
// bit slice is two full adders in series; the first adder's carry moves one
// place left into the second adder of the next slice (the lateral carry of a
// (4;2) compressor), so no carry travels further than one bit. Depth is
// three XOR delays, which is what makes a (4;2) tree regular.
// Combinational.
module compressor42 #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] x0,
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  input  logic [W-1:0] x3,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W-1:0] t, co;   // first-stage sum and lateral carry
  logic [W-1:0] cy;
  for (genvar i = 0; i < W; i++) begin : g_bit
    logic cin;
    if (i == 0) begin : g_lsb
      assign cin = 1'b0;
    end else begin : g_mid
      assign cin = co[i-1];
    end
    full_adder u_fa1 (.x(x0[i]), .y(x1[i]), .z(x2[i]), .s(t[i]), .c(co[i]));
    full_adder u_fa2 (.x(t[i]),  .y(x3[i]), .z(cin),   .s(s[i]), .c(cy[i]));
  end
  assign c = {cy[W-2:0], 1'b0};
endmodule
