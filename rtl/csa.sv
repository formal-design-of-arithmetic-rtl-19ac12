// csa: word-level carry-save adder, a row of (3,2) counters.
//
// s + c = x + y + z (mod 2^W): bit i of s is the full-adder sum of bit i,
// and the full-adder carry of bit i is placed at bit i+1 of c (c[0] = 0, the
// carry out of bit W-1 is dropped). No carry propagates. Combinational.
module csa #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W-1:0] cy;
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.x(x[i]), .y(y[i]), .z(z[i]), .s(s[i]), .c(cy[i]));
  end
  assign c = {cy[W-2:0], 1'b0};
endmodule
