// rca: ripple carry adder, {cout, s} = a + b + cin.
//
// W full adders in a chain; the carry ripples from bit 0 to bit W-1, so the
// delay grows linearly with W. It is the RCA leaf used by the signed-digit
// to two's complement converter and one of the two-operand algorithms of the
// library (the area-optimised one). Combinational; unsigned/modular, so it
// also adds two's complement words when cout is ignored.
module rca #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.x(a[i]), .y(b[i]), .z(c[i]), .s(s[i]), .c(c[i+1]));
  end
  assign cout = c[W];
endmodule
