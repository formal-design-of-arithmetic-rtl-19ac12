// digit_rba: one digit slice of the redundant-binary (radix-2 signed-digit)
// adder.
//
// Inputs are two signed digits x, y in {-1,0,1}, a positive carry c1_in
// (+1) and a negative carry nc_in (-1) from the slice below. Two full adders
// compute
//   stage 1: 2*c1 + s1 = x.p + y.p + ~x.n
//   stage 2: 2*c2 + s2 = s1 + ~y.n + c1_in,     nc = ~c2
// and the slice satisfies 2*c1 - 2*nc + z = x + y + c1_in - nc_in with the
// sum digit z = (p: s2, n: nc_in). c1 depends only on x and y, nc only on
// x, y and c1_in, and nc_in goes straight to z, so no carry travels more than
// one digit: an adder built from these slices has a constant depth of two
// full adders whatever its width. The two-carry form follows the
// digit slice of the library; the full-adder realisation is this design's.
module digit_rba
  import arith_pkg::*;
(
  input  sd2_digit_t x,
  input  sd2_digit_t y,
  input  logic       c1_in,
  input  logic       nc_in,
  output logic       c1,
  output logic       nc,
  output sd2_digit_t z
);
  logic s1, s2, c2;
  full_adder u_st1 (.x(x.p), .y(y.p), .z(~x.n), .s(s1), .c(c1));
  full_adder u_st2 (.x(s1), .y(~y.n), .z(c1_in), .s(s2), .c(c2));
  assign nc  = ~c2;
  assign z.p = s2;
  assign z.n = nc_in;
endmodule
