// booth_digit_enc: one radix-4 modified-Booth digit.
//
// From three overlapping multiplier bits (x2 = x[2i+1], x1 = x[2i],
// x0 = x[2i-1]) it forms the signed digit b = -2*x2 + x1 + x0 in {-2..2},
// coded as sign s and one-hot magnitude bits d1 (|b| = 2) and d0 (|b| = 1).
// Zero is always coded with s = 0. Combinational.
module booth_digit_enc
  import arith_pkg::*;
(
  input  logic       x2,
  input  logic       x1,
  input  logic       x0,
  output sd4_digit_t b
);
  always_comb begin
    b.d0 = x1 ^ x0;
    b.d1 = (x2 & ~x1 & ~x0) | (~x2 & x1 & x0);
    b.s  = x2 & ~(x1 & x0);
  end
endmodule
