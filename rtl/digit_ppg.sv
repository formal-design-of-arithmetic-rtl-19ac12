// digit_ppg: one signed digit of a partial product b * Y.
//
// Digit k of b*Y (b in {-2..2}) is b0*y'[k] + b1*y'[k-1] where y'[j] is bit j
// of Y with its two's complement weight sign (negative for the MSB). The
// caller passes the two candidate bits and whether each is the MSB (negative
// weight); the digit is then +1, -1 or 0 and lands in the radix-2
// signed-digit system {-1,0,1} as a (p, n) pair. Combinational.
module digit_ppg
  import arith_pkg::*;
(
  input  sd4_digit_t b,
  input  logic       y_k,      // Y bit of the same weight  (selected when |b| = 1)
  input  logic       y_km1,    // Y bit one place lower     (selected when |b| = 2)
  input  logic       neg_k,    // y_k carries a negative weight
  input  logic       neg_km1,  // y_km1 carries a negative weight
  output sd2_digit_t pp
);
  logic t, neg;
  always_comb begin
    t      = (b.d0 & y_k) | (b.d1 & y_km1);
    neg    = b.s ^ ((b.d0 & neg_k) | (b.d1 & neg_km1));
    pp.p   = t & ~neg;
    pp.n   = t & neg;
  end
endmodule
