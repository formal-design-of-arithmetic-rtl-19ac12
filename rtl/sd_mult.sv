// sd_mult: N x N two's complement multiplier in the radix-2 signed-digit
// (SD2,1) number system, P = X * Y.
//
// Four stages, all combinational:
//   booth_encoder   X -> N/2 radix-4 digits B in {-2..2}  (B = X)
//   sd_ppg          PP[i] = B{i} * Y, N+1 signed digits each, weight 4^i
//   sd_accumulator  F = sum PP[i] by a tree of carry-free RB adders
//   sd2tc           P = F converted to two's complement (one carry chain)
// With the default N = 8 this is the 8-bit example: X, Y 8-bit TC, B four
// radix-4 digits, PP[0..3] over digits [8:0], [10:2], [12:4], [14:6], F
// digits [15:0] and P 17 bits. The stage structure and digit ranges follow
// the design; the bit-level encodings of the signed digits are this
// design's own. N must be even and at least 4.
module sd_mult
  import arith_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]  x,
  input  logic [N-1:0]  y,
  output logic [2*N:0]  p
);
  sd4_digit_t [N/2-1:0]           b;
  sd2_digit_t [N/2-1:0][2*N-1:0]  pp;
  sd2_digit_t [2*N-1:0]           f;

  booth_encoder  #(.N(N))     u0_booth (.x(x), .b(b));
  sd_ppg         #(.N(N))     u1_ppg   (.b(b), .y(y), .pp(pp));
  sd_accumulator #(.N(N))     u2_acc   (.pp(pp), .f(f));
  sd2tc          #(.W(2*N))   u3_conv  (.f(f), .p(p));
endmodule
