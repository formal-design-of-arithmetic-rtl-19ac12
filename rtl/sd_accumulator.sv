// sd_accumulator: partial product accumulator of the SD2,1 multiplier.
//
// Adds the N/2 signed-digit partial products (already aligned in a 2N-digit
// frame) with a tree of redundant-binary adders and returns their sum F as a
// 2N-digit radix-2 signed-digit number (F{15}..F{0} for N = 8). For N = 8 the
// tree is RBA0 = PP0 + PP1, RBA1 = PP2 + PP3, RBA2 = RBA0 + RBA1. The RBAs
// here span the full frame with constant-zero digits where a row has none,
// and F keeps digits 0..2N-1 only; F is therefore exact modulo 2^(2N), which
// is all the following converter needs (the product fits in 2N bits).
// Combinational; no carry propagates anywhere in the accumulator.
module sd_accumulator
  import arith_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  sd2_digit_t [N/2-1:0][2*N-1:0] pp,
  output sd2_digit_t [2*N-1:0]          f
);
  rb_adder_tree #(.N(N/2), .W(2*N)) u_tree (.ops(pp), .sum(f));
endmodule
