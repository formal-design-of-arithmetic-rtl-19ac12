// sd2tc: radix-2 signed-digit to two's complement converter.
//
// F = Fp - Fn where Fp and Fn collect the positive and negative bits of the
// digits (SD2PNB). The negative word is inverted (WCONT) and an unsigned
// ripple carry adder with carry-in 1 forms Fp + ~Fn + 1 = Fp - Fn modulo
// 2^W. The W-bit result is sign-extended to the W+1-bit output P, which is
// correct whenever the value of F fits in W-bit two's complement (true for
// every product of the multiplier). This is the only carry-propagating
// stage of the SD2,1 multiplier. Combinational.
module sd2tc
  import arith_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  sd2_digit_t [W-1:0] f,
  output logic [W:0]         p
);
  logic [W-1:0] fp, fn, sum;
  logic         cout;
  always_comb begin
    for (int k = 0; k < int'(W); k++) begin
      fp[k] = f[k].p;
      fn[k] = f[k].n;
    end
  end
  rca #(.W(W)) u_add (.a(fp), .b(~fn), .cin(1'b1), .s(sum), .cout(cout));
  assign p = {sum[W-1], sum};
endmodule
