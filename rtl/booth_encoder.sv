// booth_encoder: radix-4 Booth recoding of an N-bit two's complement X.
//
// Produces N/2 digits of the radix-4 signed-digit system with digit set
// {-2..2} (weights 4^0 .. 4^(N/2-1)) such that sum b[i]*4^i = X. Digit i
// looks at x[2i+1], x[2i] and x[2i-1] (x[-1] = 0); one booth_digit_enc per
// digit, all in parallel. N must be even (8 in the worked example).
// Combinational.
module booth_encoder
  import arith_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]          x,
  output sd4_digit_t [N/2-1:0]  b
);
  logic [N:0] xe;               // x with the implicit x[-1] = 0 at bit 0
  assign xe = {x, 1'b0};
  for (genvar i = 0; i < N/2; i++) begin : g_dig
    booth_digit_enc u_enc (.x2(xe[2*i+2]), .x1(xe[2*i+1]), .x0(xe[2*i]), .b(b[i]));
  end
endmodule
