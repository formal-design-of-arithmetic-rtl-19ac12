// rba: redundant-binary adder, S = X + Y, carry-propagation free.
//
// X and Y are W-digit radix-2 signed-digit numbers (digits in {-1,0,1}),
// S has W+1 digits and equals X + Y exactly. A row of digit_rba slices, each
// taking only the two carries of its right neighbour, so the delay is that of
// two full adders for any W. Digit 0 receives no carries (c1 = 0, and the
// negative carry input held at "none"). Combinational.
module rba
  import arith_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  sd2_digit_t [W-1:0] x,
  input  sd2_digit_t [W-1:0] y,
  output sd2_digit_t [W:0]   s
);
  logic [W:0] c1, nc;
  assign c1[0] = 1'b0;
  assign nc[0] = 1'b0;
  for (genvar k = 0; k < W; k++) begin : g_dig
    digit_rba u_dig (.x(x[k]), .y(y[k]), .c1_in(c1[k]), .nc_in(nc[k]),
                     .c1(c1[k+1]), .nc(nc[k+1]), .z(s[k]));
  end
  // Top digit: what is left of the two carries.
  assign s[W].p = c1[W];
  assign s[W].n = nc[W];
endmodule
