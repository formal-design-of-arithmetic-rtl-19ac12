// vector_ppg: one partial product row PP = b * Y.
//
// Y is an N-bit two's complement number, b one radix-4 signed digit. The row
// has N+1 radix-2 signed digits (relative weights 2^0 .. 2^N), enough for
// |b*Y| <= 2^N; digit k is built by digit_ppg from y[k] and y[k-1], with
// y[-1] = y[N] = 0. No carries: every digit is independent. Combinational.
module vector_ppg
  import arith_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  sd4_digit_t         b,
  input  logic [N-1:0]       y,
  output sd2_digit_t [N:0]   pp
);
  logic [N+1:0] ye;             // ye[j+1] = y[j]; ye[0] = y[-1] = 0, ye[N+1] = y[N] = 0
  assign ye = {1'b0, y, 1'b0};
  for (genvar k = 0; k <= N; k++) begin : g_dig
    digit_ppg u_dig (
      .b      (b),
      .y_k    (ye[k+1]),
      .y_km1  (ye[k]),
      .neg_k  (1'(k == N-1)),
      .neg_km1(1'(k == N)),
      .pp     (pp[k])
    );
  end
endmodule
