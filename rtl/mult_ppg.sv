// mult_ppg: partial product generator of the parallel multiplier.
//
// Produces NOPS partial products of width 2N whose sum is X * Y modulo
// 2^(2N) (exact, since the product fits in 2N bits):
//   BOOTH = 0 (non-Booth): row j = x[j] ? Y : 0, shifted by j; N rows.
//   BOOTH = 1 (radix-4 modified Booth): X is extended by two bits (sign or
//     zero) to N+2 bits and recoded into N/2+1 digits in {-2..2}; row i is
//     |b_i| * Y shifted by 2i, inverted when b_i is negative. N/2+1 rows.
// Negative rows are formed as ~v << k, which equals -(v << k) - 2^k; the
// missing 2^k of every negative row (the Booth sign bits, or the MSB row of
// a two's complement multiplier) is collected in one extra correction row,
// the last operand. SIGNED selects two's complement (1) or unsigned binary
// (0) operands. N must be even. Combinational.
module mult_ppg
  import arith_pkg::*;
#(
  parameter int unsigned N      = 32,
  parameter bit          SIGNED = 1'b0,
  parameter bit          BOOTH  = 1'b1,
  parameter int unsigned NOPS   = BOOTH ? N / 2 + 2 : N + 1
) (
  input  logic [N-1:0]               x,
  input  logic [N-1:0]               y,
  output logic [NOPS-1:0][2*N-1:0]   pp
);
  localparam int unsigned PW = 2 * N;
  logic [PW-1:0] ye;
  assign ye = SIGNED ? PW'($signed(y)) : PW'(y);

  if (BOOTH) begin : g_booth
    localparam int unsigned ND = N / 2 + 1;
    logic [N+1:0]          xe;
    sd4_digit_t [ND-1:0]   b;
    assign xe = SIGNED ? {{2{x[N-1]}}, x} : {2'b00, x};
    booth_encoder #(.N(N + 2)) u_enc (.x(xe), .b(b));
    always_comb begin
      logic [PW-1:0] corr, m;
      corr = '0;
      for (int i = 0; i < int'(ND); i++) begin
        m = b[i].d1 ? (ye << 1) : (b[i].d0 ? ye : '0);
        pp[i] = (b[i].s ? ~m : m) << (2 * i);
        corr[2*i] = b[i].s;
      end
      pp[ND] = corr;
    end
  end else begin : g_plain
    always_comb begin
      logic [PW-1:0] m;
      for (int j = 0; j < int'(N); j++) begin
        m = x[j] ? ye : '0;
        pp[j] = (SIGNED && j == int'(N) - 1) ? (~m << j) : (m << j);
      end
      pp[N] = SIGNED ? (PW'(1) << (N - 1)) : '0;
    end
  end
endmodule
