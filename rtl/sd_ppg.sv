// sd_ppg: signed-digit partial product generator of the SD2,1 multiplier.
//
// For each of the N/2 radix-4 Booth digits B{i} it forms the row
// PP[i] = B{i} * Y as an (N+1)-digit radix-2 signed-digit number with
// weights 2^(2i) .. 2^(2i+N) (PP0..PP3 with digit ranges [8:0], [10:2],
// [12:4], [14:6] for N = 8). The rows are returned already aligned in a
// 2N-digit frame, zero digits outside their range, so that
// sum PP[i] = B * Y = X * Y. Combinational.
module sd_ppg
  import arith_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  sd4_digit_t [N/2-1:0]               b,
  input  logic [N-1:0]                       y,
  output sd2_digit_t [N/2-1:0][2*N-1:0]      pp
);
  for (genvar i = 0; i < N/2; i++) begin : g_row
    sd2_digit_t [N:0] row;
    vector_ppg #(.N(N)) u_row (.b(b[i]), .y(y), .pp(row));
    always_comb begin
      pp[i] = '0;
      for (int k = 0; k <= int'(N); k++)
        if (2*i + k < 2*int'(N)) pp[i][2*i+k] = row[k];
    end
  end
endmodule
