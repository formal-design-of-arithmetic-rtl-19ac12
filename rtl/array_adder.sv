// array_adder: multi-operand adder as a linear array of carry-save adders.
//
// N W-bit operands are reduced to two words s, c with s + c = sum of the
// operands (mod 2^W). The first CSA adds operands 0..2, each further CSA adds
// one more operand to the running (s, c) pair, so the depth is N-2 full
// adders: the smallest and slowest partial product accumulator. N >= 3.
// Combinational.
module array_adder #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 64
) (
  input  logic [N-1:0][W-1:0] ops,
  output logic [W-1:0]        s,
  output logic [W-1:0]        c
);
  logic [N-1:1][W-1:0] rs, rc;   // running pair after each CSA
  assign rs[1] = ops[0];
  assign rc[1] = ops[1];
  for (genvar k = 2; k < N; k++) begin : g_stage
    csa #(.W(W)) u_csa (.x(rs[k-1]), .y(rc[k-1]), .z(ops[k]), .s(rs[k]), .c(rc[k]));
  end
  assign s = rs[N-1];
  assign c = rc[N-1];
endmodule
