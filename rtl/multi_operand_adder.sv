// multi_operand_adder: multi-input two-output adder of a selectable
// algorithm.
//
// s + c = sum of the N operands (mod 2^W). ALG picks the array, Wallace tree,
// (4;2) compressor tree or RB addition tree (arith_pkg::moa_alg_e); all share
// this interface and differ in structure only. Used as the partial product
// accumulator of the multipliers. Combinational.
module multi_operand_adder
  import arith_pkg::*;
#(
  parameter int unsigned N   = 64,
  parameter int unsigned W   = 64,
  parameter moa_alg_e    ALG = MOA_WALLACE
) (
  input  logic [N-1:0][W-1:0] ops,
  output logic [W-1:0]        s,
  output logic [W-1:0]        c
);
  if (ALG == MOA_ARRAY && N >= 3) begin : g_array
    array_adder #(.N(N), .W(W)) u (.*);
  end else if (ALG == MOA_C42) begin : g_c42
    compressor42_tree #(.N(N), .W(W)) u (.*);
  end else if (ALG == MOA_RB) begin : g_rb
    rb_addition_tree #(.N(N), .W(W)) u (.*);
  end else begin : g_wallace
    wallace_tree #(.N(N), .W(W)) u (.*);
  end
endmodule
