// par_mult: parallel multiplier, PPG -> PPA -> FSA.
//
// p = x * y (2N bits). The partial product generator (mult_ppg: non-Booth or
// radix-4 modified Booth, unsigned or two's complement operands) feeds a
// partial product accumulator (multi_operand_adder, algorithm PPA) that
// reduces all rows to a carry-save pair, and a final stage adder
// (two_operand_adder, algorithm FSA) turns the pair into the binary product.
// Any combination of the parameters gives the same function. Defaults: 32-bit
// unsigned operands with radix-4 Booth, RB addition tree and carry lookahead
// final adder. Combinational.
module par_mult
  import arith_pkg::*;
#(
  parameter int unsigned N      = 32,
  parameter bit          SIGNED = 1'b0,
  parameter bit          BOOTH  = 1'b1,
  parameter moa_alg_e    PPA    = MOA_RB,
  parameter adder_alg_e  FSA    = ADD_CLA
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);
  localparam int unsigned NOPS = BOOTH ? N / 2 + 2 : N + 1;
  logic [NOPS-1:0][2*N-1:0] pp;
  logic [2*N-1:0]           cs_s, cs_c;
  logic                     cout;

  mult_ppg #(.N(N), .SIGNED(SIGNED), .BOOTH(BOOTH), .NOPS(NOPS)) u_ppg (.x(x), .y(y), .pp(pp));
  multi_operand_adder #(.N(NOPS), .W(2*N), .ALG(PPA)) u_ppa (.ops(pp), .s(cs_s), .c(cs_c));
  two_operand_adder #(.W(2*N), .ALG(FSA)) u_fsa (.a(cs_s), .b(cs_c), .cin(1'b0), .s(p), .cout(cout));
endmodule
