// mac: multiply accumulator, p = x0 * y0 + x1 + x2.
//
// The partial products of x0 * y0 (mult_ppg) and the two addends x1, x2
// (extended to 2N bits) all enter one partial product accumulator, which
// returns a carry-save pair; one final stage adder produces p. 2N output
// bits always hold the result: for unsigned operands the maximum is exactly
// 2^(2N) - 1. Defaults: 32-bit unsigned operands, radix-4 Booth, Wallace
// tree and ripple carry final adder. Combinational.
module mac
  import arith_pkg::*;
#(
  parameter int unsigned N      = 32,
  parameter bit          SIGNED = 1'b0,
  parameter bit          BOOTH  = 1'b1,
  parameter moa_alg_e    PPA    = MOA_WALLACE,
  parameter adder_alg_e  FSA    = ADD_RCA
) (
  input  logic [N-1:0]   x0,
  input  logic [N-1:0]   y0,
  input  logic [N-1:0]   x1,
  input  logic [N-1:0]   x2,
  output logic [2*N-1:0] p
);
  localparam int unsigned NPP  = BOOTH ? N / 2 + 2 : N + 1;
  localparam int unsigned NOPS = NPP + 2;
  logic [NPP-1:0][2*N-1:0]  pp;
  logic [NOPS-1:0][2*N-1:0] ops;
  logic [2*N-1:0]           cs_s, cs_c;
  logic                     cout;

  mult_ppg #(.N(N), .SIGNED(SIGNED), .BOOTH(BOOTH), .NOPS(NPP)) u_ppg (.x(x0), .y(y0), .pp(pp));
  assign ops = {(SIGNED ? (2*N)'($signed(x2)) : (2*N)'(x2)),
                (SIGNED ? (2*N)'($signed(x1)) : (2*N)'(x1)),
                pp};
  multi_operand_adder #(.N(NOPS), .W(2*N), .ALG(PPA)) u_ppa (.ops(ops), .s(cs_s), .c(cs_c));
  two_operand_adder #(.W(2*N), .ALG(FSA)) u_fsa (.a(cs_s), .b(cs_c), .cin(1'b0), .s(p), .cout(cout));
endmodule
