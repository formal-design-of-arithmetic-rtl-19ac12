// const_mult: constant-coefficient multiplier, p = R * x.
//
// The coefficient R (a signed RW-bit constant) is recoded at elaboration into
// canonic signed-digit (CSD) form: digits in {-1,0,1}, no two adjacent
// digits non-zero, so at most about RW/2 of them are non-zero. Each non-zero
// digit k contributes x << k (or (~x) << k for -1); the 2^k that each
// inverted row lacks is gathered, being a constant, into one constant row.
// The rows are summed by a multi-operand adder (PPA) and a final stage adder
// (FSA). x is unsigned or two's complement (SIGNED); p is two's complement,
// N+RW bits, enough for every R and x. Defaults: 32-bit x, R = 299792458,
// Wallace tree and Kogge-Stone final adder. Combinational.
module const_mult
  import arith_pkg::*;
#(
  parameter int unsigned    N      = 32,
  parameter int unsigned    RW     = 32,
  parameter longint         R      = 299792458,
  parameter bit             SIGNED = 1'b0,
  parameter moa_alg_e       PPA    = MOA_WALLACE,
  parameter adder_alg_e     FSA    = ADD_KS
) (
  input  logic [N-1:0]    x,
  output logic [N+RW-1:0] p
);
  localparam int unsigned PW = N + RW;

  // CSD recoding: returns {negative-digit mask, positive-digit mask}.
  function automatic logic [1:0][RW:0] csd(longint r);
    logic [1:0][RW:0] m;
    longint v;
    m = '0;
    v = r;
    for (int k = 0; k <= int'(RW); k++) begin
      if (v % 2 != 0) begin
        if (((v % 4) + 4) % 4 == 1) begin m[0][k] = 1'b1; v = v - 1; end
        else                        begin m[1][k] = 1'b1; v = v + 1; end
      end
      v = v / 2;
    end
    return m;
  endfunction

  localparam logic [1:0][RW:0] DIG = csd(R);
  localparam logic [RW:0] POS = DIG[0];
  localparam logic [RW:0] NEG = DIG[1];

  // number of non-zero digits below position k
  function automatic int nz_below(int k);
    int n;
    n = 0;
    for (int j = 0; j < k; j++)
      if (POS[j] || NEG[j]) n++;
    return n;
  endfunction

  localparam int unsigned NZ   = nz_below(RW + 1);
  localparam int unsigned NOPS = NZ + 1;

  logic [PW-1:0]            xe;
  logic [NOPS-1:0][PW-1:0]  ops;
  logic [PW-1:0]            cs_s, cs_c;
  logic                     cout;

  assign xe = SIGNED ? PW'($signed(x)) : PW'(x);
  for (genvar k = 0; k <= RW; k++) begin : g_dig
    if (POS[k]) begin : g_pos
      assign ops[nz_below(k)] = xe << k;
    end else if (NEG[k]) begin : g_neg
      assign ops[nz_below(k)] = (~xe) << k;
    end
  end
  assign ops[NZ] = PW'(NEG);          // sum of 2^k over the negative digits

  multi_operand_adder #(.N(NOPS), .W(PW), .ALG(PPA)) u_ppa (.ops(ops), .s(cs_s), .c(cs_c));
  two_operand_adder #(.W(PW), .ALG(FSA)) u_fsa (.a(cs_s), .b(cs_c), .cin(1'b0), .s(p), .cout(cout));
endmodule
