// wallace_tree: multi-operand adder as a Wallace tree of carry-save adders.
//
// N W-bit operands are reduced to s, c with s + c = sum (mod 2^W). At each
// level the operands are taken in groups of three, every group goes through
// one csa (3 -> 2), and the at most two left over pass to the next level
// unchanged; levels repeat until two words remain. The depth is about
// log_{1.5}(N/2) full adders. The operand count of every level is computed
// at elaboration (cnt); N >= 1. Combinational.
module wallace_tree #(
  parameter int unsigned N = 64,
  parameter int unsigned W = 64
) (
  input  logic [N-1:0][W-1:0] ops,
  output logic [W-1:0]        s,
  output logic [W-1:0]        c
);
  // operands present at level l
  function automatic int cnt(int l);
    int n;
    n = int'(N);
    for (int i = 0; i < l; i++) if (n > 2) n = 2 * (n / 3) + n % 3;
    return n;
  endfunction
  // number of levels until at most two operands remain
  function automatic int levels();
    int l;
    l = 0;
    while (cnt(l) > 2) l++;
    return l;
  endfunction

  localparam int unsigned L = levels();
  logic [L:0][N-1:0][W-1:0] lv;

  assign lv[0] = ops;
  for (genvar l = 0; l < L; l++) begin : g_level
    localparam int unsigned NI = cnt(l);
    localparam int unsigned G  = NI / 3;
    localparam int unsigned R  = NI % 3;
    for (genvar k = 0; k < G; k++) begin : g_csa
      csa #(.W(W)) u_csa (.x(lv[l][3*k]), .y(lv[l][3*k+1]), .z(lv[l][3*k+2]),
                          .s(lv[l+1][2*k]), .c(lv[l+1][2*k+1]));
    end
    for (genvar r = 0; r < R; r++) begin : g_pass
      assign lv[l+1][2*G+r] = lv[l][3*G+r];
    end
    for (genvar u = 2 * G + R; u < N; u++) begin : g_unused
      assign lv[l+1][u] = '0;
    end
  end
  assign s = lv[L][0];
  assign c = (cnt(L) > 1) ? lv[L][1 % N] : '0;
endmodule
