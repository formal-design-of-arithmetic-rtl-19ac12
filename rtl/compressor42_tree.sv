// compressor42_tree: multi-operand adder as a tree of (4;2) compressors.
//
// N W-bit operands are reduced to s, c with s + c = sum (mod 2^W). Each level
// takes the operands four at a time through compressor42 (4 -> 2); a
// remainder of three goes through one csa, a remainder of one or two passes
// unchanged. Levels repeat until two words remain, roughly halving the count
// each time. The operand count of every level is computed at elaboration
// (cnt); N >= 1. Combinational.
module compressor42_tree #(
  parameter int unsigned N = 64,
  parameter int unsigned W = 64
) (
  input  logic [N-1:0][W-1:0] ops,
  output logic [W-1:0]        s,
  output logic [W-1:0]        c
);
  function automatic int cnt(int l);
    int n;
    n = int'(N);
    for (int i = 0; i < l; i++)
      if (n > 2) n = 2 * (n / 4) + ((n % 4 == 3) ? 2 : n % 4);
    return n;
  endfunction
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
    localparam int unsigned G  = NI / 4;
    localparam int unsigned R  = NI % 4;
    localparam int unsigned NO = cnt(l + 1);
    for (genvar k = 0; k < G; k++) begin : g_c42
      compressor42 #(.W(W)) u_c42 (.x0(lv[l][4*k]), .x1(lv[l][4*k+1]), .x2(lv[l][4*k+2]),
                                   .x3(lv[l][4*k+3]), .s(lv[l+1][2*k]), .c(lv[l+1][2*k+1]));
    end
    if (R == 3) begin : g_rem3
      csa #(.W(W)) u_csa (.x(lv[l][4*G]), .y(lv[l][4*G+1]), .z(lv[l][4*G+2]),
                          .s(lv[l+1][2*G]), .c(lv[l+1][2*G+1]));
    end else begin : g_remp
      for (genvar r = 0; r < R; r++) begin : g_pass
        assign lv[l+1][2*G+r] = lv[l][4*G+r];
      end
    end
    for (genvar u = NO; u < N; u++) begin : g_unused
      assign lv[l+1][u] = '0;
    end
  end
  assign s = lv[L][0];
  assign c = (cnt(L) > 1) ? lv[L][1 % N] : '0;
endmodule
