// two_operand_adder: two-operand adder of a selectable algorithm.
//
// {cout, s} = a + b + cin. ALG picks one of the eleven adder algorithms of
// the library (arith_pkg::adder_alg_e); all have the same interface and the
// same function and differ only in structure, delay and area. Used as the
// final stage adder of the multipliers and the multiply accumulator.
// Combinational.
module two_operand_adder
  import arith_pkg::*;
#(
  parameter int unsigned W   = 64,
  parameter adder_alg_e  ALG = ADD_KS
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  case (ALG)
    ADD_RCA:       begin : g_rca  rca                   #(.W(W)) u (.*); end
    ADD_CLA:       begin : g_cla  cla_adder             #(.W(W)) u (.*); end
    ADD_RB_CLA:    begin : g_rbc  ripple_block_cla      #(.W(W)) u (.*); end
    ADD_BLOCK_CLA: begin : g_bcla block_cla             #(.W(W)) u (.*); end
    ADD_KS:        begin : g_ks   kogge_stone_adder     #(.W(W)) u (.*); end
    ADD_BK:        begin : g_bk   brent_kung_adder      #(.W(W)) u (.*); end
    ADD_HC:        begin : g_hc   han_carlson_adder     #(.W(W)) u (.*); end
    ADD_CSEL:      begin : g_csel carry_select_adder    #(.W(W)) u (.*); end
    ADD_CSUM:      begin : g_csum conditional_sum_adder #(.W(W)) u (.*); end
    ADD_CSKIP:     begin : g_skip carry_skip_adder      #(.W(W)) u (.*); end
    default:       begin : g_vsk  var_carry_skip_adder  #(.W(W)) u (.*); end
  endcase
endmodule
