// arith_top: the signed-digit multiplier and the arithmetic module library,
// side by side.
//
// The instances do not talk to each other; each has its own ports:
//   sdm_*   8-bit two's complement SD2,1 multiplier (sd_mult), P 17 bits.
//   add_*   one 64-bit two-operand adder of every algorithm, sharing the
//           operands a, b, cin; add_s[k]/add_cout[k] is algorithm k of
//           arith_pkg::adder_alg_e.
//   moa_*   one 32-operand 32-bit multi-operand adder of every algorithm
//           (arith_pkg::moa_alg_e order); operands are zero-extended to 37
//           bits so that moa_s[k] + moa_c[k] (mod 2^37) is the exact sum.
//   mul_*   32 x 32 unsigned parallel multiplier (radix-4 Booth, RB tree,
//           carry lookahead final adder).
//   cm_*    32-bit constant-coefficient multiplier, p = 299792458 * x.
//   mac_*   32-bit multiply accumulator, p = x0 * y0 + x1 + x2.
// Every path is combinational; there is no clock.
module arith_top
  import arith_pkg::*;
(
  input  logic [7:0]              sdm_x,
  input  logic [7:0]              sdm_y,
  output logic [16:0]             sdm_p,

  input  logic [63:0]             add_a,
  input  logic [63:0]             add_b,
  input  logic                    add_cin,
  output logic [10:0][63:0]       add_s,
  output logic [10:0]             add_cout,

  input  logic [31:0][31:0]       moa_ops,
  output logic [3:0][36:0]        moa_s,
  output logic [3:0][36:0]        moa_c,

  input  logic [31:0]             mul_x,
  input  logic [31:0]             mul_y,
  output logic [63:0]             mul_p,

  input  logic [31:0]             cm_x,
  output logic [63:0]             cm_p,

  input  logic [31:0]             mac_x0,
  input  logic [31:0]             mac_y0,
  input  logic [31:0]             mac_x1,
  input  logic [31:0]             mac_x2,
  output logic [63:0]             mac_p
);
  sd_mult #(.N(8)) u_sdm (.x(sdm_x), .y(sdm_y), .p(sdm_p));

  for (genvar k = 0; k < 11; k++) begin : g_add
    two_operand_adder #(.W(64), .ALG(adder_alg_e'(k))) u_add (
      .a(add_a), .b(add_b), .cin(add_cin), .s(add_s[k]), .cout(add_cout[k]));
  end

  logic [31:0][36:0] moa_ext;
  always_comb
    for (int i = 0; i < 32; i++) moa_ext[i] = 37'(moa_ops[i]);
  for (genvar k = 0; k < 4; k++) begin : g_moa
    multi_operand_adder #(.N(32), .W(37), .ALG(moa_alg_e'(k))) u_moa (
      .ops(moa_ext), .s(moa_s[k]), .c(moa_c[k]));
  end

  par_mult   u_mul (.x(mul_x), .y(mul_y), .p(mul_p));
  const_mult u_cm  (.x(cm_x), .p(cm_p));
  mac        u_mac (.x0(mac_x0), .y0(mac_y0), .x1(mac_x1), .x2(mac_x2), .p(mac_p));
endmodule
