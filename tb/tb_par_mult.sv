// tb_par_mult: the default 32 x 32 unsigned multiplier (radix-4 Booth, RB
// tree, carry lookahead) and the three configurations compared as Types A,
// B and C (Kogge-Stone + Wallace + Booth, Han-Carlson + array + non-Booth,
// block CLA + (4;2) tree + non-Booth, all unsigned), plus a two's complement
// Booth one, on random and corner-case operands; every product must equal
// x * y.
module tb_par_mult
  import arith_pkg::*;
;
  int checks = 0, failures = 0;
  logic [31:0] x, y;
  logic [63:0] p_def, p_a, p_b, p_c, p_s;
  par_mult dut (.x(x), .y(y), .p(p_def));
  par_mult #(.PPA(MOA_WALLACE), .FSA(ADD_KS))                       dut_a (.x(x), .y(y), .p(p_a));
  par_mult #(.BOOTH(1'b0), .PPA(MOA_ARRAY), .FSA(ADD_HC))           dut_b (.x(x), .y(y), .p(p_b));
  par_mult #(.BOOTH(1'b0), .PPA(MOA_C42), .FSA(ADD_BLOCK_CLA))      dut_c (.x(x), .y(y), .p(p_c));
  par_mult #(.SIGNED(1'b1), .PPA(MOA_RB), .FSA(ADD_CSEL))           dut_s (.x(x), .y(y), .p(p_s));
  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic [63:0] eu, es;
      case (n)
        0: begin x = '1; y = '1; end
        1: begin x = 32'h8000_0000; y = 32'h8000_0000; end
        2: begin x = 32'h8000_0000; y = 32'h7fff_ffff; end
        3: begin x = '0; y = '1; end
        default: begin x = $urandom; y = $urandom; end
      endcase
      #1;
      eu = 64'(x) * 64'(y);
      es = 64'($signed(x)) * 64'($signed(y));
      checks += 5;
      if (p_def != eu) failures++;
      if (p_a != eu) failures++;
      if (p_b != eu) failures++;
      if (p_c != eu) failures++;
      if (p_s != es) failures++;
      if (failures > 0 && failures < 4) $display("FAIL x=%h y=%h", x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
