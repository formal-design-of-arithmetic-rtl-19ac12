// tb_const_mult: the default constant multiplier p = 299792458 * x (32-bit
// unsigned x) and three more coefficients: -2^31 with two's complement x,
// 0x7fffffff (a long run of ones that CSD turns into two digits) and -7, each
// with its own algorithm choice. p must equal R * x as a two's complement
// number.
module tb_const_mult
  import arith_pkg::*;
;
  int checks = 0, failures = 0;
  logic [31:0] x;
  logic [63:0] p0, p1, p2, p3;
  const_mult dut (.x(x), .p(p0));
  const_mult #(.R(-64'sd2147483648), .SIGNED(1'b1), .PPA(MOA_RB), .FSA(ADD_CLA)) dut1 (.x(x), .p(p1));
  const_mult #(.R(64'sd2147483647), .PPA(MOA_ARRAY), .FSA(ADD_RCA))               dut2 (.x(x), .p(p2));
  const_mult #(.R(-64'sd7), .PPA(MOA_C42), .FSA(ADD_BK))                          dut3 (.x(x), .p(p3));
  initial begin
    for (int n = 0; n < 4000; n++) begin
      longint xs, xu;
      case (n)
        0: x = '0;
        1: x = '1;
        2: x = 32'h8000_0000;
        default: x = $urandom;
      endcase
      #1;
      xu = longint'(x);
      xs = longint'($signed(x));
      checks += 4;
      if (p0 != 64'(299792458 * xu)) begin
        failures++;
        if (failures < 5) $display("FAIL 299792458 * %0d = %0d", xu, p0);
      end
      if (p1 != 64'(-(64'sd2147483648) * xs)) begin failures++; if (failures < 5) $display("FAIL1 %h %h", x, p1); end
      if (p2 != 64'(2147483647 * xu)) begin failures++; if (failures < 5) $display("FAIL2 %h %h", x, p2); end
      if (p3 != 64'(-7 * xu)) failures++;
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
