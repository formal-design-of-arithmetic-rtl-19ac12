// tb_sd2tc: random 16-digit signed-digit numbers F whose value lies in the
// 16-bit two's complement range (digits 15 and 14 kept zero) must convert
// to a 17-bit P equal to that value; for unrestricted random F the low 16
// bits of P must equal F modulo 2^16.
module tb_sd2tc
  import arith_pkg::*;
;
  int checks = 0, failures = 0;
  sd2_digit_t [15:0] f;
  logic [16:0]       p;
  sd2tc dut (.f(f), .p(p));
  initial begin
    for (int n = 0; n < 6000; n++) begin
      longint v;
      bit restrict_range;
      restrict_range = (n % 2 == 0);
      v = 0;
      for (int k = 15; k >= 0; k--) begin
        int r;
        r = int'($urandom_range(2));
        f[k] = (restrict_range && k >= 14) ? 2'b00 :
               (r == 0) ? 2'b00 : (r == 1) ? 2'b10 : 2'b01;
        v = 2 * v + sd2_value(f[k]);
      end
      #1;
      checks++;
      if (restrict_range ? (longint'($signed(p)) != v) : (p[15:0] != 16'(v))) begin
        failures++;
        if (failures < 10) $display("FAIL F=%0d -> P=%0d", v, $signed(p));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
