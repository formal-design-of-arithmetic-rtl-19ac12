// tb_vector_ppg: for every Booth digit b in {-2..2} and every 8-bit two's
// complement Y (exhaustive) the 9-digit signed-digit row must have the value
// b * Y.
module tb_vector_ppg
  import arith_pkg::*;
;
  int checks = 0, failures = 0;
  sd4_digit_t       b;
  logic [7:0]       y;
  sd2_digit_t [8:0] pp;
  vector_ppg dut (.b(b), .y(y), .pp(pp));
  initial begin
    for (int bv = -2; bv <= 2; bv++)
      for (int v = 0; v < 256; v++) begin
        int got;
        b.s  = (bv < 0);
        b.d1 = (bv == 2 || bv == -2);
        b.d0 = (bv == 1 || bv == -1);
        y = 8'(v);
        #1;
        got = 0;
        for (int k = 8; k >= 0; k--) got = 2 * got + sd2_value(pp[k]);
        checks++;
        if (got != bv * int'($signed(y))) begin
          failures++;
          if (failures < 10) $display("FAIL b=%0d y=%0d -> %0d", bv, $signed(y), got);
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
