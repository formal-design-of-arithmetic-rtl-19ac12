// tb_booth_digit_enc: exhaustive check of one radix-4 Booth digit: for all
// eight (x2, x1, x0) the digit value must be -2*x2 + x1 + x0, the magnitude
// code one-hot or zero, and zero never marked negative.
module tb_booth_digit_enc
  import arith_pkg::*;
;
  int checks = 0, failures = 0;
  logic x2, x1, x0;
  sd4_digit_t b;
  booth_digit_enc dut (.x2(x2), .x1(x1), .x0(x0), .b(b));
  initial begin
    for (int v = 0; v < 8; v++) begin
      int expv, got;
      {x2, x1, x0} = 3'(v);
      #1;
      expv = -2 * int'(x2) + int'(x1) + int'(x0);
      got  = (b.s ? -1 : 1) * (2 * int'(b.d1) + int'(b.d0));
      checks++;
      if (got != expv || (b.d1 && b.d0) || (b.s && !b.d1 && !b.d0)) begin
        failures++;
        $display("FAIL %b%b%b -> %p (expected %0d)", x2, x1, x0, b, expv);
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
