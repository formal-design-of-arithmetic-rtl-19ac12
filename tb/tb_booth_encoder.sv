// tb_booth_encoder: for every 8-bit two's complement X (exhaustive) checks
// that the four radix-4 digits are in {-2..2} and that sum b[i]*4^i = X;
// then 2000 random 16-bit values on a 16-bit instance.
module tb_booth_encoder
  import arith_pkg::*;
;
  int checks = 0, failures = 0;
  logic [7:0]          x8;
  sd4_digit_t [3:0]    b8;
  logic [15:0]         x16;
  sd4_digit_t [7:0]    b16;
  booth_encoder             dut8  (.x(x8), .b(b8));
  booth_encoder #(.N(16))   dut16 (.x(x16), .b(b16));

  function automatic int dval(sd4_digit_t d);
    return (d.s ? -1 : 1) * (2 * int'(d.d1) + int'(d.d0));
  endfunction

  initial begin
    for (int v = 0; v < 256; v++) begin
      int sum;
      x8 = 8'(v);
      #1;
      sum = 0;
      for (int i = 3; i >= 0; i--) sum = 4 * sum + dval(b8[i]);
      checks++;
      if (sum != int'($signed(x8))) begin
        failures++;
        $display("FAIL x=%0d recoded as %0d", $signed(x8), sum);
      end
    end
    for (int k = 0; k < 2000; k++) begin
      int sum;
      x16 = 16'($urandom);
      #1;
      sum = 0;
      for (int i = 7; i >= 0; i--) sum = 4 * sum + dval(b16[i]);
      checks++;
      if (sum != int'($signed(x16))) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d recoded as %0d", $signed(x16), sum);
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
