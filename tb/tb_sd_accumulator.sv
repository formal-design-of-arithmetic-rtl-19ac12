// tb_sd_accumulator: four random partial product rows shaped like the
// multiplier's (digits only in [2i+8 : 2i] of row i); F must equal the sum
// of the row values modulo 2^16.
module tb_sd_accumulator
  import arith_pkg::*;
;
  int checks = 0, failures = 0;
  sd2_digit_t [3:0][15:0] pp;
  sd2_digit_t [15:0]      f;
  sd_accumulator dut (.pp(pp), .f(f));
  initial begin
    for (int n = 0; n < 4000; n++) begin
      longint e, vf;
      e = 0;
      for (int i = 0; i < 4; i++) begin
        longint row;
        row = 0;
        for (int k = 15; k >= 0; k--) begin
          int r;
          r = int'($urandom_range(2));
          pp[i][k] = (k < 2 * i || k > 2 * i + 8) ? 2'b00 :
                     (r == 0) ? 2'b00 : (r == 1) ? 2'b10 : 2'b01;
          row = 2 * row + sd2_value(pp[i][k]);
        end
        e += row;
      end
      #1;
      vf = 0;
      for (int k = 15; k >= 0; k--) vf = 2 * vf + sd2_value(f[k]);
      checks++;
      if (16'(vf) != 16'(e)) begin
        failures++;
        if (failures < 10) $display("FAIL sum %0d -> F %0d", e, vf);
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
