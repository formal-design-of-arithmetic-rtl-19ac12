// tb_digit_rba: exhaustive check of the redundant-binary digit slice. For all
// digit codes of x and y (including the redundant zero) and both carries in,
// 2*c1 - 2*nc + z = x + y + c1_in - nc_in must hold. It also checks that the
// outgoing carries do not depend on the incoming ones (carry-free property).
module tb_digit_rba
  import arith_pkg::*;
;
  int checks = 0, failures = 0;
  sd2_digit_t x, y, z;
  logic c1_in, nc_in, c1, nc;
  digit_rba dut (.*);
  initial begin
    for (int v = 0; v < 16; v++) begin
      logic c1_ref, nc_ref;
      for (int ci = 0; ci < 4; ci++) begin
        int lhs, rhs;
        {x, y} = 4'(v);
        {c1_in, nc_in} = 2'(ci);
        #1;
        lhs = 2 * int'(c1) - 2 * int'(nc) + sd2_value(z);
        rhs = sd2_value(x) + sd2_value(y) + int'(c1_in) - int'(nc_in);
        checks++;
        if (lhs != rhs) begin
          failures++;
          $display("FAIL x=%p y=%p c1_in=%b nc_in=%b -> c1=%b nc=%b z=%p", x, y, c1_in, nc_in, c1, nc, z);
        end
        if (ci == 0) begin
          c1_ref = c1;
        end else begin
          checks++;
          if (c1 !== c1_ref) failures++;
        end
        if (nc_in == 1'b0) begin
          nc_ref = nc;
        end else begin
          checks++;
          if (nc !== nc_ref) failures++;
        end
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
