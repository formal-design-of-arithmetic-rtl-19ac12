// tb_rb_adder_tree: sums of 4 and of 5 random 16-digit signed-digit numbers
// through the RB adder tree; the result must equal the sum of the operand
// values modulo 2^16.
module tb_rb_adder_tree
  import arith_pkg::*;
;
  int checks = 0, failures = 0;
  sd2_digit_t [4:0][15:0] ops;
  sd2_digit_t [15:0]      sum4, sum5;
  rb_adder_tree                 dut4 (.ops(ops[3:0]), .sum(sum4));
  rb_adder_tree #(.N(5), .W(16)) dut5 (.ops(ops), .sum(sum5));

  function automatic longint val(sd2_digit_t [15:0] d);
    longint v;
    v = 0;
    for (int k = 15; k >= 0; k--) v = 2 * v + sd2_value(d[k]);
    return v;
  endfunction

  initial begin
    for (int n = 0; n < 4000; n++) begin
      longint e4, e5;
      for (int i = 0; i < 5; i++)
        for (int k = 0; k < 16; k++) begin
          int r;
          r = int'($urandom_range(2));
          ops[i][k] = (r == 0) ? 2'b00 : (r == 1) ? 2'b10 : 2'b01;
        end
      #1;
      e4 = 0;
      for (int i = 0; i < 4; i++) e4 += val(ops[i]);
      e5 = e4 + val(ops[4]);
      checks += 2;
      if (16'(val(sum4)) != 16'(e4)) failures++;
      if (16'(val(sum5)) != 16'(e5)) failures++;
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
