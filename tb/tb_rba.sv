// tb_rba: random 16-digit radix-2 signed-digit operands (every digit random
// in {-1,0,1}, plus the all +1 and all -1 extremes); the 17-digit sum must
// equal value(x) + value(y) exactly.
module tb_rba
  import arith_pkg::*;
;
  int checks = 0, failures = 0;
  sd2_digit_t [15:0] x, y;
  sd2_digit_t [16:0] s;
  rba dut (.x(x), .y(y), .s(s));

  function automatic sd2_digit_t rnd_digit();
    int r;
    r = int'($urandom_range(2));
    return (r == 0) ? 2'b00 : (r == 1) ? 2'b10 : 2'b01;
  endfunction

  task automatic check_sum();
    longint vx, vy, vs;
    #1;
    vx = 0; vy = 0; vs = 0;
    for (int k = 15; k >= 0; k--) begin
      vx = 2 * vx + sd2_value(x[k]);
      vy = 2 * vy + sd2_value(y[k]);
    end
    for (int k = 16; k >= 0; k--) vs = 2 * vs + sd2_value(s[k]);
    checks++;
    if (vs != vx + vy) begin
      failures++;
      if (failures < 10) $display("FAIL %0d + %0d -> %0d", vx, vy, vs);
    end
  endtask

  initial begin
    for (int k = 0; k < 16; k++) begin x[k] = 2'b10; y[k] = 2'b10; end
    check_sum();
    for (int k = 0; k < 16; k++) begin x[k] = 2'b01; y[k] = 2'b01; end
    check_sum();
    for (int k = 0; k < 16; k++) begin x[k] = 2'b10; y[k] = 2'b01; end
    check_sum();
    for (int n = 0; n < 5000; n++) begin
      for (int k = 0; k < 16; k++) begin x[k] = rnd_digit(); y[k] = rnd_digit(); end
      check_sum();
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
