// tb_full_adder: exhaustive check of full_adder, 2*c + s = x + y + z for all
// eight input combinations. Prints the TB_RESULT line; a watchdog ends a
// hung run.
module tb_full_adder;
  int checks = 0, failures = 0;
  logic x, y, z, s, c;
  full_adder dut (.x(x), .y(y), .z(z), .s(s), .c(c));
  initial begin
    for (int v = 0; v < 8; v++) begin
      {x, y, z} = 3'(v);
      #1;
      checks++;
      if (2 * int'(c) + int'(s) != int'(x) + int'(y) + int'(z)) begin
        failures++;
        $display("FAIL %b%b%b -> c=%b s=%b", x, y, z, c, s);
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
