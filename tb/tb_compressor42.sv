// tb_compressor42: random 64-bit operand quadruples (and all-ones); s + c
// must equal the sum of the four modulo 2^64.
module tb_compressor42;
  int checks = 0, failures = 0;
  logic [63:0] x0, x1, x2, x3, s, c;
  compressor42 dut (.*);
  initial begin
    for (int n = 0; n < 5000; n++) begin
      x0 = (n == 0) ? '1 : {$urandom, $urandom};
      x1 = (n == 0) ? '1 : {$urandom, $urandom};
      x2 = (n == 0) ? '1 : {$urandom, $urandom};
      x3 = (n == 0) ? '1 : {$urandom, $urandom};
      #1;
      checks++;
      if (s + c != x0 + x1 + x2 + x3) failures++;
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
