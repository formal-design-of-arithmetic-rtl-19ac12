// tb_csa: random 64-bit and 7-bit operand triples; s + c must equal
// x + y + z modulo the width, and c[0] must be 0.
module tb_csa;
  int checks = 0, failures = 0;
  logic [63:0] x, y, z, s, c;
  logic [6:0]  s7, c7;
  csa           dut  (.x(x), .y(y), .z(z), .s(s), .c(c));
  csa #(.W(7))  dut7 (.x(x[6:0]), .y(y[6:0]), .z(z[6:0]), .s(s7), .c(c7));
  initial begin
    for (int n = 0; n < 5000; n++) begin
      x = {$urandom, $urandom};
      y = (n == 0) ? '1 : {$urandom, $urandom};
      z = (n == 0) ? '1 : {$urandom, $urandom};
      #1;
      checks += 2;
      if (s + c != x + y + z || c[0]) failures++;
      if (7'(s7 + c7) != 7'(x[6:0] + y[6:0] + z[6:0])) failures++;
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
