// tb_compressor42_tree: multi-operand addition with compressor42_tree at its default size and at small
// operand counts (3, 4, 5 and 7 operands of 12 bits, which exercise the
// pass-through and remainder paths). Operands are random, all-ones or
// all-zero; s + c must equal the sum of the operands modulo the width.
module tb_compressor42_tree;
  int checks = 0, failures = 0;
  localparam int unsigned ND = 64;
  logic [ND-1:0][63:0] ops;
  logic [63:0]         s, c;
  logic [6:0][11:0]    sm;
  logic [11:0]         s3, c3, s4, c4, s5, c5, s7, c7;

  compressor42_tree                     dut  (.ops(ops), .s(s), .c(c));
  compressor42_tree #(.N(3), .W(12))    dut3 (.ops(sm[2:0]), .s(s3), .c(c3));
  compressor42_tree #(.N(4), .W(12))    dut4 (.ops(sm[3:0]), .s(s4), .c(c4));
  compressor42_tree #(.N(5), .W(12))    dut5 (.ops(sm[4:0]), .s(s5), .c(c5));
  compressor42_tree #(.N(7), .W(12))    dut7 (.ops(sm), .s(s7), .c(c7));

  initial begin
    for (int n = 0; n < 1500; n++) begin
      logic [63:0] e;
      logic [11:0] e3, e4, e5, e7;
      e = '0;
      for (int i = 0; i < int'(ND); i++) begin
        ops[i] = (n == 0) ? '1 : (n == 1) ? '0 : {$urandom, $urandom};
        e += ops[i];
      end
      e3 = '0; e4 = '0; e5 = '0; e7 = '0;
      for (int i = 0; i < 7; i++) begin
        sm[i] = (n == 0) ? '1 : 12'($urandom);
        if (i < 3) e3 += sm[i];
        if (i < 4) e4 += sm[i];
        if (i < 5) e5 += sm[i];
        e7 += sm[i];
      end
      #1;
      checks += 5;
      if (s + c != e) begin
        failures++;
        if (failures < 10) $display("FAIL N=%0d: %h + %h != %h", ND, s, c, e);
      end
      if (12'(s3 + c3) != e3) failures++;
      if (12'(s4 + c4) != e4) failures++;
      if (12'(s5 + c5) != e5) failures++;
      if (12'(s7 + c7) != e7) failures++;
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
