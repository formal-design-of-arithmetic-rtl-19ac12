// tb_multi_operand_adder: one instance per algorithm (array, Wallace, (4;2),
// RB) with 10 operands of 20 bits plus the default 64 x 64-bit Wallace
// configuration; every s + c must equal the sum of the operands.
module tb_multi_operand_adder
  import arith_pkg::*;
;
  int checks = 0, failures = 0;
  logic [63:0][63:0]  ops;
  logic [63:0]        s, c;
  logic [9:0][19:0]   sm;
  logic [3:0][19:0]   ss, cc;

  multi_operand_adder dut (.ops(ops), .s(s), .c(c));
  for (genvar k = 0; k < 4; k++) begin : g_alg
    multi_operand_adder #(.N(10), .W(20), .ALG(moa_alg_e'(k))) u (.ops(sm), .s(ss[k]), .c(cc[k]));
  end

  initial begin
    for (int n = 0; n < 1500; n++) begin
      logic [63:0] e;
      logic [19:0] es;
      e = '0;
      es = '0;
      for (int i = 0; i < 64; i++) begin
        ops[i] = {$urandom, $urandom};
        e += ops[i];
      end
      for (int i = 0; i < 10; i++) begin
        sm[i] = (n == 0) ? '1 : 20'($urandom);
        es += sm[i];
      end
      #1;
      checks++;
      if (s + c != e) failures++;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (20'(ss[k] + cc[k]) != es) begin
          failures++;
          if (failures < 10) $display("FAIL algorithm %0d", k);
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
